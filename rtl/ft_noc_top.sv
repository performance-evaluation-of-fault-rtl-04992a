// ft_noc_top: the two fault-tolerant 64-IP networks side by side.
//
//  * mesh: an 8x8 mesh whose switches route with the fault-tolerant
//    negative-first algorithm (ROUTING selects odd-even instead), steering
//    around faulty links and switches given by a permanent fault map;
//  * bft: a butterfly fat tree whose 16-IP blocks carry spare switches S1, S2
//    and a crossbar, so that traffic can be rerouted around faulty switches
//    and links of the tree.
// The two networks share only clock and reset; each brings out its own IP
// ports and fault map (see mesh_noc and ft_bft for the meaning of each).
// Every IP port is a valid/ready flit channel; BFT IPs have a second pair
// (bftx_*) through the spare crossbar, used when their level-1 switch is dead.
// Timing: each switch adds two cycles to a head flit and then streams one flit
// per cycle, in both networks.
// The two networks, their sizes (64 IPs, 2-flit buffers, 16-flit messages in
// the evaluation) and the routing schemes follow the design being implemented;
// putting both in one top with separate ports is this design's own choice, as
// they are alternatives evaluated separately.
module ft_noc_top
  import noc_pkg::*;
#(
  parameter routing_e ROUTING = ROUTE_NEG_FIRST
) (
  input  logic        clk,
  input  logic        rst_n,
  // ---- mesh network ----
  input  logic [63:0] mesh_node_fault,
  input  logic [55:0] mesh_hlink_fault,
  input  logic [55:0] mesh_vlink_fault,
  input  flit_t       mesh_in_flit   [64],
  input  logic [63:0] mesh_in_valid,
  output logic [63:0] mesh_in_ready,
  output flit_t       mesh_out_flit  [64],
  output logic [63:0] mesh_out_valid,
  input  logic [63:0] mesh_out_ready,
  // ---- fault-tolerant BFT ----
  input  logic [31:0] bft_sw_fault,
  input  logic [31:0] bft_l1_link_fault,
  input  logic [3:0]  bft_top_sw_fault,
  input  logic [15:0] bft_top_link_fault,
  input  flit_t       bft_in_flit    [64],
  input  logic [63:0] bft_in_valid,
  output logic [63:0] bft_in_ready,
  output flit_t       bft_out_flit   [64],
  output logic [63:0] bft_out_valid,
  input  logic [63:0] bft_out_ready,
  input  flit_t       bftx_in_flit   [64],
  input  logic [63:0] bftx_in_valid,
  output logic [63:0] bftx_in_ready,
  output flit_t       bftx_out_flit  [64],
  output logic [63:0] bftx_out_valid,
  input  logic [63:0] bftx_out_ready
);
  mesh_noc #(.MESH_X(8), .MESH_Y(8), .ROUTING(ROUTING)) u_mesh (
    .clk, .rst_n,
    .node_fault(mesh_node_fault), .hlink_fault(mesh_hlink_fault), .vlink_fault(mesh_vlink_fault),
    .ip_in_flit(mesh_in_flit),   .ip_in_valid(mesh_in_valid),   .ip_in_ready(mesh_in_ready),
    .ip_out_flit(mesh_out_flit), .ip_out_valid(mesh_out_valid), .ip_out_ready(mesh_out_ready)
  );

  ft_bft u_bft (
    .clk, .rst_n,
    .sw_fault(bft_sw_fault), .l1_link_fault(bft_l1_link_fault),
    .top_sw_fault(bft_top_sw_fault), .top_link_fault(bft_top_link_fault),
    .ip_in_flit(bft_in_flit),    .ip_in_valid(bft_in_valid),    .ip_in_ready(bft_in_ready),
    .ip_out_flit(bft_out_flit),  .ip_out_valid(bft_out_valid),  .ip_out_ready(bft_out_ready),
    .ipx_in_flit(bftx_in_flit),  .ipx_in_valid(bftx_in_valid),  .ipx_in_ready(bftx_in_ready),
    .ipx_out_flit(bftx_out_flit), .ipx_out_valid(bftx_out_valid), .ipx_out_ready(bftx_out_ready)
  );
endmodule
