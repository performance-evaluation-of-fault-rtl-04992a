// bft_switch: switch of the fault-tolerant butterfly fat tree, with NC child
// ports (5: four children plus the spare S1) and NPAR parent ports (3: two
// parents plus the spare S2), the port counts of the fault-tolerant BFT. The
// spare switches use the same module. It is a wh_switch with an lca_route
// unit on every input; ports 0..NC-1 are children, NC.. are parents.
// child_ok/parent_ok mark which links are usable under the permanent fault
// map. Handshake and timing as in wh_switch.
module bft_switch
  import noc_pkg::*;
#(
  parameter int unsigned LEVEL     = 1,
  parameter int unsigned NC        = 5,
  parameter int unsigned NPAR      = 3,
  parameter bit          ANY_CHILD = 1'b0,
  localparam int unsigned NP       = NC + NPAR
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NC-1:0]   child_ok,
  input  logic [NPAR-1:0] parent_ok,
  input  flit_t           in_flit  [NP],
  input  logic [NP-1:0]   in_valid,
  output logic [NP-1:0]   in_ready,
  output flit_t           out_flit [NP],
  output logic [NP-1:0]   out_valid,
  input  logic [NP-1:0]   out_ready
);
  flit_t          hd_flit [NP];
  logic [NP-1:0]  hd_req;
  logic [NP-1:0]  pref [NP];
  logic [NP-1:0]  alt  [NP];

  wh_switch #(.NP(NP)) u_sw (
    .clk, .rst_n,
    .in_flit, .in_valid, .in_ready,
    .out_flit, .out_valid, .out_ready,
    .hd_flit, .hd_req,
    .route_pref(pref), .route_alt(alt)
  );

  for (genvar i = 0; i < NP; i++) begin : g_rt
    lca_route #(.LEVEL(LEVEL), .NC(NC), .NPAR(NPAR), .ANY_CHILD(ANY_CHILD)) u_rt (
      .src_id(flit_src(hd_flit[i])), .dst_id(flit_dst(hd_flit[i])),
      .in_port(4'(i)), .child_ok, .parent_ok,
      .route_pref(pref[i]), .route_alt(alt[i])
    );
  end
endmodule
