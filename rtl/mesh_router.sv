// mesh_router: five-port switch of the mesh network (local IP, north, east,
// south, west), with a fault-tolerant routing unit on every input.
//
// It is a wh_switch with NP=5 and, per input, either a negative-first unit
// (route_nf, the default: it tolerated the most faults in the evaluation) or
// an odd-even unit (route_oe), chosen by ROUTING. link_ok tells which of the
// four neighbour links can be used; the mesh drives it from the permanent
// link and switch fault map. The switch position is given by the MY_ID
// parameter (y*MESH_X + x). Port numbering follows noc_pkg (0 local, 1 north,
// 2 east, 3 south, 4 west); each port has a flit/valid/ready input and output.
module mesh_router
  import noc_pkg::*;
#(
  parameter int unsigned MESH_X  = 8,
  parameter int unsigned MESH_Y  = 8,
  parameter int unsigned MY_ID   = 0,
  parameter routing_e    ROUTING = ROUTE_NEG_FIRST
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [3:0]  link_ok,     // {W, S, E, N}
  input  flit_t       in_flit  [5],
  input  logic [4:0]  in_valid,
  output logic [4:0]  in_ready,
  output flit_t       out_flit [5],
  output logic [4:0]  out_valid,
  input  logic [4:0]  out_ready
);
  flit_t       hd_flit [5];
  logic [4:0]  hd_req;
  logic [4:0]  pref [5];
  logic [4:0]  alt  [5];

  wh_switch #(.NP(5)) u_sw (
    .clk, .rst_n,
    .in_flit, .in_valid, .in_ready,
    .out_flit, .out_valid, .out_ready,
    .hd_flit, .hd_req,
    .route_pref(pref), .route_alt(alt)
  );

  for (genvar i = 0; i < 5; i++) begin : g_rt
    if (ROUTING == ROUTE_NEG_FIRST) begin : g_nf
      route_nf #(.MESH_X(MESH_X), .MESH_Y(MESH_Y)) u_rt (
        .cur_id(ID_W'(MY_ID)), .dst_id(flit_dst(hd_flit[i])),
        .in_port(3'(i)), .link_ok,
        .route_pref(pref[i]), .route_alt(alt[i])
      );
    end else begin : g_oe
      route_oe #(.MESH_X(MESH_X), .MESH_Y(MESH_Y)) u_rt (
        .cur_id(ID_W'(MY_ID)), .src_id(flit_src(hd_flit[i])), .dst_id(flit_dst(hd_flit[i])),
        .in_port(3'(i)), .link_ok,
        .route_pref(pref[i]), .route_alt(alt[i])
      );
    end
  end
endmodule
