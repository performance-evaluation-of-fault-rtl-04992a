// mesh_noc: MESH_X x MESH_Y mesh network, one IP per switch (8x8 = 64 IPs by
// default, the system size of the evaluation).
//
// Switch n = y*MESH_X + x sits at column x, row y; north is y+1, east x+1.
// Every switch is a mesh_router; neighbours are joined by a pair of opposite
// flit/valid/ready channels. Permanent faults are given as a map: node_fault
// marks a dead switch, hlink_fault[y*(MESH_X-1)+x] the link between (x,y) and
// (x+1,y), vlink_fault[y*MESH_X+x] the link between (x,y) and (x,y+1). A
// switch treats a neighbour link as unusable when the link or the switch at
// its far end is faulty, and its routing unit steers around it. A faulty
// link or switch still carries nothing: its channels are cut (valid and ready
// forced low), so a packet can never cross a fault. The IP of a dead switch is
// cut off too. ip_in_* injects packets from IP n into its switch, ip_out_*
// delivers packets to IP n. Each hop takes two cycles without contention.
module mesh_noc
  import noc_pkg::*;
#(
  parameter int unsigned MESH_X  = 8,
  parameter int unsigned MESH_Y  = 8,
  parameter routing_e    ROUTING = ROUTE_NEG_FIRST,
  localparam int unsigned NN     = MESH_X * MESH_Y
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [NN-1:0]                 node_fault,
  input  logic [(MESH_X-1)*MESH_Y-1:0]  hlink_fault,
  input  logic [MESH_X*(MESH_Y-1)-1:0]  vlink_fault,
  input  flit_t                         ip_in_flit  [NN],
  input  logic [NN-1:0]                 ip_in_valid,
  output logic [NN-1:0]                 ip_in_ready,
  output flit_t                         ip_out_flit [NN],
  output logic [NN-1:0]                 ip_out_valid,
  input  logic [NN-1:0]                 ip_out_ready
);
  flit_t       r_in_flit  [NN][5];
  flit_t       r_out_flit [NN][5];
  logic [4:0]  r_in_valid  [NN];
  logic [4:0]  r_in_ready  [NN];
  logic [4:0]  r_out_valid [NN];
  logic [4:0]  r_out_ready [NN];
  logic [3:0]  link_ok     [NN];   // {W, S, E, N}

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int unsigned N = y*MESH_X + x;
      // usable[d]: link in direction d exists, it and both end switches are good
      logic [4:0] usable;
      assign usable[P_LOCAL] = !node_fault[N];
      assign link_ok[N] = usable[4:1];

      mesh_router #(.MESH_X(MESH_X), .MESH_Y(MESH_Y), .MY_ID(N), .ROUTING(ROUTING)) u_r (
        .clk, .rst_n,
        .link_ok  (link_ok[N]),
        .in_flit  (r_in_flit[N]),  .in_valid (r_in_valid[N]),  .in_ready (r_in_ready[N]),
        .out_flit (r_out_flit[N]), .out_valid(r_out_valid[N]), .out_ready(r_out_ready[N])
      );

      // local port
      assign r_in_flit[N][P_LOCAL]   = ip_in_flit[N];
      assign r_in_valid[N][P_LOCAL]  = ip_in_valid[N] && usable[P_LOCAL];
      assign ip_in_ready[N]          = r_in_ready[N][P_LOCAL] && usable[P_LOCAL];
      assign ip_out_flit[N]          = r_out_flit[N][P_LOCAL];
      assign ip_out_valid[N]         = r_out_valid[N][P_LOCAL] && usable[P_LOCAL];
      assign r_out_ready[N][P_LOCAL] = ip_out_ready[N] && usable[P_LOCAL];

      // neighbour ports: input d of this switch is fed by output opp(d) of the
      // neighbour in direction d
      for (genvar d = 1; d < 5; d++) begin : g_d
        localparam int unsigned OPP = (d == P_NORTH) ? P_SOUTH : (d == P_SOUTH) ? P_NORTH :
                                      (d == P_EAST)  ? P_WEST  : P_EAST;
        localparam int          NB  = (d == P_NORTH) ? int'(N + MESH_X) : (d == P_SOUTH) ? int'(N) - int'(MESH_X) :
                                      (d == P_EAST)  ? int'(N + 1)      : int'(N) - 1;
        localparam bit          HAS = (d == P_NORTH) ? (y < MESH_Y-1) : (d == P_SOUTH) ? (y > 0) :
                                      (d == P_EAST)  ? (x < MESH_X-1) : (x > 0);
        if (HAS) begin : g_link
          localparam bit HORIZ = (d == P_EAST) || (d == P_WEST);
          // index of the link in its fault vector, counted from its west/south end
          localparam int LX = (d == P_WEST) ? int'(x) - 1 : int'(x);
          localparam int LY = (d == P_SOUTH) ? int'(y) - 1 : int'(y);
          logic link_bad;
          if (HORIZ) begin : g_h
            assign link_bad = hlink_fault[LY*(MESH_X-1) + LX];
          end else begin : g_v
            assign link_bad = vlink_fault[LY*MESH_X + LX];
          end
          assign usable[d]         = !node_fault[N] && !node_fault[NB] && !link_bad;
          assign r_in_flit[N][d]   = r_out_flit[NB][OPP];
          assign r_in_valid[N][d]  = r_out_valid[NB][OPP] && usable[d];
          assign r_out_ready[N][d] = r_in_ready[NB][OPP] && usable[d];
        end else begin : g_edge
          assign usable[d]         = 1'b0;
          assign r_in_flit[N][d]   = '0;
          assign r_in_valid[N][d]  = 1'b0;
          assign r_out_ready[N][d] = 1'b0;
        end
      end
    end
  end
endmodule
