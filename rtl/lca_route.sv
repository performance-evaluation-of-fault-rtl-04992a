// lca_route: least-common-ancestor routing unit of one butterfly-fat-tree
// switch at level LEVEL (level 1 holds the IPs' switches).
//
// A switch at level l sees a subtree of 4^l IPs. The upper M = ID_W - 2*l
// bits of the source and destination ids are compared bit by bit (XOR): if
// any bit differs the two IPs have no common ancestor at or below this level
// and a head flit that came from a child goes up; otherwise, and always for
// a flit that came from a parent, it goes down to child dst[2l-1:2l-2].
//
// Port numbering: children 0..NC-1 (child 4 of a regular switch is the spare
// switch S1 of the fault-tolerant BFT), parents NC..NC+NPAR-1 (parent 2 is the
// spare S2). Fault handling: going up, any usable regular parent link may be
// taken (the switch takes whichever is free); the spare parent only when both
// regular ones are faulty. Going down, a faulty child link is replaced by the
// link to child 4 (S1), which reaches every IP of the block through the
// crossbar. With ANY_CHILD set (the spare switch S1 itself) children 0..3 all
// lead to the crossbar, so any usable one is taken. The LCA comparison
// follows the document; the fall-back order is this design's choice.
// Combinational.
module lca_route
  import noc_pkg::*;
#(
  parameter int unsigned LEVEL     = 1,
  parameter int unsigned NC        = 5,
  parameter int unsigned NPAR      = 3,
  parameter bit          ANY_CHILD = 1'b0,
  localparam int unsigned NP       = NC + NPAR
) (
  input  logic [ID_W-1:0] src_id,
  input  logic [ID_W-1:0] dst_id,
  input  logic [3:0]      in_port,
  input  logic [NC-1:0]   child_ok,
  input  logic [NPAR-1:0] parent_ok,
  output logic [NP-1:0]   route_pref,
  output logic [NP-1:0]   route_alt
);
  localparam int unsigned LO = 2 * LEVEL;   // lowest compared bit
  localparam bit          HAS_SPARE_UP = (NPAR > 2);
  localparam bit          HAS_SPARE_DN = (NC > 4);
  localparam int unsigned SPARE_UP_IX  = HAS_SPARE_UP ? NC + 2 : 0;
  localparam int unsigned SPARE_DN_IX  = HAS_SPARE_DN ? 4 : 0;

  logic [ID_W-1:0] diff;
  logic            go_up;
  logic [1:0]      child;

  assign diff  = (src_id ^ dst_id) >> LO;
  assign go_up = (int'(in_port) < int'(NC)) && (diff != '0);
  assign child = 2'(dst_id >> (LO - 2));

  always_comb begin
    route_pref = '0;
    route_alt  = '0;
    if (go_up) begin
      for (int unsigned p = 0; p < NPAR && p < 2; p++)
        route_pref[NC+p] = parent_ok[p];
      if (HAS_SPARE_UP && route_pref == '0) route_pref[SPARE_UP_IX] = parent_ok[NPAR-1];
    end else if (ANY_CHILD) begin
      for (int unsigned c = 0; c < 4 && c < NC; c++) route_pref[c] = child_ok[c];
    end else begin
      route_pref[int'(child)] = child_ok[int'(child)];
      if (HAS_SPARE_DN && !child_ok[int'(child)]) route_pref[SPARE_DN_IX] = child_ok[NC-1];
    end
  end
endmodule
