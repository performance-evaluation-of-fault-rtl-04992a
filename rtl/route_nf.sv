// route_nf: fault-tolerant negative-first routing unit for one mesh switch.
//
// Given the switch's own coordinates, the destination id of a head flit and
// which of the four neighbour links are usable (link_ok: a link is unusable
// when it or the switch behind it is faulty, or when it would leave the mesh),
// it returns the outputs the head flit may take: route_pref (wanted) and
// route_alt (taken only when no wanted output is free). Combinational.
//
// Rules (ids are y*MESH_X + x; north is y+1, east x+1, south y-1, west x-1):
//  * offsets 0/0: the local port.
//  * Negative phase, any offset negative: go west/south towards the
//    destination, preferring a hop that does not land on a negative edge
//    (x=0 or y=0). If both productive negative links are blocked, go further
//    west or south than the destination. If no negative hop is possible, go
//    one hop perpendicular (north when west is blocked, east when south is).
//  * Positive phase, both offsets >= 0: go east/north, preferring the hop that
//    does not bring an offset to zero while the other is still non-zero. If
//    the productive links are blocked, step sideways (west/south first, so that
//    the packet re-enters the negative phase from a fresh column or row).
//  * Of two wanted directions, the one leading back through the input port
//    is demoted to route_alt, which stops a packet bouncing between two
//    switches next to a fault.
//  * Edge exception: a packet for a destination on the west (south) edge that
//    was just pushed off that edge (it is one column (row) away and arrived
//    through the west (south) port) moves along the neighbouring column (row)
//    towards the destination and steps back onto the edge with its last hop,
//    so a blocked edge path is walked around.
// The rules follow the document's summary of the fault-tolerant
// negative-first algorithm; the preference ordering between two allowed
// directions and the sideways fallback are this design's choices, because a
// stateless per-hop unit cannot count the "one hop perpendicular, two hops
// toward the destination, one hop back" sequence the document gives.
module route_nf
  import noc_pkg::*;
#(
  parameter int unsigned MESH_X = 8,
  parameter int unsigned MESH_Y = 8
) (
  input  logic [ID_W-1:0] cur_id,
  input  logic [ID_W-1:0] dst_id,
  input  logic [2:0]      in_port,   // port the head flit arrived on
  input  logic [3:0]      link_ok,   // {W, S, E, N}
  output logic [4:0]      route_pref,
  output logic [4:0]      route_alt
);
  always_comb begin
    int xc, yc, xd, yd, dx, dy;
    logic okN, okE, okS, okW;
    logic [4:0] prod, edge_hop, back;
    xc = int'(cur_id) % MESH_X;
    yc = int'(cur_id) / MESH_X;
    xd = int'(dst_id) % MESH_X;
    yd = int'(dst_id) / MESH_X;
    dx = xd - xc;
    dy = yd - yc;
    okN = link_ok[0] && (yc < int'(MESH_Y) - 1);
    okE = link_ok[1] && (xc < int'(MESH_X) - 1);
    okS = link_ok[2] && (yc > 0);
    okW = link_ok[3] && (xc > 0);
    route_pref = '0;
    route_alt  = '0;
    prod       = '0;
    edge_hop   = '0;
    back       = 5'b1 << in_port;
    if (dx == 0 && dy == 0) begin
      route_pref[P_LOCAL] = 1'b1;
    end else if (dx == -1 && xd == 0 && dy > 0 && okN && in_port == 3'(P_WEST)) begin
      route_pref[P_NORTH] = 1'b1;          // west-edge destination
    end else if (dy == -1 && yd == 0 && dx > 0 && okE && in_port == 3'(P_SOUTH)) begin
      route_pref[P_EAST] = 1'b1;           // south-edge destination
    end else if (dx < 0 || dy < 0) begin
      // negative phase
      prod[P_WEST]  = (dx < 0) && okW;
      prod[P_SOUTH] = (dy < 0) && okS;
      edge_hop[P_WEST]  = (xc == 1);
      edge_hop[P_SOUTH] = (yc == 1);
      if (prod != '0) begin
        route_pref = prod & ~edge_hop;
        route_alt  = prod & edge_hop;
        if (route_pref == '0) begin
          route_pref = route_alt;
          route_alt  = '0;
        end
      end else begin
        route_pref[P_WEST]  = (dx >= 0) && okW;
        route_pref[P_SOUTH] = (dy >= 0) && okS;
        if (route_pref == '0) begin
          route_pref[P_NORTH] = (dx < 0) && okN;
          route_pref[P_EAST]  = (dy < 0) && okE;
        end
      end
    end else begin
      // positive phase
      prod[P_EAST]  = (dx > 0) && okE;
      prod[P_NORTH] = (dy > 0) && okN;
      if (prod != '0) begin
        route_pref[P_EAST]  = prod[P_EAST]  && (dx > 1 || dy == 0);
        route_pref[P_NORTH] = prod[P_NORTH] && (dy > 1 || dx == 0);
        route_alt = prod & ~route_pref;
        if (route_pref == '0) begin
          route_pref = route_alt;
          route_alt  = '0;
        end
      end else begin
        route_pref[P_WEST]  = (dx == 0 || dy > 0) && okW;
        route_pref[P_SOUTH] = (dy == 0 || dx > 0) && okS;
        route_alt[P_EAST]   = (dx == 0) && okE;
        route_alt[P_NORTH]  = (dy == 0) && okN;
      end
    end
    // never turn straight back while another wanted direction exists
    if (in_port != 3'(P_LOCAL) && route_pref[in_port] && (route_pref & ~back) != '0) begin
      route_pref = route_pref & ~back;
      route_alt  = route_alt | back;
    end
  end
endmodule
