// route_oe: odd-even turn model routing unit for one mesh switch.
//
// Turns are restricted by column parity instead of being forbidden outright:
// east->north and east->south turns are not taken in even columns, north->west
// and south->west turns not in odd columns. The minimal route set follows the
// usual odd-even routing function:
//   dx = 0            : north or south (local port when dy = 0 too)
//   dx > 0, dy = 0    : east
//   dx > 0, dy != 0   : north/south if the current column is odd or is the
//                       source column; east if the destination column is odd
//                       or more than one column away
//   dx < 0            : west; north/south too if the current column is even
// Directions whose link is unusable (link_ok low, or off the mesh) are removed;
// what is left is route_pref. When every minimal direction is blocked,
// route_alt offers any usable neighbour except the one the flit came from, so
// the packet can be routed around the fault. That fallback is this design's
// own choice: the document shows a detour around faults only by example.
// Combinational.
module route_oe
  import noc_pkg::*;
#(
  parameter int unsigned MESH_X = 8,
  parameter int unsigned MESH_Y = 8
) (
  input  logic [ID_W-1:0] cur_id,
  input  logic [ID_W-1:0] src_id,
  input  logic [ID_W-1:0] dst_id,
  input  logic [2:0]      in_port,   // port the head flit arrived on
  input  logic [3:0]      link_ok,   // {W, S, E, N}
  output logic [4:0]      route_pref,
  output logic [4:0]      route_alt
);
  always_comb begin
    int xc, yc, xd, yd, xs, dx, dy;
    logic [4:0] ok, allow;
    xc = int'(cur_id) % MESH_X;
    yc = int'(cur_id) / MESH_X;
    xd = int'(dst_id) % MESH_X;
    yd = int'(dst_id) / MESH_X;
    xs = int'(src_id) % MESH_X;
    dx = xd - xc;
    dy = yd - yc;
    ok = '0;
    ok[P_NORTH] = link_ok[0] && (yc < int'(MESH_Y) - 1);
    ok[P_EAST]  = link_ok[1] && (xc < int'(MESH_X) - 1);
    ok[P_SOUTH] = link_ok[2] && (yc > 0);
    ok[P_WEST]  = link_ok[3] && (xc > 0);
    allow = '0;
    if (dx == 0) begin
      if (dy == 0)     allow[P_LOCAL] = 1'b1;
      else if (dy > 0) allow[P_NORTH] = 1'b1;
      else             allow[P_SOUTH] = 1'b1;
    end else if (dx > 0) begin
      if (dy == 0) begin
        allow[P_EAST] = 1'b1;
      end else begin
        if ((xc % 2) == 1 || xc == xs) begin
          allow[P_NORTH] = (dy > 0);
          allow[P_SOUTH] = (dy < 0);
        end
        if ((xd % 2) == 1 || dx != 1) allow[P_EAST] = 1'b1;
      end
    end else begin
      allow[P_WEST] = 1'b1;
      if ((xc % 2) == 0) begin
        allow[P_NORTH] = (dy > 0);
        allow[P_SOUTH] = (dy < 0);
      end
    end
    route_pref = allow & (ok | 5'b00001);
    route_alt  = '0;
    if (route_pref == '0) begin
      route_alt = ok;
      if (in_port != 3'(P_LOCAL)) route_alt[in_port] = 1'b0;
    end
  end
endmodule
