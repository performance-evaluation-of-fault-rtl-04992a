// tb_route_nf: checks the negative-first routing unit of an 8x8 mesh.
//  1. For every (current, destination) pair with all links good: the local
//     port exactly at the destination; otherwise a non-empty set of
//     productive directions, only west/south while an offset is negative and
//     only east/north after that (negative-first order).
//  2. With random link faults no unusable link is ever offered.
//  3. Hop-by-hop walks through a mesh with one random faulty link, taking the
//     first offered direction each hop: every walk that is not cut off from
//     its destination by the fault must arrive, and fault-free walks must
//     take exactly the Manhattan distance.
//  4. The edge case: a packet on the south edge whose west link is dead is
//     sent one hop north.
module tb_route_nf;
  import noc_pkg::*;
  localparam int MX = 8, MY = 8;
  logic [5:0] cur_id, dst_id;
  logic [2:0] in_port;
  logic [3:0] link_ok;
  logic [4:0] route_pref, route_alt;
  int checks = 0, failures = 0;

  route_nf #(.MESH_X(MX), .MESH_Y(MY)) dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // usable[d] of node n for a mesh whose only faulty link is (fa, fb)
  function automatic logic [3:0] ok_of(int n, int fa, int fb);
    int x, y, nb[4];
    logic [3:0] ok;
    x = n % MX; y = n / MX;
    nb[0] = n + MX; nb[1] = n + 1; nb[2] = n - MX; nb[3] = n - 1;
    ok[0] = (y < MY-1); ok[1] = (x < MX-1); ok[2] = (y > 0); ok[3] = (x > 0);
    for (int d = 0; d < 4; d++)
      if ((n == fa && nb[d] == fb) || (n == fb && nb[d] == fa)) ok[d] = 1'b0;
    return ok;
  endfunction

  initial begin
    int xc, yc, xd, yd, dx, dy, hops, n, arrived, walks;
    logic [4:0] prod, allowed, pick;
    in_port = 3'(P_LOCAL);
    // 1. fault-free rules
    for (int c = 0; c < 64; c++)
      for (int d = 0; d < 64; d++) begin
        cur_id = 6'(c); dst_id = 6'(d); link_ok = 4'hf; #1;
        xc = c % MX; yc = c / MX; xd = d % MX; yd = d / MX; dx = xd - xc; dy = yd - yc;
        checks++;
        if (c == d) begin
          if (route_pref != 5'b00001) begin failures++; $display("local %0d", c); end
        end else begin
          prod = '0;
          prod[P_NORTH] = dy > 0; prod[P_SOUTH] = dy < 0; prod[P_EAST] = dx > 0; prod[P_WEST] = dx < 0;
          allowed = (dx < 0 || dy < 0) ? (prod & 5'b11000) : prod;
          if (route_pref == '0 || (route_pref & ~allowed) != '0 || (route_alt & ~allowed) != '0) begin
            failures++; $display("ff %0d->%0d pref %b alt %b", c, d, route_pref, route_alt);
          end
        end
      end
    // 2. never offer an unusable link
    for (int i = 0; i < 20000; i++) begin
      cur_id = 6'($urandom_range(0, 63)); dst_id = 6'($urandom_range(0, 63));
      link_ok = 4'($urandom); in_port = 3'($urandom_range(0, 4)); #1;
      xc = int'(cur_id) % MX; yc = int'(cur_id) / MX;
      allowed = 5'b00001;
      allowed[P_NORTH] = link_ok[0] && yc < MY-1; allowed[P_EAST] = link_ok[1] && xc < MX-1;
      allowed[P_SOUTH] = link_ok[2] && yc > 0;    allowed[P_WEST] = link_ok[3] && xc > 0;
      checks++;
      if (((route_pref | route_alt) & ~allowed) != '0) begin failures++; $display("unusable offered"); end
    end
    // 3. walks with one faulty link
    arrived = 0; walks = 0;
    for (int t = 0; t < 3000; t++) begin
      int s, d, fa, fb, fd;
      s = $urandom_range(0, 63); d = $urandom_range(0, 63);
      fa = $urandom_range(0, 63); fd = $urandom_range(0, 3);
      fb = (fd == 0) ? fa + MX : (fd == 1) ? fa + 1 : (fd == 2) ? fa - MX : fa - 1;
      if (t < 500) begin fa = -1; fb = -1; end
      n = s; hops = 0; in_port = 3'(P_LOCAL);
      while (n != d && hops < 64) begin
        cur_id = 6'(n); dst_id = 6'(d); link_ok = ok_of(n, fa, fb); #1;
        pick = (route_pref != '0) ? route_pref : route_alt;
        if (pick[P_NORTH])      begin n = n + MX; in_port = 3'(P_SOUTH); end
        else if (pick[P_EAST])  begin n = n + 1;  in_port = 3'(P_WEST);  end
        else if (pick[P_SOUTH]) begin n = n - MX; in_port = 3'(P_NORTH); end
        else if (pick[P_WEST])  begin n = n - 1;  in_port = 3'(P_EAST);  end
        else break;
        hops++;
      end
      walks++;
      checks++;
      if (n == d) arrived++;
      else begin failures++; $display("walk %0d->%0d with fault %0d-%0d stuck at %0d", s, d, fa, fb, n); end
      if (fa < 0) begin
        checks++;
        xc = s % MX; yc = s / MX; xd = d % MX; yd = d / MX;
        dx = (xd > xc) ? xd - xc : xc - xd; dy = (yd > yc) ? yd - yc : yc - yd;
        if (hops != dx + dy) begin failures++; $display("non-minimal fault-free path"); end
      end
    end
    $display("walks %0d arrived %0d", walks, arrived);
    // 4. south-edge exception: node (5,0) to (2,0), west link dead -> north
    cur_id = 6'(5); dst_id = 6'(2); link_ok = 4'b0111; in_port = 3'(P_LOCAL); #1;
    checks++;
    if (route_pref != (5'b1 << P_NORTH)) begin failures++; $display("edge exception %b", route_pref); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
