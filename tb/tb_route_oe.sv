// tb_route_oe: checks the odd-even routing unit of an 8x8 mesh.
//  1. Fault-free hop-by-hop walks for all 4096 (source, destination) pairs,
//     choosing at random among the offered directions: every walk arrives in
//     the Manhattan distance, and no walk turns east->north/south in an even
//     column or north/south->west in an odd column.
//  2. Random link faults: no unusable link is ever offered.
//  3. A minimal direction blocked by a fault is replaced by a detour: a walk
//     from (2,3) to (5,3) whose east link at (2,3) is dead still arrives.
module tb_route_oe;
  import noc_pkg::*;
  localparam int MX = 8, MY = 8;
  logic [5:0] cur_id, src_id, dst_id;
  logic [2:0] in_port;
  logic [3:0] link_ok;
  logic [4:0] route_pref, route_alt;
  int checks = 0, failures = 0;

  route_oe #(.MESH_X(MX), .MESH_Y(MY)) dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one hop: returns next node, updates in_port; -1 when nothing offered
  function automatic int step(int n, logic [4:0] pick, ref logic [2:0] ip);
    if (pick[P_NORTH]) begin ip = 3'(P_SOUTH); return n + MX; end
    if (pick[P_EAST])  begin ip = 3'(P_WEST);  return n + 1;  end
    if (pick[P_SOUTH]) begin ip = 3'(P_NORTH); return n - MX; end
    if (pick[P_WEST])  begin ip = 3'(P_EAST);  return n - 1;  end
    return -1;
  endfunction

  function automatic logic [4:0] one_of(logic [4:0] m);
    int c, k;
    c = $countones(m);
    if (c == 0) return '0;
    k = $urandom_range(0, c - 1);
    for (int i = 0; i < 5; i++)
      if (m[i]) begin
        if (k == 0) return 5'b1 << i;
        k--;
      end
    return '0;
  endfunction

  initial begin
    int n, nxt, hops, xc, yc, mdist, arrived;
    logic [4:0] pick, allowed;
    // 1. fault-free walks
    for (int s = 0; s < 64; s++)
      for (int d = 0; d < 64; d++) begin
        n = s; hops = 0; in_port = 3'(P_LOCAL);
        src_id = 6'(s); dst_id = 6'(d); link_ok = 4'hf;
        while (hops < 40) begin
          cur_id = 6'(n); #1;
          if (n == d) begin
            checks++;
            if (route_pref != 5'b00001) begin failures++; $display("no local at %0d", d); end
            break;
          end
          pick = one_of(route_pref);
          xc = n % MX;
          checks++;
          if (xc % 2 == 0 && in_port == 3'(P_WEST) && (pick[P_NORTH] || pick[P_SOUTH])) begin
            failures++; $display("E->N/S turn in even column %0d (%0d->%0d)", xc, s, d);
          end
          if (xc % 2 == 1 && (in_port == 3'(P_NORTH) || in_port == 3'(P_SOUTH)) && pick[P_WEST]) begin
            failures++; $display("N/S->W turn in odd column %0d (%0d->%0d)", xc, s, d);
          end
          nxt = step(n, pick, in_port);
          if (nxt < 0) break;
          n = nxt; hops++;
        end
        mdist = ((d % MX > s % MX) ? d % MX - s % MX : s % MX - d % MX)
             + ((d / MX > s / MX) ? d / MX - s / MX : s / MX - d / MX);
        checks++;
        if (n != d || hops != mdist) begin failures++; $display("walk %0d->%0d: at %0d after %0d hops", s, d, n, hops); end
      end
    // 2. never offer an unusable link
    for (int i = 0; i < 20000; i++) begin
      cur_id = 6'($urandom_range(0, 63)); dst_id = 6'($urandom_range(0, 63)); src_id = 6'($urandom_range(0, 63));
      link_ok = 4'($urandom); in_port = 3'($urandom_range(0, 4)); #1;
      xc = int'(cur_id) % MX; yc = int'(cur_id) / MX;
      allowed = 5'b00001;
      allowed[P_NORTH] = link_ok[0] && yc < MY-1; allowed[P_EAST] = link_ok[1] && xc < MX-1;
      allowed[P_SOUTH] = link_ok[2] && yc > 0;    allowed[P_WEST] = link_ok[3] && xc > 0;
      checks++;
      if (((route_pref | route_alt) & ~allowed) != '0) begin failures++; $display("unusable offered"); end
    end
    // 3. detour around a dead east link at (2,3)
    n = 3*MX + 2; hops = 0; in_port = 3'(P_LOCAL); src_id = 6'(n); dst_id = 6'(3*MX + 5); arrived = 0;
    while (hops < 30) begin
      cur_id = 6'(n);
      link_ok = (n == 3*MX + 2) ? 4'b1101 : 4'hf; #1;
      if (n == int'(dst_id)) begin arrived = 1; break; end
      pick = (route_pref != '0) ? route_pref : route_alt;
      if (route_pref == '0) pick = one_of(route_alt);
      else pick = one_of(route_pref);
      nxt = step(n, pick, in_port);
      if (nxt < 0) break;
      n = nxt; hops++;
    end
    checks++;
    if (!arrived) begin failures++; $display("detour failed, at %0d", n); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
