// tb_lca_route: checks the LCA routing unit at level 1 (regular and spare S1
// flavour), level 2, and level 3 (top switch with four children, no parent)
// for every source/destination pair and input port, all links good and with
// random link faults, against a model written from the routing rule: up when
// source and destination lie in different subtrees of the switch
// (src / 4^l != dst / 4^l) and the flit came from a child, else down to child
// (dst / 4^(l-1)) mod 4; spare parent only when both regular parents are
// dead, spare child S1 only when the wanted child is dead.
module tb_lca_route;
  import noc_pkg::*;
  logic [5:0] src_id, dst_id;
  logic [3:0] in_port;
  logic [4:0] child_ok;
  logic [2:0] parent_ok;
  logic [7:0] pref1, alt1, pref2, alt2, prefs, alts;
  logic [4:0] pref3, alt3;
  int checks = 0, failures = 0;

  lca_route #(.LEVEL(1), .NC(5), .NPAR(3))                  u_l1 (.src_id, .dst_id, .in_port, .child_ok, .parent_ok, .route_pref(pref1), .route_alt(alt1));
  lca_route #(.LEVEL(2), .NC(5), .NPAR(3))                  u_l2 (.src_id, .dst_id, .in_port, .child_ok, .parent_ok, .route_pref(pref2), .route_alt(alt2));
  lca_route #(.LEVEL(1), .NC(5), .NPAR(3), .ANY_CHILD(1'b1)) u_s1 (.src_id, .dst_id, .in_port, .child_ok, .parent_ok, .route_pref(prefs), .route_alt(alts));
  lca_route #(.LEVEL(3), .NC(4), .NPAR(1))                  u_l3 (.src_id, .dst_id, .in_port, .child_ok(child_ok[3:0]), .parent_ok(parent_ok[0]), .route_pref(pref3), .route_alt(alt3));

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] model(int lvl, int nc, int npar, bit any, int s, int d, int ip,
                                       logic [4:0] cok, logic [2:0] pok);
    logic [7:0] r;
    int span, ch;
    span = 1 << (2 * lvl);
    r = '0;
    if (ip < nc && (s / span) != (d / span)) begin
      if (npar > 0 && pok[0]) r[nc] = 1'b1;
      if (npar > 1 && pok[1]) r[nc+1] = 1'b1;
      if (r == '0 && npar > 2 && pok[2]) r[nc+2] = 1'b1;
    end else if (any) begin
      for (int c = 0; c < 4; c++) r[c] = cok[c];
    end else begin
      ch = (d / (span / 4)) % 4;
      if (cok[ch]) r[ch] = 1'b1;
      else if (nc > 4 && cok[4]) r[4] = 1'b1;
    end
    return r;
  endfunction

  initial begin
    for (int rep = 0; rep < 4; rep++)
      for (int s = 0; s < 64; s++)
        for (int d = 0; d < 64; d++)
          for (int ip = 0; ip < 8; ip++) begin
            src_id = 6'(s); dst_id = 6'(d); in_port = 4'(ip);
            child_ok  = (rep == 0) ? 5'h1f : 5'($urandom);
            parent_ok = (rep == 0) ? 3'h7  : 3'($urandom);
            #1;
            checks += 4;
            if (pref1 != model(1, 5, 3, 0, s, d, ip, child_ok, parent_ok)) begin failures++; $display("L1 %0d->%0d port %0d: %b", s, d, ip, pref1); end
            if (pref2 != model(2, 5, 3, 0, s, d, ip, child_ok, parent_ok)) begin failures++; $display("L2 %0d->%0d port %0d: %b", s, d, ip, pref2); end
            if (prefs != model(1, 5, 3, 1, s, d, ip, child_ok, parent_ok)) begin failures++; $display("S1 %0d->%0d port %0d: %b", s, d, ip, prefs); end
            if (ip < 5 && pref3 != 5'(model(3, 4, 1, 0, s, d, ip, child_ok, parent_ok))) begin failures++; $display("L3 %0d->%0d port %0d: %b", s, d, ip, pref3); end
            if ((alt1 | alt2 | alts) != '0 || alt3 != '0) begin failures++; $display("alt set"); end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
