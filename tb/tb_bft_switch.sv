// tb_bft_switch: a level-1 switch of the fault-tolerant BFT holding IPs 0..3
// on children 0..3, the spare S1 on child 4 and parents L2[0], L2[1], S2 on
// ports 5, 6, 7. Random 1..8-flit packets from every port; each must leave
// whole on a port allowed by LCA routing: child dst for a destination 0..3,
// one of the two regular parents otherwise (only from a child). Then with both
// regular parent links dead upward packets must use the spare parent (port 7),
// and with child link 1 dead packets for IP 1 must go to the spare S1 (port 4).
module tb_bft_switch;
  import noc_pkg::*;
  import tb_noc_pkg::*;
  localparam int NP = 8;
  logic clk = 0, rst_n = 0;
  logic [4:0] child_ok;
  logic [2:0] parent_ok;
  flit_t in_flit [NP], out_flit [NP];
  logic [NP-1:0] in_valid, in_ready, out_valid, out_ready;
  int checks = 0, failures = 0;

  bft_switch #(.LEVEL(1)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  rx_port rx [NP];
  pkt_t   txq [NP][$];
  int     tk [NP];
  int     got, sent, up_seen [NP];

  function automatic logic [NP-1:0] allowed(int dst);
    logic [NP-1:0] a;
    a = '0;
    if (dst < 4) begin
      if (child_ok[dst]) a[dst] = 1'b1; else a[4] = 1'b1;
    end else if (parent_ok[1:0] != 2'b00) begin
      a[5] = parent_ok[0]; a[6] = parent_ok[1];
    end else a[7] = 1'b1;
    return a;
  endfunction

  task automatic run();
    for (int cyc = 0; cyc < 10000 && got < sent; cyc++) begin
      for (int i = 0; i < NP; i++) begin
        in_valid[i] = txq[i].size() > 0;
        if (txq[i].size() > 0) in_flit[i] = mk_flit(i, txq[i][0].dst, txq[i][0].seq, tk[i], txq[i][0].len);
        out_ready[i] = ($urandom_range(0, 3) != 0);
      end
      #1;
      for (int i = 0; i < NP; i++) begin
        if (in_valid[i] && in_ready[i]) begin
          tk[i]++;
          if (tk[i] == txq[i][0].len) begin tk[i] = 0; void'(txq[i].pop_front()); end
        end
        if (out_valid[i] && out_ready[i]) begin
          checks++;
          if (rx[i].accept(out_flit[i])) begin
            got++;
            up_seen[i]++;
            checks++;
            if (!allowed(rx[i].last_dst)[i]) begin
              failures++; $display("packet for %0d left on port %0d", rx[i].last_dst, i);
            end
          end
        end
      end
      @(negedge clk);
    end
    in_valid = '0;
    checks++;
    if (got != sent) begin failures++; $display("delivered %0d of %0d", got, sent); end
  endtask

  // inputs 0..3 are IPs 0..3; inputs 5..7 bring packets from above (down only)
  task automatic load(int per_port, bit only_up, bit only_ip1);
    got = 0; sent = 0;
    for (int i = 0; i < NP; i++)
      for (int p = 0; p < per_port; p++) begin
        pkt_t pk;
        if (i >= 4 || only_ip1) pk.dst = only_ip1 ? 1 : $urandom_range(0, 3);
        else if (only_up) pk.dst = $urandom_range(4, 63);
        else pk.dst = $urandom_range(0, 63);
        if (i < 4 && pk.dst == i && !only_ip1) pk.dst = (i + 1) % 4;
        if ((only_ip1 && i == 1) || i == 4) continue;   // child 4 of a level-1 switch is unused
        pk.seq = p; pk.len = $urandom_range(1, 8); pk.at = 0;
        txq[i].push_back(pk); sent++;
      end
  endtask

  initial begin
    for (int i = 0; i < NP; i++) begin rx[i] = new(i < 4 ? i : -1); tk[i] = 0; up_seen[i] = 0; end
    in_valid = '0; out_ready = '0; child_ok = 5'h1f; parent_ok = 3'h7;
    for (int i = 0; i < NP; i++) in_flit[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    load(40, 0, 0);
    run();
    checks += 2;
    if (up_seen[5] == 0 || up_seen[6] == 0) begin failures++; $display("an up link was never used"); end
    if (up_seen[7] != 0 || up_seen[4] != 0) begin failures++; $display("a spare was used with no fault"); end
    // both regular parents dead
    parent_ok = 3'b100;
    load(10, 1, 0);
    run();
    // child link 1 dead
    parent_ok = 3'h7; child_ok = 5'b11101;
    load(5, 0, 1);
    run();
    checks++;
    if (up_seen[7] == 0 || up_seen[4] == 0) begin failures++; $display("spare ports not used"); end
    for (int i = 0; i < NP; i++) failures += rx[i].errors;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
