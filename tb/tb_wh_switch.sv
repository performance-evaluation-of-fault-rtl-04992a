// tb_wh_switch: a 3-port switch core with a testbench routing function
// (destination id = output port). Random packets of 1..6 flits from all
// inputs with random output stalls; every output must deliver whole,
// uninterleaved packets for its own id, every packet must arrive, and a lone
// head flit must leave at the second clock edge after the one that wrote it.
module tb_wh_switch;
  import noc_pkg::*;
  import tb_noc_pkg::*;
  localparam int NP = 3;
  logic clk = 0, rst_n = 0;
  flit_t in_flit [NP], out_flit [NP], hd_flit [NP];
  logic [NP-1:0] in_valid, in_ready, out_valid, out_ready, hd_req;
  logic [NP-1:0] route_pref [NP], route_alt [NP];
  int checks = 0, failures = 0;

  wh_switch #(.NP(NP)) dut (.*);

  always_comb
    for (int i = 0; i < NP; i++) begin
      route_pref[i] = '0;
      route_alt[i]  = '0;
      if (int'(flit_dst(hd_flit[i])) < NP) route_pref[i][flit_dst(hd_flit[i])] = 1'b1;
    end

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  pkt_t   txq [NP][$];
  int     tk  [NP];
  rx_port rx  [NP];
  int     sent = 0, got = 0;
  bit     stall_en = 1;

  initial begin
    for (int i = 0; i < NP; i++) begin rx[i] = new(i); tk[i] = 0; end
    in_valid = '0; out_ready = '0;
    for (int i = 0; i < NP; i++) in_flit[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // latency of a lone one-flit packet, input 0 -> output 2
    @(negedge clk);
    in_flit[0] = mk_flit(0, 2, 0, 0, 1); in_valid[0] = 1; out_ready = '1;
    @(negedge clk); in_valid[0] = 0;   // written at the edge just passed
    checks++; if (out_valid[2]) begin failures++; $display("head left too early"); end
    @(negedge clk);
    checks++; if (!out_valid[2] || out_flit[2] != mk_flit(0, 2, 0, 0, 1)) begin failures++; $display("head not out after 2 cycles"); end
    @(negedge clk);
    // random traffic
    for (int i = 0; i < NP; i++)
      for (int p = 0; p < 60; p++) begin
        pkt_t pk;
        pk.dst = $urandom_range(0, NP-1); pk.seq = p; pk.len = $urandom_range(1, 6);
        txq[i].push_back(pk); sent++;
      end
    for (int cyc = 0; cyc < 20000 && got < sent; cyc++) begin
      for (int i = 0; i < NP; i++) begin
        in_valid[i] = (txq[i].size() > 0) && ($urandom_range(0, 4) != 0);
        if (txq[i].size() > 0) in_flit[i] = mk_flit(i, txq[i][0].dst, txq[i][0].seq, tk[i], txq[i][0].len);
        out_ready[i] = stall_en ? ($urandom_range(0, 2) != 0) : 1'b1;
      end
      #1;
      for (int i = 0; i < NP; i++) begin
        if (in_valid[i] && in_ready[i]) begin
          tk[i]++;
          if (tk[i] == txq[i][0].len) begin tk[i] = 0; void'(txq[i].pop_front()); end
        end
        if (out_valid[i] && out_ready[i]) begin
          checks++;
          if (rx[i].accept(out_flit[i])) got++;
        end
      end
      @(negedge clk);
    end
    for (int i = 0; i < NP; i++) failures += rx[i].errors;
    checks++;
    if (got != sent) begin failures++; $display("delivered %0d of %0d", got, sent); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
