// tb_ft_bft: the 64-IP fault-tolerant butterfly fat tree.
//  1. Latency: a lone 16-flit packet from IP 0 to IP 63 crosses five switches
//     (L1, L2, top, L2, L1), so its head must arrive 2*5 = 10 cycles after it
//     was accepted, and its tail 15 cycles after the head.
//  2. Fault-free uniform random traffic of 16-flit packets among all 64 IPs.
//  3. Light uniform traffic with faults the spare hardware covers: block 0
//     L1[1] dead (IPs 4..7 use the crossbar both ways), block 1 L1[0] with
//     both regular up links dead (its IPs reach their block through S2 and
//     send only inside the block), block 2 link L1[2]-L2[0] dead, top switch
//     3 dead. Every packet must arrive whole.
module tb_ft_bft;
  import noc_pkg::*;
  import tb_noc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [31:0] sw_fault, l1_link_fault;
  logic [3:0]  top_sw_fault;
  logic [15:0] top_link_fault;
  flit_t       ip_in_flit [64], ip_out_flit [64], ipx_in_flit [64], ipx_out_flit [64];
  logic [63:0] ip_in_valid, ip_in_ready, ip_out_valid, ip_out_ready;
  logic [63:0] ipx_in_valid, ipx_in_ready, ipx_out_valid, ipx_out_ready;
  int checks = 0, failures = 0;

  ft_bft dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  rx_port rx [64], rxx [64];
  pkt_t   txq [64][$];
  int     tk [64];
  int     got, sent, cycle;

  always @(posedge clk) cycle <= cycle + 1;

  function automatic bit l1_dead(int i);
    return sw_fault[8*(i/16) + (i%16)/4];
  endfunction

  task automatic run(int max_cycles);
    for (int cyc = 0; cyc < max_cycles && got < sent; cyc++) begin
      for (int i = 0; i < 64; i++) begin
        logic v;
        v = txq[i].size() > 0 && (tk[i] > 0 || cycle >= txq[i][0].at);
        if (txq[i].size() > 0) begin
          ip_in_flit[i]  = mk_flit(i, txq[i][0].dst, txq[i][0].seq, tk[i], txq[i][0].len);
          ipx_in_flit[i] = ip_in_flit[i];
        end
        ip_in_valid[i]  = v && !l1_dead(i);
        ipx_in_valid[i] = v && l1_dead(i);
        ip_out_ready[i]  = ($urandom_range(0, 4) != 0);
        ipx_out_ready[i] = ($urandom_range(0, 4) != 0);
      end
      #1;
      for (int i = 0; i < 64; i++) begin
        if ((ip_in_valid[i] && ip_in_ready[i]) || (ipx_in_valid[i] && ipx_in_ready[i])) begin
          tk[i]++;
          if (tk[i] == txq[i][0].len) begin tk[i] = 0; void'(txq[i].pop_front()); end
        end
        if (ip_out_valid[i] && ip_out_ready[i]) begin
          checks++;
          if (rx[i].accept(ip_out_flit[i])) got++;
        end
        if (ipx_out_valid[i] && ipx_out_ready[i]) begin
          checks++;
          if (rxx[i].accept(ipx_out_flit[i])) got++;
        end
      end
      @(negedge clk);
    end
    ip_in_valid = '0; ipx_in_valid = '0;
    checks++;
    if (got != sent) begin failures++; $display("delivered %0d of %0d", got, sent); end
    $display("%0d packets delivered", got);
  endtask

  task automatic load(int per_ip, int spread, int local_lo, int local_hi);
    got = 0; sent = 0;
    for (int i = 0; i < 64; i++)
      for (int p = 0; p < per_ip; p++) begin
        pkt_t pk;
        if (i >= local_lo && i <= local_hi)
          do pk.dst = 16 * (i / 16) + $urandom_range(0, 15); while (pk.dst == i);
        else
          do pk.dst = $urandom_range(0, 63); while (pk.dst == i);
        pk.seq = p; pk.len = 16; pk.at = cycle + $urandom_range(0, spread);
        txq[i].push_back(pk); sent++;
      end
  endtask

  initial begin
    int t0, th, tt;
    for (int i = 0; i < 64; i++) begin rx[i] = new(i); rxx[i] = new(i); tk[i] = 0; end
    cycle = 0;
    sw_fault = '0; l1_link_fault = '0; top_sw_fault = '0; top_link_fault = '0;
    ip_in_valid = '0; ipx_in_valid = '0; ip_out_ready = '1; ipx_out_ready = '1;
    for (int i = 0; i < 64; i++) begin ip_in_flit[i] = '0; ipx_in_flit[i] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // 1. latency
    th = -1; tt = -1;
    fork
      for (int k = 0; k < 16; ) begin
        ip_in_flit[0] = mk_flit(0, 63, 0, k, 16); ip_in_valid[0] = 1'b1;
        #1;
        if (k == 0) t0 = cycle;
        if (ip_in_ready[0]) k++;
        @(negedge clk);
        if (k == 16) ip_in_valid[0] = 1'b0;
      end
      for (int c = 0; c < 100 && tt < 0; c++) begin
        #2;
        if (ip_out_valid[63]) begin
          void'(rx[63].accept(ip_out_flit[63]));
          if (ip_out_flit[63].head) th = cycle;
          if (ip_out_flit[63].tail) tt = cycle;
        end
        @(negedge clk);
      end
    join
    checks += 2;
    if (th - t0 != 10) begin failures++; $display("head latency %0d, expected 10", th - t0); end
    if (tt - th != 15) begin failures++; $display("tail %0d cycles after head, expected 15", tt - th); end
    // 2. fault-free
    load(5, 0, -1, -1);
    run(50000);
    // 3. faults
    sw_fault[8*0 + 1] = 1'b1;
    l1_link_fault[8*1 + 0] = 1'b1; l1_link_fault[8*1 + 1] = 1'b1;
    l1_link_fault[8*2 + 2*2 + 0] = 1'b1;
    top_sw_fault[3] = 1'b1;
    load(4, 3000, 16, 19);
    run(60000);
    for (int i = 0; i < 64; i++) failures += rx[i].errors + rxx[i].errors;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
