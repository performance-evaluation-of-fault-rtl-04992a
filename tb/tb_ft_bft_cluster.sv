// tb_ft_bft_cluster: one 16-IP block of the fault-tolerant BFT, on its own
// (its up ports unused, so all traffic stays in the block).
//  1. Fault-free: random 16-flit packets between all IPs through the regular
//     ports; all must arrive whole on the regular ejection ports.
//  2. With faults: L1[1] dead (its IPs 4..7 inject through the crossbar and
//     must receive through it), both up links of L1[2] dead (IPs 8..11 must
//     reach the rest through S2), and L2[0] dead together with the link
//     L1[3]-L2[1] (packets for IPs 12..15 must come down through S1 and the
//     crossbar). All packets must arrive, and each recovery path must be used.
module tb_ft_bft_cluster;
  import noc_pkg::*;
  import tb_noc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0]  sw_fault, l1_link_fault;
  logic [3:0]  up_ok;
  flit_t       ip_in_flit [16], ip_out_flit [16], ipx_in_flit [16], ipx_out_flit [16];
  logic [15:0] ip_in_valid, ip_in_ready, ip_out_valid, ip_out_ready;
  logic [15:0] ipx_in_valid, ipx_in_ready, ipx_out_valid, ipx_out_ready;
  flit_t       up_out_flit [4], up_in_flit [4];
  logic [3:0]  up_out_valid, up_out_ready, up_in_valid, up_in_ready;
  int checks = 0, failures = 0;

  ft_bft_cluster dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  rx_port rx [16], rxx [16];
  pkt_t   txq [16][$];
  int     tk [16];
  int     got, sent, via_xbar_rx, via_xbar_tx, s2_used, cycle;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && dut.g_sw[7].u_sw.out_valid != '0) s2_used <= s2_used + 1;
  end

  task automatic run(int max_cycles);
    for (int cyc = 0; cyc < max_cycles && got < sent; cyc++) begin
      for (int i = 0; i < 16; i++) begin
        logic v;
        v = txq[i].size() > 0 && (tk[i] > 0 || cycle >= txq[i][0].at);
        if (txq[i].size() > 0) begin
          ip_in_flit[i]  = mk_flit(i, txq[i][0].dst, txq[i][0].seq, tk[i], txq[i][0].len);
          ipx_in_flit[i] = ip_in_flit[i];
        end
        // an IP whose level-1 switch is dead uses the crossbar
        ip_in_valid[i]  = v && !sw_fault[i/4];
        ipx_in_valid[i] = v && sw_fault[i/4];
        ip_out_ready[i]  = ($urandom_range(0, 4) != 0);
        ipx_out_ready[i] = ($urandom_range(0, 4) != 0);
      end
      #1;
      for (int i = 0; i < 16; i++) begin
        if ((ip_in_valid[i] && ip_in_ready[i]) || (ipx_in_valid[i] && ipx_in_ready[i])) begin
          if (ipx_in_valid[i] && tk[i] == 0) via_xbar_tx++;
          tk[i]++;
          if (tk[i] == txq[i][0].len) begin tk[i] = 0; void'(txq[i].pop_front()); end
        end
        if (ip_out_valid[i] && ip_out_ready[i]) begin
          checks++;
          if (rx[i].accept(ip_out_flit[i])) got++;
        end
        if (ipx_out_valid[i] && ipx_out_ready[i]) begin
          checks++;
          if (rxx[i].accept(ipx_out_flit[i])) begin got++; via_xbar_rx++; end
        end
      end
      @(negedge clk);
    end
    ip_in_valid = '0; ipx_in_valid = '0;
    checks++;
    if (got != sent) begin failures++; $display("delivered %0d of %0d", got, sent); end
  endtask

  task automatic load(int per_ip, int spread);
    got = 0; sent = 0;
    for (int i = 0; i < 16; i++)
      for (int p = 0; p < per_ip; p++) begin
        pkt_t pk;
        do pk.dst = $urandom_range(0, 15); while (pk.dst == i);
        pk.seq = p; pk.len = 16; pk.at = cycle + $urandom_range(0, spread);
        txq[i].push_back(pk); sent++;
      end
  endtask

  initial begin
    for (int i = 0; i < 16; i++) begin rx[i] = new(i); rxx[i] = new(i); tk[i] = 0; end
    cycle = 0; s2_used = 0; via_xbar_rx = 0; via_xbar_tx = 0;
    sw_fault = '0; l1_link_fault = '0; up_ok = '0;
    ip_in_valid = '0; ipx_in_valid = '0; ip_out_ready = '0; ipx_out_ready = '0;
    up_in_valid = '0; up_out_ready = '0;
    for (int i = 0; i < 16; i++) begin ip_in_flit[i] = '0; ipx_in_flit[i] = '0; end
    for (int u = 0; u < 4; u++) up_in_flit[u] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    load(8, 0);
    run(20000);
    checks += 2;
    if (via_xbar_rx != 0) begin failures++; $display("crossbar used without faults"); end
    if (s2_used != 0) begin failures++; $display("S2 used without faults"); end
    // faults
    sw_fault[1] = 1'b1;                          // L1[1]
    l1_link_fault[2*2+0] = 1'b1; l1_link_fault[2*2+1] = 1'b1;   // L1[2] up links
    sw_fault[5] = 1'b1;                          // L2[0]
    l1_link_fault[2*3+1] = 1'b1;                 // L1[3]-L2[1]
    load(6, 2000);
    run(40000);
    $display("crossbar deliveries %0d, crossbar injections %0d, S2 busy cycles %0d", via_xbar_rx, via_xbar_tx, s2_used);
    checks += 3;
    if (via_xbar_rx == 0) begin failures++; $display("no delivery through the crossbar"); end
    if (via_xbar_tx == 0) begin failures++; $display("no injection through the crossbar"); end
    if (s2_used == 0) begin failures++; $display("S2 never used"); end
    for (int i = 0; i < 16; i++) failures += rx[i].errors + rxx[i].errors;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
