// tb_ft_crossbar: the crossbar between spare switch S1 (4 channels) and 16
// IPs. Downward, random packets on all four S1 channels for random IPs must
// each reach exactly their IP, whole, and four channels must be seen open to
// four different IPs in the same cycle. Upward, packets offered by all 16 IPs
// must all come out, whole, on the S1 channels, never more than four at once
// and with no packet split across channels. Both directions see random stalls.
module tb_ft_crossbar;
  import noc_pkg::*;
  import tb_noc_pkg::*;
  logic clk = 0, rst_n = 0;
  flit_t s1_dn_flit [4], s1_up_flit [4], ip_dn_flit [16], ip_up_flit [16];
  logic [3:0]  s1_dn_valid, s1_dn_ready, s1_up_valid, s1_up_ready;
  logic [15:0] ip_dn_valid, ip_dn_ready, ip_up_valid, ip_up_ready;
  int checks = 0, failures = 0;

  ft_crossbar #(.NIP(16), .NCH(4)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  rx_port rx_ip [16];
  rx_port rx_s1 [4];
  pkt_t   dq [4][$];
  pkt_t   uq [16][$];
  int     dk [4], uk [16];
  int     got, sent, max_dn;

  initial begin
    for (int i = 0; i < 16; i++) begin rx_ip[i] = new(i); uk[i] = 0; end
    for (int k = 0; k < 4; k++) begin rx_s1[k] = new(-1); dk[k] = 0; end
    s1_dn_valid = '0; s1_up_ready = '0; ip_dn_ready = '0; ip_up_valid = '0;
    for (int k = 0; k < 4; k++) s1_dn_flit[k] = '0;
    for (int i = 0; i < 16; i++) ip_up_flit[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    got = 0; sent = 0; max_dn = 0;
    for (int k = 0; k < 4; k++)
      for (int p = 0; p < 40; p++) begin
        pkt_t pk;
        pk.dst = $urandom_range(0, 15); pk.seq = p; pk.len = $urandom_range(1, 8); pk.at = 0;
        dq[k].push_back(pk); sent++;
      end
    for (int i = 0; i < 16; i++)
      for (int p = 0; p < 10; p++) begin
        pkt_t pk;
        pk.dst = 16 + $urandom_range(0, 47); pk.seq = p; pk.len = $urandom_range(1, 8); pk.at = 0;
        uq[i].push_back(pk); sent++;
      end
    for (int cyc = 0; cyc < 20000 && got < sent; cyc++) begin
      for (int k = 0; k < 4; k++) begin
        s1_dn_valid[k] = dq[k].size() > 0;
        if (dq[k].size() > 0) s1_dn_flit[k] = mk_flit(32 + k, dq[k][0].dst, dq[k][0].seq, dk[k], dq[k][0].len);
        s1_up_ready[k] = ($urandom_range(0, 3) != 0);
      end
      for (int i = 0; i < 16; i++) begin
        ip_up_valid[i] = uq[i].size() > 0;
        if (uq[i].size() > 0) ip_up_flit[i] = mk_flit(i, uq[i][0].dst, uq[i][0].seq, uk[i], uq[i][0].len);
        ip_dn_ready[i] = ($urandom_range(0, 3) != 0);
      end
      #1;
      if ($countones(dut.ipo_busy) > max_dn) max_dn = $countones(dut.ipo_busy);
      checks++;
      if ($countones(s1_up_valid) > 4) begin failures++; $display("too many up channels"); end
      for (int k = 0; k < 4; k++) begin
        if (s1_dn_valid[k] && s1_dn_ready[k]) begin
          dk[k]++;
          if (dk[k] == dq[k][0].len) begin dk[k] = 0; void'(dq[k].pop_front()); end
        end
        if (s1_up_valid[k] && s1_up_ready[k]) begin
          checks++;
          if (rx_s1[k].accept(s1_up_flit[k])) got++;
        end
      end
      for (int i = 0; i < 16; i++) begin
        if (ip_up_valid[i] && ip_up_ready[i]) begin
          uk[i]++;
          if (uk[i] == uq[i][0].len) begin uk[i] = 0; void'(uq[i].pop_front()); end
        end
        if (ip_dn_valid[i] && ip_dn_ready[i]) begin
          checks++;
          if (rx_ip[i].accept(ip_dn_flit[i])) got++;
        end
      end
      @(negedge clk);
    end
    checks += 2;
    if (got != sent) begin failures++; $display("delivered %0d of %0d", got, sent); end
    if (max_dn < 4) begin failures++; $display("never four downward channels at once (max %0d)", max_dn); end
    for (int i = 0; i < 16; i++) failures += rx_ip[i].errors;
    for (int k = 0; k < 4; k++) failures += rx_s1[k].errors;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
