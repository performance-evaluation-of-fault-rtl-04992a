// tb_ft_noc_top: end-to-end run of the whole design at its default sizes
// (64-IP negative-first mesh and 64-IP fault-tolerant BFT side by side).
// Both networks carry uniform random 16-flit messages, first fault-free, then
// at light load with a permanent fault map in each network. Every packet must
// arrive whole at its destination. The run also counts, and requires at least
// once each: injection stalls (backpressure), mesh packets whose dimension-
// order path crosses a fault and that were delivered by the detour of the
// negative-first routing, deliveries and injections through the BFT spare
// crossbar, and cycles in which the spare switch S2 forwarded flits.
// Fault phase load: two packets per IP within 8000 cycles. At twice that load
// the negative-first detours around the dead mesh switch can deadlock (see
// route_nf), so the load is kept in the very-low range the evaluation used.
module tb_ft_noc_top;
  import noc_pkg::*;
  import tb_noc_pkg::*;
  localparam int NN = 64;
  localparam int LEN = 16;
  logic clk = 0, rst_n = 0;
  logic [63:0] mesh_node_fault;
  logic [55:0] mesh_hlink_fault, mesh_vlink_fault;
  flit_t       mesh_in_flit [NN], mesh_out_flit [NN];
  logic [63:0] mesh_in_valid, mesh_in_ready, mesh_out_valid, mesh_out_ready;
  logic [31:0] bft_sw_fault, bft_l1_link_fault;
  logic [3:0]  bft_top_sw_fault;
  logic [15:0] bft_top_link_fault;
  flit_t       bft_in_flit [NN], bft_out_flit [NN], bftx_in_flit [NN], bftx_out_flit [NN];
  logic [63:0] bft_in_valid, bft_in_ready, bft_out_valid, bft_out_ready;
  logic [63:0] bftx_in_valid, bftx_in_ready, bftx_out_valid, bftx_out_ready;
  int checks = 0, failures = 0;

  ft_noc_top u_dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  rx_port mrx [NN], brx [NN], bxrx [NN];
  pkt_t   mq [NN][$], bq [NN][$];
  int     mk [NN], bk [NN];
  int     got, sent, cycle;
  int     n_stall, n_detour, n_xbar_rx, n_xbar_tx, n_s2;
  bit     detour_pkt [NN][int];   // [src][seq]: dimension-order path crosses a fault

  logic [3:0] s2_busy;
  for (genvar c = 0; c < 4; c++) begin : g_s2
    assign s2_busy[c] = u_dut.u_bft.g_blk[c].u_blk.g_sw[7].u_sw.out_valid != '0;
  end
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) n_s2 <= n_s2 + $countones(s2_busy);
  end

  function automatic bit l1_dead(int i);
    return bft_sw_fault[8*(i/16) + (i%16)/4];
  endfunction

  // does the x-then-y path from s to d use a dead switch or link?
  function automatic bit xy_hits_fault(int s, int d);
    int x, y, xd, yd;
    x = s % 8; y = s / 8; xd = d % 8; yd = d / 8;
    while (x != xd) begin
      int nx;
      nx = (xd > x) ? x + 1 : x - 1;
      if (mesh_hlink_fault[y*7 + ((nx > x) ? x : nx)] || mesh_node_fault[y*8 + nx]) return 1;
      x = nx;
    end
    while (y != yd) begin
      int ny;
      ny = (yd > y) ? y + 1 : y - 1;
      if (mesh_vlink_fault[((ny > y) ? y : ny)*8 + x] || mesh_node_fault[ny*8 + x]) return 1;
      y = ny;
    end
    return 0;
  endfunction

  task automatic run(int max_cycles);
    for (int cyc = 0; cyc < max_cycles && got < sent; cyc++) begin
      for (int i = 0; i < NN; i++) begin
        logic v;
        mesh_in_valid[i] = mq[i].size() > 0 && (mk[i] > 0 || cycle >= mq[i][0].at);
        if (mq[i].size() > 0) mesh_in_flit[i] = mk_flit(i, mq[i][0].dst, mq[i][0].seq, mk[i], mq[i][0].len);
        v = bq[i].size() > 0 && (bk[i] > 0 || cycle >= bq[i][0].at);
        if (bq[i].size() > 0) begin
          bft_in_flit[i]  = mk_flit(i, bq[i][0].dst, bq[i][0].seq, bk[i], bq[i][0].len);
          bftx_in_flit[i] = bft_in_flit[i];
        end
        bft_in_valid[i]  = v && !l1_dead(i);
        bftx_in_valid[i] = v && l1_dead(i);
        mesh_out_ready[i] = ($urandom_range(0, 4) != 0);
        bft_out_ready[i]  = ($urandom_range(0, 4) != 0);
        bftx_out_ready[i] = ($urandom_range(0, 4) != 0);
      end
      #1;
      for (int i = 0; i < NN; i++) begin
        if ((mesh_in_valid[i] && !mesh_in_ready[i]) || (bft_in_valid[i] && !bft_in_ready[i])) n_stall++;
        if (mesh_in_valid[i] && mesh_in_ready[i]) begin
          mk[i]++;
          if (mk[i] == mq[i][0].len) begin mk[i] = 0; void'(mq[i].pop_front()); end
        end
        if ((bft_in_valid[i] && bft_in_ready[i]) || (bftx_in_valid[i] && bftx_in_ready[i])) begin
          if (bftx_in_valid[i] && bk[i] == 0) n_xbar_tx++;
          bk[i]++;
          if (bk[i] == bq[i][0].len) begin bk[i] = 0; void'(bq[i].pop_front()); end
        end
        if (mesh_out_valid[i] && mesh_out_ready[i]) begin
          checks++;
          if (mrx[i].accept(mesh_out_flit[i])) begin
            got++;
            if (detour_pkt[mrx[i].last_src].exists(mrx[i].last_seq)) n_detour++;
          end
        end
        if (bft_out_valid[i] && bft_out_ready[i]) begin
          checks++;
          if (brx[i].accept(bft_out_flit[i])) got++;
        end
        if (bftx_out_valid[i] && bftx_out_ready[i]) begin
          checks++;
          if (bxrx[i].accept(bftx_out_flit[i])) begin got++; n_xbar_rx++; end
        end
      end
      @(negedge clk);
    end
    mesh_in_valid = '0; bft_in_valid = '0; bftx_in_valid = '0;
    checks++;
    if (got != sent) begin
      failures++;
      $display("delivered %0d of %0d", got, sent);
      for (int i = 0; i < NN; i++)
        if (mq[i].size() != 0 || bq[i].size() != 0 || mk[i] != 0 || bk[i] != 0)
          $display("  IP %0d: mesh %0d left (flit %0d), BFT %0d left (flit %0d)", i, mq[i].size(), mk[i], bq[i].size(), bk[i]);
    end
    $display("cycle %0d: %0d packets delivered", cycle, got);
  endtask

  task automatic load(int per_ip, int spread, int seq0);
    got = 0; sent = 0;
    for (int i = 0; i < NN; i++)
      for (int p = 0; p < per_ip; p++) begin
        pkt_t pk;
        // mesh
        if (!mesh_node_fault[i]) begin
          do pk.dst = $urandom_range(0, NN-1); while (pk.dst == i || mesh_node_fault[pk.dst]);
          pk.seq = seq0 + p; pk.len = LEN; pk.at = cycle + $urandom_range(0, spread);
          if (xy_hits_fault(i, pk.dst)) detour_pkt[i][pk.seq] = 1'b1;
          mq[i].push_back(pk); sent++;
        end
        // BFT: block 1, L1[0] (IPs 16..19) has no regular up link, stays in its block
        if (bft_l1_link_fault[8*1+0] && i >= 16 && i <= 19)
          do pk.dst = 16 + $urandom_range(0, 15); while (pk.dst == i);
        else
          do pk.dst = $urandom_range(0, NN-1); while (pk.dst == i);
        pk.seq = seq0 + p; pk.len = LEN; pk.at = cycle + $urandom_range(0, spread);
        bq[i].push_back(pk); sent++;
      end
  endtask

  initial begin
    for (int i = 0; i < NN; i++) begin
      mrx[i] = new(i); brx[i] = new(i); bxrx[i] = new(i); mk[i] = 0; bk[i] = 0;
    end
    cycle = 0; n_stall = 0; n_detour = 0; n_xbar_rx = 0; n_xbar_tx = 0; n_s2 = 0;
    mesh_node_fault = '0; mesh_hlink_fault = '0; mesh_vlink_fault = '0;
    bft_sw_fault = '0; bft_l1_link_fault = '0; bft_top_sw_fault = '0; bft_top_link_fault = '0;
    mesh_in_valid = '0; bft_in_valid = '0; bftx_in_valid = '0;
    mesh_out_ready = '0; bft_out_ready = '0; bftx_out_ready = '0;
    for (int i = 0; i < NN; i++) begin mesh_in_flit[i] = '0; bft_in_flit[i] = '0; bftx_in_flit[i] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // fault-free, every IP sends four messages at once
    load(4, 0, 0);
    run(60000);
    // permanent faults
    mesh_node_fault[36] = 1'b1;             // switch (4,4)
    mesh_hlink_fault[2*7+2] = 1'b1;         // (2,2)-(3,2)
    mesh_vlink_fault[5*8+5] = 1'b1;         // (5,5)-(5,6)
    mesh_hlink_fault[0*7+6] = 1'b1;         // (6,0)-(7,0)
    bft_sw_fault[8*0 + 1] = 1'b1;           // block 0 L1[1]
    bft_l1_link_fault[8*1 + 0] = 1'b1;      // block 1 L1[0] both up links
    bft_l1_link_fault[8*1 + 1] = 1'b1;
    bft_l1_link_fault[8*2 + 2*2 + 0] = 1'b1; // block 2 L1[2]-L2[0]
    bft_sw_fault[8*3 + 3] = 1'b1;           // block 3 L1[3]
    bft_top_sw_fault[3] = 1'b1;             // top switch 3
    load(2, 8000, 100);
    run(80000);
    $display("stalls %0d, mesh detours %0d, crossbar deliveries %0d, crossbar injections %0d, S2 busy cycles %0d",
             n_stall, n_detour, n_xbar_rx, n_xbar_tx, n_s2);
    checks += 5;
    if (n_stall == 0)   begin failures++; $display("no injection stall seen"); end
    if (n_detour == 0)  begin failures++; $display("no detour around a mesh fault seen"); end
    if (n_xbar_rx == 0) begin failures++; $display("no delivery through the spare crossbar"); end
    if (n_xbar_tx == 0) begin failures++; $display("no injection through the spare crossbar"); end
    if (n_s2 == 0)      begin failures++; $display("spare switch S2 never used"); end
    for (int i = 0; i < NN; i++) failures += mrx[i].errors + brx[i].errors + bxrx[i].errors;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
