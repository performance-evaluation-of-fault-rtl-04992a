// tb_mesh_noc: the full 8x8 mesh, once with negative-first and once with
// odd-even routing, side by side.
//  1. Latency: a lone 16-flit packet from (0,0) to (7,7) (14 hops) must show
//     its head at the destination 2*(14+1) = 30 cycles after the head was
//     accepted, and its tail 15 cycles later (one flit per cycle).
//  2. Uniform random traffic of 16-flit messages (the message length of the
//     evaluation) from every IP with random ejection stalls, first fault-free,
//     on both meshes; then, on the negative-first mesh, light traffic (four
//     messages per IP spread over 4000 cycles, the low-load regime of the
//     fault experiments) with a permanent fault map of one dead switch and
//     three dead links; every packet whose source and destination are alive
//     must arrive whole. (The odd-even fallback can circle a fault, so it is
//     not run with faults here.)
module tb_mesh_noc;
  import noc_pkg::*;
  import tb_noc_pkg::*;
  localparam int NN = 64;
  localparam int LEN = 16;
  logic clk = 0, rst_n = 0;
  logic [63:0] node_fault;
  logic [55:0] hlink_fault, vlink_fault;
  flit_t       in_flit [2][NN], out_flit [2][NN];
  logic [63:0] in_valid [2], in_ready [2], out_valid [2], out_ready [2];
  int checks = 0, failures = 0;

  mesh_noc #(.ROUTING(ROUTE_NEG_FIRST)) u_nf (.clk, .rst_n, .node_fault, .hlink_fault, .vlink_fault,
    .ip_in_flit(in_flit[0]), .ip_in_valid(in_valid[0]), .ip_in_ready(in_ready[0]),
    .ip_out_flit(out_flit[0]), .ip_out_valid(out_valid[0]), .ip_out_ready(out_ready[0]));
  mesh_noc #(.ROUTING(ROUTE_ODD_EVEN)) u_oe (.clk, .rst_n, .node_fault, .hlink_fault, .vlink_fault,
    .ip_in_flit(in_flit[1]), .ip_in_valid(in_valid[1]), .ip_in_ready(in_ready[1]),
    .ip_out_flit(out_flit[1]), .ip_out_valid(out_valid[1]), .ip_out_ready(out_ready[1]));

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  rx_port rx [2][NN];
  pkt_t   txq [2][NN][$];
  int     tk [2][NN];
  int     got [2], sent [2];
  int     cycle;

  always @(posedge clk) cycle <= cycle + 1;

  task automatic run(int max_cycles, int stall_pct);
    for (int cyc = 0; cyc < max_cycles && (got[0] < sent[0] || got[1] < sent[1]); cyc++) begin
      for (int m = 0; m < 2; m++)
        for (int i = 0; i < NN; i++) begin
          in_valid[m][i] = txq[m][i].size() > 0 && (tk[m][i] > 0 || cycle >= txq[m][i][0].at);
          if (txq[m][i].size() > 0) in_flit[m][i] = mk_flit(i, txq[m][i][0].dst, txq[m][i][0].seq, tk[m][i], txq[m][i][0].len);
          out_ready[m][i] = ($urandom_range(0, 99) >= stall_pct);
        end
      #1;
      for (int m = 0; m < 2; m++)
        for (int i = 0; i < NN; i++) begin
          if (in_valid[m][i] && in_ready[m][i]) begin
            tk[m][i]++;
            if (tk[m][i] == txq[m][i][0].len) begin tk[m][i] = 0; void'(txq[m][i].pop_front()); end
          end
          if (out_valid[m][i] && out_ready[m][i]) begin
            checks++;
            if (rx[m][i].accept(out_flit[m][i])) got[m]++;
          end
        end
      @(negedge clk);
    end
    in_valid[0] = '0; in_valid[1] = '0;
    for (int m = 0; m < 2; m++) begin
      checks++;
      if (got[m] != sent[m]) begin failures++; $display("mesh %0d delivered %0d of %0d", m, got[m], sent[m]); end
      $display("mesh %0d: %0d packets delivered", m, got[m]);
    end
  endtask

  task automatic load(int per_ip, int spread, int nets);
    got = '{0, 0}; sent = '{0, 0};
    for (int i = 0; i < NN; i++) begin
      if (node_fault[i]) continue;
      for (int p = 0; p < per_ip; p++) begin
        pkt_t pk;
        do pk.dst = $urandom_range(0, NN-1); while (pk.dst == i || node_fault[pk.dst]);
        pk.seq = p; pk.len = LEN; pk.at = cycle + $urandom_range(0, spread);
        for (int m = 0; m < nets; m++) begin txq[m][i].push_back(pk); sent[m]++; end
      end
    end
  endtask

  initial begin
    int t0, th, tt;
    for (int m = 0; m < 2; m++) for (int i = 0; i < NN; i++) begin rx[m][i] = new(i); tk[m][i] = 0; end
    node_fault = '0; hlink_fault = '0; vlink_fault = '0; cycle = 0;
    in_valid = '{default: '0}; out_ready = '{default: '1};
    for (int m = 0; m < 2; m++) for (int i = 0; i < NN; i++) in_flit[m][i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // 1. latency of a lone packet, negative-first mesh
    out_ready[0] = '1;
    th = -1; tt = -1;
    for (int k = 0; k < LEN; ) begin
      in_flit[0][0] = mk_flit(0, 63, 0, k, LEN); in_valid[0][0] = 1'b1;
      #1;
      if (k == 0) t0 = cycle;
      if (in_ready[0][0]) k++;
      @(negedge clk);
    end
    in_valid[0][0] = 1'b0;
    for (int c = 0; c < 100 && tt < 0; c++) begin
      #1;
      if (out_valid[0][63]) begin
        void'(rx[0][63].accept(out_flit[0][63]));
        if (out_flit[0][63].head) th = cycle;
        if (out_flit[0][63].tail) tt = cycle;
      end
      @(negedge clk);
    end
    checks += 2;
    if (th - t0 != 30) begin failures++; $display("head latency %0d, expected 30", th - t0); end
    if (tt - th != LEN - 1) begin failures++; $display("tail %0d cycles after head, expected %0d", tt - th, LEN - 1); end
    // 2a. fault-free uniform traffic
    load(6, 0, 2);
    run(60000, 20);
    // 2b. with faults: switch (4,4) dead, links (2,2)-(3,2), (5,5)-(5,6), (6,0)-(7,0) dead
    node_fault[36] = 1'b1;
    hlink_fault[2*7+2] = 1'b1;
    vlink_fault[5*8+5] = 1'b1;
    hlink_fault[0*7+6] = 1'b1;
    load(4, 4000, 1);
    run(60000, 20);
    for (int m = 0; m < 2; m++) for (int i = 0; i < NN; i++) failures += rx[m][i].errors;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
