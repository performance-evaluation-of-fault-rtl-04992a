// tb_mesh_router: one negative-first mesh switch at (3,3) of an 8x8 mesh.
// Packets of 4 flits enter on all five inputs for destinations whose
// negative-first direction is unique (west, south, east, north, local); each
// must leave whole on the expected output. Then the west link is marked dead:
// a packet for (1,3) must leave south instead (further south than the
// destination), and a packet for (3,6) still north.
module tb_mesh_router;
  import noc_pkg::*;
  import tb_noc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] link_ok;
  flit_t in_flit [5], out_flit [5];
  logic [4:0] in_valid, in_ready, out_valid, out_ready;
  int checks = 0, failures = 0;

  mesh_router #(.MESH_X(8), .MESH_Y(8), .MY_ID(27)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  rx_port rx [5];
  pkt_t   txq [5][$];
  int     tk [5];
  int     expect_port [64];
  int     got, sent;

  task automatic run();
    for (int cyc = 0; cyc < 3000 && got < sent; cyc++) begin
      for (int i = 0; i < 5; i++) begin
        in_valid[i] = txq[i].size() > 0;
        if (txq[i].size() > 0) in_flit[i] = mk_flit(i, txq[i][0].dst, txq[i][0].seq, tk[i], txq[i][0].len);
        out_ready[i] = ($urandom_range(0, 3) != 0);
      end
      #1;
      for (int i = 0; i < 5; i++) begin
        if (in_valid[i] && in_ready[i]) begin
          tk[i]++;
          if (tk[i] == txq[i][0].len) begin tk[i] = 0; void'(txq[i].pop_front()); end
        end
        if (out_valid[i] && out_ready[i]) begin
          checks++;
          if (rx[i].accept(out_flit[i])) begin
            got++;
            checks++;
            if (expect_port[rx[i].last_dst] != i) begin
              failures++; $display("packet for %0d left on port %0d, expected %0d", rx[i].last_dst, i, expect_port[rx[i].last_dst]);
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

  initial begin
    int dsts [5] = '{27, 51, 30, 11, 25};   // local, N (3,6), E (6,3), S (3,1), W (1,3)
    for (int i = 0; i < 5; i++) begin rx[i] = new(i == 0 ? 27 : -1); tk[i] = 0; end
    in_valid = '0; out_ready = '0; link_ok = 4'hf;
    for (int i = 0; i < 5; i++) in_flit[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int p = 0; p < 5; p++) expect_port[dsts[p]] = p;
    got = 0; sent = 0;
    for (int i = 0; i < 5; i++)
      for (int k = 0; k < 5; k++) begin
        pkt_t pk;
        pk.dst = dsts[(i + k) % 5]; pk.seq = k; pk.len = 4;
        txq[i].push_back(pk); sent++;
      end
    run();
    // west link dead
    link_ok = 4'b0111;
    expect_port[25] = P_SOUTH;
    got = 0; sent = 0;
    for (int k = 0; k < 3; k++) begin
      pkt_t pk;
      pk.dst = 25; pk.seq = 10 + k; pk.len = 4; txq[0].push_back(pk); sent++;
      pk.dst = 51; txq[2].push_back(pk); sent++;
    end
    run();
    for (int i = 0; i < 5; i++) failures += rx[i].errors;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
