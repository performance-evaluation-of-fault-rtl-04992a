// tb_flit_fifo: random push/pop against a queue model; checks data order,
// full/empty flags at depth 2 and the one-cycle write-to-read latency.
module tb_flit_fifo;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  flit_t in_flit, out_flit;
  logic in_valid, in_ready, out_valid, out_ready;
  int checks = 0, failures = 0;
  flit_t model[$];
  int cyc = 0;

  flit_fifo #(.DEPTH(2)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_flit = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // latency: push one flit, it must be visible one cycle later
    @(negedge clk);
    checks++; if (out_valid) begin failures++; $display("valid after reset"); end
    in_flit = '{head:1'b1, tail:1'b0, data:32'h1234}; in_valid = 1;
    @(negedge clk); in_valid = 0;
    checks++; if (!out_valid || out_flit.data != 32'h1234) begin failures++; $display("latency"); end
    out_ready = 1; @(negedge clk); out_ready = 0;
    // random traffic
    for (int i = 0; i < 4000; i++) begin
      in_valid  = ($urandom_range(0, 3) != 0);
      out_ready = ($urandom_range(0, 2) != 0);
      in_flit   = '{head:1'($urandom), tail:1'($urandom), data:$urandom};
      #1;
      checks++;
      if (in_ready != (model.size() < 2)) begin failures++; $display("in_ready %0d size %0d", in_ready, model.size()); end
      checks++;
      if (out_valid != (model.size() > 0)) begin failures++; $display("out_valid"); end
      if (out_valid && model.size() > 0) begin
        checks++;
        if (out_flit != model[0]) begin failures++; $display("data %h exp %h", out_flit, model[0]); end
      end
      @(posedge clk);
      if (out_valid && out_ready) void'(model.pop_front());
      if (in_valid && in_ready) model.push_back(in_flit);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
