// flit_fifo: input buffer of one switch port.
//
// A small synchronous FIFO of DEPTH flits (two by default, the buffer depth the
// networks are evaluated with). Push side: in_valid/in_ready, a flit is written
// when both are high. Pop side: out_valid shows the oldest flit on out_flit; it
// is removed when out_ready is high. in_ready is !full and does not depend on
// out_ready, so no combinational path runs through the buffer. A flit written
// in cycle t is visible at the output in cycle t+1. Reset empties the buffer.
module flit_fifo
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH = BUF_DEPTH
) (
  input  logic  clk,
  input  logic  rst_n,
  input  flit_t in_flit,
  input  logic  in_valid,
  output logic  in_ready,
  output flit_t out_flit,
  output logic  out_valid,
  input  logic  out_ready
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  flit_t          mem [DEPTH];
  logic [AW-1:0]  rd_ptr, wr_ptr;
  logic [AW:0]    count;
  logic           push, pop;

  assign in_ready  = (count != (AW+1)'(DEPTH));
  assign out_valid = (count != '0);
  assign out_flit  = mem[rd_ptr];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= inc(wr_ptr);
      if (pop)  rd_ptr <= inc(rd_ptr);
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_flit;
  end

  // A full buffer never reports ready, an empty one never valid.
  assert property (@(posedge clk) disable iff (!rst_n) count <= (AW+1)'(DEPTH));

endmodule
