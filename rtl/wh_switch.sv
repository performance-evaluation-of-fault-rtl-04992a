// wh_switch: wormhole switch core shared by the mesh and the BFT switches.
//
// Every input port has a flit_fifo. When a head flit reaches the front of an
// input buffer that holds no path, the switch shows it on hd_flit and the
// attached routing unit answers with two output masks: route_pref (outputs
// that are wanted) and route_alt (used only when no wanted output is free).
// The allocator walks the inputs in round-robin order starting at a rotating
// pointer and gives each waiting head flit the lowest-numbered free output of
// its masks. The path (input -> output) is then held, and body flits follow
// it, until the tail flit has left; a blocked flit keeps its path and waits,
// as wormhole switching requires. Outputs that a routing unit leaves out of
// both masks are never taken, which is how faulty links are avoided.
//
// Timing: a flit written into an input buffer in cycle t can be allocated in
// cycle t+1 and leaves on the output from cycle t+2 (body flits leave one per
// cycle once the path is held). Output handshake: out_valid/out_ready, a flit
// moves when both are high. The switch is this design's own choice of
// micro-architecture; the document fixes only wormhole switching and the
// 2-flit buffers.
module wh_switch
  import noc_pkg::*;
#(
  parameter int unsigned NP    = 5,
  parameter int unsigned DEPTH = BUF_DEPTH
) (
  input  logic          clk,
  input  logic          rst_n,
  input  flit_t         in_flit   [NP],
  input  logic [NP-1:0] in_valid,
  output logic [NP-1:0] in_ready,
  output flit_t         out_flit  [NP],
  output logic [NP-1:0] out_valid,
  input  logic [NP-1:0] out_ready,
  // routing unit interface
  output flit_t         hd_flit   [NP],
  output logic [NP-1:0] hd_req,
  input  logic [NP-1:0] route_pref [NP],
  input  logic [NP-1:0] route_alt  [NP]
);
  localparam int unsigned PW = (NP > 1) ? $clog2(NP) : 1;

  flit_t          q_flit  [NP];
  logic [NP-1:0]  q_valid, q_ready;

  logic [NP-1:0]  in_bound, out_bound;
  logic [PW-1:0]  in_port  [NP];
  logic [PW-1:0]  out_src  [NP];
  logic [PW-1:0]  rr;

  // allocation results of this cycle
  logic [NP-1:0]  grant;
  logic [PW-1:0]  grant_port [NP];

  for (genvar i = 0; i < NP; i++) begin : g_in
    flit_fifo #(.DEPTH(DEPTH)) u_buf (
      .clk, .rst_n,
      .in_flit (in_flit[i]), .in_valid(in_valid[i]), .in_ready(in_ready[i]),
      .out_flit(q_flit[i]),  .out_valid(q_valid[i]), .out_ready(q_ready[i])
    );
    assign hd_flit[i] = q_flit[i];
    assign hd_req[i]  = q_valid[i] && q_flit[i].head && !in_bound[i];
  end

  // Round-robin, greedy output allocation.
  always_comb begin
    logic [NP-1:0] taken;
    logic [NP-1:0] cand;
    int unsigned   idx;
    taken = out_bound;
    cand  = '0;
    grant = '0;
    for (int unsigned i = 0; i < NP; i++) grant_port[i] = '0;
    for (int unsigned k = 0; k < NP; k++) begin
      idx = int'(rr) + k;
      if (idx >= NP) idx = idx - NP;
      if (hd_req[idx]) begin
        cand = route_pref[idx] & ~taken;
        if (cand == '0) cand = route_alt[idx] & ~taken;
        for (int unsigned j = NP; j > 0; j--) begin
          if (cand[j-1]) begin
            grant[idx]      = 1'b1;
            grant_port[idx] = PW'(j-1);
          end
        end
        if (grant[idx]) taken[grant_port[idx]] = 1'b1;
      end
    end
  end

  // Datapath: each held output shows the front flit of its input.
  always_comb begin
    q_ready = '0;
    for (int unsigned j = 0; j < NP; j++) begin
      out_flit[j]  = q_flit[out_src[j]];
      out_valid[j] = out_bound[j] && q_valid[out_src[j]];
      if (out_bound[j] && out_ready[j]) q_ready[out_src[j]] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_bound  <= '0;
      out_bound <= '0;
      rr        <= '0;
      for (int unsigned i = 0; i < NP; i++) begin
        in_port[i] <= '0;
        out_src[i] <= '0;
      end
    end else begin
      rr <= (rr == PW'(NP-1)) ? '0 : rr + 1'b1;
      // release paths whose tail flit leaves this cycle
      for (int unsigned j = 0; j < NP; j++) begin
        if (out_valid[j] && out_ready[j] && out_flit[j].tail) begin
          out_bound[j]          <= 1'b0;
          in_bound[out_src[j]]  <= 1'b0;
        end
      end
      for (int unsigned i = 0; i < NP; i++) begin
        if (grant[i]) begin
          in_bound[i]               <= 1'b1;
          in_port[i]                <= grant_port[i];
          out_bound[grant_port[i]]  <= 1'b1;
          out_src[grant_port[i]]    <= PW'(i);
        end
      end
    end
  end

  // An output is held by at most the input that owns it.
  for (genvar j = 0; j < NP; j++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
                     out_bound[j] |-> (in_bound[out_src[j]] && in_port[out_src[j]] == PW'(j)));
  end

endmodule
