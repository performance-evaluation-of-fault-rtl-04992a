// ft_bft: 64-IP fault-tolerant butterfly fat tree.
//
// Four ft_bft_cluster blocks (IPs 16c..16c+15 in block c) and four level-3
// switches T[0..3] at the top. Up port t of block c (parent p of the block's
// L2[s], t = 2s+p) connects to child c of T[t], so every top switch reaches
// every block and a packet can cross between blocks through any of them; the
// L2 switches pick any usable, free parent. Top switches have four children
// and no parents: lca_route at level 3 always sends down to child dst[5:4].
//
// Fault map: sw_fault[8c+i] is switch i of block c (see ft_bft_cluster),
// l1_link_fault[8c+2g+s] the link from L1[g] to L2[s] in block c,
// top_sw_fault[t] top switch t, top_link_fault[4c+t] the link between block c
// and T[t]. Each IP n has a regular injection/ejection port pair (ip_*) and a
// spare pair through its block's crossbar (ipx_*). No spare switch is built
// at level 3: the spare hardware is added per 16-IP block only.
module ft_bft
  import noc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] sw_fault,
  input  logic [31:0] l1_link_fault,
  input  logic [3:0]  top_sw_fault,
  input  logic [15:0] top_link_fault,
  input  flit_t       ip_in_flit   [64],
  input  logic [63:0] ip_in_valid,
  output logic [63:0] ip_in_ready,
  output flit_t       ip_out_flit  [64],
  output logic [63:0] ip_out_valid,
  input  logic [63:0] ip_out_ready,
  input  flit_t       ipx_in_flit  [64],
  input  logic [63:0] ipx_in_valid,
  output logic [63:0] ipx_in_ready,
  output flit_t       ipx_out_flit [64],
  output logic [63:0] ipx_out_valid,
  input  logic [63:0] ipx_out_ready
);
  // block c up port t  <->  top switch t child c
  flit_t      c_up_out_flit [4][4];
  logic [3:0] c_up_out_valid [4], c_up_out_ready [4];
  flit_t      c_up_in_flit  [4][4];
  logic [3:0] c_up_in_valid  [4], c_up_in_ready  [4];
  logic [3:0] c_up_ok        [4];

  flit_t      t_in_flit  [4][5];
  logic [4:0] t_in_valid [4], t_in_ready [4];
  flit_t      t_out_flit [4][5];
  logic [4:0] t_out_valid [4], t_out_ready [4];
  logic [3:0] t_child_ok [4];

  always_comb begin
    for (int t = 0; t < 4; t++)
      for (int c = 0; c < 4; c++) begin
        c_up_ok[c][t]    = !top_sw_fault[t] && !top_link_fault[4*c+t];
        t_child_ok[t][c] = !top_sw_fault[t] && !top_link_fault[4*c+t] && !sw_fault[8*c + 5 + t/2];
      end
  end

  always_comb begin
    for (int t = 0; t < 4; t++) begin
      t_in_valid[t]  = '0;
      t_out_ready[t] = '0;
      t_in_flit[t][4] = '0;
      for (int c = 0; c < 4; c++) begin
        t_in_flit[t][c]    = c_up_out_flit[c][t];
        t_in_valid[t][c]   = c_up_out_valid[c][t] && c_up_ok[c][t];
        t_out_ready[t][c]  = c_up_in_ready[c][t] && t_child_ok[t][c];
        c_up_in_flit[c][t] = t_out_flit[t][c];
        c_up_in_valid[c][t]  = t_out_valid[t][c] && t_child_ok[t][c];
        c_up_out_ready[c][t] = t_in_ready[t][c] && c_up_ok[c][t];
      end
    end
  end

  for (genvar t = 0; t < 4; t++) begin : g_top
    bft_switch #(.LEVEL(3), .NC(4), .NPAR(1)) u_sw (
      .clk, .rst_n,
      .child_ok(t_child_ok[t]), .parent_ok(1'b0),
      .in_flit(t_in_flit[t]),   .in_valid(t_in_valid[t]),   .in_ready(t_in_ready[t]),
      .out_flit(t_out_flit[t]), .out_valid(t_out_valid[t]), .out_ready(t_out_ready[t])
    );
  end

  for (genvar c = 0; c < 4; c++) begin : g_blk
    ft_bft_cluster u_blk (
      .clk, .rst_n,
      .sw_fault      (sw_fault[8*c +: 8]),
      .l1_link_fault (l1_link_fault[8*c +: 8]),
      .up_ok         (c_up_ok[c]),
      .ip_in_flit    (ip_in_flit[16*c +: 16]),
      .ip_in_valid   (ip_in_valid[16*c +: 16]),
      .ip_in_ready   (ip_in_ready[16*c +: 16]),
      .ip_out_flit   (ip_out_flit[16*c +: 16]),
      .ip_out_valid  (ip_out_valid[16*c +: 16]),
      .ip_out_ready  (ip_out_ready[16*c +: 16]),
      .ipx_in_flit   (ipx_in_flit[16*c +: 16]),
      .ipx_in_valid  (ipx_in_valid[16*c +: 16]),
      .ipx_in_ready  (ipx_in_ready[16*c +: 16]),
      .ipx_out_flit  (ipx_out_flit[16*c +: 16]),
      .ipx_out_valid (ipx_out_valid[16*c +: 16]),
      .ipx_out_ready (ipx_out_ready[16*c +: 16]),
      .up_out_flit   (c_up_out_flit[c]),
      .up_out_valid  (c_up_out_valid[c]),
      .up_out_ready  (c_up_out_ready[c]),
      .up_in_flit    (c_up_in_flit[c]),
      .up_in_valid   (c_up_in_valid[c]),
      .up_in_ready   (c_up_in_ready[c])
    );
  end
endmodule
