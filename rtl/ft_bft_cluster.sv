// ft_bft_cluster: one 16-IP block of the fault-tolerant butterfly fat tree,
// with its spare hardware.
//
// Regular part: four level-1 switches L1[0..3] (switch indices 0..3), each
// with four IPs on its children and parents L2[0], L2[1] (switch indices 5,
// 6); the two level-2 switches lead up to the next level through the four
// up ports (up port 2s+p is parent p of L2[s]). Spare part: a spare level-1
// switch S1 (index 4) whose four children reach all sixteen IPs through the
// ft_crossbar, and a spare level-2 switch S2 (index 7). Every L1 switch and
// S1 have S2 as third parent; S1 is the fifth child of L2[0], L2[1] and S2.
// All eight switches are the same bft_switch (five children, three parents).
//
// Fault map: sw_fault[i] kills switch i, l1_link_fault[2g+s] kills the link
// between L1[g] and L2[s], up_ok[u] says whether up port u (its link and the
// switch above) can be used. Links to and between spare switches are taken to
// be good. A dead switch or link carries nothing. Recovery paths: an L1 switch
// whose two regular up links are dead goes up through S2; an L2 switch (or
// S2) whose link down to L1[g] is dead, or whose L1[g] is dead, goes down
// through S1 and the crossbar; an IP whose L1 switch is dead injects through
// the crossbar into S1. Every IP therefore has two injection ports (ip_in_*
// to its L1 switch, ipx_in_* to the crossbar) and two ejection ports; the IP
// chooses the injection port (the crossbar one when its L1 switch is dead).
// Limits of this design: S2 has no parents, so it only carries traffic that
// stays in the block; a packet for an IP whose L1 switch is alive always
// takes the regular last hop.
module ft_bft_cluster
  import noc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  sw_fault,
  input  logic [7:0]  l1_link_fault,
  input  logic [3:0]  up_ok,
  // IP <-> regular L1 switches
  input  flit_t       ip_in_flit   [16],
  input  logic [15:0] ip_in_valid,
  output logic [15:0] ip_in_ready,
  output flit_t       ip_out_flit  [16],
  output logic [15:0] ip_out_valid,
  input  logic [15:0] ip_out_ready,
  // IP <-> crossbar (spare path)
  input  flit_t       ipx_in_flit  [16],
  input  logic [15:0] ipx_in_valid,
  output logic [15:0] ipx_in_ready,
  output flit_t       ipx_out_flit [16],
  output logic [15:0] ipx_out_valid,
  input  logic [15:0] ipx_out_ready,
  // up ports to level 3
  output flit_t       up_out_flit  [4],
  output logic [3:0]  up_out_valid,
  input  logic [3:0]  up_out_ready,
  input  flit_t       up_in_flit   [4],
  input  logic [3:0]  up_in_valid,
  output logic [3:0]  up_in_ready
);
  localparam int unsigned NSW = 8;
  localparam int unsigned NL  = 15;   // internal switch-to-switch links
  localparam int unsigned S1  = 4;
  localparam int unsigned S2  = 7;

  // internal link l joins port lc_port(l) of child switch lc_sw(l) with child
  // input lp_port(l) of parent switch lp_sw(l)
  function automatic int lc_sw(int l);
    return (l < 8) ? l / 2 : (l < 12) ? l - 8 : S1;
  endfunction
  function automatic int lc_port(int l);
    return (l < 8) ? 5 + l % 2 : (l < 12) ? 7 : (l == 14) ? 7 : 5 + (l - 12);
  endfunction
  function automatic int lp_sw(int l);
    return (l < 8) ? 5 + l % 2 : (l < 12) ? S2 : (l == 14) ? S2 : 5 + (l - 12);
  endfunction
  function automatic int lp_port(int l);
    return (l < 8) ? l / 2 : (l < 12) ? l - 8 : 4;
  endfunction

  flit_t       s_in_flit   [NSW][8];
  logic [7:0]  s_in_valid  [NSW];
  logic [7:0]  s_in_ready  [NSW];
  flit_t       s_out_flit  [NSW][8];
  logic [7:0]  s_out_valid [NSW];
  logic [7:0]  s_out_ready [NSW];
  logic [4:0]  child_ok    [NSW];
  logic [2:0]  parent_ok   [NSW];

  // crossbar <-> S1
  flit_t       xb_up_flit [4];
  logic [3:0]  xb_up_valid, xb_up_ready;
  flit_t       s1_dn_flit [4];
  logic [3:0]  s1_dn_valid, s1_dn_ready;

  logic [NL-1:0] link_good;
  always_comb begin
    for (int l = 0; l < NL; l++)
      link_good[l] = !sw_fault[lc_sw(l)] && !sw_fault[lp_sw(l)] && !(l < 8 && l1_link_fault[l]);
  end

  always_comb begin
    for (int s = 0; s < NSW; s++) begin
      s_in_valid[s]  = '0;
      s_out_ready[s] = '0;
      child_ok[s]    = '0;
      parent_ok[s]   = '0;
      for (int p = 0; p < 8; p++) s_in_flit[s][p] = '0;
    end
    // switch-to-switch links
    for (int l = 0; l < NL; l++) begin
      s_in_flit  [lp_sw(l)][lp_port(l)] = s_out_flit[lc_sw(l)][lc_port(l)];
      s_in_valid [lp_sw(l)][lp_port(l)] = s_out_valid[lc_sw(l)][lc_port(l)] && link_good[l];
      s_out_ready[lc_sw(l)][lc_port(l)] = s_in_ready[lp_sw(l)][lp_port(l)] && link_good[l];
      s_in_flit  [lc_sw(l)][lc_port(l)] = s_out_flit[lp_sw(l)][lp_port(l)];
      s_in_valid [lc_sw(l)][lc_port(l)] = s_out_valid[lp_sw(l)][lp_port(l)] && link_good[l];
      s_out_ready[lp_sw(l)][lp_port(l)] = s_in_ready[lc_sw(l)][lc_port(l)] && link_good[l];
      child_ok [lp_sw(l)][lp_port(l)]   = link_good[l];
      parent_ok[lc_sw(l)][lc_port(l)-5] = link_good[l];
    end
    // IPs on the L1 switches
    for (int i = 0; i < 16; i++) begin
      s_in_flit  [i/4][i%4] = ip_in_flit[i];
      s_in_valid [i/4][i%4] = ip_in_valid[i] && !sw_fault[i/4];
      s_out_ready[i/4][i%4] = ip_out_ready[i] && !sw_fault[i/4];
      child_ok   [i/4][i%4] = !sw_fault[i/4];
    end
    // S1 children <-> crossbar
    for (int k = 0; k < 4; k++) begin
      s_in_flit  [S1][k] = xb_up_flit[k];
      s_in_valid [S1][k] = xb_up_valid[k] && !sw_fault[S1];
      s_out_ready[S1][k] = s1_dn_ready[k] && !sw_fault[S1];
      child_ok   [S1][k] = !sw_fault[S1];
    end
    // L2 up ports
    for (int u = 0; u < 4; u++) begin
      s_in_flit  [5+u/2][5+u%2] = up_in_flit[u];
      s_in_valid [5+u/2][5+u%2] = up_in_valid[u] && up_ok[u] && !sw_fault[5+u/2];
      s_out_ready[5+u/2][5+u%2] = up_out_ready[u] && up_ok[u] && !sw_fault[5+u/2];
      parent_ok  [5+u/2][u%2]   = up_ok[u] && !sw_fault[5+u/2];
    end
  end

  always_comb begin
    for (int i = 0; i < 16; i++) begin
      ip_in_ready[i]  = s_in_ready[i/4][i%4] && !sw_fault[i/4];
      ip_out_flit[i]  = s_out_flit[i/4][i%4];
      ip_out_valid[i] = s_out_valid[i/4][i%4] && !sw_fault[i/4];
    end
    for (int k = 0; k < 4; k++) begin
      xb_up_ready[k] = s_in_ready[S1][k] && !sw_fault[S1];
      s1_dn_flit[k]  = s_out_flit[S1][k];
      s1_dn_valid[k] = s_out_valid[S1][k] && !sw_fault[S1];
    end
    for (int u = 0; u < 4; u++) begin
      up_in_ready[u]  = s_in_ready[5+u/2][5+u%2] && up_ok[u] && !sw_fault[5+u/2];
      up_out_flit[u]  = s_out_flit[5+u/2][5+u%2];
      up_out_valid[u] = s_out_valid[5+u/2][5+u%2] && up_ok[u] && !sw_fault[5+u/2];
    end
  end

  for (genvar s = 0; s < NSW; s++) begin : g_sw
    localparam int unsigned LEVEL = (s < 5) ? 1 : 2;
    bft_switch #(.LEVEL(LEVEL), .NC(5), .NPAR(3), .ANY_CHILD(s == S1)) u_sw (
      .clk, .rst_n,
      .child_ok(child_ok[s]), .parent_ok(parent_ok[s]),
      .in_flit(s_in_flit[s]),   .in_valid(s_in_valid[s]),   .in_ready(s_in_ready[s]),
      .out_flit(s_out_flit[s]), .out_valid(s_out_valid[s]), .out_ready(s_out_ready[s])
    );
  end

  ft_crossbar #(.NIP(16), .NCH(4)) u_xbar (
    .clk, .rst_n,
    .s1_dn_flit, .s1_dn_valid, .s1_dn_ready,
    .s1_up_flit(xb_up_flit), .s1_up_valid(xb_up_valid), .s1_up_ready(xb_up_ready),
    .ip_dn_flit(ipx_out_flit), .ip_dn_valid(ipx_out_valid), .ip_dn_ready(ipx_out_ready),
    .ip_up_flit(ipx_in_flit),  .ip_up_valid(ipx_in_valid),  .ip_up_ready(ipx_in_ready)
  );
endmodule
