// ft_crossbar: crossbar between the spare switch S1 and the NIP (16) IPs of a
// fault-tolerant BFT block.
//
// Downward part (a multiplexer per IP): each of the NCH (4) child channels of
// S1 carries packets for any IP of the block. When a head flit appears on
// channel k, its destination IP (the low log2(NIP) bits of the destination
// id) is looked up; if that IP's output is free it is bound to channel k and
// the whole packet is passed through, the binding being released after the
// tail flit. So up to four channels from S1 to four different IPs can be open
// at once. Upward part (a demultiplexer driven by the free S1 links): an IP
// that presents a head flit on its crossbar input is given a free S1 input
// channel, searched in round-robin order over the IPs, and keeps it until its
// tail flit has gone. At most NCH packets travel upward at once, one per S1
// child link. Bindings are made in the cycle the head flit is seen and take
// effect in the next cycle; after that one flit per cycle and channel passes,
// with valid/ready handshakes on all sides. The split into a multiplexer and a
// demultiplexer part follows the document; the binding and arbitration scheme
// is this design's own.
module ft_crossbar
  import noc_pkg::*;
#(
  parameter int unsigned NIP = 16,
  parameter int unsigned NCH = 4,
  localparam int unsigned IW = $clog2(NIP),
  localparam int unsigned CW = (NCH > 1) ? $clog2(NCH) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  // S1 child outputs -> crossbar
  input  flit_t          s1_dn_flit  [NCH],
  input  logic [NCH-1:0] s1_dn_valid,
  output logic [NCH-1:0] s1_dn_ready,
  // crossbar -> S1 child inputs
  output flit_t          s1_up_flit  [NCH],
  output logic [NCH-1:0] s1_up_valid,
  input  logic [NCH-1:0] s1_up_ready,
  // crossbar -> IPs
  output flit_t          ip_dn_flit  [NIP],
  output logic [NIP-1:0] ip_dn_valid,
  input  logic [NIP-1:0] ip_dn_ready,
  // IPs -> crossbar
  input  flit_t          ip_up_flit  [NIP],
  input  logic [NIP-1:0] ip_up_valid,
  output logic [NIP-1:0] ip_up_ready
);
  // ---------------- downward: S1 channel k -> IP ----------------
  logic [NCH-1:0] dn_bound;
  logic [IW-1:0]  dn_ip   [NCH];
  logic [NIP-1:0] ipo_busy;
  logic [CW-1:0]  ipo_src [NIP];

  logic [NCH-1:0] dn_grant;
  logic [IW-1:0]  dn_gip  [NCH];

  always_comb begin
    logic [NIP-1:0] claimed;
    claimed  = ipo_busy;
    dn_grant = '0;
    for (int unsigned k = 0; k < NCH; k++) begin
      dn_gip[k] = IW'(flit_dst(s1_dn_flit[k]));
      if (s1_dn_valid[k] && s1_dn_flit[k].head && !dn_bound[k] && !claimed[dn_gip[k]]) begin
        dn_grant[k]         = 1'b1;
        claimed[dn_gip[k]]  = 1'b1;
      end
    end
  end

  always_comb begin
    for (int unsigned i = 0; i < NIP; i++) begin
      ip_dn_flit[i]  = s1_dn_flit[ipo_src[i]];
      ip_dn_valid[i] = ipo_busy[i] && s1_dn_valid[ipo_src[i]];
    end
    for (int unsigned k = 0; k < NCH; k++)
      s1_dn_ready[k] = dn_bound[k] && ip_dn_ready[dn_ip[k]] && ipo_busy[dn_ip[k]]
                       && ipo_src[dn_ip[k]] == CW'(k);
  end

  // ---------------- upward: IP -> free S1 channel ----------------
  logic [NCH-1:0] up_bound;
  logic [IW-1:0]  up_ip   [NCH];
  logic [NIP-1:0] ipi_bound;
  logic [CW-1:0]  ipi_ch  [NIP];
  logic [IW-1:0]  up_rr;

  logic [NCH-1:0] up_grant;
  logic [IW-1:0]  up_gip  [NCH];

  always_comb begin
    logic [NIP-1:0] claimed;
    logic           found;
    int unsigned    idx;  // only the low bits index an IP
    claimed  = ipi_bound;
    idx      = 0;
    up_grant = '0;
    for (int unsigned c = 0; c < NCH; c++) begin
      up_gip[c] = '0;
      found     = 1'b0;
      if (!up_bound[c]) begin
        for (int unsigned n = 0; n < NIP; n++) begin
          idx = (int'(up_rr) + n) % NIP;
          if (!found && ip_up_valid[idx] && ip_up_flit[idx].head && !claimed[idx]) begin
            found     = 1'b1;
            up_gip[c] = IW'(idx);
          end
        end
        if (found) begin
          up_grant[c]        = 1'b1;
          claimed[up_gip[c]] = 1'b1;
        end
      end
    end
  end

  always_comb begin
    for (int unsigned c = 0; c < NCH; c++) begin
      s1_up_flit[c]  = ip_up_flit[up_ip[c]];
      s1_up_valid[c] = up_bound[c] && ip_up_valid[up_ip[c]];
    end
    for (int unsigned i = 0; i < NIP; i++)
      ip_up_ready[i] = ipi_bound[i] && s1_up_ready[ipi_ch[i]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dn_bound  <= '0;
      ipo_busy  <= '0;
      up_bound  <= '0;
      ipi_bound <= '0;
      up_rr     <= '0;
      for (int unsigned k = 0; k < NCH; k++) begin
        dn_ip[k] <= '0;
        up_ip[k] <= '0;
      end
      for (int unsigned i = 0; i < NIP; i++) begin
        ipo_src[i] <= '0;
        ipi_ch[i]  <= '0;
      end
    end else begin
      up_rr <= up_rr + 1'b1;
      for (int unsigned k = 0; k < NCH; k++) begin
        // downward release / bind
        if (s1_dn_valid[k] && s1_dn_ready[k] && s1_dn_flit[k].tail) begin
          dn_bound[k]        <= 1'b0;
          ipo_busy[dn_ip[k]] <= 1'b0;
        end
        if (dn_grant[k]) begin
          dn_bound[k]          <= 1'b1;
          dn_ip[k]             <= dn_gip[k];
          ipo_busy[dn_gip[k]]  <= 1'b1;
          ipo_src[dn_gip[k]]   <= CW'(k);
        end
        // upward release / bind
        if (s1_up_valid[k] && s1_up_ready[k] && s1_up_flit[k].tail) begin
          up_bound[k]         <= 1'b0;
          ipi_bound[up_ip[k]] <= 1'b0;
        end
        if (up_grant[k]) begin
          up_bound[k]          <= 1'b1;
          up_ip[k]             <= up_gip[k];
          ipi_bound[up_gip[k]] <= 1'b1;
          ipi_ch[up_gip[k]]    <= CW'(k);
        end
      end
    end
  end

  // A bound S1 channel always points at an IP that points back at it.
  for (genvar k = 0; k < NCH; k++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
                     dn_bound[k] |-> (ipo_busy[dn_ip[k]] && ipo_src[dn_ip[k]] == CW'(k)));
    assert property (@(posedge clk) disable iff (!rst_n)
                     up_bound[k] |-> (ipi_bound[up_ip[k]] && ipi_ch[up_ip[k]] == CW'(k)));
  end
endmodule
