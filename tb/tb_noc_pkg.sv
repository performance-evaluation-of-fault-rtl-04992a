// tb_noc_pkg: packet generation and checking shared by the network testbenches.
//
// Packet format used by the testbenches (the switches look only at the head
// flit's destination and source ids):
//   head flit : data = {seq[11:0], len[7:0], src[5:0], dst[5:0]}
//   body flit : data = {src[5:0], seq[11:0], k[7:0], dst[5:0]}, k = flit index
// The last flit of a packet of len flits has tail set. rx_port follows the
// flits that arrive on one ejection port and checks that each packet arrives
// whole, in order, uninterleaved and at the right IP (any IP when the
// port id is negative, for ports between switches).
package tb_noc_pkg;
  import noc_pkg::*;

  function automatic flit_t mk_flit(int src, int dst, int seq, int k, int len);
    flit_t f;
    f.head = (k == 0);
    f.tail = (k == len - 1);
    if (k == 0) f.data = {12'(seq), 8'(len), 6'(src), 6'(dst)};
    else        f.data = {6'(src), 12'(seq), 8'(k), 6'(dst)};
    return f;
  endfunction

  class rx_port;
    int  my_id;
    bit  busy;
    int  src, seq, idx, len, dst;
    int  packets, errors;
    int  last_src, last_seq, last_dst;

    function new(int id);
      my_id = id; busy = 0; packets = 0; errors = 0;
    endfunction

    // returns 1 when f completes a good packet
    function bit accept(flit_t f);
      bit done;
      done = 0;
      if (!busy) begin
        if (!f.head || (my_id >= 0 && int'(f.data[5:0]) != my_id)) begin
          errors++;
          $display("rx %0d: bad head %h", my_id, f);
          return 0;
        end
        dst = int'(f.data[5:0]);
        src = int'(f.data[11:6]);
        len = int'(f.data[19:12]);
        seq = int'(f.data[31:20]);
        idx = 1;
        busy = 1;
      end else begin
        if (f != mk_flit(src, dst, seq, idx, len)) begin
          errors++;
          $display("rx %0d: flit %0d of packet %0d->%0d seq %0d wrong: %h", my_id, idx, src, dst, seq, f);
        end
        idx++;
      end
      if (f.tail) begin
        if (idx != len) begin
          errors++;
          $display("rx %0d: packet length %0d, expected %0d", my_id, idx, len);
        end
        busy = 0;
        packets++;
        last_src = src;
        last_seq = seq;
        last_dst = dst;
        done = 1;
      end
      return done;
    endfunction
  endclass

  // a packet waiting to be injected by one IP
  typedef struct {
    int dst;
    int seq;
    int len;
    int at;    // earliest cycle for the head flit
  } pkt_t;

endpackage
