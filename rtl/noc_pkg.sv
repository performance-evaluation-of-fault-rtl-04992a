// noc_pkg: types and constants shared by the mesh and the fault-tolerant
// butterfly-fat-tree (BFT) networks.
//
// A packet (message) is a sequence of flits. The first flit (head) carries the
// routing information: destination IP id in data[5:0] and source IP id in
// data[11:6]; the last flit has `tail` set. A one-flit packet has both set.
// 64 IPs (6-bit ids) and 2-flit input buffers are the sizes the network is
// evaluated at; the 32-bit payload width is this design's own choice.
package noc_pkg;

  localparam int unsigned DATA_W  = 32;  // payload bits per flit (own choice)
  localparam int unsigned ID_W    = 6;   // IP id width, 64 IPs
  localparam int unsigned BUF_DEPTH = 2; // input buffer depth in flits

  typedef struct packed {
    logic              head;
    logic              tail;
    logic [DATA_W-1:0] data;
  } flit_t;

  // Mesh port numbering
  localparam int unsigned P_LOCAL = 0;
  localparam int unsigned P_NORTH = 1;  // y+1
  localparam int unsigned P_EAST  = 2;  // x+1
  localparam int unsigned P_SOUTH = 3;  // y-1
  localparam int unsigned P_WEST  = 4;  // x-1

  typedef enum logic [0:0] {ROUTE_NEG_FIRST = 1'b0, ROUTE_ODD_EVEN = 1'b1} routing_e;

  function automatic logic [ID_W-1:0] flit_dst(flit_t f);
    return f.data[ID_W-1:0];
  endfunction

  function automatic logic [ID_W-1:0] flit_src(flit_t f);
    return f.data[2*ID_W-1:ID_W];
  endfunction

  function automatic flit_t make_head(logic [ID_W-1:0] src, logic [ID_W-1:0] dst,
                                      logic tail, logic [DATA_W-2*ID_W-1:0] payload);
    flit_t f;
    f.head = 1'b1;
    f.tail = tail;
    f.data = {payload, src, dst};
    return f;
  endfunction

endpackage
