// bist_pkg: types and constants shared by the NoC scan-BIST blocks.
//
// Test data travels from the Embedded Test Core (ETC) to the cores as packets
// of flits. A flit carries FLIT_W data bits plus head/tail framing bits and a
// valid bit. The first flit of a packet (head) is a header whose data field
// holds the packet type in its two top bits and the multicast destination
// mask (one bit per core) in its low bits. The payload flits that follow hold
// the test vector, FLIT_W scan bits per flit.
//
// The flit width, the header layout and the packet types are this design's
// own choices; the network they travel over is outside this RTL.
package bist_pkg;

  // Data bits per flit; also the number of parallel scan chains in a core,
  // so that one flit shifts one bit into every chain.
  localparam int unsigned FLIT_W = 16;

  // Largest number of cores a header's destination mask can address.
  localparam int unsigned MAX_CORES = FLIT_W - 2;

  typedef enum logic [1:0] {
    PKT_START = 2'd0,  // header only: clear shadow chain and signature
    PKT_TEST  = 2'd1,  // header + vector: shift in, then apply in one stall cycle
    PKT_FLUSH = 2'd2   // header + filler: shift out the last response, close signature
  } pkt_type_e;

  typedef struct packed {
    logic              valid;
    logic              head;
    logic              tail;
    logic [FLIT_W-1:0] data;
  } flit_t;

  localparam flit_t FLIT_IDLE = '{valid: 1'b0, head: 1'b0, tail: 1'b0, data: '0};

  function automatic logic [FLIT_W-1:0] make_header(pkt_type_e t, logic [MAX_CORES-1:0] mask);
    logic [FLIT_W-1:0] d;
    d = '0;
    d[FLIT_W-1 -: 2]   = t;
    d[MAX_CORES-1:0]   = mask;
    return d;
  endfunction

  // Type field of a header; pass it data[FLIT_W-1 -: 2] of the head flit.
  function automatic pkt_type_e header_type(logic [1:0] type_bits);
    return pkt_type_e'(type_bits);
  endfunction

endpackage
