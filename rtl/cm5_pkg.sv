// cm5_pkg: types, constants and small functions shared by the CM-5 network blocks.
//
// Data network: messages travel as a stream of 4-bit nibbles (each router link carries
// 4 data bits per direction). A message is
//   H0 = {afd, up[2:0]}   all-fall-down mark, levels still to climb above this chip
//   H1 = {0,   dn[2:0]}   number of downward routing digits that follow
//   dn digit nibbles      {00, child[1:0]}, first digit used first
//   LEN                   number of 32-bit data words, 1..5
//   TAG                   4-bit message tag
//   DATA                  LEN words, 8 nibbles each, most significant nibble first
//   CRC                   8-bit CRC of every nibble from H0 to the last data nibble, 2 nibbles
// The field order (routing, length, tag, data, CRC), the 4-bit tag and the 1..5 word length
// follow the document; the nibble encodings, the CRC width and polynomial are this design's own.
//
// Control network: a packet moves over a link as one struct per clock. The fields follow
// the document's packet (type, operation, a 32-bit data word, synchronisation bits, flags,
// segment bit); the encodings are this design's own.
package cm5_pkg;

  // ---------------- data network ----------------
  localparam int DN_PORTS     = 8;   // 4 child + 4 parent links per router chip
  localparam int DN_CHILDREN  = 4;
  localparam int DN_MAX_WORDS = 5;   // initial network-interface limit on message length

  // CRC-8, polynomial x^8 + x^2 + x + 1, fed four bits at a time, MSB first.
  function automatic logic [7:0] crc8_nib(input logic [7:0] crc, input logic [3:0] nib);
    logic [7:0] c;
    c = crc;
    for (int b = 3; b >= 0; b--) begin
      if (c[7] ^ nib[b]) c = {c[6:0], 1'b0} ^ 8'h07;
      else               c = {c[6:0], 1'b0};
    end
    return c;
  endfunction

  // ---------------- control network ----------------
  typedef enum logic [1:0] {
    PT_IDLE    = 2'd0,   // filler, sent when a node has nothing better to send
    PT_SINGLE  = 2'd1,   // single-source: broadcasts and interrupts
    PT_MULTI   = 2'd2,   // multiple-source: reductions, scans, router done, sync OR
    PT_ABSTAIN = 2'd3    // stands in for a leaf that does not take part
  } cn_ptype_e;

  typedef enum logic [3:0] {
    OP_NONE   = 4'd0,
    OP_UBCAST = 4'd1,    // user broadcast
    OP_SBCAST = 4'd2,    // supervisor broadcast
    OP_INTR   = 4'd3,    // interrupt broadcast
    OP_UTIL   = 4'd4,    // utility broadcast
    OP_REDUCE = 4'd5,
    OP_SCANF  = 4'd6,    // forward scan (exclusive parallel prefix)
    OP_SCANB  = 4'd7,    // backward scan (exclusive parallel suffix)
    OP_RDONE  = 4'd8,    // router done
    OP_SYNCOR = 4'd9     // synchronous one-bit OR
  } cn_op_e;

  typedef enum logic [2:0] {
    CB_OR   = 3'd0,
    CB_XOR  = 3'd1,
    CB_SMAX = 3'd2,
    CB_SADD = 3'd3,
    CB_UADD = 3'd4
  } cn_comb_e;

  typedef struct packed {
    cn_ptype_e   ptype;
    cn_op_e      op;
    cn_comb_e    comb;
    logic [31:0] data;
    logic        seg;       // segment flag of a segmented scan
    logic        ovf;       // overflow of an addition somewhere in the combine
    logic        err;       // error OR, gathered up and redistributed down
    logic [1:0]  async_or;  // the two asynchronous OR bits (0: supervisor, 1: user)
    logic        stop;      // flow control: some interface is short of receive space
  } cn_pkt_t;

  localparam cn_pkt_t CN_IDLE = '{ptype: PT_IDLE, op: OP_NONE, comb: CB_OR, data: 32'd0,
                                  seg: 1'b0, ovf: 1'b0, err: 1'b0, async_or: 2'b00,
                                  stop: 1'b0};

  function automatic logic [31:0] cn_identity(input cn_comb_e comb);
    return (comb == CB_SMAX) ? 32'h8000_0000 : 32'h0000_0000;
  endfunction

  function automatic logic cn_is_scan(input cn_op_e op);
    return op inside {OP_SCANF, OP_SCANB};
  endfunction

  function automatic logic cn_is_bcast(input cn_op_e op);
    return op inside {OP_UBCAST, OP_SBCAST, OP_INTR, OP_UTIL};
  endfunction

  // ---------------- diagnostic network ----------------
  typedef enum logic [1:0] {
    DG_LEFT  = 2'd0,     // digit 0: left subtree
    DG_RIGHT = 2'd1,     // digit 1: right subtree
    DG_BOTH  = 2'd2,     // digit B: both subtrees
    DG_END   = 2'd3      // end of address: the nodes now holding tokens are selected
  } dg_digit_e;

endpackage
