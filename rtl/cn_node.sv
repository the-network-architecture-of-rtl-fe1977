// cn_node: one binary node of the CM-5 control network tree.
//
// Every link carries one packet per clock in each direction; a node with nothing to send
// sends an idle packet. Going up, the node looks at the packets arriving from its two
// children:
//   * a single-source packet (broadcast, interrupt) goes straight up, ahead of anything
//     waiting; two single-source packets in the same clock are a collision: the left one
//     goes on and the error flag is raised;
//   * multiple-source and abstain packets are queued per child, in arrival order. When both
//     queues hold a packet (and no single-source packet uses the up slot) the two heads are
//     combined with cn_alu and sent up. An abstain packet counts as the identity; two abstains
//     give an abstain. Different operations meeting raise the error flag.
//   * for a scan the node puts aside the left child's summary (forward scan) or the right
//     child's (backward scan) in the scan buffer, to combine with the value that later comes
//     down from the parent. Segment flags travel with the summaries, so a scan restarts at a
//     segment start.
// Going down, a single-source packet and a reduction result are copied to both children; a
// scan value p from the parent gives, for a forward scan, p to the left child and
// (left summary restarts ? left summary : p op left summary) to the right child, and the
// mirror image for a backward scan.
// The minor-stream bits (error, the two asynchronous ORs, the stop flow-control bit) are ORed
// from both children on every clock, whatever the packet type, and copied to both children
// on the way down.
//
// Flow control: the node itself never stalls. The queues cannot overflow because each network
// interface keeps at most a few combining operations outstanding, and the stop bit makes the
// interfaces hold off new packets while any receive FIFO is short of space.
//
// Timing: a single-source packet takes 1 clock per node going up, a combined packet 2 (queue
// then combine), and every packet 1 clock per node going down.
// From the document: the four packet types, single-source priority and collision error, the
// wait-for-sibling combining with in-order queues, the put-aside buffer for scans, abstain as
// identity, the error OR. This design's own: one packet per clock on a link (the document sends
// a 65-bit packet over narrower links), the queue depth, the segmented-scan summaries and the
// stop bit as the flow-control bit of the minor stream.
module cn_node
  import cm5_pkg::*;
#(
  parameter int QDEPTH = 8     // waiting multiple-source packets per child, and scan buffer
) (
  input  logic    clk,
  input  logic    rst_n,
  input  cn_pkt_t up_in  [2],   // from children (0 left, 1 right)
  output cn_pkt_t up_out,       // to parent
  input  cn_pkt_t dn_in,        // from parent
  output cn_pkt_t dn_out [2],   // to children
  output logic    collision_err,
  output logic    mismatch_err
);
  localparam int PW = $bits(cn_pkt_t);

  // ---------------- up direction ----------------
  logic [1:0]  q_push, q_pop, q_empty;
  cn_pkt_t     q_head [2];
  logic [PW-1:0] q_rdata [2];

  for (genvar c = 0; c < 2; c++) begin : g_q
    assign q_push[c] = up_in[c].ptype inside {PT_MULTI, PT_ABSTAIN};
    sync_fifo #(.WIDTH(PW), .DEPTH(QDEPTH)) u_q (
      .clk, .rst_n,
      .push (q_push[c]),
      .wdata(up_in[c]),
      .pop  (q_pop[c]),
      .rdata(q_rdata[c]),
      .full (),
      .empty(q_empty[c]),
      .count()
    );
    assign q_head[c] = cn_pkt_t'(q_rdata[c]);
  end

  logic        ss_l, ss_r, combine;
  cn_pkt_t     a, b, comb_pkt, up_d;
  logic [31:0] alu_y;
  logic        alu_ovf;
  logic        mism;

  assign ss_l    = up_in[0].ptype == PT_SINGLE;
  assign ss_r    = up_in[1].ptype == PT_SINGLE;
  assign combine = !ss_l && !ss_r && !q_empty[0] && !q_empty[1];
  assign q_pop   = {combine, combine};
  assign a       = q_head[0];
  assign b       = q_head[1];

  // abstaining side acts as the identity with no segment start
  logic [31:0] av, bv;
  logic        aseg, bseg;
  assign av   = (a.ptype == PT_ABSTAIN) ? cn_identity(b.comb) : a.data;
  assign bv   = (b.ptype == PT_ABSTAIN) ? cn_identity(a.comb) : b.data;
  assign aseg = (a.ptype == PT_MULTI) && a.seg;
  assign bseg = (b.ptype == PT_MULTI) && b.seg;

  cn_alu u_up_alu (
    .comb ((a.ptype == PT_MULTI) ? a.comb : b.comb),
    .a    (av), .b(bv),
    .a_ovf(a.ptype == PT_MULTI && a.ovf),
    .b_ovf(b.ptype == PT_MULTI && b.ovf),
    .y    (alu_y), .ovf(alu_ovf)
  );

  assign mism = combine && a.ptype == PT_MULTI && b.ptype == PT_MULTI &&
                (a.op != b.op || a.comb != b.comb);

  always_comb begin
    comb_pkt = (a.ptype == PT_MULTI) ? a : b;
    if (a.ptype == PT_ABSTAIN && b.ptype == PT_ABSTAIN) begin
      comb_pkt.ptype = PT_ABSTAIN;
    end else begin
      comb_pkt.ptype = PT_MULTI;
      comb_pkt.ovf   = alu_ovf;
      comb_pkt.seg   = aseg | bseg;
      case (comb_pkt.op)
        OP_SCANF: comb_pkt.data = bseg ? bv : alu_y;
        OP_SCANB: comb_pkt.data = aseg ? av : alu_y;
        default:  comb_pkt.data = alu_y;
      endcase
    end
  end

  always_comb begin
    if (ss_l)         up_d = up_in[0];
    else if (ss_r)    up_d = up_in[1];
    else if (combine) up_d = comb_pkt;
    else              up_d = CN_IDLE;
    up_d.err      = up_in[0].err | up_in[1].err | (ss_l & ss_r) | mism;
    up_d.async_or = up_in[0].async_or | up_in[1].async_or;
    up_d.stop     = up_in[0].stop | up_in[1].stop;
  end

  // scan buffer: the summary put aside for the down phase
  typedef struct packed {
    logic [31:0] data;
    logic        seg;
    logic        ovf;
  } save_t;
  save_t       sv_w, sv_r;
  logic        sv_push, sv_pop, sv_empty;
  logic [$bits(save_t)-1:0] sv_rdata;

  assign sv_push = combine && cn_is_scan(comb_pkt.op);
  always_comb begin
    if (comb_pkt.op == OP_SCANF) sv_w = '{data: av, seg: aseg, ovf: a.ptype == PT_MULTI && a.ovf};
    else                         sv_w = '{data: bv, seg: bseg, ovf: b.ptype == PT_MULTI && b.ovf};
  end

  sync_fifo #(.WIDTH($bits(save_t)), .DEPTH(QDEPTH)) u_scanbuf (
    .clk, .rst_n,
    .push (sv_push),
    .wdata(sv_w),
    .pop  (sv_pop),
    .rdata(sv_rdata),
    .full (),
    .empty(sv_empty),
    .count()
  );
  assign sv_r = save_t'(sv_rdata);

  // ---------------- down direction ----------------
  logic        dn_scan;
  logic [31:0] dn_y;
  logic        dn_ovf;
  cn_pkt_t     dn_d [2];

  assign dn_scan = dn_in.ptype inside {PT_MULTI, PT_ABSTAIN} && cn_is_scan(dn_in.op);
  assign sv_pop  = dn_scan;

  cn_alu u_dn_alu (
    .comb (dn_in.comb),
    .a    (dn_in.data), .b(sv_r.data),
    .a_ovf(dn_in.ovf),  .b_ovf(sv_r.ovf),
    .y    (dn_y), .ovf(dn_ovf)
  );

  always_comb begin
    dn_d[0] = dn_in;
    dn_d[1] = dn_in;
    if (dn_scan && dn_in.ptype == PT_MULTI) begin
      if (dn_in.op == OP_SCANF) begin
        dn_d[1].data = sv_r.seg ? sv_r.data : dn_y;
        dn_d[1].ovf  = sv_r.seg ? sv_r.ovf  : dn_ovf;
      end else begin
        dn_d[0].data = sv_r.seg ? sv_r.data : dn_y;
        dn_d[0].ovf  = sv_r.seg ? sv_r.ovf  : dn_ovf;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      up_out        <= CN_IDLE;
      dn_out[0]     <= CN_IDLE;
      dn_out[1]     <= CN_IDLE;
      collision_err <= 1'b0;
      mismatch_err  <= 1'b0;
    end else begin
      up_out        <= up_d;
      dn_out[0]     <= dn_d[0];
      dn_out[1]     <= dn_d[1];
      collision_err <= ss_l & ss_r;
      mismatch_err  <= mism;
    end
  end

  // a scan result coming down always finds its put-aside summary
  a_scanbuf: assert property (@(posedge clk) disable iff (!rst_n) dn_scan |-> !sv_empty)
    else $error("cn_node: scan value arrived with an empty scan buffer");
endmodule
