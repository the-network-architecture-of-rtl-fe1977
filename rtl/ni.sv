// ni: the CM-5 network interface of one processing node (or control processor).
//
// The processor sees the networks as memory-mapped registers and FIFOs. Writing to an
// address pushes data toward a network, the address telling the interface what to do;
// reading pops what the networks delivered. Supervisor-only addresses ignore writes made
// without bus_sup and set the privilege-error flag, as the processor's page protection would
// keep user code away from them.
//
// Data network: two independent sides, left and right (ni_dn_port each), so requests and
// replies can travel on different sides. A message starts with a header write that names the
// destination by its relative address inside the partition; the interface bounds-checks it
// against the partition size and adds the partition base to get the physical address
// (supervisor code may give a physical address directly). A message the interface refuses
// (no room, out of bounds) is reported in the status word and may be retried.
//
// Control network: one packet per clock goes up the leaf link. Broadcasts (user, and the
// supervisor, interrupt and utility kinds) go out as single-source packets; reductions,
// scans, router done and the synchronous OR as multiple-source packets, or as abstain packets
// while the abstain bit is set. The interface keeps, in order, what it contributed to each
// combining operation still open, so that on the result it can drop the result of an
// operation it abstained from and restart a forward scan at its own segment start (a leaf
// that starts a segment gets the identity). For a backward scan it sends the identity when it
// starts a segment. Router done: after the processor writes the router-done address, the
// interface sends (messages sent - messages received) with signed addition; while the sum
// over all leaves is not zero, every interface sends it again, and when it is zero the
// router-done FIFO receives a word. No new combining operation starts while router done is
// open, so all leaves keep the same order. At most CM_MAX combining operations and BC_MAX
// broadcasts are outstanding, and the stop bit is raised while the broadcast receive FIFO has
// less than 2*BC_MAX+2 free entries; this is the end-to-end flow control.
// Interrupts (irq, with the cause in IRQ_STATUS): a data message whose tag is enabled in the
// 16-bit tag mask, an interrupt broadcast, a rising asynchronous OR.
//
// Register map (word addresses): 00 L_SEND_FIRST {tag[31:28], len[26:24], rel dest}; 01 L_SEND
// data; 02 L_RECV; 03 L_STATUS {bounds_err, rx_avail, accepted}; 04-07 the same for the right
// side; 08 / 0C L / R_SEND_FIRST_PHYS (supervisor); 10 CN_UBCAST, 11 CN_SBCAST*, 12 CN_INTR*,
// 13 CN_UTIL* (data words; * supervisor); 14 CN_COMB_CFG {seg[9], abstain[8], comb[6:4],
// op[3:0]}; 15 CN_COMB data; 16 CN_RDONE; 17 CN_SYNCOR bit 0; 18 CN_ASYNC {sup[1]*, user[0]};
// 20 BCAST_RECV; 21 COMB_RECV; 22 RDONE_RECV; 23 SYNCOR_RECV; 24 CN_STATUS; 25 BCAST_OP; 30 TAG_MASK*;
// 31 PART_BASE*; 32 PART_SIZE*; 33 SELF (read); 34 IRQ_STATUS (read clears); 35 SENT; 36 RECEIVED.
// Reading an empty receive FIFO returns 0 and pops nothing.
// From the document: memory-mapped FIFOs, left/right sides, relative addresses with bounds
// check, tag interrupt mask, separate control FIFOs per function, abstaining, segment bit,
// Kirchhoff router done, the synchronous and two asynchronous ORs, error reporting. This
// design's own: the register map and every encoding, the credit limits and the stop bit, the
// linear relative-to-physical mapping (base + offset), one clock domain.
module ni
  import cm5_pkg::*;
#(
  parameter int LEVELS = 7,      // data network height, 4**LEVELS nodes
  parameter int BC_MAX = 4,
  parameter int CM_MAX = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [2*LEVELS-1:0]  self_addr,
  // processor bus
  input  logic                 bus_wr,
  input  logic                 bus_rd,
  input  logic [7:0]           bus_addr,
  input  logic [31:0]          bus_wdata,
  input  logic                 bus_sup,
  output logic [31:0]          bus_rdata,
  output logic                 irq,
  // data network, left side [0] and right side [1]
  output logic [1:0]           dn_tx_valid,
  output logic [1:0][3:0]      dn_tx_data,
  input  logic [1:0]           dn_tx_ready,
  input  logic [1:0]           dn_rx_valid,
  input  logic [1:0][3:0]      dn_rx_data,
  output logic [1:0]           dn_rx_ready,
  // control network leaf link
  output cn_pkt_t              cn_up,
  input  cn_pkt_t              cn_dn
);
  localparam int NB = 2 * LEVELS;

  // ---------------- registers ----------------
  logic [15:0]   tag_mask;
  logic [NB-1:0] part_base;
  logic [NB:0]   part_size;
  logic [9:0]    comb_cfg;
  logic [1:0]    async_in;
  logic          priv_err, net_err, rx_err, comb_ovf;
  logic [3:0]    irq_status;
  logic [1:0]    bounds_err;

  logic wr_sup_ok;
  assign wr_sup_ok = bus_wr && bus_sup;

  // ---------------- data network sides ----------------
  logic [1:0]       p_hdr, p_data, p_pop, p_refuse, p_acc, p_avail, p_irq, p_crc;
  logic [1:0][31:0] p_rdata, p_sent, p_recv;
  logic [1:0][31:0] p_wdata;

  for (genvar s = 0; s < 2; s++) begin : g_side
    localparam logic [7:0] B = 8'(4 * s);
    logic          rel_hdr, phys_hdr;
    logic [NB:0]   rel;
    assign rel_hdr   = bus_wr && bus_addr == B;
    assign phys_hdr  = wr_sup_ok && bus_addr == B + 8'h08;
    assign rel       = {1'b0, bus_wdata[NB-1:0]};
    assign p_hdr[s]  = rel_hdr || phys_hdr;
    assign p_refuse[s] = rel_hdr && (rel >= part_size);
    assign p_wdata[s] = rel_hdr ? {bus_wdata[31:NB], bus_wdata[NB-1:0] + part_base} : bus_wdata;
    assign p_data[s] = bus_wr && bus_addr == B + 8'h01;
    assign p_pop[s]  = bus_rd && bus_addr == B + 8'h02;

    ni_dn_port #(.LEVELS(LEVELS)) u_port (
      .clk, .rst_n, .self_addr,
      .push_hdr(p_hdr[s]), .refuse(p_refuse[s]), .push_data(p_data[s]), .wdata(p_wdata[s]),
      .accepted(p_acc[s]), .pop(p_pop[s]), .rdata(p_rdata[s]), .rx_avail(p_avail[s]),
      .tag_mask, .irq(p_irq[s]), .crc_err(p_crc[s]),
      .sent_count(p_sent[s]), .recv_count(p_recv[s]),
      .tx_valid(dn_tx_valid[s]), .tx_data(dn_tx_data[s]), .tx_ready(dn_tx_ready[s]),
      .rx_valid(dn_rx_valid[s]), .rx_data(dn_rx_data[s]), .rx_ready(dn_rx_ready[s])
    );
  end

  // ---------------- control network: outgoing ----------------
  localparam int PW = $bits(cn_pkt_t);
  logic          bq_push, bq_pop, bq_empty, bq_full;
  logic [PW-1:0] bq_rdata;
  cn_pkt_t       bq_w;
  logic          cq_push, cq_pop, cq_empty, cq_full;
  logic [PW-1:0] cq_rdata;
  cn_pkt_t       cq_w, cq_head;

  always_comb begin
    bq_w = CN_IDLE;
    bq_w.ptype = PT_SINGLE;
    bq_w.data  = bus_wdata;
    unique case (bus_addr)
      8'h11:   bq_w.op = OP_SBCAST;
      8'h12:   bq_w.op = OP_INTR;
      8'h13:   bq_w.op = OP_UTIL;
      default: bq_w.op = OP_UBCAST;
    endcase
  end
  assign bq_push = bus_wr && (bus_addr == 8'h10 ||
                   (bus_sup && bus_addr inside {8'h11, 8'h12, 8'h13}));

  always_comb begin
    cq_w       = CN_IDLE;
    cq_w.ptype = comb_cfg[8] ? PT_ABSTAIN : PT_MULTI;
    cq_w.comb  = cn_comb_e'(comb_cfg[6:4]);
    cq_w.seg   = comb_cfg[9];
    cq_w.data  = bus_wdata;
    cq_w.op    = cn_op_e'(comb_cfg[3:0]);
    if (bus_addr == 8'h16) begin
      cq_w.op    = OP_RDONE;
      cq_w.ptype = PT_MULTI;
      cq_w.comb  = CB_SADD;
      cq_w.seg  = 1'b0;
    end else if (bus_addr == 8'h17) begin
      cq_w.op   = OP_SYNCOR;
      cq_w.comb = CB_OR;
      cq_w.seg  = 1'b0;
      cq_w.data = {31'd0, bus_wdata[0]};
    end else if (cq_w.op == OP_SCANB && comb_cfg[9]) begin
      cq_w.data = cn_identity(cq_w.comb);      // a segment start adds nothing to the left
    end
  end
  assign cq_push = bus_wr && bus_addr inside {8'h15, 8'h16, 8'h17};

  sync_fifo #(.WIDTH(PW), .DEPTH(8)) u_bq (
    .clk, .rst_n, .push(bq_push), .wdata(bq_w), .pop(bq_pop), .rdata(bq_rdata),
    .full(bq_full), .empty(bq_empty), .count()
  );
  sync_fifo #(.WIDTH(PW), .DEPTH(8)) u_cq (
    .clk, .rst_n, .push(cq_push), .wdata(cq_w), .pop(cq_pop), .rdata(cq_rdata),
    .full(cq_full), .empty(cq_empty), .count()
  );
  assign cq_head = cn_pkt_t'(cq_rdata);

  // outstanding operations and router-done state
  logic [3:0] bc_out, cm_out;
  logic       rd_open, rd_again;
  logic [3:0] in_used;
  logic [31:0] diff;
  logic       stop_in;

  assign diff    = (p_sent[0] + p_sent[1]) - (p_recv[0] + p_recv[1]);
  assign stop_in = cn_dn.stop;

  logic send_bc, send_cm, send_rd;
  assign send_rd = rd_again;
  assign send_bc = !send_rd && !bq_empty && !stop_in && int'(bc_out) < BC_MAX;
  assign send_cm = !send_rd && !send_bc && !cq_empty && (!rd_open || cq_head.op == OP_RDONE) &&
                   int'(cm_out) < CM_MAX && int'(cm_out) + int'(in_used) < 8;
  assign bq_pop  = send_bc;
  assign cq_pop  = send_cm;

  // ---------------- control network: incoming ----------------
  logic          bi_push, bi_pop, bi_empty;
  logic [35:0]   bi_rdata;
  logic [$clog2(17)-1:0] bi_count;
  logic          ci_push, ci_pop, ci_empty;
  logic [31:0]   ci_rdata, ci_w;
  logic [3:0]    ci_count;
  logic          ri_push, ri_pop, ri_empty;
  logic [3:0]    ri_count;
  logic          si_push, si_pop, si_empty;
  logic [31:0]   si_rdata;
  logic [3:0]    si_count;
  // what this leaf contributed to each open combining operation: {abstain, seg}
  logic          pq_push, pq_pop, pq_empty;
  logic [1:0]    pq_rdata;

  logic dn_multi;
  assign dn_multi = cn_dn.ptype inside {PT_MULTI, PT_ABSTAIN};
  assign bi_push  = cn_dn.ptype == PT_SINGLE && cn_dn.op != OP_INTR;
  assign pq_push  = send_cm && cq_head.op != OP_RDONE;
  assign pq_pop   = dn_multi && cn_dn.op != OP_RDONE;
  assign ci_push  = pq_pop && cn_dn.op inside {OP_REDUCE, OP_SCANF, OP_SCANB} && !pq_rdata[1];
  assign ci_w     = (cn_dn.op == OP_SCANF && pq_rdata[0]) ? cn_identity(cn_dn.comb) : cn_dn.data;
  assign si_push  = pq_pop && cn_dn.op == OP_SYNCOR && !pq_rdata[1];
  assign ri_push  = dn_multi && cn_dn.op == OP_RDONE && cn_dn.data == 32'd0;
  assign in_used  = ci_count + ri_count + si_count;

  sync_fifo #(.WIDTH(36), .DEPTH(16)) u_bi (
    .clk, .rst_n, .push(bi_push), .wdata({cn_dn.op, cn_dn.data}), .pop(bi_pop),
    .rdata(bi_rdata), .full(), .empty(bi_empty), .count(bi_count)
  );
  sync_fifo #(.WIDTH(32), .DEPTH(8)) u_ci (
    .clk, .rst_n, .push(ci_push), .wdata(ci_w), .pop(ci_pop), .rdata(ci_rdata),
    .full(), .empty(ci_empty), .count(ci_count)
  );
  sync_fifo #(.WIDTH(1), .DEPTH(8)) u_ri (
    .clk, .rst_n, .push(ri_push), .wdata(1'b1), .pop(ri_pop), .rdata(),
    .full(), .empty(ri_empty), .count(ri_count)
  );
  sync_fifo #(.WIDTH(32), .DEPTH(8)) u_si (
    .clk, .rst_n, .push(si_push), .wdata(cn_dn.data), .pop(si_pop), .rdata(si_rdata),
    .full(), .empty(si_empty), .count(si_count)
  );
  sync_fifo #(.WIDTH(2), .DEPTH(8)) u_pq (
    .clk, .rst_n, .push(pq_push), .wdata({cq_head.ptype == PT_ABSTAIN, cq_head.seg}),
    .pop(pq_pop), .rdata(pq_rdata), .full(), .empty(pq_empty), .count()
  );

  assign bi_pop = bus_rd && bus_addr == 8'h20;
  assign ci_pop = bus_rd && bus_addr == 8'h21;
  assign ri_pop = bus_rd && bus_addr == 8'h22;
  assign si_pop = bus_rd && bus_addr == 8'h23;

  // ---------------- leaf link ----------------
  always_comb begin
    if (send_rd) begin
      cn_up       = CN_IDLE;
      cn_up.ptype = PT_MULTI;
      cn_up.op    = OP_RDONE;
      cn_up.comb  = CB_SADD;
      cn_up.data  = diff;
    end else if (send_bc) cn_up = cn_pkt_t'(bq_rdata);
    else if (send_cm) begin
      cn_up = cq_head;
      if (cq_head.op == OP_RDONE) cn_up.data = diff;
    end else cn_up = CN_IDLE;
    cn_up.async_or = async_in;
    cn_up.err      = net_err;
    cn_up.stop     = (16 - int'(bi_count)) < 2 * BC_MAX + 2;
  end

  logic [1:0] async_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tag_mask   <= '0;
      part_base  <= '0;
      part_size  <= (NB+1)'(1) << NB;
      comb_cfg   <= '0;
      async_in   <= '0;
      async_q    <= '0;
      priv_err   <= 1'b0;
      net_err    <= 1'b0;
      rx_err     <= 1'b0;
      comb_ovf   <= 1'b0;
      irq_status <= '0;
      bounds_err <= '0;
      bc_out     <= '0;
      cm_out     <= '0;
      rd_open    <= 1'b0;
      rd_again   <= 1'b0;
    end else begin
      // register writes
      if (bus_wr) begin
        if (bus_addr inside {8'h08, 8'h0C, 8'h11, 8'h12, 8'h13, 8'h30, 8'h31, 8'h32} && !bus_sup)
          priv_err <= 1'b1;
        if (bus_addr == 8'h14) comb_cfg <= bus_wdata[9:0];
        if (bus_addr == 8'h18) begin
          async_in[0] <= bus_wdata[0];
          if (bus_sup) async_in[1] <= bus_wdata[1];
        end
      end
      if (wr_sup_ok) begin
        if (bus_addr == 8'h30) tag_mask  <= bus_wdata[15:0];
        if (bus_addr == 8'h31) part_base <= bus_wdata[NB-1:0];
        if (bus_addr == 8'h32) part_size <= bus_wdata[NB:0];
      end
      for (int s = 0; s < 2; s++)
        if (p_hdr[s] && bus_addr == 8'(4 * s)) bounds_err[s] <= p_refuse[s] && 1'b1;
      if (bus_wr && bus_addr == 8'h16) rd_open <= 1'b1;

      // outstanding counts
      bc_out <= bc_out + 4'(send_bc) - 4'(cn_dn.ptype == PT_SINGLE && bc_out != 4'd0);
      cm_out <= cm_out + 4'(send_cm || send_rd) - 4'(dn_multi);

      // router done: repeat until the network holds no message
      rd_again <= 1'b0;
      if (dn_multi && cn_dn.op == OP_RDONE) begin
        if (cn_dn.data == 32'd0) rd_open  <= 1'b0;
        else                     rd_again <= 1'b1;
      end

      // status
      if (p_crc != 2'b00) net_err <= 1'b1;
      if (cn_dn.err)      rx_err  <= 1'b1;
      if (ci_push)        comb_ovf <= cn_dn.ovf;
      async_q <= cn_dn.async_or;
      if (bus_rd && bus_addr == 8'h34) irq_status <= '0;
      else begin
        if (p_irq[0]) irq_status[0] <= 1'b1;
        if (p_irq[1]) irq_status[1] <= 1'b1;
        if (cn_dn.ptype == PT_SINGLE && cn_dn.op == OP_INTR) irq_status[2] <= 1'b1;
        if ((cn_dn.async_or & ~async_q) != 2'b00) irq_status[3] <= 1'b1;
      end
    end
  end
  assign irq = irq_status != 4'd0;

  // ---------------- reads ----------------
  always_comb begin
    bus_rdata = 32'd0;
    unique case (bus_addr)
      8'h02: bus_rdata = p_avail[0] ? p_rdata[0] : 32'd0;
      8'h03: bus_rdata = {29'd0, bounds_err[0], p_avail[0], p_acc[0] && !bounds_err[0]};
      8'h06: bus_rdata = p_avail[1] ? p_rdata[1] : 32'd0;
      8'h07: bus_rdata = {29'd0, bounds_err[1], p_avail[1], p_acc[1] && !bounds_err[1]};
      8'h14: bus_rdata = {22'd0, comb_cfg};
      8'h20: bus_rdata = bi_empty ? 32'd0 : bi_rdata[31:0];
      8'h21: bus_rdata = ci_empty ? 32'd0 : ci_rdata;
      8'h22: bus_rdata = {31'd0, !ri_empty};
      8'h23: bus_rdata = si_empty ? 32'd0 : si_rdata;
      8'h24: bus_rdata = {20'd0, rd_open, comb_ovf, priv_err, rx_err, net_err, cn_dn.async_or,
                          bq_full | cq_full, !si_empty, !ri_empty, !ci_empty, !bi_empty};
      8'h25: bus_rdata = bi_empty ? 32'd0 : {28'd0, bi_rdata[35:32]};
      8'h30: bus_rdata = {16'd0, tag_mask};
      8'h31: bus_rdata = 32'(part_base);
      8'h32: bus_rdata = 32'(part_size);
      8'h33: bus_rdata = 32'(self_addr);
      8'h34: bus_rdata = {28'd0, irq_status};
      8'h35: bus_rdata = p_sent[0] + p_sent[1];
      8'h36: bus_rdata = p_recv[0] + p_recv[1];
      default: bus_rdata = 32'd0;
    endcase
  end

  // the result of an operation always finds this leaf's contribution record
  a_part: assert property (@(posedge clk) disable iff (!rst_n) pq_pop |-> !pq_empty)
    else $error("ni: combining result without an open operation");
endmodule
