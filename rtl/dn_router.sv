// dn_router: one CM-5 data network router chip.
//
// The chip is a buffered crossbar between 8 input and 8 output links of 4 data bits each:
// ports 0..3 go to the 4 child chips below, ports 4..7 to the parent chips above. Every
// input has a nibble FIFO. At the head of a message the input reads H0 and H1 (see cm5_pkg):
//   * a message that still has to climb (up > 0, entering from a child) asks for any enabled
//     parent link; the allocator takes the free enabled parents starting at a pseudorandom
//     position given by an LFSR, so load is spread over the parents; the chip forwards the
//     message with up decremented;
//   * otherwise the message goes down: the first routing digit names the child port and is
//     stripped, and H1 is decremented;
//   * an all-fall-down message (afd bit set, or the chip in all-fall-down mode) goes down to
//     the child preprogrammed in afd_perm for its input port, with its routing fields left
//     as they are and the afd bit set, so once a message falls it keeps falling.
// A message from a parent is never sent to another parent; a parent input with up > 0 raises
// route_err and is sent down. A blocked message waits in its input FIFO; the FIFO's full flag
// is the flow-control signal returned on the link (in_ready). Each output grants requests in
// round-robin order, so no input is starved. A granted input streams its message to the output
// (wormhole style) and keeps the output until the CRC has gone out.
//
// CRC: the chip checks the CRC of every message it receives and writes a fresh CRC over what
// it sends (its header differs from the one received). If the received CRC is right, the
// proper CRC is sent. If the received CRC is the complement of the proper one, an upstream
// chip already found an error: secondary_err pulses and the complement is passed on. Any other
// value is a primary error: primary_err pulses and the complement of the proper CRC is sent.
// msg_count counts the messages sent on each output link.
//
// Timing: one nibble per link per clock. A message has a fixed head latency of 4 clocks
// through an idle chip (the header is read from the FIFO before the output is requested) and
// two idle clocks before the CRC (both received CRC nibbles are read before the new CRC goes
// out). Fixed by the document: the 4+4 links, 4-bit links, 2-or-4 parent choice, random
// choice among free parents, fair arbitration, no parent-to-parent routing, CRC-complement
// error marking, message counters, all-fall-down. This design's own: the header encoding,
// FIFO depth, the separate ready wire for flow control, one new up-allocation per clock.
module dn_router
  import cm5_pkg::*;
#(
  parameter int FIFO_DEPTH = 16,   // nibbles of buffering per input link
  parameter int CNT_W      = 16    // width of the per-link message counters
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // links, index 0..3 children, 4..7 parents
  input  logic [DN_PORTS-1:0]         in_valid,
  input  logic [DN_PORTS-1:0][3:0]    in_data,
  output logic [DN_PORTS-1:0]         in_ready,
  output logic [DN_PORTS-1:0]         out_valid,
  output logic [DN_PORTS-1:0][3:0]    out_data,
  input  logic [DN_PORTS-1:0]         out_ready,
  // static configuration
  input  logic [3:0]                  parent_en,   // which parent links are used (2 or 4)
  input  logic                        afd_mode,    // all-fall-down mode
  input  logic [DN_PORTS-1:0][1:0]    afd_perm,    // child port per input in all-fall-down
  // status
  output logic                        primary_err,
  output logic                        secondary_err,
  output logic                        route_err,
  output logic [DN_PORTS-1:0][CNT_W-1:0] msg_count
);

  typedef enum logic [3:0] {
    S_H0, S_H1, S_DIG, S_REQ, S_OH0, S_OH1, S_DIGS, S_LEN, S_TAG, S_DATA,
    S_CRCH, S_CRCL, S_OCRCH, S_OCRCL
  } in_state_e;

  // ---------------- input side ----------------
  logic [DN_PORTS-1:0][3:0] f_rdata;
  logic [DN_PORTS-1:0]      f_empty, f_full, f_pop;

  in_state_e              st      [DN_PORTS];
  logic [DN_PORTS-1:0]    m_afd, m_up_go;
  logic [2:0]             m_up    [DN_PORTS];
  logic [2:0]             m_dn    [DN_PORTS];
  logic [1:0]             m_child [DN_PORTS];
  logic [2:0]             m_len   [DN_PORTS];
  logic [5:0]             m_cnt   [DN_PORTS];
  logic [7:0]             crc_in  [DN_PORTS];
  logic [7:0]             crc_out [DN_PORTS];
  logic [3:0]             rx_crch [DN_PORTS];
  logic [7:0]             tx_crc  [DN_PORTS];
  logic [DN_PORTS-1:0]    granted;
  logic [2:0]             gport   [DN_PORTS];

  // per-input combinational outputs toward the crossbar
  logic [DN_PORTS-1:0]      src_valid;
  logic [DN_PORTS-1:0][3:0] src_data;
  logic [DN_PORTS-1:0]      src_fire;   // the nibble offered is taken this clock

  for (genvar i = 0; i < DN_PORTS; i++) begin : g_in
    sync_fifo #(.WIDTH(4), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n,
      .push (in_valid[i]),
      .wdata(in_data[i]),
      .pop  (f_pop[i]),
      .rdata(f_rdata[i]),
      .full (f_full[i]),
      .empty(f_empty[i]),
      .count()
    );
    assign in_ready[i] = !f_full[i];
  end

  // next CRC state for the nibble being offered or read
  always_comb begin
    for (int i = 0; i < DN_PORTS; i++) begin
      logic pass;
      pass        = st[i] inside {S_DIGS, S_LEN, S_TAG, S_DATA};
      src_valid[i] = 1'b0;
      src_data[i]  = 4'h0;
      case (st[i])
        S_OH0: begin
          src_valid[i] = 1'b1;
          src_data[i]  = {m_afd[i], m_up_go[i] ? m_up[i] - 3'd1 : m_up[i]};
        end
        S_OH1: begin
          src_valid[i] = 1'b1;
          src_data[i]  = {1'b0, (m_afd[i] || m_up_go[i]) ? m_dn[i] : m_dn[i] - 3'd1};
        end
        S_OCRCH: begin src_valid[i] = 1'b1; src_data[i] = tx_crc[i][7:4]; end
        S_OCRCL: begin src_valid[i] = 1'b1; src_data[i] = tx_crc[i][3:0]; end
        default: ;
      endcase
      if (pass) begin
        src_valid[i] = !f_empty[i];
        src_data[i]  = f_rdata[i];
      end
    end
  end

  // FIFO pops: header and CRC nibbles are consumed locally, the rest when sent on
  always_comb begin
    for (int i = 0; i < DN_PORTS; i++) begin
      if (st[i] inside {S_DIGS, S_LEN, S_TAG, S_DATA}) f_pop[i] = src_fire[i];
      else if (st[i] inside {S_H0, S_H1, S_DIG, S_CRCH, S_CRCL}) f_pop[i] = !f_empty[i];
      else f_pop[i] = 1'b0;
    end
  end

  // ---------------- allocation ----------------
  logic [DN_PORTS-1:0]    o_busy;
  logic [2:0]             o_src   [DN_PORTS];
  logic [2:0]             rr      [DN_PORTS];
  logic [2:0]             rr_up;
  logic [7:0]             lfsr;

  logic [DN_PORTS-1:0]    alloc_o;          // output o gets a new owner this clock
  logic [2:0]             alloc_src [DN_PORTS];

  always_comb begin
    logic [DN_PORTS-1:0] up_req;
    logic                found;
    logic [2:0]          win;
    logic                placed;
    logic [1:0]          p;
    logic [2:0]          ci;
    placed  = 1'b0;
    p       = 2'd0;
    ci      = 3'd0;
    alloc_o = '0;
    for (int o = 0; o < DN_PORTS; o++) alloc_src[o] = 3'd0;
    // child outputs: round robin among the inputs that want this child
    for (int o = 0; o < DN_CHILDREN; o++) begin
      found = 1'b0;
      win   = 3'd0;
      for (int k = 0; k < DN_PORTS; k++) begin
        ci = rr[o] + 3'(k);
        if (!found && st[ci] == S_REQ && !granted[ci] && !m_up_go[ci] && m_child[ci] == 2'(o)) begin
          found = 1'b1;
          win   = ci;
        end
      end
      if (!o_busy[o] && found) begin
        alloc_o[o]   = 1'b1;
        alloc_src[o] = win;
      end
    end
    // parent outputs: one climbing message per clock takes a free enabled parent,
    // searched from a pseudorandom starting point
    for (int i = 0; i < DN_PORTS; i++)
      up_req[i] = st[i] == S_REQ && !granted[i] && m_up_go[i];
    found = 1'b0;
    win   = 3'd0;
    for (int k = 0; k < DN_PORTS; k++) begin
      ci = rr_up + 3'(k);
      if (!found && up_req[ci]) begin
        found = 1'b1;
        win   = ci;
      end
    end
    if (found) begin
      for (int k = 0; k < 4; k++) begin
        p = lfsr[1:0] + 2'(k);
        if (!placed && parent_en[p] && !o_busy[4 + int'(p)]) begin
          placed               = 1'b1;
          alloc_o[4 + int'(p)]   = 1'b1;
          alloc_src[4 + int'(p)] = win;
        end
      end
    end
  end

  // ---------------- crossbar ----------------
  always_comb begin
    src_fire = '0;
    for (int o = 0; o < DN_PORTS; o++) begin
      out_valid[o] = o_busy[o] && src_valid[o_src[o]];
      out_data[o]  = src_data[o_src[o]];
    end
    for (int i = 0; i < DN_PORTS; i++)
      src_fire[i] = granted[i] && src_valid[i] && out_ready[gport[i]];
  end

  // ---------------- sequential ----------------
  logic prim_d, sec_d, rerr_d;

  always_comb begin
    prim_d = 1'b0;
    sec_d  = 1'b0;
    rerr_d = 1'b0;
    for (int i = 0; i < DN_PORTS; i++) begin
      if (st[i] == S_CRCL && !f_empty[i]) begin
        if ({rx_crch[i], f_rdata[i]} == ~crc_in[i])     sec_d  = 1'b1;
        else if ({rx_crch[i], f_rdata[i]} != crc_in[i]) prim_d = 1'b1;
      end
      if (st[i] == S_H1 && !f_empty[i] && i >= DN_CHILDREN && !m_afd[i] && !afd_mode &&
          m_up[i] != 3'd0)
        rerr_d = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DN_PORTS; i++) begin
        st[i]      <= S_H0;
        m_up[i]    <= '0;
        m_dn[i]    <= '0;
        m_child[i] <= '0;
        m_len[i]   <= '0;
        m_cnt[i]   <= '0;
        crc_in[i]  <= '0;
        crc_out[i] <= '0;
        rx_crch[i] <= '0;
        tx_crc[i]  <= '0;
        gport[i]   <= '0;
        o_src[i]   <= '0;
        rr[i]      <= '0;
      end
      m_afd         <= '0;
      m_up_go       <= '0;
      granted       <= '0;
      o_busy        <= '0;
      rr_up         <= '0;
      lfsr          <= 8'hA5;
      primary_err   <= 1'b0;
      secondary_err <= 1'b0;
      route_err     <= 1'b0;
      msg_count     <= '0;
    end else begin
      lfsr          <= {lfsr[6:0], lfsr[7] ^ lfsr[5] ^ lfsr[4] ^ lfsr[3]};
      primary_err   <= prim_d;
      secondary_err <= sec_d;
      route_err     <= rerr_d;

      // allocation results
      for (int o = 0; o < DN_PORTS; o++) begin
        if (alloc_o[o]) begin
          o_busy[o]            <= 1'b1;
          o_src[o]             <= alloc_src[o];
          granted[alloc_src[o]] <= 1'b1;
          gport[alloc_src[o]]   <= 3'(o);
          if (o < DN_CHILDREN) rr[o] <= alloc_src[o] + 3'd1;
          else                 rr_up <= alloc_src[o] + 3'd1;
        end
      end

      for (int i = 0; i < DN_PORTS; i++) begin
        // CRC over nibbles read from the FIFO (header to last data nibble)
        if (f_pop[i] && !(st[i] inside {S_CRCH, S_CRCL}))
          crc_in[i] <= crc8_nib(crc_in[i], f_rdata[i]);
        // CRC over nibbles sent
        if (src_fire[i] && !(st[i] inside {S_OCRCH, S_OCRCL}))
          crc_out[i] <= crc8_nib(crc_out[i], src_data[i]);

        case (st[i])
          S_H0: if (!f_empty[i]) begin
            crc_in[i]  <= crc8_nib(8'h00, f_rdata[i]);
            crc_out[i] <= 8'h00;
            m_afd[i]   <= f_rdata[i][3] || afd_mode;
            m_up[i]    <= f_rdata[i][2:0];
            st[i]      <= S_H1;
          end
          S_H1: if (!f_empty[i]) begin
            m_dn[i] <= f_rdata[i][2:0];
            if (m_afd[i]) begin
              m_up_go[i] <= 1'b0;
              m_child[i] <= afd_perm[i];
              st[i]      <= S_REQ;
            end else if (i < DN_CHILDREN && m_up[i] != 3'd0) begin
              m_up_go[i] <= 1'b1;
              st[i]      <= S_REQ;
            end else begin
              m_up_go[i] <= 1'b0;
              m_up[i]    <= 3'd0;
              st[i]      <= S_DIG;
            end
          end
          S_DIG: if (!f_empty[i]) begin
            m_child[i] <= f_rdata[i][1:0];
            st[i]      <= S_REQ;
          end
          S_REQ: if (granted[i]) st[i] <= S_OH0;
          S_OH0: if (src_fire[i]) st[i] <= S_OH1;
          S_OH1: if (src_fire[i]) begin
            m_cnt[i] <= {3'd0, (m_afd[i] || m_up_go[i]) ? m_dn[i] : m_dn[i] - 3'd1};
            st[i]    <= ((m_afd[i] || m_up_go[i]) ? m_dn[i] : m_dn[i] - 3'd1) == 3'd0
                        ? S_LEN : S_DIGS;
          end
          S_DIGS: if (src_fire[i]) begin
            m_cnt[i] <= m_cnt[i] - 6'd1;
            if (m_cnt[i] == 6'd1) st[i] <= S_LEN;
          end
          S_LEN: if (src_fire[i]) begin
            m_len[i] <= src_data[i][2:0];
            st[i]    <= S_TAG;
          end
          S_TAG: if (src_fire[i]) begin
            m_cnt[i] <= {m_len[i], 3'b000};
            st[i]    <= (m_len[i] == 3'd0) ? S_CRCH : S_DATA;
          end
          S_DATA: if (src_fire[i]) begin
            m_cnt[i] <= m_cnt[i] - 6'd1;
            if (m_cnt[i] == 6'd1) st[i] <= S_CRCH;
          end
          S_CRCH: if (!f_empty[i]) begin
            rx_crch[i] <= f_rdata[i];
            st[i]      <= S_CRCL;
          end
          S_CRCL: if (!f_empty[i]) begin
            tx_crc[i] <= ({rx_crch[i], f_rdata[i]} == crc_in[i]) ? crc_out[i] : ~crc_out[i];
            st[i]     <= S_OCRCH;
          end
          S_OCRCH: if (src_fire[i]) st[i] <= S_OCRCL;
          S_OCRCL: if (src_fire[i]) begin
            st[i]                 <= S_H0;
            granted[i]            <= 1'b0;
            o_busy[gport[i]]      <= 1'b0;
            msg_count[gport[i]]   <= msg_count[gport[i]] + 1'b1;
          end
          default: st[i] <= S_H0;
        endcase
      end
    end
  end

  // a granted input always owns the output it streams to
  for (genvar i = 0; i < DN_PORTS; i++) begin : g_chk
    a_owner: assert property (@(posedge clk) disable iff (!rst_n)
                              granted[i] |-> (o_busy[gport[i]] && o_src[gport[i]] == 3'(i)))
      else $error("dn_router: input %0d lost its output", i);
  end
endmodule
