// ni_dn_port: one side (left or right) of the network interface toward the data network.
//
// Sending: the processor side pushes a header word and then LEN data words into the
// outgoing FIFO (push_hdr, push_data). A header is accepted only if the FIFO has room for the
// whole message; otherwise it and the data words that follow it are dropped and accepted
// reads 0, so the processor can try again later without blocking. The serializer takes a
// message from the FIFO and sends it as nibbles (format in cm5_pkg). It works out the routing
// instructions from its own physical address and the destination: with base-4 digits d_i of
// the addresses, the highest level l where they differ gives up = l and l+1 down digits
// (dest digits l .. 0); a message to itself goes up to its first router and straight back.
//
// Receiving: the deserializer reads H0, H1, skips any routing digits still present (an
// all-fall-down message keeps them), takes LEN and TAG, packs data nibbles into words and
// checks the CRC. The message is held until its CRC has been checked; then a header word
// {afd, crc_bad, tag, len} and the data words go into the incoming FIFO, and the link's ready
// signal stays low until they all have. When a message has arrived, irq pulses if the tag's bit in tag_mask is set.
// sent_count counts messages accepted for sending (so a message still waiting in the send
// FIFO counts as in the network) and recv_count messages delivered, for router done.
//
// Header word on the sending side: [31:28] tag, [26:24] len (1..5), [NODE_BITS-1:0] physical
// destination. Header word on the receiving side: [31] afd, [30] crc_bad, [27:24] tag, [2:0] len.
// From the document: message fields and order, 1..5 words, 4-bit tag indexing a 16-bit
// interrupt mask, the try-again send contract, message counting. This design's own: word
// layouts, FIFO depths, the whole-message acceptance rule.
module ni_dn_port
  import cm5_pkg::*;
#(
  parameter int LEVELS  = 7,    // data network height: 4**7 = 16384 nodes
  parameter int OUT_DEPTH = 8,
  parameter int IN_DEPTH  = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [2*LEVELS-1:0]   self_addr,
  // processor side
  input  logic                  push_hdr,
  input  logic                  refuse,       // with push_hdr: refuse this message
  input  logic                  push_data,
  input  logic [31:0]           wdata,
  output logic                  accepted,     // last header accepted
  input  logic                  pop,
  output logic [31:0]           rdata,
  output logic                  rx_avail,
  input  logic [15:0]           tag_mask,
  output logic                  irq,
  output logic                  crc_err,      // pulses when a message arrives with a bad CRC
  output logic [31:0]           sent_count,
  output logic [31:0]           recv_count,
  // link to the first router chip
  output logic                  tx_valid,
  output logic [3:0]            tx_data,
  input  logic                  tx_ready,
  input  logic                  rx_valid,
  input  logic [3:0]            rx_data,
  output logic                  rx_ready
);
  localparam int NB = 2 * LEVELS;
  localparam int OCW = $clog2(OUT_DEPTH + 1);

  // ---------------- sending ----------------
  logic [31:0]    of_rdata;
  logic           of_push, of_pop, of_empty, of_full;
  logic [OCW-1:0] of_count;
  logic [2:0]     drop_left;     // data words still to drop after a refused header

  logic hdr_fits;
  assign hdr_fits = !refuse && (int'(of_count) + int'(wdata[26:24]) + 1) <= OUT_DEPTH &&
                    wdata[26:24] >= 3'd1 && wdata[26:24] <= 3'(DN_MAX_WORDS);
  assign of_push  = (push_hdr && hdr_fits) || (push_data && drop_left == 3'd0 && !of_full);

  sync_fifo #(.WIDTH(32), .DEPTH(OUT_DEPTH)) u_out (
    .clk, .rst_n, .push(of_push), .wdata, .pop(of_pop), .rdata(of_rdata),
    .full(of_full), .empty(of_empty), .count(of_count)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      accepted  <= 1'b0;
      drop_left <= '0;
      sent_count <= '0;
    end else if (push_hdr) begin
      if (hdr_fits) sent_count <= sent_count + 32'd1;
      accepted  <= hdr_fits;
      drop_left <= hdr_fits ? 3'd0 : wdata[26:24];
    end else if (push_data && drop_left != 3'd0) begin
      drop_left <= drop_left - 3'd1;
    end
  end

  typedef enum logic [3:0] {T_IDLE, T_H0, T_H1, T_DIG, T_LEN, T_TAG, T_DATA, T_CRCH, T_CRCL}
    tx_state_e;
  tx_state_e   ts;
  logic [NB-1:0] t_dest;
  logic [2:0]  t_up, t_dig;      // t_dig: index of the next digit to send
  logic [2:0]  t_len, t_words;
  logic [3:0]  t_tag;
  logic [2:0]  t_nib;
  logic [7:0]  t_crc;

  // highest differing base-4 digit
  function automatic logic [2:0] lca_level(input logic [NB-1:0] a, input logic [NB-1:0] b);
    logic [2:0] l = 3'd0;
    for (int i = 0; i < LEVELS; i++)
      if (a[2*i +: 2] != b[2*i +: 2]) l = 3'(i);
    return l;
  endfunction

  always_comb begin
    tx_valid = 1'b0;
    tx_data  = 4'h0;
    of_pop   = 1'b0;
    case (ts)
      T_H0:   begin tx_valid = 1'b1; tx_data = {1'b0, t_up}; end
      T_H1:   begin tx_valid = 1'b1; tx_data = {1'b0, t_up + 3'd1}; end
      T_DIG:  begin tx_valid = 1'b1; tx_data = {2'b00, t_dest[2*t_dig +: 2]}; end
      T_LEN:  begin tx_valid = 1'b1; tx_data = {1'b0, t_len}; end
      T_TAG:  begin tx_valid = 1'b1; tx_data = t_tag; end
      T_DATA: begin
        tx_valid = !of_empty;
        tx_data  = of_rdata[4*t_nib +: 4];
        of_pop   = tx_ready && !of_empty && t_nib == 3'd0;
      end
      T_CRCH: begin tx_valid = 1'b1; tx_data = t_crc[7:4]; end
      T_CRCL: begin tx_valid = 1'b1; tx_data = t_crc[3:0]; end
      default: of_pop = 1'b0;
    endcase
    if (ts == T_IDLE) of_pop = !of_empty;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ts         <= T_IDLE;
      t_dest     <= '0;
      t_up       <= '0;
      t_dig      <= '0;
      t_len      <= '0;
      t_words    <= '0;
      t_tag      <= '0;
      t_nib      <= '0;
      t_crc      <= '0;
    end else begin
      if (tx_valid && tx_ready && !(ts inside {T_CRCH, T_CRCL}))
        t_crc <= crc8_nib(t_crc, tx_data);
      case (ts)
        T_IDLE: if (!of_empty) begin
          t_dest <= of_rdata[NB-1:0];
          t_up   <= lca_level(of_rdata[NB-1:0], self_addr);
          t_dig  <= lca_level(of_rdata[NB-1:0], self_addr);
          t_len  <= of_rdata[26:24];
          t_tag  <= of_rdata[31:28];
          t_crc  <= 8'h00;
          ts     <= T_H0;
        end
        T_H0:  if (tx_ready) ts <= T_H1;
        T_H1:  if (tx_ready) ts <= T_DIG;
        T_DIG: if (tx_ready) begin
          if (t_dig == 3'd0) ts <= T_LEN;
          else               t_dig <= t_dig - 3'd1;
        end
        T_LEN: if (tx_ready) ts <= T_TAG;
        T_TAG: if (tx_ready) begin
          t_words <= t_len;
          t_nib   <= 3'd7;
          ts      <= T_DATA;
        end
        T_DATA: if (tx_ready && !of_empty) begin
          t_nib <= t_nib - 3'd1;
          if (t_nib == 3'd0) begin
            t_words <= t_words - 3'd1;
            if (t_words == 3'd1) ts <= T_CRCH;
          end
        end
        T_CRCH: if (tx_ready) ts <= T_CRCL;
        T_CRCL: if (tx_ready) ts <= T_IDLE;
        default: ts <= T_IDLE;
      endcase
    end
  end

  // ---------------- receiving ----------------
  typedef enum logic [2:0] {R_H0, R_H1, R_DIG, R_LEN, R_TAG, R_DATA, R_CRCH, R_CRCL}
    rx_state_e;
  rx_state_e   rs;
  logic        r_afd;
  logic [2:0]  r_dig, r_len, r_words;
  logic [3:0]  r_tag, r_crch;
  logic [2:0]  r_nib;
  logic [7:0]  r_crc;
  logic [27:0] r_word;
  logic        hold_v;          // a finished word waits for FIFO space
  logic [31:0] hold_w;
  logic        if_push, if_full, if_empty;
  logic [31:0] if_wdata;
  logic        take;

  assign rx_ready = !hold_v;
  assign take     = rx_valid && rx_ready;
  assign if_push  = hold_v && !if_full;
  assign if_wdata = hold_w;

  sync_fifo #(.WIDTH(32), .DEPTH(IN_DEPTH)) u_in (
    .clk, .rst_n, .push(if_push), .wdata(if_wdata), .pop, .rdata,
    .full(if_full), .empty(if_empty), .count()
  );
  assign rx_avail = !if_empty;

  // a message is held here until its CRC has been checked, then drained into the FIFO,
  // header word first
  logic        hdr_pending;
  logic [31:0] data_buf [DN_MAX_WORDS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rs          <= R_H0;
      r_afd       <= 1'b0;
      r_dig       <= '0;
      r_len       <= '0;
      r_words     <= '0;
      r_tag       <= '0;
      r_crch      <= '0;
      r_nib       <= '0;
      r_crc       <= '0;
      r_word      <= '0;
      hold_v      <= 1'b0;
      hold_w      <= '0;
      hdr_pending <= 1'b0;
      irq         <= 1'b0;
      crc_err     <= 1'b0;
      recv_count  <= '0;
      for (int k = 0; k < DN_MAX_WORDS; k++) data_buf[k] <= '0;
    end else begin
      irq     <= 1'b0;
      crc_err <= 1'b0;
      if (if_push) begin
        // drain: header first, then the buffered data words
        if (hdr_pending) begin
          hdr_pending <= 1'b0;
          if (r_words != 3'd0) hold_w <= data_buf[0];
          else                 hold_v <= 1'b0;
        end
        if (!hdr_pending) begin
          for (int k = 0; k < DN_MAX_WORDS - 1; k++) data_buf[k] <= data_buf[k+1];
          r_words <= r_words - 3'd1;
          if (r_words == 3'd1) hold_v <= 1'b0;
          else                 hold_w <= data_buf[1];
        end
      end
      if (take && !(rs inside {R_CRCH, R_CRCL})) r_crc <= crc8_nib(r_crc, rx_data);
      case (rs)
        R_H0: if (take) begin
          r_crc <= crc8_nib(8'h00, rx_data);
          r_afd <= rx_data[3];
          rs    <= R_H1;
        end
        R_H1: if (take) begin
          r_dig <= rx_data[2:0];
          rs    <= (rx_data[2:0] == 3'd0) ? R_LEN : R_DIG;
        end
        R_DIG: if (take) begin
          r_dig <= r_dig - 3'd1;
          if (r_dig == 3'd1) rs <= R_LEN;
        end
        R_LEN: if (take) begin
          r_len <= rx_data[2:0];
          rs    <= R_TAG;
        end
        R_TAG: if (take) begin
          r_tag   <= rx_data;
          r_words <= 3'd0;
          r_nib   <= 3'd7;
          rs      <= (r_len == 3'd0) ? R_CRCH : R_DATA;
        end
        R_DATA: if (take) begin
          r_word <= {r_word[23:0], rx_data};
          r_nib  <= r_nib - 3'd1;
          if (r_nib == 3'd0) begin
            data_buf[r_words] <= {r_word[27:0], rx_data};
            r_words           <= r_words + 3'd1;
            if (r_words + 3'd1 == r_len) rs <= R_CRCH;
          end
        end
        R_CRCH: if (take) begin
          r_crch <= rx_data;
          rs     <= R_CRCL;
        end
        R_CRCL: if (take) begin
          hold_w      <= {r_afd, ({r_crch, rx_data} != r_crc), 2'b00, r_tag, 21'd0, r_len};
          hold_v      <= 1'b1;
          hdr_pending <= 1'b1;
          irq         <= tag_mask[r_tag];
          crc_err     <= ({r_crch, rx_data} != r_crc);
          recv_count  <= recv_count + 32'd1;
          rs          <= R_H0;
        end
        default: rs <= R_H0;
      endcase
    end
  end
endmodule
