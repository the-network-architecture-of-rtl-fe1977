// dn_fat_tree: one side (left or right) of the CM-5 data network, a 4-ary fat-tree of
// dn_router chips with 4**LEVELS leaf links.
//
// Level 1 has one chip per group of 4 leaves. A chip at level l uses P(l) of its 4 parent
// links: 2 at the first two levels and 4 above; the top level uses none. A tree node at level
// l+1 is therefore made of C(l+1) = C(l) * P(l) chips (C(1) = 1): 1, 2, 4, 16, ... Child link q
// of chip j of node n at level l goes to chip j*P(l) + q of node n/4 at level l+1, on that
// chip's child port n mod 4. Every chip of a node thus reaches all 4 subtrees, so a message
// may climb on any free parent link and still find its way down by the routing digits.
// Leaf link i is child port i mod 4 of level-1 chip i/4. The 2-then-4 choice of parent links,
// the 4-ary tree and the fat-tree wiring follow the document; the link numbering is this
// design's own. all-fall-down mode and the fall-down permutation are the same for all chips.
module dn_fat_tree
  import cm5_pkg::*;
#(
  parameter int LEVELS     = 3,          // 64 leaves
  parameter int FIFO_DEPTH = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [4**LEVELS-1:0]      leaf_in_valid,
  input  logic [4**LEVELS-1:0][3:0] leaf_in_data,
  output logic [4**LEVELS-1:0]      leaf_in_ready,
  output logic [4**LEVELS-1:0]      leaf_out_valid,
  output logic [4**LEVELS-1:0][3:0] leaf_out_data,
  input  logic [4**LEVELS-1:0]      leaf_out_ready,
  input  logic                      afd_mode,
  input  logic [7:0][1:0]           afd_perm,
  output logic                      primary_err,
  output logic                      secondary_err,
  output logic                      route_err,
  output logic [31:0]               msgs_delivered    // messages handed to the leaves
);
  localparam int NL = 4**LEVELS;

  function automatic int parents(input int l);
    if (l >= LEVELS) return 0;
    return (l <= 2) ? 2 : 4;
  endfunction
  function automatic int cpn(input int l);      // chips per tree node at level l
    int c = 1;
    for (int k = 1; k < l; k++) c = c * parents(k);
    return c;
  endfunction
  function automatic int nodes(input int l);
    return 4**(LEVELS - l);
  endfunction
  function automatic int base(input int l);     // first global chip number of level l
    int b = 0;
    for (int k = 1; k < l; k++) b = b + nodes(k) * cpn(k);
    return b;
  endfunction
  localparam int NCHIP = base(LEVELS + 1);

  logic       iv [NCHIP][8];
  logic [3:0] idt[NCHIP][8];
  logic       ir [NCHIP][8];
  logic       ov [NCHIP][8];
  logic [3:0] odt[NCHIP][8];
  logic       orr[NCHIP][8];
  logic [NCHIP-1:0] perr, serr, rerr;
  logic [NL-1:0]    leaf_last;

  for (genvar l = 1; l <= LEVELS; l++) begin : g_lvl
    for (genvar n = 0; n < nodes(l); n++) begin : g_node
      for (genvar j = 0; j < cpn(l); j++) begin : g_chip
        localparam int G = base(l) + n * cpn(l) + j;
        logic [7:0]      c_iv, c_ir, c_ov, c_or;
        logic [7:0][3:0] c_id, c_od;
        logic [7:0][15:0] cnt;     // per-link counters, read by diagnostics in the original

        always_comb
          for (int p = 0; p < 8; p++) begin
            c_iv[p] = iv[G][p];
            c_id[p] = idt[G][p];
            c_or[p] = orr[G][p];
          end
        always_comb
          for (int p = 0; p < 8; p++) begin
            ir[G][p]  = c_ir[p];
            ov[G][p]  = c_ov[p];
            odt[G][p] = c_od[p];
          end

        dn_router #(.FIFO_DEPTH(FIFO_DEPTH)) u_chip (
          .clk, .rst_n,
          .in_valid(c_iv), .in_data(c_id), .in_ready(c_ir),
          .out_valid(c_ov), .out_data(c_od), .out_ready(c_or),
          .parent_en(parents(l) == 4 ? 4'b1111 : parents(l) == 2 ? 4'b0011 : 4'b0000),
          .afd_mode, .afd_perm,
          .primary_err(perr[G]), .secondary_err(serr[G]), .route_err(rerr[G]),
          .msg_count(cnt)
        );

        // child links
        for (genvar d = 0; d < 4; d++) begin : g_child
          if (l == 1) begin : g_leaf
            assign iv[G][d]  = leaf_in_valid[4*n + d];
            assign idt[G][d] = leaf_in_data[4*n + d];
            assign leaf_in_ready[4*n + d]  = ir[G][d];
            assign leaf_out_valid[4*n + d] = ov[G][d];
            assign leaf_out_data[4*n + d]  = odt[G][d];
            assign orr[G][d] = leaf_out_ready[4*n + d];
          end else begin : g_chip_below
            localparam int PB = parents(l - 1);
            localparam int CG = base(l - 1) + (4*n + d) * cpn(l - 1) + j / PB;
            localparam int CQ = 4 + j % PB;
            assign iv[G][d]   = ov[CG][CQ];
            assign idt[G][d]  = odt[CG][CQ];
            assign orr[CG][CQ] = ir[G][d];
            assign iv[CG][CQ]  = ov[G][d];
            assign idt[CG][CQ] = odt[G][d];
            assign orr[G][d]   = ir[CG][CQ];
          end
        end
        // parent links left open
        for (genvar q = parents(l); q < 4; q++) begin : g_open
          assign iv[G][4+q]  = 1'b0;
          assign idt[G][4+q] = 4'h0;
          assign orr[G][4+q] = 1'b0;
        end
      end
    end
  end

  assign primary_err   = |perr;
  assign secondary_err = |serr;
  assign route_err     = |rerr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) msgs_delivered <= '0;
    else begin
      // a message ends at a leaf when its last CRC nibble passes; counted by the leaf side
      msgs_delivered <= msgs_delivered + 32'($countones(leaf_out_valid & leaf_out_ready & leaf_last));
    end
  end

  // track message ends on the leaf links: the last CRC nibble
  for (genvar i = 0; i < NL; i++) begin : g_track
    typedef enum logic [2:0] {K_H0, K_H1, K_DIG, K_LEN, K_TAG, K_DATA, K_CRC} k_e;
    k_e         k;
    logic [5:0] c;
    logic [2:0] len;
    logic       fire;
    assign fire = leaf_out_valid[i] && leaf_out_ready[i];
    assign leaf_last[i] = (k == K_CRC) && c == 6'd1;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin k <= K_H0; c <= '0; len <= '0; end
      else if (fire) begin
        unique case (k)
          K_H0:   k <= K_H1;
          K_H1:   begin c <= {3'd0, leaf_out_data[i][2:0]}; k <= (leaf_out_data[i][2:0] == 3'd0) ? K_LEN : K_DIG; end
          K_DIG:  begin c <= c - 6'd1; if (c == 6'd1) k <= K_LEN; end
          K_LEN:  begin len <= leaf_out_data[i][2:0]; k <= K_TAG; end
          K_TAG:  begin c <= {len, 3'b000}; k <= (len == 3'd0) ? K_CRC : K_DATA; if (len == 3'd0) c <= 6'd2; end
          K_DATA: begin c <= c - 6'd1; if (c == 6'd1) begin k <= K_CRC; c <= 6'd2; end end
          K_CRC:  begin c <= c - 6'd1; if (c == 6'd1) k <= K_H0; end
          default: k <= K_H0;
        endcase
      end
    end
  end
endmodule
