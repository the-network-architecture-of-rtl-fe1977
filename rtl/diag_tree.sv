// diag_tree: the diagnostic network, a binary tree of diag_node with pods at the leaves.
//
// The diagnostic processor drives the root: an address stream (tok_valid, tok_digit), erase,
// and the scan signals (jtag_step, jtag_tms, jtag_tdi, comb_and); it reads the combined
// test-data-out on tdo. Pod j (j = 0 .. 2**HEIGHT-1, the binary address of its path, bit
// HEIGHT-1 chosen at the root) gets pod_step[j], which pulses only while j is selected, and
// the broadcast pod_tms and pod_tdi; it returns pod_tdo[j]. The address of a pod takes HEIGHT
// digits plus END; digits move one level per clock. Nodes are numbered as a heap (node k has
// children 2k and 2k+1). The tree of nodes with pods at the leaves follows the document; the
// complete tree is this design's simplification of the document's not necessarily complete one.
module diag_tree
  import cm5_pkg::*;
#(
  parameter int HEIGHT = 6
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 erase,
  input  logic                 tok_valid,
  input  dg_digit_e            tok_digit,
  input  logic                 jtag_step,
  input  logic                 jtag_tms,
  input  logic                 jtag_tdi,
  input  logic                 comb_and,
  output logic                 tdo,
  output logic [2**HEIGHT-1:0] pod_step,
  output logic                 pod_tms,
  output logic                 pod_tdi,
  input  logic [2**HEIGHT-1:0] pod_tdo,
  output logic [2**HEIGHT-1:1] node_selected
);
  localparam int NL = 2**HEIGHT;

  logic      t_valid [2*NL];
  dg_digit_e t_digit [2*NL];
  logic      step    [2*NL];
  logic      dout    [2*NL];
  logic [1:0] ch_v   [NL];
  dg_digit_e  ch_d   [NL];
  logic [1:0] ch_s   [NL];

  assign t_valid[1] = tok_valid;
  assign t_digit[1] = tok_digit;
  assign step[1]    = jtag_step;
  assign tdo        = dout[1];
  assign t_valid[0] = 1'b0;
  assign t_digit[0] = DG_END;
  assign step[0]    = 1'b0;
  assign dout[0]    = 1'b0;

  for (genvar k = 1; k < NL; k++) begin : g_node
    diag_node u_node (
      .clk, .rst_n, .erase,
      .tok_valid   (t_valid[k]),
      .tok_digit   (t_digit[k]),
      .ch_tok_valid(ch_v[k]),
      .ch_tok_digit(ch_d[k]),
      .jtag_step   (step[k]),
      .comb_and,
      .ch_step     (ch_s[k]),
      .ch_tdo      ({dout[2*k+1], dout[2*k]}),
      .tdo         (dout[k]),
      .en          (),
      .selected    (node_selected[k])
    );
    for (genvar c = 0; c < 2; c++) begin : g_ch
      assign t_valid[2*k+c] = ch_v[k][c];
      assign t_digit[2*k+c] = ch_d[k];
      assign step[2*k+c]    = ch_s[k][c];
    end
  end
  assign ch_v[0] = 2'b00;
  assign ch_d[0] = DG_END;
  assign ch_s[0] = 2'b00;

  for (genvar j = 0; j < NL; j++) begin : g_pod
    assign pod_step[j]  = step[NL + j];
    assign dout[NL + j] = pod_tdo[j];
  end
  assign pod_tms = jtag_tms;
  assign pod_tdi = jtag_tdi;
endmodule
