// diag_node: one binary node of the CM-5 diagnostic network.
//
// Addressing: the diagnostic processor selects pods by steering a token down the tree with a
// digit-serial address, high-order digit first, each digit 0 (left), 1 (right) or B (both),
// ended by an END marker. A node that is idle takes the first digit it receives as its own:
// 0, 1 or B overwrite its two child enables, END leaves them and marks the node itself as
// selected (an address of fewer digits than the tree height names an internal node). The node
// then forwards every later digit, up to and including END, one clock later to the children
// it has just enabled, so a B splits the token in two. Enables persist until a later address
// passing through the node overwrites them or erase clears them; this is how sets are merged:
// select a left set, then a right set, then send the address "B" to the common ancestor
// (the root) so that it enables both children again, the old paths below being intact.
//
// Scan access: the JTAG step (one test-clock pulse), TMS and TDI come from the root; step is
// passed only to enabled children, so only selected pods move, while TMS and TDI are
// broadcast. Test-data-out values come back up combined: with comb_and the node ANDs the
// outputs of its enabled children, otherwise ORs them; a child that is not enabled gives the
// identity (1 for AND, 0 for OR), so the root sees 1 under AND only if every selected pod
// gave 1, and 0 under OR only if every selected pod gave 0. The return path is
// combinational, as in the programmable-logic nodes of the original.
// From the document: 0/1/B digits, high-order first, token splitting, persistent paths,
// merging, OR/AND combining chosen by the expected bit. This design's own: the END marker,
// the erase input, JTAG carried as a step strobe synchronous to clk.
module diag_node
  import cm5_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            erase,
  // address stream from the parent
  input  logic            tok_valid,
  input  dg_digit_e       tok_digit,
  output logic [1:0]      ch_tok_valid,
  output dg_digit_e       ch_tok_digit,
  // scan access
  input  logic            jtag_step,
  input  logic            comb_and,
  output logic [1:0]      ch_step,
  input  logic [1:0]      ch_tdo,
  output logic            tdo,
  // state
  output logic [1:0]      en,          // [0] left child, [1] right child
  output logic            selected
);
  logic passing;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en           <= 2'b00;
      selected     <= 1'b0;
      passing      <= 1'b0;
      ch_tok_valid <= 2'b00;
      ch_tok_digit <= DG_END;
    end else if (erase) begin
      en           <= 2'b00;
      selected     <= 1'b0;
      passing      <= 1'b0;
      ch_tok_valid <= 2'b00;
    end else begin
      ch_tok_valid <= 2'b00;
      if (tok_valid) begin
        if (!passing) begin
          // this node's own digit
          selected <= (tok_digit == DG_END);
          unique case (tok_digit)
            DG_LEFT:  en <= 2'b01;
            DG_RIGHT: en <= 2'b10;
            DG_BOTH:  en <= 2'b11;
            default:  ;
          endcase
          passing <= (tok_digit != DG_END);
        end else begin
          ch_tok_valid <= en;
          ch_tok_digit <= tok_digit;
          if (tok_digit == DG_END) passing <= 1'b0;
        end
      end
    end
  end

  assign ch_step = {2{jtag_step}} & en;

  always_comb begin
    if (comb_and) tdo = (ch_tdo[0] | ~en[0]) & (ch_tdo[1] | ~en[1]);
    else          tdo = (ch_tdo[0] &  en[0]) | (ch_tdo[1] &  en[1]);
  end
endmodule
