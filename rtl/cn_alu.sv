// cn_alu: the combiner of a control network node.
//
// Combines two 32-bit words with one of the five operators the control network offers:
// bitwise OR, bitwise XOR, signed maximum, signed addition and unsigned addition. The two
// additions give the same sum and differ only in how overflow is reported: signed addition
// flags two's-complement overflow, unsigned addition flags a carry out. Overflow flags
// already carried by the operands are ORed in, so a flag raised anywhere in the tree
// reaches the result. Purely combinational. The operator set follows the document; the
// operator encoding and the overflow-flag behaviour of the other operators (always clear)
// are this design's own.
module cn_alu
  import cm5_pkg::*;
(
  input  cn_comb_e    comb,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        a_ovf,
  input  logic        b_ovf,
  output logic [31:0] y,
  output logic        ovf
);
  logic [32:0] usum;
  assign usum = {1'b0, a} + {1'b0, b};

  always_comb begin
    y   = 32'd0;
    ovf = a_ovf | b_ovf;
    unique case (comb)
      CB_OR:   y = a | b;
      CB_XOR:  y = a ^ b;
      CB_SMAX: y = ($signed(a) > $signed(b)) ? a : b;
      CB_SADD: begin
        y   = usum[31:0];
        ovf = ovf | ((a[31] == b[31]) && (usum[31] != a[31]));
      end
      CB_UADD: begin
        y   = usum[31:0];
        ovf = ovf | usum[32];
      end
      default: y = 32'd0;
    endcase
  end
endmodule
