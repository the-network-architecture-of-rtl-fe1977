// cn_alu_tb: checks the five control network combiners against reference arithmetic done
// here on wide integers, for fixed corner cases and random operands.
module cn_alu_tb;
  import cm5_pkg::*;
  cn_comb_e    comb;
  logic [31:0] a, b, y;
  logic        a_ovf, b_ovf, ovf;
  int checks = 0, failures = 0;

  cn_alu dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input cn_comb_e c, input logic [31:0] x, input logic [31:0] z,
                     input logic xo);
    longint sx, sz, ss;
    logic [31:0] ey;
    logic        eo;
    comb = c; a = x; b = z; a_ovf = xo; b_ovf = 1'b0;
    #1;
    sx = longint'($signed(x));
    sz = longint'($signed(z));
    case (c)
      CB_OR:   begin ey = x | z; eo = xo; end
      CB_XOR:  begin ey = x ^ z; eo = xo; end
      CB_SMAX: begin ey = (sx > sz) ? x : z; eo = xo; end
      CB_SADD: begin ss = sx + sz; ey = 32'(ss); eo = xo || ss > 64'sd2147483647 || ss < -64'sd2147483648; end
      default: begin ss = longint'(x) + longint'(z); ey = 32'(ss); eo = xo || ss > 64'd4294967295; end
    endcase
    checks++;
    if (y !== ey || ovf !== eo) begin
      failures++;
      $display("FAIL op %0d a=%h b=%h: y=%h ovf=%b want %h %b", c, x, z, y, ovf, ey, eo);
    end
  endtask

  initial begin
    cn_comb_e ops [5] = '{CB_OR, CB_XOR, CB_SMAX, CB_SADD, CB_UADD};
    one(CB_SADD, 32'h7FFFFFFF, 32'h00000001, 0);   // signed overflow, no carry
    one(CB_UADD, 32'h7FFFFFFF, 32'h00000001, 0);
    one(CB_UADD, 32'hFFFFFFFF, 32'h00000001, 0);   // carry, no signed overflow
    one(CB_SADD, 32'hFFFFFFFF, 32'h00000001, 0);
    one(CB_SMAX, 32'hFFFFFFFF, 32'h00000001, 0);   // -1 < 1
    one(CB_SMAX, 32'h80000000, 32'h80000001, 0);
    one(CB_OR,   32'h0F0F0000, 32'h00F0F0F0, 1);   // incoming flag is kept
    for (int k = 0; k < 500; k++) one(ops[k % 5], $urandom, $urandom, k[3] & k[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
