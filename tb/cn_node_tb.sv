// cn_node_tb: one control network node, its two children and its parent played by the
// testbench.
//
// Checked: a single-source packet from either child goes up unchanged in one clock; two in the
// same clock raise the collision error and the left one goes on; multiple-source packets wait
// for the sibling and are combined (every operator, with random values and random arrival
// skew); an abstaining child counts as the identity and two abstains give an abstain; a scan
// value coming down is split into the left and right child's values using the summary put
// aside on the way up, for both scan directions, with and without a segment start; a
// broadcast coming down is copied to both children; the minor bits are ORed.
module cn_node_tb;
  import cm5_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  cn_pkt_t up_in [2], dn_out [2];
  cn_pkt_t up_out, dn_in;
  logic    collision_err, mismatch_err;

  cn_node dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic cn_pkt_t mk(input cn_ptype_e t, input cn_op_e op, input cn_comb_e c,
                                 input logic [31:0] d, input logic seg = 1'b0);
    cn_pkt_t p = CN_IDLE;
    p.ptype = t; p.op = op; p.comb = c; p.data = d; p.seg = seg;
    return p;
  endfunction

  function automatic logic [31:0] f(input cn_comb_e c, input logic [31:0] x, input logic [31:0] y);
    case (c)
      CB_OR:   return x | y;
      CB_XOR:  return x ^ y;
      CB_SMAX: return ($signed(x) > $signed(y)) ? x : y;
      default: return x + y;
    endcase
  endfunction

  // drive one clock of inputs and return what the node sends up in the next clock
  task automatic step(input cn_pkt_t l, input cn_pkt_t r, input cn_pkt_t p);
    @(negedge clk);
    up_in[0] = l; up_in[1] = r; dn_in = p;
    @(negedge clk);
    up_in[0] = CN_IDLE; up_in[1] = CN_IDLE; dn_in = CN_IDLE;
  endtask

  // wait until the node sends a non-idle packet up
  task automatic wait_up(output cn_pkt_t u);
    u = CN_IDLE;
    for (int t = 0; t < 10 && u.ptype == PT_IDLE; t++) begin
      #1 u = up_out;
      if (u.ptype == PT_IDLE) @(negedge clk);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cn_pkt_t u, a, b;
    int coll = 0;
    up_in[0] = CN_IDLE; up_in[1] = CN_IDLE; dn_in = CN_IDLE;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // single-source up, one clock
    a = mk(PT_SINGLE, OP_UBCAST, CB_OR, 32'h1234);
    @(negedge clk) up_in[1] = a;
    @(negedge clk) up_in[1] = CN_IDLE;
    check(up_out == a, "single-source goes up in one clock");
    // collision
    @(negedge clk) begin up_in[0] = a; up_in[1] = mk(PT_SINGLE, OP_UBCAST, CB_OR, 32'h9); end
    @(negedge clk) begin up_in[0] = CN_IDLE; up_in[1] = CN_IDLE; end
    check(collision_err && up_out.data == 32'h1234 && up_out.err, "collision: left goes on, error set");

    // combining with skew, every operator
    for (int r = 0; r < 100; r++) begin
      cn_comb_e c;
      logic [31:0] x, y;
      int skew;
      bit ab_l, ab_r;
      c = cn_comb_e'(r % 5);
      x = $urandom; y = $urandom;
      skew = $urandom_range(0, 3);
      ab_l = ($urandom_range(0, 4) == 0); ab_r = ($urandom_range(0, 4) == 0);
      a = mk(ab_l ? PT_ABSTAIN : PT_MULTI, OP_REDUCE, c, x);
      b = mk(ab_r ? PT_ABSTAIN : PT_MULTI, OP_REDUCE, c, y);
      @(negedge clk) up_in[0] = a;
      repeat (skew) @(negedge clk) up_in[0] = CN_IDLE;
      @(negedge clk) begin up_in[0] = CN_IDLE; up_in[1] = b; end
      @(negedge clk) up_in[1] = CN_IDLE;
      wait_up(u);
      if (ab_l && ab_r) check(u.ptype == PT_ABSTAIN, "two abstains give an abstain");
      else check(u.ptype == PT_MULTI &&
                 u.data == (ab_l ? y : ab_r ? x : f(c, x, y)),
                 $sformatf("combine op %0d: %h %h -> %h", c, x, y, u.data));
      // reduction result coming down goes to both children
      step(CN_IDLE, CN_IDLE, mk(PT_MULTI, OP_REDUCE, c, u.data));
      check(dn_out[0].data == u.data && dn_out[1].data == u.data, "result copied down");
    end

    // scans: forward and backward, with and without a segment start on the put-aside side
    for (int r = 0; r < 40; r++) begin
      cn_op_e op;
      logic sg;
      logic [31:0] x, y, p;
      op = (r % 2) ? OP_SCANB : OP_SCANF;
      sg = r[1];
      x = $urandom_range(0, 1000); y = $urandom_range(0, 1000); p = $urandom_range(1, 1000);
      a = mk(PT_MULTI, op, CB_UADD, x, (op == OP_SCANF) ? sg : 1'b0);
      b = mk(PT_MULTI, op, CB_UADD, y, (op == OP_SCANB) ? sg : 1'b0);
      step(a, b, CN_IDLE);
      wait_up(u);
      check(u.data == x + y && u.seg == sg, $sformatf("scan summary %0d", r));
      step(CN_IDLE, CN_IDLE, mk(PT_MULTI, op, CB_UADD, p));
      if (op == OP_SCANF)
        check(dn_out[0].data == p && dn_out[1].data == (sg ? x : p + x),
              $sformatf("forward scan split %0d", r));
      else
        check(dn_out[1].data == p && dn_out[0].data == (sg ? y : p + y),
              $sformatf("backward scan split %0d", r));
    end

    // broadcast down, minor bits
    step(CN_IDLE, CN_IDLE, mk(PT_SINGLE, OP_UBCAST, CB_OR, 32'hABCD));
    check(dn_out[0].data == 32'hABCD && dn_out[1].data == 32'hABCD, "broadcast copied down");
    a = CN_IDLE; a.async_or = 2'b01; a.stop = 1'b1;
    b = CN_IDLE; b.async_or = 2'b10;
    step(a, b, CN_IDLE);
    check(up_out.async_or == 2'b11 && up_out.stop, "minor bits ORed");
    check(!mismatch_err, "no mismatch");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
