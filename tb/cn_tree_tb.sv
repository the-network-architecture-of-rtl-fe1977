// cn_tree_tb: the control network tree of 8 leaves with its root turnaround, driven by leaf
// models in the testbench.
//
// Each leaf injects packets at a random delay, as processors reach an operation at
// different times, and collects what comes down. Expected results are computed here from the
// leaf inputs: a broadcast reaches every leaf once, a reduction gives every leaf the total,
// forward and backward scans give the exclusive prefix and suffix (including the
// document's example <3,2,0,4,2,6,5,8> -> <0,3,5,5,9,11,17,22>), a segmented scan restarts at
// segment starts, an abstaining leaf counts as the identity, back-to-back operations come out
// in order, asynchronous OR bits reach every leaf, and two broadcasts that meet raise the
// collision error. The up-and-back latency of a broadcast is checked as well.
module cn_tree_tb;
  import cm5_pkg::*;
  localparam int H = 3, N = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  cn_pkt_t leaf_up [N], leaf_dn [N];
  cn_pkt_t root_up, root_dn;
  logic    collision_err, mismatch_err;

  cn_tree #(.HEIGHT(H)) dut (.*);
  cn_root u_root (.clk, .rst_n, .up_in(root_up), .dn_out(root_dn));

  int checks = 0, failures = 0, n_coll = 0, cycle = 0;
  cn_pkt_t   txq [N][$];
  int        txdelay [N];
  cn_pkt_t   rxq [N][$];
  int        rx_cycle [N][$];
  logic [1:0] async_in [N];

  always_comb
    for (int j = 0; j < N; j++) begin
      if (txq[j].size() > 0 && txdelay[j] == 0) leaf_up[j] = txq[j][0];
      else                                      leaf_up[j] = CN_IDLE;
      leaf_up[j].async_or = async_in[j];
    end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && collision_err) n_coll++;
    for (int j = 0; j < N; j++) begin
      if (rst_n && leaf_dn[j].ptype != PT_IDLE) begin
        rxq[j].push_back(leaf_dn[j]);
        rx_cycle[j].push_back(cycle);
      end
    end
  end
  always @(negedge clk)
    for (int j = 0; j < N; j++) begin
      if (txdelay[j] > 0) txdelay[j]--;
      else if (rst_n && txq[j].size() > 0 && leaf_up[j].ptype != PT_IDLE) void'(txq[j].pop_front());
    end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic cn_pkt_t mk(input cn_ptype_e t, input cn_op_e op, input cn_comb_e c,
                                 input logic [31:0] d, input logic seg);
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

  // one combining operation over all leaves; abst[j] = leaf j abstains
  task automatic combine_op(input cn_op_e op, input cn_comb_e c, input logic [31:0] v[N],
                            input bit seg[N], input bit abst[N], input string name);
    logic [31:0] expv [N];
    logic [31:0] acc;
    for (int j = 0; j < N; j++) begin
      cn_pkt_t p;
      logic [31:0] d = v[j];
      logic        s = seg[j];
      if (op == OP_SCANB && seg[j]) d = cn_identity(c);   // leaf summary of a backward scan
      p = mk(abst[j] ? PT_ABSTAIN : PT_MULTI, op, c, d, s);
      txq[j].push_back(p);
      txdelay[j] = $urandom_range(0, 6);
    end
    // reference, as the raw value each leaf receives
    for (int j = 0; j < N; j++) begin
      acc = cn_identity(c);
      if (op == OP_REDUCE) begin
        for (int k = 0; k < N; k++) if (!abst[k]) acc = f(c, acc, v[k]);
      end else if (op == OP_SCANF) begin
        for (int k = j - 1; k >= 0; k--) begin
          if (!abst[k]) acc = f(c, acc, v[k]);
          if (!abst[k] && seg[k]) break;
        end
      end else begin
        for (int k = j + 1; k < N; k++) begin
          if (!abst[k] && seg[k]) break;
          if (!abst[k]) acc = f(c, acc, v[k]);
        end
      end
      expv[j] = acc;
    end
    repeat (60) @(posedge clk);
    for (int j = 0; j < N; j++) begin
      cn_pkt_t r;
      if (rxq[j].size() == 0) begin
        check(0, $sformatf("%s: leaf %0d got nothing", name, j));
        continue;
      end
      r = rxq[j].pop_front();
      void'(rx_cycle[j].pop_front());
      if (abst.sum() == N) check(r.ptype == PT_ABSTAIN, $sformatf("%s: all abstain", name));
      else check(r.ptype == PT_MULTI && r.op == op && r.data == expv[j],
                 $sformatf("%s: leaf %0d got %h want %h", name, j, r.data, expv[j]));
    end
  endtask

  initial begin
    #400000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v [N];
    bit seg [N], none [N], abst [N];
    int t0;
    for (int j = 0; j < N; j++) begin async_in[j] = 2'b00; txdelay[j] = 0; none[j] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // broadcast from leaf 5, latency up and back down
    t0 = cycle;
    txq[5].push_back(mk(PT_SINGLE, OP_UBCAST, CB_OR, 32'hB0B0CAFE, 0));
    repeat (30) @(posedge clk);
    for (int j = 0; j < N; j++) begin
      check(rxq[j].size() == 1 && rxq[j][0].data == 32'hB0B0CAFE && rxq[j][0].op == OP_UBCAST,
            $sformatf("broadcast leaf %0d n=%0d", j, rxq[j].size()));
      if (rxq[j].size() > 0)
        check(rx_cycle[j][0] - t0 <= 2 * H + 3, $sformatf("broadcast latency %0d", rx_cycle[j][0] - t0));
      rxq[j].delete();
      rx_cycle[j].delete();
    end

    // the document's forward scan example
    v = '{32'd3, 32'd2, 32'd0, 32'd4, 32'd2, 32'd6, 32'd5, 32'd8};
    combine_op(OP_SCANF, CB_SADD, v, none, none, "scan example");

    // random reductions and scans with every operator
    for (int r = 0; r < 20; r++) begin
      cn_comb_e c;
      c = cn_comb_e'(r % 5);
      for (int j = 0; j < N; j++) begin
        v[j] = $urandom;
        seg[j] = ($urandom_range(0, 3) == 0);
        abst[j] = ($urandom_range(0, 5) == 0);
      end
      combine_op(OP_REDUCE, c, v, none, none, $sformatf("reduce %0d", r));
      combine_op(OP_REDUCE, c, v, none, abst, $sformatf("reduce abstain %0d", r));
      combine_op(OP_SCANF, c, v, none, none, $sformatf("scanf %0d", r));
      combine_op(OP_SCANB, c, v, none, none, $sformatf("scanb %0d", r));
      combine_op(OP_SCANF, c, v, seg, none, $sformatf("seg scanf %0d", r));
      combine_op(OP_SCANB, c, v, seg, abst, $sformatf("seg scanb abstain %0d", r));
    end
    for (int j = 0; j < N; j++) abst[j] = 1;
    combine_op(OP_REDUCE, CB_OR, v, none, abst, "all abstain");

    // two reductions pushed back to back come out in order (pipelined)
    for (int j = 0; j < N; j++) begin
      txq[j].push_back(mk(PT_MULTI, OP_REDUCE, CB_UADD, 32'(j), 0));
      txq[j].push_back(mk(PT_MULTI, OP_REDUCE, CB_XOR, 32'(1 << j), 0));
      txdelay[j] = $urandom_range(0, 3);
    end
    repeat (60) @(posedge clk);
    for (int j = 0; j < N; j++) begin
      check(rxq[j].size() == 2 && rxq[j][0].data == 32'd28 && rxq[j][1].data == 32'hFF,
            $sformatf("pipelined reductions leaf %0d", j));
      rxq[j].delete();
      rx_cycle[j].delete();
    end

    // asynchronous OR
    async_in[3] = 2'b10;
    repeat (2 * H + 4) @(posedge clk);
    for (int j = 0; j < N; j++) check(leaf_dn[j].async_or == 2'b10, $sformatf("async OR leaf %0d", j));
    async_in[3] = 2'b00;
    repeat (2 * H + 4) @(posedge clk);
    check(leaf_dn[0].async_or == 2'b00, "async OR clears");

    // two broadcasts meeting at the node above leaves 0 and 1
    txq[0].push_back(mk(PT_SINGLE, OP_UBCAST, CB_OR, 32'h1, 0));
    txq[1].push_back(mk(PT_SINGLE, OP_UBCAST, CB_OR, 32'h2, 0));
    repeat (30) @(posedge clk);
    check(n_coll == 1, $sformatf("collision seen %0d", n_coll));
    check(rxq[7].size() == 1 && rxq[7][0].err, "collision error flag reaches the leaves");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
