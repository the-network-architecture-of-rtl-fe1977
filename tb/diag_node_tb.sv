// diag_node_tb: one diagnostic network node with its two children played by the testbench.
//
// Checked: the first digit sets the child enables (0, 1, B) and later digits, END included,
// come out one clock later on the enabled children only; an END as first digit marks the node
// selected and keeps its enables; the step strobe reaches enabled children only; the returned
// test data is the AND or the OR of the enabled children, a disabled child giving the
// identity; erase clears the node.
module diag_node_tb;
  import cm5_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       erase = 0, tok_valid = 0, jtag_step = 0, comb_and = 0, tdo, selected;
  dg_digit_e  tok_digit = DG_LEFT, ch_tok_digit;
  logic [1:0] ch_tok_valid, ch_step, ch_tdo = 2'b00, en;

  diag_node dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // send a digit string; record what each child received
  dg_digit_e got [2][$];
  always @(posedge clk)
    for (int c = 0; c < 2; c++) if (rst_n && ch_tok_valid[c]) got[c].push_back(ch_tok_digit);

  task automatic send(input dg_digit_e ds[$]);
    foreach (ds[k]) begin
      @(negedge clk);
      tok_valid = 1'b1; tok_digit = ds[k];
    end
    @(negedge clk) tok_valid = 1'b0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    send('{DG_RIGHT, DG_LEFT, DG_BOTH, DG_END});
    check(en == 2'b10, "digit 1 enables the right child");
    check(got[1].size() == 3 && got[1][0] == DG_LEFT && got[1][1] == DG_BOTH && got[1][2] == DG_END,
          "later digits forwarded to the right child");
    check(got[0].size() == 0, "nothing to the left child");
    got[0].delete(); got[1].delete();

    send('{DG_BOTH, DG_RIGHT, DG_END});
    check(en == 2'b11 && got[0].size() == 2 && got[1].size() == 2, "B splits the token");
    got[0].delete(); got[1].delete();

    send('{DG_END});
    check(selected && en == 2'b11, "END alone selects the node and keeps its enables");

    send('{DG_LEFT, DG_END});
    @(negedge clk) jtag_step = 1'b1;
    #1 check(ch_step == 2'b01, "step to the enabled child only");
    @(negedge clk) jtag_step = 1'b0;

    for (int v = 0; v < 4; v++) begin
      ch_tdo = 2'(v);
      comb_and = 1'b1; #1 check(tdo == ch_tdo[0], "AND ignores a disabled child");
      comb_and = 1'b0; #1 check(tdo == ch_tdo[0], "OR ignores a disabled child");
    end
    send('{DG_BOTH, DG_END});
    for (int v = 0; v < 4; v++) begin
      ch_tdo = 2'(v);
      comb_and = 1'b1; #1 check(tdo == &ch_tdo, "AND of both children");
      comb_and = 1'b0; #1 check(tdo == |ch_tdo, "OR of both children");
    end

    @(negedge clk) erase = 1'b1;
    @(negedge clk) erase = 1'b0;
    check(en == 2'b00 && !selected, "erase clears the node");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
