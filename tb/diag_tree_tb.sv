// diag_tree_tb: the diagnostic network of height 6 (64 pods) with pod models.
//
// Each pod model is an 8-bit scan chain that shifts on its step strobe (TDI in at the top,
// TDO from bit 0). Checked here: the document's example address 00B10B selects exactly pods
// 4, 5, 12 and 13; the union of two separately selected pods by a final address B at the root;
// an internal node named by a one-digit address; parallel scan-out of the selected pods with
// the AND combiner for expected ones and the OR combiner for expected zeros, which finds a pod
// whose chain holds a wrong bit and passes once that pod is left out; and erase.
module diag_tree_tb;
  import cm5_pkg::*;
  localparam int H = 6, NP = 64;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic erase, tok_valid, jtag_step, jtag_tms, jtag_tdi, comb_and, tdo, pod_tms, pod_tdi;
  dg_digit_e tok_digit;
  logic [NP-1:0] pod_step, pod_tdo;
  logic [NP-1:1] node_selected;

  diag_tree #(.HEIGHT(H)) dut (.*);

  logic [7:0] chain [NP];
  int         steps [NP];
  for (genvar j = 0; j < NP; j++) begin : g_pod
    assign pod_tdo[j] = chain[j][0];
    always @(posedge clk) if (pod_step[j]) begin
      chain[j] <= {pod_tdi, chain[j][7:1]};
      steps[j] <= steps[j] + 1;
    end
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send_addr(input string a);
    for (int k = 0; k <= a.len(); k++) begin
      @(negedge clk);
      tok_valid = 1'b1;
      if (k == a.len())    tok_digit = DG_END;
      else if (a[k] == "0") tok_digit = DG_LEFT;
      else if (a[k] == "1") tok_digit = DG_RIGHT;
      else                  tok_digit = DG_BOTH;
    end
    @(negedge clk);
    tok_valid = 1'b0;
    repeat (H + 2) @(negedge clk);
  endtask

  // one step strobe; returns the set of pods that moved
  task automatic strobe(output logic [NP-1:0] moved);
    int prev [NP];
    for (int j = 0; j < NP; j++) prev[j] = steps[j];
    @(negedge clk) jtag_step = 1'b1;
    @(negedge clk) jtag_step = 1'b0;
    for (int j = 0; j < NP; j++) moved[j] = steps[j] != prev[j];
  endtask

  // shift out 8 bits of every selected pod, comparing with want; returns mismatches
  task automatic scan_compare(input logic [7:0] want, output int bad);
    bad = 0;
    for (int b = 0; b < 8; b++) begin
      @(negedge clk);
      comb_and = want[b];        // expect 1: AND; expect 0: OR
      #1;
      if (tdo !== want[b]) bad++;
      jtag_tdi = want[b];        // recirculate the expected value
      jtag_step = 1'b1;
      @(negedge clk) jtag_step = 1'b0;
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NP-1:0] moved, want;
    int bad;
    erase = 0; tok_valid = 0; tok_digit = DG_END; jtag_step = 0; jtag_tms = 0; jtag_tdi = 0;
    comb_and = 0;
    for (int j = 0; j < NP; j++) begin chain[j] = 8'hA5; steps[j] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // nothing selected after reset
    strobe(moved);
    check(moved == '0, "no pod selected after reset");

    // the example of the document
    send_addr("00B10B");
    strobe(moved);
    want = '0; want[4] = 1; want[5] = 1; want[12] = 1; want[13] = 1;
    check(moved == want, $sformatf("00B10B selects %h", moved));

    // union of pod 1 and pod 62 through a final B at the root
    @(negedge clk) erase = 1;
    @(negedge clk) erase = 0;
    send_addr("000001");
    send_addr("111110");
    strobe(moved);
    want = '0; want[62] = 1;
    check(moved == want, $sformatf("second set alone %h", moved));
    send_addr("B");
    strobe(moved);
    want[1] = 1;
    check(moved == want, $sformatf("union %h", moved));
    check(node_selected[2] && node_selected[3], "root children hold the tokens after B");

    // an internal node addressed with one digit
    send_addr("1");
    check(node_selected[3], "one-digit address selects node 3");
    strobe(moved);
    want = '0; want[62] = 1;
    check(moved == want, $sformatf("left set kept but out of reach %h", moved));

    // parallel scan compare, pod 12 faulty
    @(negedge clk) erase = 1;
    @(negedge clk) erase = 0;
    for (int j = 0; j < NP; j++) chain[j] = 8'h5A;
    chain[12] = 8'h5B;
    send_addr("00B10B");
    scan_compare(8'h5A, bad);
    check(bad > 0, "faulty pod detected by the combined scan output");
    for (int j = 0; j < NP; j++) chain[j] = 8'h5A;
    chain[12] = 8'h5B;
    send_addr("00B101");                  // pods 5 and 13 only
    scan_compare(8'h5A, bad);
    check(bad == 0, $sformatf("good pods compare clean (%0d)", bad));
    send_addr("001100");                  // pod 12 alone
    scan_compare(8'h5A, bad);
    check(bad == 1, $sformatf("pod 12 isolated, %0d bad bits", bad));

    // erase clears every path
    @(negedge clk) erase = 1;
    @(negedge clk) erase = 0;
    strobe(moved);
    check(moved == '0, "erase");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
