// cm5_top_tb: the whole machine at its default size (64 processing nodes, a control
// processor, two data network fat-trees, a 64-pod diagnostic network), with no parameter
// changed.
//
// The testbench plays all 65 processors at once: in a "wave" every processor makes the same
// kind of bus access in the same clock, each with its own data. The pods are 8-bit scan
// chains. Each mechanism the machine should show is counted, and a mechanism that never
// happened counts as a failure:
//   msg_left / msg_right   permutation traffic on both sides, every message checked
//   stall                  a link held by back-pressure while 63 nodes send to node 0
//   refused                a message refused because the send FIFO was full
//   rdone_wait / rdone     router done stays open while messages are in flight, then closes
//   bcast                  a user broadcast reaching all 65 leaves
//   reduce / scan          a signed-add reduction and a forward scan over all leaves
//   syncor / asyncor       the synchronous and an asynchronous global OR
//   afd                    all-fall-down mode delivering a marked message
//   diag_select            one pod reached by its address
//   diag_fault             a faulty pod found by the AND/OR compare
module cm5_top_tb;
  import cm5_pkg::*;
  localparam int NN = 64, NL = 65, NP = 64;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NN-1:0]        pn_bus_wr, pn_bus_rd, pn_bus_sup, pn_irq;
  logic [NN-1:0][7:0]   pn_bus_addr;
  logic [NN-1:0][31:0]  pn_bus_wdata, pn_bus_rdata;
  logic                 cp_bus_wr, cp_bus_rd, cp_bus_sup, cp_irq;
  logic [7:0]           cp_bus_addr;
  logic [31:0]          cp_bus_wdata, cp_bus_rdata;
  logic                 afd_mode;
  logic [7:0][1:0]      afd_perm;
  logic                 dn_primary_err, dn_secondary_err, dn_route_err;
  logic [1:0][31:0]     dn_msgs_delivered;
  logic                 cn_collision_err, cn_mismatch_err;
  logic                 dg_erase = 0, dg_tok_valid = 0, dg_jtag_step = 0, dg_jtag_tms = 0;
  logic                 dg_jtag_tdi = 0, dg_comb_and = 0, dg_tdo;
  dg_digit_e            dg_tok_digit = DG_LEFT;
  logic [NP-1:0]        pod_step, pod_tdo;
  logic                 pod_tms, pod_tdi;
  logic [NP-1:1]        dg_node_selected;

  cm5_top dut (.*);

  // ---------------- processor side ----------------
  logic        bw [NL], br [NL], bs [NL];
  logic [7:0]  ba [NL];
  logic [31:0] bd [NL], bq [NL];
  always_comb begin
    for (int i = 0; i < NN; i++) begin
      pn_bus_wr[i] = bw[i]; pn_bus_rd[i] = br[i]; pn_bus_sup[i] = bs[i];
      pn_bus_addr[i] = ba[i]; pn_bus_wdata[i] = bd[i]; bq[i] = pn_bus_rdata[i];
    end
    cp_bus_wr = bw[NN]; cp_bus_rd = br[NN]; cp_bus_sup = bs[NN];
    cp_bus_addr = ba[NN]; cp_bus_wdata = bd[NN]; bq[NN] = cp_bus_rdata;
  end

  typedef logic [31:0] word_a [NL];
  typedef bit          mask_a [NL];

  // every enabled processor writes its own word to address a in the same clock
  task automatic wr_wave(input logic [7:0] a, input word_a d, input mask_a en, input bit sup = 0);
    @(negedge clk);
    for (int i = 0; i < NL; i++) begin
      bw[i] = en[i]; ba[i] = a; bd[i] = d[i]; bs[i] = sup;
    end
    @(negedge clk);
    for (int i = 0; i < NL; i++) begin bw[i] = 0; bs[i] = 0; end
  endtask

  task automatic rd_wave(input logic [7:0] a, input mask_a en, output word_a d);
    @(negedge clk);
    for (int i = 0; i < NL; i++) begin br[i] = en[i]; ba[i] = a; end
    #1;
    for (int i = 0; i < NL; i++) d[i] = bq[i];
    @(negedge clk);
    for (int i = 0; i < NL; i++) br[i] = 0;
  endtask

  task automatic rd1(input int n, input logic [7:0] a, output logic [31:0] d);
    mask_a en;
    word_a w;
    for (int i = 0; i < NL; i++) en[i] = (i == n);
    rd_wave(a, en, w);
    d = w[n];
  endtask

  // ---------------- pods ----------------
  logic [7:0] chain [NP];
  for (genvar j = 0; j < NP; j++) begin : g_pod
    assign pod_tdo[j] = chain[j][0];
    always @(posedge clk) if (pod_step[j]) chain[j] <= {pod_tdi, chain[j][7:1]};
  end

  // ---------------- bookkeeping ----------------
  int checks = 0, failures = 0;
  int n_msg_left = 0, n_msg_right = 0, n_stall = 0, n_refused = 0, n_rdone_wait = 0, n_rdone = 0;
  int n_bcast = 0, n_reduce = 0, n_scan = 0, n_syncor = 0, n_asyncor = 0, n_afd = 0;
  int n_diag_select = 0, n_diag_fault = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk)
    if (rst_n && ((dut.tx_v[0] & ~dut.tx_r[0]) != '0 || (dut.rx_v[0] & ~dut.rx_r[0]) != '0))
      n_stall++;

  int unsigned expected [2][NN][$];   // per side and receiver: expected first data words

  // read every message waiting on side s of node n; returns the first data words
  task automatic drain(input int s, input int n, inout int got[$], inout int afd_seen);
    logic [31:0] st, h, w, first;
    forever begin
      rd1(n, 8'(4 * s + 3), st);
      if (!st[1]) break;
      rd1(n, 8'(4 * s + 2), h);
      if (h[31]) afd_seen++;
      check(h[30] == 1'b0, $sformatf("side %0d node %0d CRC error flagged", s, n));
      for (int k = 0; k < int'(h[2:0]); k++) begin
        rd1(n, 8'(4 * s + 2), w);
        if (k == 0) first = w;
        if (k == 1) check(w == ~first, $sformatf("side %0d node %0d word 1 %h", s, n, w));
      end
      got.push_back(int'(first));
    end
  endtask

  // every enabled node sends one message of len words on side s to dest[i]
  task automatic send_wave(input int s, input int dest [NL], input int len, input mask_a en,
                           input int tagv, output mask_a ok);
    word_a d, st;
    for (int i = 0; i < NL; i++) d[i] = {4'(tagv), 1'b0, 3'(len), 24'(dest[i])};
    wr_wave(8'(4 * s), d, en);
    for (int k = 0; k < len; k++) begin
      for (int i = 0; i < NL; i++) d[i] = (k == 0) ? {8'(s), 8'(tagv), 16'(i)} :
                                          (k == 1) ? ~{8'(s), 8'(tagv), 16'(i)} : 32'(k);
      wr_wave(8'(4 * s + 1), d, en);
    end
    rd_wave(8'(4 * s + 3), en, st);
    for (int i = 0; i < NL; i++) ok[i] = en[i] && st[i][0];
  endtask

  // compare what every node received on side s with what was sent to it
  task automatic check_side(input int s, inout int count);
    int afd_seen = 0;
    for (int n = 0; n < NN; n++) begin
      int got[$];
      drain(s, n, got, afd_seen);
      for (int t = 0; t < 400 && got.size() < expected[s][n].size(); t++) begin
        repeat (10) @(posedge clk);
        drain(s, n, got, afd_seen);
      end
      got.sort();
      expected[s][n].sort();
      check(got.size() == expected[s][n].size(), $sformatf("side %0d node %0d got %0d messages, want %0d",
            s, n, got.size(), expected[s][n].size()));
      if (got.size() == expected[s][n].size())
        foreach (got[k]) begin
          check(got[k] == int'(expected[s][n][k]), $sformatf("side %0d node %0d message %h", s, n, got[k]));
          if (got[k] == int'(expected[s][n][k])) count++;
        end
      expected[s][n].delete();
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_a d, r;
    mask_a all, pns, ok, one;
    int dest [NL];
    int dummy;
    longint sum;
    for (int i = 0; i < NL; i++) begin
      bw[i] = 0; br[i] = 0; bs[i] = 0; ba[i] = 0; bd[i] = 0;
      all[i] = 1; pns[i] = (i < NN);
    end
    for (int j = 0; j < NP; j++) chain[j] = 8'hA5;
    afd_mode = 1'b0;
    for (int p = 0; p < 8; p++) afd_perm[p] = (p < 4) ? 2'((p + 1) % 4) : 2'(p - 4);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);

    // 1. permutation traffic: left side i -> 5i+3, right side i -> i+17, all at once
    for (int i = 0; i < NL; i++) dest[i] = (5 * i + 3) % NN;
    send_wave(0, dest, 3, pns, 1, ok);
    for (int i = 0; i < NN; i++) begin
      check(ok[i], $sformatf("left send accepted at node %0d", i));
      if (ok[i]) expected[0][dest[i]].push_back({8'd0, 8'd1, 16'(i)});
    end
    for (int i = 0; i < NL; i++) dest[i] = (i + 17) % NN;
    send_wave(1, dest, 2, pns, 2, ok);
    for (int i = 0; i < NN; i++) begin
      check(ok[i], $sformatf("right send accepted at node %0d", i));
      if (ok[i]) expected[1][dest[i]].push_back({8'd1, 8'd2, 16'(i)});
    end
    repeat (400) @(posedge clk);
    check_side(0, n_msg_left);
    check_side(1, n_msg_right);

    // 2. contention: nodes 1..63 send two messages each to node 0; router done meanwhile
    for (int i = 0; i < NL; i++) begin dest[i] = 0; one[i] = (i >= 1 && i < NN); end
    for (int m = 0; m < 2; m++) begin
      send_wave(0, dest, 5, one, 3 + m, ok);
      for (int i = 0; i < NN; i++) begin
        if (one[i] && !ok[i]) n_refused++;
        if (ok[i]) expected[0][0].push_back({8'd0, 8'(3 + m), 16'(i)});
      end
    end
    for (int i = 0; i < NL; i++) d[i] = 0;
    wr_wave(8'h16, d, all);
    repeat (300) @(posedge clk);
    rd_wave(8'h24, all, r);
    dummy = 0;
    for (int i = 0; i < NL; i++) if (r[i][11] && !r[i][2]) dummy++;
    check(dummy == NL, $sformatf("router done open at %0d leaves while messages wait", dummy));
    if (dummy == NL) n_rdone_wait++;
    check_side(0, n_msg_left);
    repeat (200) @(posedge clk);
    rd_wave(8'h22, all, r);
    dummy = 0;
    for (int i = 0; i < NL; i++) if (r[i] == 1) dummy++;
    check(dummy == NL, $sformatf("router done at %0d leaves", dummy));
    if (dummy == NL) n_rdone++;

    // 3. broadcast from node 5
    d[5] = 32'hB0AD_CA57;
    for (int i = 0; i < NL; i++) one[i] = (i == 5);
    wr_wave(8'h10, d, one);
    repeat (40) @(posedge clk);
    rd_wave(8'h20, all, r);
    dummy = 0;
    for (int i = 0; i < NL; i++) if (r[i] == 32'hB0AD_CA57) dummy++;
    check(dummy == NL, $sformatf("broadcast reached %0d leaves", dummy));
    if (dummy == NL) n_bcast++;

    // 4. signed-add reduction and forward scan over the 65 leaves
    for (int i = 0; i < NL; i++) d[i] = {22'd0, 2'b00, 1'b0, 3'(CB_SADD), 4'(OP_REDUCE)};
    wr_wave(8'h14, d, all);
    sum = 0;
    for (int i = 0; i < NL; i++) begin d[i] = 32'(i * 3 - 50); sum += i * 3 - 50; end
    wr_wave(8'h15, d, all);
    for (int i = 0; i < NL; i++) d[i] = {22'd0, 2'b00, 1'b0, 3'(CB_SADD), 4'(OP_SCANF)};
    wr_wave(8'h14, d, all);
    for (int i = 0; i < NL; i++) d[i] = 32'(i);
    wr_wave(8'h15, d, all);
    repeat (60) @(posedge clk);
    rd_wave(8'h21, all, r);
    dummy = 0;
    for (int i = 0; i < NL; i++) if (r[i] == 32'(sum)) dummy++;
    check(dummy == NL, $sformatf("reduction right at %0d leaves", dummy));
    if (dummy == NL) n_reduce++;
    rd_wave(8'h21, all, r);
    dummy = 0;
    for (int i = 0; i < NL; i++) if (r[i] == 32'(i * (i - 1) / 2)) dummy++;
    check(dummy == NL, $sformatf("forward scan right at %0d leaves", dummy));
    if (dummy == NL) n_scan++;

    // 5. synchronous OR (only node 13 says 1) and asynchronous OR from node 7
    for (int i = 0; i < NL; i++) d[i] = (i == 13);
    wr_wave(8'h17, d, all);
    for (int i = 0; i < NL; i++) one[i] = (i == 7);
    d[7] = 1;
    wr_wave(8'h18, d, one);
    repeat (60) @(posedge clk);
    rd_wave(8'h23, all, r);
    dummy = 0;
    for (int i = 0; i < NL; i++) if (r[i] == 1) dummy++;
    check(dummy == NL, $sformatf("synchronous OR at %0d leaves", dummy));
    if (dummy == NL) n_syncor++;
    rd_wave(8'h24, all, r);
    dummy = 0;
    for (int i = 0; i < NL; i++) if (r[i][5]) dummy++;
    check(dummy == NL && cp_irq, $sformatf("asynchronous OR at %0d leaves", dummy));
    if (dummy == NL) n_asyncor++;

    // 6. all-fall-down: a message from node 3 to node 12 falls into node 3's group
    afd_mode = 1'b1;
    for (int i = 0; i < NL; i++) begin dest[i] = 12; one[i] = (i == 3); end
    send_wave(0, dest, 2, one, 6, ok);
    repeat (200) @(posedge clk);
    afd_mode = 1'b0;
    begin
      int got[$];
      int afd_seen = 0;
      for (int n = 0; n < NN; n++) drain(0, n, got, afd_seen);
      check(got.size() == 1 && afd_seen == 1, $sformatf("all-fall-down delivered %0d marked %0d",
            got.size(), afd_seen));
      if (afd_seen == 1) n_afd++;
    end

    // 7. diagnostic network: pod 12 is faulty; select all, find it; then select pod 5 alone
    chain[12] = 8'hA4;
    begin
      int bad;
      logic [NP-1:0] sel;
      dg_send("BBBBBB");
      dg_compare(8'hA5, bad);
      check(bad > 0, "faulty pod found by the compare");
      if (bad > 0) n_diag_fault++;
      dg_erase = 1; @(negedge clk) dg_erase = 0;
      dg_send("000101");
      for (int j = 0; j < NP; j++) chain[j] = 8'(j);
      @(negedge clk) dg_jtag_step = 1'b1;
      #1 sel = pod_step;
      @(negedge clk) dg_jtag_step = 1'b0;
      check(sel == 64'h20, $sformatf("pod 5 alone selected %h", sel));
      if (sel == 64'h20) n_diag_select++;
    end

    // 8. no error reported by the networks
    check(!dn_primary_err && !dn_route_err && !cn_collision_err && !cn_mismatch_err, "no network error");

    begin
      int counts [14];
      string names [14];
      counts = '{n_msg_left, n_msg_right, n_stall, n_refused, n_rdone_wait, n_rdone,
                 n_bcast, n_reduce, n_scan, n_syncor, n_asyncor, n_afd,
                 n_diag_select, n_diag_fault};
      names = '{"msg_left", "msg_right", "stall", "refused", "rdone_wait", "rdone",
                 "bcast", "reduce", "scan", "syncor", "asyncor", "afd",
                 "diag_select", "diag_fault"};
      for (int k = 0; k < 14; k++) begin
        $display("mechanism %-12s %0d", names[k], counts[k]);
        check(counts[k] > 0, $sformatf("mechanism %s never happened", names[k]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic dg_send(input string a);
    for (int k = 0; k <= a.len(); k++) begin
      @(negedge clk);
      dg_tok_valid = 1'b1;
      if (k == a.len())     dg_tok_digit = DG_END;
      else if (a[k] == "0") dg_tok_digit = DG_LEFT;
      else if (a[k] == "1") dg_tok_digit = DG_RIGHT;
      else                  dg_tok_digit = DG_BOTH;
    end
    @(negedge clk);
    dg_tok_valid = 1'b0;
    repeat (10) @(negedge clk);
  endtask

  task automatic dg_compare(input logic [7:0] want, output int bad);
    bad = 0;
    for (int b = 0; b < 8; b++) begin
      @(negedge clk);
      dg_comb_and = want[b];
      #1;
      if (dg_tdo !== want[b]) bad++;
      dg_jtag_tdi = want[b];
      dg_jtag_step = 1'b1;
      @(negedge clk) dg_jtag_step = 1'b0;
    end
  endtask
endmodule
