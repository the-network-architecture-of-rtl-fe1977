// dn_router_tb: self-checking test of one data network router chip.
//
// Messages are built as nibble streams in the testbench, pushed into chosen input links and
// collected on the output links. The expected output stream (header rewritten by the
// routing rule, fresh CRC) is computed here from the message fields, independently of the
// router. Covered: a down route, an up route over the enabled parents only, a down route
// from a parent, a corrupted CRC (primary error), a complemented CRC (secondary error),
// all-fall-down mode and an all-fall-down marked message, contention for one output with
// random back-pressure, the head latency through an idle chip, and the message counters.
module dn_router_tb;
  import cm5_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [7:0]      in_valid, in_ready, out_valid, out_ready;
  logic [7:0][3:0] in_data, out_data;
  logic [3:0]      parent_en;
  logic            afd_mode;
  logic [7:0][1:0] afd_perm;
  logic            primary_err, secondary_err, route_err;
  logic [7:0][15:0] msg_count;

  dn_router dut (.*);

  int checks = 0, failures = 0;
  int n_prim = 0, n_sec = 0;

  logic [3:0] inq  [8][$];
  logic [3:0] outq [8][$];
  int         first_out_cycle [8];
  int         cycle = 0;
  bit         rand_bp = 0;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && primary_err)   n_prim++;
    if (rst_n && secondary_err) n_sec++;
    for (int o = 0; o < 8; o++)
      if (rst_n && out_valid[o] && out_ready[o]) begin
        if (outq[o].size() == 0) first_out_cycle[o] = cycle;
        outq[o].push_back(out_data[o]);
      end
  end

  // drive inputs on the falling edge
  logic [7:0] took;
  always @(posedge clk) took <= rst_n ? (in_valid & in_ready) : 8'h00;
  always @(negedge clk) begin
    for (int i = 0; i < 8; i++) begin
      if (took[i]) void'(inq[i].pop_front());
    end
  end
  always_comb begin
    for (int i = 0; i < 8; i++) begin
      in_valid[i] = rst_n && inq[i].size() > 0;
      in_data[i]  = (inq[i].size() > 0) ? inq[i][0] : 4'h0;
    end
  end
  always @(negedge clk) out_ready <= rand_bp ? 8'($urandom) : 8'hFF;

  function automatic logic [7:0] ref_crc(input logic [3:0] s[$]);
    logic [7:0] c = 8'h00;
    foreach (s[k])
      for (int b = 3; b >= 0; b--) c = (c[7] ^ s[k][b]) ? ({c[6:0], 1'b0} ^ 8'h07) : {c[6:0], 1'b0};
    return c;
  endfunction

  // a message body: H0, H1, digits, LEN, TAG, DATA (no CRC)
  function automatic void build(output logic [3:0] s[$], input bit afd, input int up,
                                input int digits[$], input int len, input int tag,
                                input logic [31:0] words[$]);
    s = {};
    s.push_back({afd, 3'(up)});
    s.push_back({1'b0, 3'(digits.size())});
    foreach (digits[k]) s.push_back({2'b00, 2'(digits[k])});
    s.push_back(4'(len));
    s.push_back(4'(tag));
    foreach (words[w]) for (int n = 7; n >= 0; n--) s.push_back(words[w][4*n +: 4]);
  endfunction

  task automatic send(input int port, input logic [3:0] body[$], input int crc_mode);
    logic [7:0] c = ref_crc(body);
    if (crc_mode == 1) c = c ^ 8'h10;       // corrupted
    if (crc_mode == 2) c = ~c;              // marked bad upstream
    foreach (body[k]) inq[port].push_back(body[k]);
    inq[port].push_back(c[7:4]);
    inq[port].push_back(c[3:0]);
  endtask

  task automatic expect_out(input int o, input logic [3:0] body[$], input bit bad, input string what);
    logic [7:0] c = ref_crc(body);
    logic [3:0] exp[$];
    if (bad) c = ~c;
    exp = body;
    exp.push_back(c[7:4]);
    exp.push_back(c[3:0]);
    checks++;
    if (outq[o].size() < exp.size()) begin
      failures++;
      $display("FAIL %s: port %0d got %0d nibbles, want %0d", what, o, outq[o].size(), exp.size());
      return;
    end
    for (int k = 0; k < exp.size(); k++) begin
      logic [3:0] g = outq[o].pop_front();
      if (g !== exp[k]) begin
        failures++;
        $display("FAIL %s: port %0d nibble %0d = %h want %h", what, o, k, g, exp[k]);
        return;
      end
    end
  endtask

  task automatic wait_idle(input int n);
    repeat (n) @(posedge clk);
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] b[$], e[$];
    int t0, got;
    int none[$];
    parent_en = 4'b0011;
    afd_mode  = 1'b0;
    for (int i = 0; i < 8; i++) afd_perm[i] = 2'(3 - (i % 4));
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // 1. child 0 -> child 2, latency through an idle chip
    build(b, 0, 0, {2}, 2, 5, {32'hDEADBEEF, 32'h01234567});
    t0 = cycle;
    send(0, b, 0);
    wait_idle(60);
    build(e, 0, 0, none, 2, 5, {32'hDEADBEEF, 32'h01234567});
    check(first_out_cycle[2] - t0 <= 6, $sformatf("head latency %0d", first_out_cycle[2] - t0));
    expect_out(2, e, 0, "down route");

    // 2. child 1 climbs one level: must leave on an enabled parent (4 or 5)
    build(b, 0, 1, {3, 1}, 1, 9, {32'hCAFEF00D});
    send(1, b, 0);
    wait_idle(60);
    build(e, 0, 0, {3, 1}, 1, 9, {32'hCAFEF00D});
    got = (outq[4].size() > 0) ? 4 : (outq[5].size() > 0) ? 5 : -1;
    check(got >= 0 && outq[6].size() == 0 && outq[7].size() == 0, "up route on an enabled parent");
    if (got >= 0) expect_out(got, e, 0, "up route");

    // 3. parent 6 -> child 3 (a parent input always descends)
    build(b, 0, 0, {3, 0}, 1, 1, {32'h5A5A5A5A});
    send(6, b, 0);
    wait_idle(60);
    build(e, 0, 0, {0}, 1, 1, {32'h5A5A5A5A});
    expect_out(3, e, 0, "down from parent");

    // 4. corrupted CRC -> primary error, complement sent on
    build(b, 0, 0, {1}, 1, 2, {32'h11111111});
    send(2, b, 1);
    wait_idle(60);
    build(e, 0, 0, none, 1, 2, {32'h11111111});
    expect_out(1, e, 1, "primary error marking");
    check(n_prim == 1 && n_sec == 0, $sformatf("primary count %0d/%0d", n_prim, n_sec));

    // 5. complemented CRC -> secondary error, complement passed on
    build(b, 0, 0, {0}, 1, 3, {32'h22222222});
    send(3, b, 2);
    wait_idle(60);
    build(e, 0, 0, none, 1, 3, {32'h22222222});
    expect_out(0, e, 1, "secondary error marking");
    check(n_prim == 1 && n_sec == 1, $sformatf("secondary count %0d/%0d", n_prim, n_sec));

    // 6. all-fall-down mode: an upward message falls to afd_perm[input]
    afd_mode = 1'b1;
    build(b, 0, 2, {1, 2, 3}, 1, 4, {32'h33333333});
    send(1, b, 0);
    wait_idle(60);
    build(e, 1, 2, {1, 2, 3}, 1, 4, {32'h33333333});
    expect_out(2, e, 0, "all-fall-down mode");    // afd_perm[1] = 2
    afd_mode = 1'b0;

    // 7. an all-fall-down marked message keeps falling in a normal chip
    build(b, 1, 0, {0, 0}, 1, 4, {32'h44444444});
    send(5, b, 0);                                // afd_perm[5] = 2
    wait_idle(60);
    expect_out(2, b, 0, "marked message keeps falling");

    // 8. three inputs compete for child 3 under random back-pressure
    rand_bp = 1;
    for (int i = 0; i < 3; i++) begin
      build(b, 0, 0, {3}, 5, i, {32'(i), 32'h0F0F0F0F, 32'hF0F0F0F0, 32'h12345678, 32'(~i)});
      send(i, b, 0);
    end
    wait_idle(600);
    rand_bp = 0;
    wait_idle(10);
    check(outq[3].size() == 3 * (2 + 2 + 40 + 2), $sformatf("contention total %0d", outq[3].size()));
    for (int m = 0; m < 3; m++) begin
      // messages arrive whole; the tag says which input sent it
      int tg;
      tg = (outq[3].size() > 3) ? int'(outq[3][3]) : 0;
      build(e, 0, 0, none, 5, tg, {32'(tg), 32'h0F0F0F0F, 32'hF0F0F0F0, 32'h12345678, 32'(~tg)});
      expect_out(3, e, 0, $sformatf("contention message %0d", m));
    end

    // 9. counters: one message on port 2 (test 1) + 2 (tests 6,7), 3 on port 3 + 1
    check(msg_count[2] == 16'd3, $sformatf("count port2 %0d", msg_count[2]));
    check(msg_count[3] == 16'd4, $sformatf("count port3 %0d", msg_count[3]));
    check(msg_count[4] + msg_count[5] == 16'd1 && msg_count[6] == 0 && msg_count[7] == 0,
          "parent counters");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
