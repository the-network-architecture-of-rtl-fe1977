// dn_fat_tree_tb: one data network fat-tree of 16 leaves (two router levels) with leaf
// models that send and receive nibble streams.
//
// Every leaf sends random messages to random destinations (itself included) with random gaps,
// and takes its output with random back-pressure. Each message carries its source and a
// sequence number in its first data word, so the receiver can find it in the list of sent
// messages and compare length, tag, data and CRC. Messages between one source and one
// destination may overtake each other, as the document allows (climbing messages take random
// parents), so matching is by content, not order. Also checked: no error flags, the delivery
// counter, and that every message arrives exactly once.
module dn_fat_tree_tb;
  import cm5_pkg::*;
  localparam int L = 2, N = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0]      leaf_in_valid, leaf_in_ready, leaf_out_valid, leaf_out_ready;
  logic [N-1:0][3:0] leaf_in_data, leaf_out_data;
  logic              afd_mode = 1'b0;
  logic [7:0][1:0]   afd_perm = '0;
  logic              primary_err, secondary_err, route_err;
  logic [31:0]       msgs_delivered;

  dn_fat_tree #(.LEVELS(L)) dut (.*);

  int checks = 0, failures = 0, n_err = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [3:0] inq [N][$];
  logic [3:0] rxn [N][$];
  bit         bp = 1;

  logic [N-1:0] took;
  always @(posedge clk) begin
    took <= rst_n ? (leaf_in_valid & leaf_in_ready) : '0;
    if (rst_n && (primary_err || secondary_err || route_err)) n_err++;
    for (int o = 0; o < N; o++)
      if (rst_n && leaf_out_valid[o] && leaf_out_ready[o]) rxn[o].push_back(leaf_out_data[o]);
  end
  always @(negedge clk) begin
    for (int i = 0; i < N; i++) if (took[i]) void'(inq[i].pop_front());
    leaf_out_ready <= bp ? N'($urandom) | N'($urandom) : '1;
  end
  always_comb
    for (int i = 0; i < N; i++) begin
      leaf_in_valid[i] = rst_n && inq[i].size() > 0;
      leaf_in_data[i]  = (inq[i].size() > 0) ? inq[i][0] : 4'h0;
    end

  function automatic logic [7:0] crc_of(input logic [3:0] s[$]);
    logic [7:0] c = 8'h00;
    foreach (s[k]) c = crc8_nib(c, s[k]);
    return c;
  endfunction

  // expected leaf-side stream of each message, keyed by {src, seq}
  logic [3:0] sent [N * 16][$];
  bit         pending [N * 16];

  task automatic send(input int src, input int dst, input int seq);
    logic [3:0] body[$], out[$];
    int l = 0, len = $urandom_range(1, 5), tag = $urandom_range(0, 15);
    logic [7:0] c;
    for (int i = 0; i < L; i++) if (((src >> (2 * i)) & 3) != ((dst >> (2 * i)) & 3)) l = i;
    body.push_back({1'b0, 3'(l)});
    body.push_back({1'b0, 3'(l + 1)});
    for (int i = l; i >= 0; i--) body.push_back(4'((dst >> (2 * i)) & 3));
    out.push_back(4'h0);
    out.push_back(4'h0);
    body.push_back(4'(len)); out.push_back(4'(len));
    body.push_back(4'(tag)); out.push_back(4'(tag));
    for (int w = 0; w < len; w++) begin
      logic [31:0] d = (w == 0) ? {8'(src), 8'(dst), 16'(seq)} : $urandom;
      for (int n = 7; n >= 0; n--) begin body.push_back(d[4*n +: 4]); out.push_back(d[4*n +: 4]); end
    end
    c = crc_of(body);
    body.push_back(c[7:4]); body.push_back(c[3:0]);
    c = crc_of(out);
    out.push_back(c[7:4]); out.push_back(c[3:0]);
    foreach (body[k]) inq[src].push_back(body[k]);
    sent[src * 16 + seq] = out;
    pending[src * 16 + seq] = 1;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total = 0, got = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 12; r++) begin
      for (int s = 0; s < N; s++) begin
        send(s, $urandom_range(0, N - 1), r);
        total++;
      end
      repeat ($urandom_range(0, 40)) @(posedge clk);
    end
    repeat (6000) @(posedge clk);
    // parse every leaf's received stream into messages
    for (int o = 0; o < N; o++) begin
      while (rxn[o].size() >= 4) begin
        logic [3:0] m[$];
        int len, key;
        logic [31:0] w0;
        m.delete();
        len = int'(rxn[o][2]);
        if (rxn[o].size() < 4 + 8 * len + 2) break;
        for (int k = 0; k < 4 + 8 * len + 2; k++) m.push_back(rxn[o].pop_front());
        for (int n = 0; n < 8; n++) w0 = {w0[27:0], m[4 + n]};
        key = (int'(w0[31:24]) % N) * 16 + (int'(w0[15:0]) % 16);
        check(int'(w0[23:16]) == o, $sformatf("leaf %0d got a message for %0d", o, w0[23:16]));
        if (!pending[key]) begin
          check(0, $sformatf("leaf %0d: unknown or repeated message %h", o, w0));
          continue;
        end
        check(m == sent[key], $sformatf("leaf %0d: message %h differs", o, w0));
        pending[key] = 0;
        got++;
      end
      check(rxn[o].size() == 0, $sformatf("leaf %0d has %0d stray nibbles", o, rxn[o].size()));
    end
    check(got == total, $sformatf("delivered %0d of %0d", got, total));
    check(msgs_delivered == 32'(total), $sformatf("delivery counter %0d", msgs_delivered));
    check(n_err == 0, "no error flags");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
