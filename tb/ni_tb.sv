// ni_tb: the network interface of one node, with its data network sides looped back onto
// themselves and its control network leaf link attached to a one-leaf tree (cn_root).
//
// The testbench plays the processor: it writes and reads the interface's registers over
// the bus, one access per clock. The loopback on each data side can be held closed, so
// that a message stays in flight. Covered: a message to itself on each side, the
// relative-address bounds check, the supervisor-only addresses, the tag interrupt mask and
// IRQ_STATUS, refusal of a message when the send FIFO is full, broadcasts, a reduction, a
// forward scan (a lone leaf gets the identity), abstaining, the synchronous OR, the
// asynchronous OR, interrupt broadcasts, and router done both with the network empty and
// with a message still in flight.
module ni_tb;
  import cm5_pkg::*;
  localparam int L = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [2*L-1:0] self_addr = 6'd9;
  logic           bus_wr = 0, bus_rd = 0, bus_sup = 0;
  logic [7:0]     bus_addr = 0;
  logic [31:0]    bus_wdata = 0, bus_rdata;
  logic           irq;
  logic [1:0]      dn_tx_valid, dn_tx_ready, dn_rx_valid, dn_rx_ready;
  logic [1:0][3:0] dn_tx_data, dn_rx_data;
  cn_pkt_t        cn_up, cn_dn;
  logic [1:0]     gate = 2'b11;

  ni #(.LEVELS(L)) dut (.*);
  cn_root u_root (.clk, .rst_n, .up_in(cn_up), .dn_out(cn_dn));

  assign dn_rx_valid = dn_tx_valid & gate;
  assign dn_rx_data  = dn_tx_data;
  assign dn_tx_ready = dn_rx_ready & gate;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(input logic [7:0] a, input logic [31:0] d, input bit sup = 0);
    @(negedge clk);
    bus_wr = 1; bus_addr = a; bus_wdata = d; bus_sup = sup;
    @(negedge clk);
    bus_wr = 0; bus_sup = 0;
  endtask

  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    bus_rd = 1; bus_addr = a;
    #1 d = bus_rdata;
    @(negedge clk);
    bus_rd = 0;
  endtask

  function automatic logic [31:0] hdr(input int tag, input int len, input int dest);
    return {4'(tag), 1'b0, 3'(len), 24'(dest)};
  endfunction

  initial begin
    #300000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // message to itself on each side
    for (int s = 0; s < 2; s++) begin
      wr(8'(4 * s), hdr(6 + s, 2, 9));
      wr(8'(4 * s + 1), 32'hA0A0_0000 + 32'(s));
      wr(8'(4 * s + 1), 32'h0B0B_0000 + 32'(s));
      rd(8'(4 * s + 3), d);
      check(d[0] == 1'b1 && d[2] == 1'b0, $sformatf("side %0d accepted", s));
      repeat (80) @(posedge clk);
      rd(8'(4 * s + 3), d);
      check(d[1] == 1'b1, $sformatf("side %0d message arrived", s));
      rd(8'(4 * s + 2), d);
      check(d[27:24] == 4'(6 + s) && d[2:0] == 3'd2 && d[30] == 1'b0,
            $sformatf("side %0d header word %h", s, d));
      rd(8'(4 * s + 2), d);
      check(d == 32'hA0A0_0000 + 32'(s), $sformatf("side %0d word 0 %h", s, d));
      rd(8'(4 * s + 2), d);
      check(d == 32'h0B0B_0000 + 32'(s), $sformatf("side %0d word 1 %h", s, d));
    end
    rd(8'h35, d); check(d == 2, $sformatf("sent count %0d", d));
    rd(8'h36, d); check(d == 2, $sformatf("received count %0d", d));

    // user code cannot write the partition registers
    wr(8'h32, 32'd4, 0);
    rd(8'h32, d);  check(d == 32'd64, $sformatf("partition size unchanged %0d", d));
    rd(8'h24, d);  check(d[9] == 1'b1, "privilege error flagged");

    // partition of 4 nodes at base 8: relative 1 is physical 9 (itself), relative 5 is refused
    wr(8'h31, 32'd8, 1);
    wr(8'h32, 32'd4, 1);
    wr(8'h00, hdr(1, 1, 5));
    wr(8'h01, 32'h5555_5555);
    rd(8'h03, d);  check(d[2] == 1'b1 && d[0] == 1'b0, "out of bounds refused");
    wr(8'h30, 32'h0000_0008, 1);                     // tag 3 interrupts
    wr(8'h00, hdr(3, 1, 1));
    wr(8'h01, 32'h1234_5678);
    rd(8'h03, d);  check(d[0] == 1'b1 && d[2] == 1'b0, "in bounds accepted");
    repeat (60) @(posedge clk);
    check(irq == 1'b1, "tag interrupt");
    rd(8'h34, d);  check(d[0] == 1'b1, "IRQ_STATUS cause");
    rd(8'h34, d);  check(d == 0 && irq == 0, "IRQ_STATUS read clears");
    rd(8'h02, d);  check(d[27:24] == 4'd3, "tagged message header");
    rd(8'h02, d);  check(d == 32'h1234_5678, "tagged message data");
    rd(8'h02, d);
    check(d == 0, "nothing else arrived");

    // full send FIFO refuses a message; it can be tried again later
    gate = 2'b00;
    wr(8'h00, hdr(2, 5, 1));
    for (int k = 0; k < 5; k++) wr(8'h01, 32'(k));
    repeat (5) @(posedge clk);
    wr(8'h00, hdr(2, 5, 1));
    for (int k = 0; k < 5; k++) wr(8'h01, 32'(k));
    rd(8'h03, d);  check(d[0] == 1'b0, "full FIFO refuses");

    // router done while that message is held in the network
    wr(8'h16, 32'd0);
    repeat (40) @(posedge clk);
    rd(8'h24, d);  check(d[11] == 1'b1 && d[2] == 1'b0, "router done open while a message is in flight");
    gate = 2'b11;
    repeat (150) @(posedge clk);
    rd(8'h24, d);  check(d[11] == 1'b0 && d[2] == 1'b1, "router done after delivery");
    rd(8'h22, d);  check(d == 1, "router done word");
    for (int k = 0; k < 6; k++) rd(8'h02, d);
    check(d == 32'd4, "held message delivered whole");

    // broadcasts
    wr(8'h10, 32'hFEED_0001);
    wr(8'h11, 32'hFEED_0002, 0);                     // supervisor kind from user: dropped
    repeat (10) @(posedge clk);
    rd(8'h25, d);  check(d == OP_UBCAST, "broadcast kind");
    rd(8'h20, d);  check(d == 32'hFEED_0001, "broadcast data");
    rd(8'h24, d);  check(d[0] == 1'b0, "user cannot send a supervisor broadcast");
    wr(8'h12, 32'h0, 1);
    repeat (10) @(posedge clk);
    rd(8'h34, d);  check(d[2] == 1'b1, "interrupt broadcast");

    // combining
    wr(8'h14, {22'd0, 2'b00, 1'b0, 3'(CB_UADD), 4'(OP_REDUCE)});
    wr(8'h15, 32'd77);
    wr(8'h14, {22'd0, 2'b00, 1'b0, 3'(CB_SMAX), 4'(OP_SCANF)});
    wr(8'h15, 32'd5);
    wr(8'h14, {22'd0, 2'b01, 1'b0, 3'(CB_UADD), 4'(OP_REDUCE)});
    wr(8'h15, 32'd99);                               // abstained: no result kept
    wr(8'h14, 32'd0);
    wr(8'h17, 32'd1);
    repeat (20) @(posedge clk);
    rd(8'h21, d);  check(d == 32'd77, $sformatf("reduction %0d", d));
    rd(8'h21, d);  check(d == 32'h8000_0000, $sformatf("forward scan identity %h", d));
    rd(8'h24, d);  check(d[1] == 1'b0 && d[3] == 1'b1, $sformatf("abstained result dropped %h", d));
    rd(8'h23, d);  check(d == 32'd1, "synchronous OR");

    // asynchronous OR
    wr(8'h18, 32'd1);
    repeat (5) @(posedge clk);
    rd(8'h24, d);  check(d[6:5] == 2'b01, "asynchronous OR");
    rd(8'h34, d);  check(d[3] == 1'b1, "asynchronous OR interrupt");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
