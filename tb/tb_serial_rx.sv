// tb_serial_rx: an instrument model shifts random words (random block flags,
// some back to back, some with idle gaps) onto the line, one bit per tick,
// and the received words and flags are compared in order. Back-to-back words
// must arrive exactly 18 bit times apart (continuous 1 Mbps stream).
module tb_serial_rx;
  localparam int TICK = 8;                 // clocks per bit in this test
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        bit_tick = 0, sdata = 1, bs, wv;
  logic [15:0] word;

  serial_rx dut (.clk, .rst_n, .bit_tick, .sdata_i(sdata), .word_o(word),
                 .blk_start_o(bs), .word_valid_o(wv));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    bit_tick <= (cyc % TICK == TICK - 1);
  end

  logic [16:0] sent [$];
  int n_rx = 0, last_rx = -1, b2b_ok = 0;
  bit b2b [$];

  // receiver check
  always @(posedge clk) if (rst_n && wv) begin
    logic [16:0] e;
    e = sent.pop_front();
    check({bs, word} == e, $sformatf("word %0d: got %b/%h expected %b/%h", n_rx, bs, word, e[16], e[15:0]));
    if (last_rx >= 0 && b2b.pop_front()) begin
      check(cyc - last_rx == 18 * TICK, $sformatf("back-to-back spacing %0d", cyc - last_rx));
      b2b_ok++;
    end else if (last_rx < 0) void'(b2b.pop_front());
    last_rx = cyc;
    n_rx++;
  end

  // drive one bit, changing the line just after a tick
  task automatic send_bit(input logic b);
    @(posedge clk iff bit_tick);
    sdata <= b;
  endtask

  initial begin
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 200; w++) begin
      logic [15:0] d;
      logic        f;
      int gap;
      d = 16'($urandom); f = ($urandom_range(0, 4) == 0);
      gap = (w % 3 == 0) ? $urandom_range(1, 5) : 0;
      repeat (gap) send_bit(1'b1);
      sent.push_back({f, d});
      b2b.push_back(gap == 0);
      send_bit(1'b0);
      send_bit(f);
      for (int i = 15; i >= 0; i--) send_bit(d[i]);
    end
    send_bit(1'b1);
    repeat (4 * TICK) @(posedge clk);
    check(n_rx == 200, $sformatf("received %0d words", n_rx));
    check(b2b_ok > 50, "back-to-back words exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200 * 25 * TICK) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
