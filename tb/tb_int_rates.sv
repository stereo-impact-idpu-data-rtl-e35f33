// tb_int_rates: the timing interrupt at its default size (1,000,000 us per
// second), at each of the four rates the document lists: 256, 128, 64 and
// 32 Hz. The testbench keeps its own microsecond counter, advanced by a
// 1 MHz enable every other clock. It runs two full seconds at each rate, the
// rate being switched in the middle of a second.
// In every complete second it checks:
//  * the number of interrupts is exactly the rate;
//  * the first interrupt comes with the 1 Hz tic (count 0);
//  * interrupt k comes at the count ceil(k * 1e6 / rate), worked out here in
//    integer arithmetic, so the spacing never drifts;
//  * each pulse lasts one microsecond.
module tb_int_rates;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int US = 1_000_000;

  logic        us_tick = 0, timer_en = 1;
  logic [19:0] usec = 0;
  logic [1:0]  rate_sel = 0;
  logic [1:0]  b_int = 0;
  logic        tint, i1553;

  int_ctrl dut (.clk, .rst_n, .us_tick, .usec_i(usec), .rate_sel, .timer_en,
    .b1553_int_i(b_int), .timer_int_o(tint), .int1553_o(i1553));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // 1 MHz enable every other clock, and the microsecond counter it drives
  always_ff @(posedge clk) begin
    us_tick <= ~us_tick;
    if (us_tick) usec <= (usec == 20'(US - 1)) ? 20'd0 : usec + 20'd1;
  end

  // record each interrupt, its position and its width; a second counts only
  // if the rate was not changed during it
  int n_pulses = 0, k_next = 0, sec_rate = 256, width = 0;
  bit full_sec = 0, prev = 0;
  int seconds_checked [4];

  always @(posedge clk) begin
    if (tint && !prev) begin
      if (usec == 0) begin
        if (full_sec) begin
          check(n_pulses == sec_rate,
                $sformatf("rate %0d: %0d interrupts in a second", sec_rate, n_pulses));
          seconds_checked[$clog2(256 / sec_rate)]++;
        end
        n_pulses = 0; k_next = 0; full_sec = 1; sec_rate = 256 >> rate_sel;
      end
      if (full_sec) begin
        int expect_at;
        // ceil(k * US / rate) in 64-bit integers
        expect_at = int'((longint'(k_next) * US + sec_rate - 1) / sec_rate);
        check(int'(usec) == expect_at,
              $sformatf("rate %0d: interrupt %0d at %0d us, expected %0d", sec_rate, k_next, usec, expect_at));
      end
      k_next++;
      n_pulses++;
    end
    if (tint) width++;
    if (!tint && prev) begin
      check(width == 2, $sformatf("pulse width %0d clocks, expected 2 (1 us)", width));
      width = 0;
    end
    prev = tint;
  end

  initial begin
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 4; r++) begin
      // change the rate half-way through a second; that second is not counted
      wait (usec == 20'(US / 2));
      @(negedge clk);
      rate_sel = 2'(r);
      full_sec = 0;
      wait (seconds_checked[r] == 2);
    end
    for (int r = 0; r < 4; r++) begin
      check(seconds_checked[r] == 2, $sformatf("rate %0d Hz checked", 256 >> r));
      $display("rate %0d Hz: %0d complete seconds checked", 256 >> r, seconds_checked[r]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
