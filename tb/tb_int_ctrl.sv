// tb_int_ctrl: runs the interrupt block against its own microsecond counter
// (second shortened to US_PER_SEC = 1000, 1 MHz tick every 2 clocks). For
// every rate it checks that an interrupt starts exactly at the counts v with
// (v * rate) mod US_PER_SEC < rate -- the evenly spread positions, including
// v = 0, the 1 Hz tic -- and that each second holds exactly `rate` interrupts.
// It also checks the enable and the OR of the 1553 interrupt lines.
module tb_int_ctrl;
  localparam int US = 1000;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        us_tick = 0, timer_en = 1, tint, i1553;
  logic [19:0] usec = 0;
  logic [1:0]  rate_sel = 0, b_int = 0;

  int_ctrl #(.US_PER_SEC(US), .N1553(2)) dut (.clk, .rst_n, .us_tick, .usec_i(usec),
    .rate_sel, .timer_en, .b1553_int_i(b_int), .timer_int_o(tint), .int1553_o(i1553));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int ph = 0;
  always @(posedge clk) begin
    ph <= ph ^ 1;
    us_tick <= (ph == 1);
    if (us_tick) usec <= (usec == 20'(US - 1)) ? 20'd0 : usec + 1'b1;
  end

  logic tint_d = 0;
  int   per_sec = 0, rate;
  int   seconds_ok = 0;
  always @(posedge clk) tint_d <= tint;

  task automatic run_rate(input int sel, input int nsec);
    int exp_fire, v;
    rate_sel = 2'(sel);
    rate = 256 >> sel;
    // wait for the start of a second
    @(posedge clk); #1;
    while (!(us_tick && usec == 20'(US - 1))) begin @(posedge clk); #1; end
    @(posedge clk);  // wrap edge
    per_sec = 0;
    for (int s = 0; s < nsec; s++) begin
      per_sec = 0;
      for (int c = 0; c < 2 * US; c++) begin
        #1;
        v = int'(usec);
        if (tint && !tint_d) per_sec++;
        // interrupt must rise exactly when usec has just changed to a firing position
        if (c % 2 == 0) begin
          exp_fire = (((v * rate) % US) < rate) ? 1 : 0;
          check((tint && !tint_d) == exp_fire[0],
                $sformatf("rate %0d usec %0d: int %0b expected %0d", rate, v, tint && !tint_d, exp_fire));
        end
        @(posedge clk);
      end
      check(per_sec == rate, $sformatf("rate %0d: %0d interrupts in a second", rate, per_sec));
    end
  endtask

  initial begin
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int sel = 0; sel < 4; sel++) run_rate(sel, 2);
    // disabled: no interrupts
    timer_en = 0;
    begin
      int n = 0;
      repeat (2 * US) begin @(posedge clk); #1; if (tint) n++; end
      check(n == 0, "interrupt while disabled");
    end
    // 1553 interrupt OR
    b_int = 2'b01; repeat (4) @(posedge clk); #1; check(i1553 == 1, "1553 int line 0");
    b_int = 2'b00; repeat (4) @(posedge clk); #1; check(i1553 == 0, "1553 int idle");
    b_int = 2'b10; repeat (4) @(posedge clk); #1; check(i1553 == 1, "1553 int line 1");
    b_int = 2'b11; repeat (4) @(posedge clk); #1; check(i1553 == 1, "1553 int both");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
