// tb_timebase: drives the timebase with a 1 MHz tick every 4 clocks and a
// shortened second (US_PER_SEC = 50). Checks the microsecond count against a
// reference counter, the 1 Hz tic period, the seconds counter, and the
// latch taken on an asynchronous time-command pulse.
module tb_timebase;
  localparam int US = 50;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        us_tick = 0, time_cmd = 0;
  logic [19:0] usec, lat_usec;
  logic [15:0] sec, lat_sec;
  logic        tic, lat_evt;

  timebase #(.US_PER_SEC(US)) dut (.clk, .rst_n, .us_tick, .time_cmd_i(time_cmd),
    .usec_o(usec), .sec_o(sec), .tic_o(tic), .lat_usec_o(lat_usec), .lat_sec_o(lat_sec),
    .lat_evt_o(lat_evt));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int ref_us = 0, ref_sec = 0, ntic = 0, last_tic_us = -1, nticks = 0;
  int snap_us, snap_sec;

  // 1 MHz tick every 4 clocks
  always @(posedge clk) if (rst_n) begin
    us_tick <= (nticks % 4 == 3);
    nticks  <= nticks + 1;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (4 * US * 5 + 20) begin
      @(posedge clk); #1;
      check(usec == 20'(ref_us), $sformatf("usec %0d expected %0d", usec, ref_us));
      check(sec  == 16'(ref_sec), $sformatf("sec %0d expected %0d", sec, ref_sec));
      if (tic) begin
        ntic++;
        check(usec == 0, "tic with usec != 0");
      end
      // reference: model the tick seen on this edge
      if (us_tick) begin
        if (ref_us == US - 1) begin ref_us = 0; ref_sec++; end
        else ref_us++;
      end
    end
    check(ntic == 5, $sformatf("tic count %0d expected 5", ntic));

    // time command latch
    @(posedge clk); #3;
    snap_us = ref_us; snap_sec = ref_sec;
    time_cmd = 1;
    repeat (6) @(posedge clk);
    time_cmd = 0;
    #1;
    check(lat_sec == 16'(snap_sec), $sformatf("latched sec %0d exp %0d", lat_sec, snap_sec));
    check(lat_usec >= 20'(snap_us) && lat_usec <= 20'(snap_us + 1),
          $sformatf("latched usec %0d exp ~%0d", lat_usec, snap_us));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
