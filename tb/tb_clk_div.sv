// tb_clk_div: checks the clock divider at DIV = 24 (1 MHz from 24 MHz) and
// DIV = 3 (8 MHz processor clock): the enable tick must come exactly every
// DIV cycles and the square wave must be high DIV/2 cycles per period.
module tb_clk_div;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic c24, t24, c3, t3;
  clk_div #(.DIV(24)) d24 (.clk, .rst_n, .clk_o(c24), .tick_o(t24));
  clk_div #(.DIV(3))  d3  (.clk, .rst_n, .clk_o(c3),  .tick_o(t3));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int last24 = -1, last3 = -1, hi24 = 0, hi3 = 0, n24 = 0, n3 = 0, cyc = 0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (24 * 40) begin
      @(posedge clk); #1;
      cyc++;
      if (t24) begin
        if (last24 >= 0) check(cyc - last24 == 24, $sformatf("DIV24 tick spacing %0d", cyc - last24));
        if (last24 >= 0) check(hi24 == 12, $sformatf("DIV24 high time %0d", hi24));
        last24 = cyc; hi24 = 0; n24++;
      end
      if (t3) begin
        if (last3 >= 0) check(cyc - last3 == 3, $sformatf("DIV3 tick spacing %0d", cyc - last3));
        if (last3 >= 0) check(hi3 == 1, $sformatf("DIV3 high time %0d", hi3));
        last3 = cyc; hi3 = 0; n3++;
      end
      hi24 += c24; hi3 += c3;
    end
    check(n24 == 40, $sformatf("DIV24 tick count %0d", n24));
    check(n3 == 320, $sformatf("DIV3 tick count %0d", n3));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
