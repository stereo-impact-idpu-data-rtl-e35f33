// tb_cmd_tx: sends random 24-bit commands with random steering masks
// (single lines and the all-lines broadcast) and decodes every line with a
// UART-style receiver sampling once per bit. Steered lines must carry the
// frame (start 0, 24 bits MSB first, stop 1); the others must stay high.
// Busy must last the 26-bit frame plus at most one bit time of start delay.
module tb_cmd_tx;
  localparam int TICK = 4;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        bit_tick = 0, start = 0, busy;
  logic [23:0] word = 0;
  logic [4:0]  steer = 0, cmd;

  cmd_tx #(.N_OUT(5)) dut (.clk, .rst_n, .bit_tick, .start_i(start), .word_i(word),
                           .steer_i(steer), .busy_o(busy), .cmd_o(cmd));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    bit_tick <= (cyc % TICK == TICK - 1);
  end

  // per-line receivers, sampling at the negedge before each tick edge
  logic [23:0] rx_word [5];
  int          rx_cnt  [5];
  int          rx_bit  [5];
  initial for (int i = 0; i < 5; i++) begin rx_cnt[i] = 0; rx_bit[i] = -1; end
  always @(negedge clk) if (rst_n && bit_tick) begin
    for (int i = 0; i < 5; i++) begin
      if (rx_bit[i] < 0) begin
        if (!cmd[i]) rx_bit[i] = 0;
      end else if (rx_bit[i] < 24) begin
        rx_word[i] = {rx_word[i][22:0], cmd[i]};
        rx_bit[i]++;
      end else begin
        check(cmd[i] == 1'b1, $sformatf("line %0d stop bit", i));
        rx_cnt[i]++;
        rx_bit[i] = -1;
      end
    end
  end

  initial begin
    int exp_cnt [5];
    int t0, busy_cyc;
    for (int i = 0; i < 5; i++) exp_cnt[i] = 0;
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      @(negedge clk);
      word  = 24'($urandom);
      steer = (n % 5 == 4) ? 5'b11111 : 5'(1 << $urandom_range(0, 4));
      start = 1;
      @(negedge clk);
      start = 0;
      busy_cyc = 0;
      while (busy) begin @(negedge clk); busy_cyc++; end
      check(busy_cyc >= 26 * TICK - 1 && busy_cyc <= 27 * TICK,
            $sformatf("busy for %0d clocks", busy_cyc));
      repeat (2 * TICK) @(negedge clk);
      for (int i = 0; i < 5; i++) if (steer[i]) begin
        exp_cnt[i]++;
        check(rx_word[i] == word, $sformatf("line %0d got %h expected %h", i, rx_word[i], word));
      end
      for (int i = 0; i < 5; i++)
        check(rx_cnt[i] == exp_cnt[i], $sformatf("line %0d frame count %0d expected %0d", i, rx_cnt[i], exp_cnt[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60 * 40 * TICK) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
