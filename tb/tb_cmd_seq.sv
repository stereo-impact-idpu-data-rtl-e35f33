// tb_cmd_seq: a command list in a model memory (random prefixes 0..4 and
// commands, one invalid prefix, then the FFH end code followed by an entry
// that must never be sent) is played through cmd_seq and the real cmd_tx,
// with a shortened second (US_PER_SEC = 400, 1 MHz tick every 2 clocks).
// Checked: every command reaches exactly its instrument line, in order; at
// every tic a time command with the new seconds value reaches all five
// lines; no list command starts inside the guard window before a tic;
// the invalid prefix is flagged and skipped; the sequencer stops at FFH.
module tb_cmd_seq;
  import dcb_pkg::*;
  localparam int US = 400, GUARD = 32;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        us_tick = 0, tic = 0, start = 0, ack = 0, tx_busy, tx_start, busy, bad, tsent;
  logic [19:0] usec = 0;
  logic [15:0] sec = 0, rdata = 0;
  logic [21:0] list_addr = 22'h012340;
  dma_req_t    dreq;
  logic [23:0] tx_word;
  logic [4:0]  tx_steer, lines;

  cmd_seq #(.US_PER_SEC(US), .GUARD_US(GUARD)) dut (.clk, .rst_n, .start_i(start),
    .list_addr_i(list_addr), .tic_i(tic), .usec_i(usec), .sec_i(sec),
    .dma_o(dreq), .dma_ack_i(ack), .dma_rdata_i(rdata),
    .tx_busy_i(tx_busy), .tx_start_o(tx_start), .tx_word_o(tx_word), .tx_steer_o(tx_steer),
    .busy_o(busy), .bad_pfx_o(bad), .time_sent_o(tsent));
  cmd_tx #(.N_OUT(5)) tx (.clk, .rst_n, .bit_tick(us_tick), .start_i(tx_start), .word_i(tx_word),
    .steer_i(tx_steer), .busy_o(tx_busy), .cmd_o(lines));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // time source
  int ph = 0;
  always @(posedge clk) begin
    ph <= ph ^ 1;
    us_tick <= (ph == 1);
    tic <= 0;
    if (us_tick) begin
      if (usec == 20'(US - 1)) begin usec <= 0; sec <= sec + 1; tic <= 1; end
      else usec <= usec + 1;
    end
  end

  // memory and DMA model
  logic [15:0] mem [int];
  initial forever begin
    @(posedge clk);
    if (dreq.req && !ack) begin
      repeat ($urandom_range(0, 5)) @(posedge clk);
      check(!dreq.we, "command DMA must read");
      rdata <= mem.exists(int'(dreq.addr)) ? mem[int'(dreq.addr)] : 16'hDEAD;
      ack <= 1;
      @(posedge clk);
      ack <= 0;
    end
  end

  // expected traffic per line
  logic [23:0] expq [5][$];   // list commands
  logic [23:0] timq [5][$];   // time commands
  // line receivers
  int rx_bit [5];
  logic [23:0] rx_word [5];
  int n_time_rx = 0, n_cmd_rx = 0;
  initial for (int i = 0; i < 5; i++) rx_bit[i] = -1;
  always @(negedge clk) if (rst_n && us_tick) begin
    for (int i = 0; i < 5; i++) begin
      if (rx_bit[i] < 0) begin
        if (!lines[i]) rx_bit[i] = 0;
      end else if (rx_bit[i] < 24) begin
        rx_word[i] = {rx_word[i][22:0], lines[i]};
        rx_bit[i]++;
      end else begin
        rx_bit[i] = -1;
        if (rx_word[i][23:16] == TIME_CMD_OPC) begin
          logic [23:0] e;
          e = (timq[i].size() > 0) ? timq[i].pop_front() : 24'h0;
          check(rx_word[i] == e, $sformatf("line %0d time cmd %h expected %h", i, rx_word[i], e));
          n_time_rx++;
        end else begin
          logic [23:0] e;
          e = (expq[i].size() > 0) ? expq[i].pop_front() : 24'h0;
          check(rx_word[i] == e, $sformatf("line %0d got %h expected %h", i, rx_word[i], e));
          n_cmd_rx++;
        end
      end
    end
  end

  // time command bookkeeping and guard check
  int n_tic = 0, n_time_start = 0, n_guard_wait = 0, last_tic = -100, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (rst_n) begin
    if (tic) begin
      n_tic++; last_tic = cyc;
      for (int i = 0; i < 5; i++) timq[i].push_back({TIME_CMD_OPC, sec});
    end
    if (tx_start && tx_steer == 5'b11111) begin
      n_time_start++;
      check(cyc - last_tic <= 3, $sformatf("time command %0d clocks after tic", cyc - last_tic));
      check(tx_word == {TIME_CMD_OPC, sec}, "time command carries seconds");
    end else if (tx_start) begin
      check(usec < 20'(US - GUARD), $sformatf("command started at usec %0d inside guard", usec));
    end
    if (dut.state == 3'd3 && usec >= 20'(US - GUARD) && !tx_busy) n_guard_wait++;
  end

  initial begin
    int a, ncmd;
    logic [7:0] pfx;
    logic [23:0] c;
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // build the list
    a = int'(list_addr);
    ncmd = 45;
    for (int n = 0; n < ncmd; n++) begin
      pfx = (n == 7) ? 8'h17 : 8'($urandom_range(0, 4));
      c = 24'($urandom);
      if (c[23:16] == TIME_CMD_OPC) c[23:16] = 8'h11;
      mem[a] = {pfx, c[23:16]}; mem[a + 2] = c[15:0];
      a += 4;
      if (pfx < 5) expq[pfx].push_back(c);
    end
    mem[a] = {PFX_END, 8'h00}; mem[a + 2] = 16'h0000;
    mem[a + 4] = {8'h01, 8'h55}; mem[a + 6] = 16'h5555;   // beyond the end
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    wait (!busy);
    repeat (40 * 2) @(negedge clk);
    for (int i = 0; i < 5; i++)
      check(expq[i].size() == 0,
            $sformatf("line %0d: %0d commands not received", i, expq[i].size()));
    check(bad, "invalid prefix flagged");
    check(n_cmd_rx == ncmd - 1 - 0, $sformatf("received %0d list commands", n_cmd_rx));
    check(n_time_rx >= 5 * (n_tic - 1), $sformatf("%0d time commands received", n_time_rx));
    check(n_tic >= 3 && n_time_start == n_tic, $sformatf("tics %0d time commands %0d", n_tic, n_time_start));
    check(n_guard_wait > 0, "a command had to wait for the time slot");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
