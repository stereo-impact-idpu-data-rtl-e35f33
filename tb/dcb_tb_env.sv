// dcb_tb_env: board-level test environment for dcb_fpga.
//
// Holds behavioural models of everything around the FPGA and the test
// program; a wrapper instantiates it next to the FPGA and connects the two
// by name. Models:
//   - processor: a program of single-cycle bus reads/writes and instruction
//     fetches; it stops between accesses to answer HOLD with HLDA;
//   - memories: RAM (sparse), PROM and EEPROM returning address patterns;
//   - 1553 chip: bus requests with short write/read bursts into its window,
//     two interrupt lines and the asynchronous time-command strobe;
//   - five instruments: each streams telemetry blocks back to back at the
//     full serial rate (word = {channel, 13-bit sequence number}) and decodes
//     its command line.
// The program boots (fetch at 2080H from the PROM), maps pages, masks the
// I/O window, powers the PROM off, sets up four telemetry buffers that it
// drains and checks word by word through the page mapping, one buffer it
// never drains (over-run), a command list started shortly before a tic so
// the guard slot and time command meet it, and the timing interrupt at two
// rates. Every mechanism is counted and must have happened at least once.
module dcb_tb_env #(
  parameter int unsigned US_DIV     = 24,
  parameter int unsigned US_PER_SEC = 1_000_000,
  parameter int unsigned N_SEC      = 3
) (
  output logic        clk,
  output logic        rst_n,
  input  logic        cpu_clk_o,
  output logic [15:0] cpu_addr,
  output logic        cpu_inst,
  output logic        cpu_rd,
  output logic        cpu_wr,
  output logic [15:0] cpu_wdata,
  input  logic [15:0] cpu_rdata,
  input  logic        cpu_bus16_o,
  input  logic        cpu_hold_o,
  output logic        cpu_hlda_i,
  input  logic        cpu_int_timer_o,
  input  logic        cpu_int_1553_o,
  input  logic [21:0] mem_addr,
  input  logic        mem_rd,
  input  logic        mem_wr,
  input  logic [15:0] mem_wdata,
  output logic [15:0] mem_rdata,
  input  logic [2:0]  ram_cs,
  input  logic        eeprom_cs,
  input  logic        prom_cs,
  input  logic        prom_pwr_o,
  output logic        b_dmar_i,
  input  logic        b_dmag_o,
  output logic [15:0] b_addr_i,
  output logic        b_rd_i,
  output logic        b_wr_i,
  output logic [15:0] b_wdata_i,
  input  logic [15:0] b_rdata_o,
  output logic [1:0]  b_int_i,
  output logic        b_time_i,
  input  logic        sclk_o,
  input  logic        tic_o,
  output logic [4:0]  tlm_i,
  input  logic [4:0]  cmd_o,
  input  logic        guard_wait_i   // a list command is being held for the time slot
);
  import dcb_pkg::*;
  localparam int NI = 5;
  localparam int US = int'(US_PER_SEC);
  localparam logic [7:0] WIN = 8'h08;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // mechanism counters
  typedef enum int {
    M_PROM_BOOT, M_PAGING, M_IO_MASK, M_PROM_OFF, M_TIMER_INT, M_RATE_SWITCH,
    M_INT1553, M_TIME_LATCH, M_TLM_DMA, M_BLOCK_IN, M_WRAP, M_OVERRUN,
    M_CMD, M_TIME_CMD, M_GUARD, M_HOLD, M_DMA1553, M_NUM
  } mech_e;
  int mech [M_NUM];
  string mech_name [M_NUM] = '{"boot fetch from PROM", "page mapping", "I/O window masks memory",
    "PROM powered off", "timing interrupt", "timer rate switch", "1553 interrupt OR",
    "1553 time latch", "telemetry DMA write", "block-in pointer advance", "circular wrap",
    "buffer over-run", "list command delivered", "time command delivered", "guard slot wait",
    "HOLD session", "1553 DMA transfer"};

  // ---------------------------------------------------------------- clock
  initial begin
    clk = 0;
    forever #20.833 clk = ~clk;   // 24 MHz crystal
  end
  initial begin
    rst_n = 1;
    #1 rst_n = 0;
    #200 rst_n = 1;
  end

  // ---------------------------------------------------------------- memory
  logic [15:0] ram [int];
  function automatic logic [15:0] prom_val(input logic [21:0] a);
    return 16'h5A00 ^ 16'(a[12:0]);
  endfunction
  function automatic logic [15:0] ee_val(input logic [21:0] a);
    return 16'h3C3C ^ a[15:0];
  endfunction
  always_comb begin
    mem_rdata = 16'h0000;
    if (prom_cs) mem_rdata = prom_val(mem_addr);
    else if (eeprom_cs) mem_rdata = ee_val(mem_addr);
    else if (ram_cs != 0) mem_rdata = ram.exists(int'(mem_addr)) ? ram[int'(mem_addr)] : 16'h0000;
  end
  always @(posedge clk) begin
    if (mem_wr && ram_cs != 0) begin
      check(ram_cs == 3'(1 << mem_addr[21:20]), "RAM bank select matches address");
      ram[int'(mem_addr)] = mem_wdata;
      if (cpu_hlda_i && !b_dmag_o) mech[M_TLM_DMA]++;
    end
    if (prom_cs) check(prom_pwr_o, "PROM selected while unpowered");
  end

  // ---------------------------------------------------------------- processor
  logic cpu_busy = 0;
  initial begin
    cpu_addr = 0; cpu_inst = 0; cpu_rd = 0; cpu_wr = 0; cpu_wdata = 0; cpu_hlda_i = 0;
  end
  always @(posedge clk) begin
    if (!cpu_busy) cpu_hlda_i <= cpu_hold_o;
  end
  logic hold_d = 0;
  always @(posedge clk) begin
    hold_d <= cpu_hold_o;
    if (cpu_hold_o && !hold_d) mech[M_HOLD]++;
  end

  task automatic bus_start();
    @(negedge clk);
    while (cpu_hold_o || cpu_hlda_i) @(negedge clk);
    cpu_busy = 1;
  endtask

  task automatic cpu_access(input logic [15:0] a, input bit inst, input bit write,
                            input logic [15:0] wd, output logic [15:0] rd,
                            output bit was_prom, output bit was_mem);
    bus_start();
    cpu_addr = a; cpu_inst = inst; cpu_rd = !write; cpu_wr = write; cpu_wdata = wd;
    #1;
    rd = cpu_rdata;
    was_prom = prom_cs;
    was_mem = prom_cs || eeprom_cs || (ram_cs != 0);
    @(negedge clk);
    cpu_rd = 0; cpu_wr = 0; cpu_inst = 0;
    cpu_busy = 0;
  endtask

  task automatic wr(input logic [15:0] a, input logic [15:0] d);
    logic [15:0] r; bit p, m;
    cpu_access(a, 0, 1, d, r, p, m);
  endtask
  task automatic rd(input logic [15:0] a, output logic [15:0] d);
    bit p, m;
    cpu_access(a, 0, 0, 0, d, p, m);
  endtask
  task automatic reg_wr(input logic [6:0] off, input logic [15:0] d);
    wr(IO_BASE | 16'(off), d);
  endtask
  task automatic reg_rd(input logic [6:0] off, output logic [15:0] d);
    rd(IO_BASE | 16'(off), d);
  endtask

  // ---------------------------------------------------------------- 1553 chip
  int n1553_words = 0;
  initial begin
    b_dmar_i = 0; b_addr_i = 0; b_rd_i = 0; b_wr_i = 0; b_wdata_i = 0; b_int_i = 0; b_time_i = 0;
  end
  initial begin
    @(posedge rst_n);
    repeat (2000) @(posedge clk);
    forever begin
      logic [15:0] base, d [4];
      repeat (US_DIV * 150 + $urandom_range(0, 200)) @(posedge clk);
      base = 16'($urandom_range(0, 16'h3FF0));
      @(negedge clk); b_dmar_i = 1;
      while (!b_dmag_o) @(negedge clk);
      for (int k = 0; k < 4; k++) begin
        d[k] = 16'($urandom);
        b_addr_i = base + 16'(k); b_wdata_i = d[k]; b_wr_i = 1;
        #1;
        check(mem_addr == {WIN[7:3], base + 16'(k), 1'b0} && ram_cs != 0, "1553 access lands in its RAM window");
        @(negedge clk); b_wr_i = 0;
        @(negedge clk);
      end
      for (int k = 0; k < 4; k++) begin
        b_addr_i = base + 16'(k); b_rd_i = 1;
        #1;
        check(b_rdata_o == d[k], "1553 read back");
        @(negedge clk); b_rd_i = 0;
        mech[M_DMA1553]++;
      end
      b_dmar_i = 0;
    end
  end
  // 1553 interrupt lines
  initial begin
    @(posedge rst_n);
    forever begin
      repeat (US_DIV * 200) @(posedge clk);
      @(negedge clk); b_int_i = 2'($urandom_range(1, 3));
      repeat (4) @(negedge clk);
      check(cpu_int_1553_o, "1553 interrupt reaches the processor");
      if (cpu_int_1553_o) mech[M_INT1553]++;
      b_int_i = 0;
      repeat (4) @(negedge clk);
      check(!cpu_int_1553_o, "1553 interrupt released");
    end
  end

  // ---------------------------------------------------------------- instruments
  localparam int SEQ_MOD = 8192;
  // telemetry senders: data changes just after each rising edge of the serial clock
  logic sclk_d = 0;
  always @(posedge clk) sclk_d <= sclk_o;
  wire sclk_rise = sclk_o && !sclk_d;
  wire sclk_fall = !sclk_o && sclk_d;

  int  tx_seq   [NI];
  bit  blk_first_seq [NI][int];   // sequence numbers that started a block
  int  tx_bit   [NI];
  logic [17:0] tx_frame [NI];
  int  blk_left [NI];
  initial for (int i = 0; i < NI; i++) begin
    tx_seq[i] = 0; tx_bit[i] = -1; blk_left[i] = 0;
  end
  initial tlm_i = '1;
  always @(posedge clk) if (rst_n && sclk_rise) begin
    for (int i = 0; i < NI; i++) begin
      if (tx_bit[i] < 0) begin
        bit f;
        f = (blk_left[i] == 0);
        if (f) begin
          blk_left[i] = $urandom_range(8, 30);
          blk_first_seq[i][tx_seq[i]] = 1;
        end
        blk_left[i]--;
        tx_frame[i] = {1'b0, f, 3'(i), 13'(tx_seq[i])};
        tx_seq[i] = (tx_seq[i] + 1) % SEQ_MOD;
        tx_bit[i] = 17;
      end
      tlm_i[i] <= tx_frame[i][tx_bit[i]];
      tx_bit[i]--;
    end
  end

  // command receivers, sampling mid-bit on the falling serial clock edge
  logic [23:0] exp_cmd [NI][$];
  int          rx_bit  [NI];
  logic [23:0] rx_word [NI];
  int          n_time_rx [NI];
  logic [15:0] last_time_sec [NI];
  initial for (int i = 0; i < NI; i++) begin rx_bit[i] = -1; n_time_rx[i] = 0; end
  always @(posedge clk) if (rst_n && sclk_fall) begin
    for (int i = 0; i < NI; i++) begin
      if (rx_bit[i] < 0) begin
        if (!cmd_o[i]) rx_bit[i] = 0;
      end else if (rx_bit[i] < 24) begin
        rx_word[i] = {rx_word[i][22:0], cmd_o[i]};
        rx_bit[i]++;
      end else begin
        rx_bit[i] = -1;
        check(cmd_o[i], "command stop bit");
        if (rx_word[i][23:16] == TIME_CMD_OPC) begin
          if (n_time_rx[i] > 0)
            check(rx_word[i][15:0] == last_time_sec[i] + 16'd1, "time command seconds advance by one");
          last_time_sec[i] = rx_word[i][15:0];
          n_time_rx[i]++;
          mech[M_TIME_CMD]++;
        end else begin
          logic [23:0] e;
          e = (exp_cmd[i].size() > 0) ? exp_cmd[i].pop_front() : 24'h0;
          check(rx_word[i] == e, $sformatf("instrument %0d command %h expected %h", i, rx_word[i], e));
          mech[M_CMD]++;
        end
      end
    end
  end

  // ---------------------------------------------------------------- timing interrupt
  int tint_cnt = 0, n_tic = 0;
  logic tint_d = 0;
  logic [1:0] cur_rate = 0, rate_at_tic = 0;
  bit rate_valid = 0;
  always @(posedge clk) begin
    tint_d <= cpu_int_timer_o;
    if (cpu_int_timer_o && !tint_d) begin
      tint_cnt++;
      mech[M_TIMER_INT]++;
    end
    if (tic_o) begin
      n_tic++;
      // count of the second that just ended; the interrupt at the tic belongs to the new one
      if (rate_valid && rate_at_tic == cur_rate)
        check(tint_cnt == (256 >> cur_rate), $sformatf("%0d timing interrupts in a second at %0d Hz",
                                                       tint_cnt, 256 >> cur_rate));
      rate_valid = 1;
      rate_at_tic = cur_rate;
      tint_cnt = 0;
    end
    if (guard_wait_i) mech[M_GUARD]++;
  end

  // ---------------------------------------------------------------- program
  localparam logic [11:0] BUF_KB = 12'd64;     // buffers at 64 KB + 1 KB * channel
  localparam int          BUF_W  = 512;        // 1 KB = 512 words
  int  out_ptr [NI];
  int  exp_seq [NI];
  bit  seq_valid [NI];
  int  n_checked [NI];

  task automatic drain(input int ch);
    logic [15:0] endp, inp, d;
    int p, n;
    reg_rd(7'(32 + 16 * ch + 10), endp);
    reg_rd(7'(32 + 16 * ch + int'(C_IN)), inp);
    if (int'(endp) == out_ptr[ch]) return;
    if (int'(endp) < out_ptr[ch]) mech[M_WRAP]++;
    mech[M_BLOCK_IN]++;
    // the block-in pointer must point at the first word of a block
    rd(16'h4000 + 16'(ch * 1024) + 16'(2 * inp), d);
    check(blk_first_seq[ch].exists(int'(d[12:0])), $sformatf("ch %0d IN pointer at a block start", ch));
    p = out_ptr[ch];
    n = 0;
    while (p != int'(endp)) begin
      rd(16'h4000 + 16'(ch * 1024) + 16'(2 * p), d);
      check(d[15:13] == 3'(ch), $sformatf("ch %0d word %h from wrong channel", ch, d));
      if (seq_valid[ch])
        check(int'(d[12:0]) == exp_seq[ch], $sformatf("ch %0d seq %0d expected %0d", ch, d[12:0], exp_seq[ch]));
      exp_seq[ch] = (int'(d[12:0]) + 1) % SEQ_MOD;
      seq_valid[ch] = 1;
      p = (p + 1) % BUF_W;
      n++;
    end
    n_checked[ch] += n;
    out_ptr[ch] = int'(endp);
    reg_wr(7'(32 + 16 * ch + int'(C_OUT)), endp);
  endtask

  initial begin
    logic [15:0] d, u1, u2, lu, ls, s1;
    bit p, m;
    int ncmd, a, sec_start;
    for (int i = 0; i < M_NUM; i++) mech[i] = 0;
    for (int i = 0; i < NI; i++) begin
      out_ptr[i] = 0; exp_seq[i] = 0; seq_valid[i] = 0; n_checked[i] = 0;
    end
    @(posedge rst_n);
    repeat (5) @(posedge clk);

    // boot: the reset vector comes from the byte-wide PROM
    cpu_access(16'h2080, 1, 0, 0, d, p, m);
    check(p && d == prom_val(22'h3F2080), "reset vector fetched from PROM");
    if (p) mech[M_PROM_BOOT]++;
    // I/O window: page 0 maps the PROM there too, but the register answers
    cpu_access(IO_BASE | 16'(R_CTRL), 0, 0, 0, d, p, m);
    check(!m && d == 16'h0001, "I/O read masks memory and returns CTRL");
    if (!m) mech[M_IO_MASK]++;

    // pages: 1 -> telemetry buffers (block 4), 2 -> command list (block 5), 3 -> RAM block 0x83
    reg_wr(R_PAGE1, 16'h0004);
    reg_wr(R_PAGE2, 16'h0005);
    reg_wr(R_PAGE3, 16'h0083);
    wr(16'hC010, 16'hCAFE);
    rd(16'hC010, d);
    check(d == 16'hCAFE && ram.exists(int'((22'h83 << 14) | 22'h0010)) &&
          ram[int'((22'h83 << 14) | 22'h0010)] == 16'hCAFE, "page 3 write lands in block 83H");
    if (d == 16'hCAFE) mech[M_PAGING]++;
    reg_wr(R_PAGE3, 16'h00C2);                     // EEPROM block
    rd(16'hC020, d);
    check(d == ee_val(22'hC2 << 14 | 22'h20), "page 3 on EEPROM");

    // PROM off
    reg_wr(R_CTRL, 16'h0000);
    cpu_access(16'h2080, 1, 0, 0, d, p, m);
    check(!p && !prom_pwr_o, "PROM off: not selected");
    if (!p) mech[M_PROM_OFF]++;

    // 1553 window, telemetry channels, timer at 256 Hz
    reg_wr(R_WIN1553, 16'(WIN));
    for (int ch = 0; ch < NI; ch++) begin
      reg_wr(7'(32 + 16 * ch + int'(C_BASE)), 16'(BUF_KB + 12'(ch)));
      reg_wr(7'(32 + 16 * ch + int'(C_OUT)), (ch == 4) ? 16'd40 : 16'd0);
      reg_wr(7'(32 + 16 * ch + int'(C_CFG)), 16'h0008);  // 1 KB, enabled
    end
    cur_rate = 0;
    reg_wr(R_CTRL, 16'b1000);

    // command list at block 5, started 600 us before a tic
    ncmd = 40;
    a = 16'h8000;
    for (int n = 0; n < ncmd; n++) begin
      int ins;
      logic [23:0] c;
      ins = n % NI;
      c = {8'(n), 16'($urandom)};
      wr(16'(a), {8'(ins), c[23:16]}); wr(16'(a + 2), c[15:0]);
      exp_cmd[ins].push_back(c);
      a += 4;
    end
    wr(16'(a), {PFX_END, 8'h00}); wr(16'(a + 2), 16'h0000);
    reg_wr(R_CMD_LO, 16'h4000); reg_wr(R_CMD_HI, 16'h0001);     // 0x014000
    do begin
      for (int ch = 0; ch < 4; ch++) drain(ch);
      reg_rd(R_USEC_HI, u2); reg_rd(R_USEC_LO, u1);
    end while (!(({u2[3:0], u1} >= 20'(US - 600)) && ({u2[3:0], u1} < 20'(US - 500))));
    reg_wr(R_CMD_CTRL, 16'h0001);

    // main loop: drain buffers, switch timer rate, take a 1553 time latch
    reg_rd(R_SEC, s1);
    sec_start = int'(s1);
    while (n_tic < int'(N_SEC)) begin
      for (int ch = 0; ch < 4; ch++) drain(ch);
      if (n_tic == 2 && cur_rate == 0 && N_SEC > 2) begin
        cur_rate = 3;
        reg_wr(R_CTRL, 16'b1110);
        mech[M_RATE_SWITCH]++;
      end
      if (mech[M_TIME_LATCH] == 0 && n_tic >= 1) begin
        reg_rd(R_USEC_LO, u1);
        b_time_i = 1;
        repeat (6) @(negedge clk);
        b_time_i = 0;
        reg_rd(R_USEC_LO, u2);
        reg_rd(R_LUSEC_LO, lu);
        reg_rd(R_LSEC, ls);
        reg_rd(R_SEC, s1);
        check(lu >= u1 && lu <= u2 && ls == s1, $sformatf("time latch %0d between %0d and %0d", lu, u1, u2));
        mech[M_TIME_LATCH]++;
      end
    end
    // over-run on channel 4, which was never drained
    reg_rd(R_STATUS, d);
    check(d[4] && d[3:0] == 0 && d[9:5] == 0, $sformatf("status %b: only channel 4 over-ran", d));
    if (d[4]) mech[M_OVERRUN]++;
    // channel 4 stopped one word short of its output pointer (word 40): words
    // 39 and 40 were never written, the words before them hold its data
    rd(16'h4000 + 16'(4 * 1024), d);
    check(d[15:13] == 3'd4, "ch 4 buffer holds its data");
    check(!ram.exists(int'((22'(BUF_KB) + 22'd4) << 10 | 22'd78)) &&
          !ram.exists(int'((22'(BUF_KB) + 22'd4) << 10 | 22'd80)), "ch 4 never wrote up to its output pointer");
    // the command list has been sent
    reg_rd(R_CMD_CTRL, d);
    check(d[0] == 0, "command list finished");
    for (int i = 0; i < NI; i++)
      check(exp_cmd[i].size() == 0, $sformatf("instrument %0d: %0d commands missing", i, exp_cmd[i].size()));
    for (int i = 0; i < 4; i++)
      check(n_checked[i] > 0, $sformatf("ch %0d: %0d words checked", i, n_checked[i]));
    for (int i = 0; i < M_NUM; i++) begin
      $display("mechanism %-28s %0d", mech_name[i], mech[i]);
      check(mech[i] > 0, $sformatf("mechanism never happened: %s", mech_name[i]));
    end
    $display("words checked per channel: %0d %0d %0d %0d", n_checked[0], n_checked[1], n_checked[2], n_checked[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((N_SEC + 2) * US * US_DIV + 200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
