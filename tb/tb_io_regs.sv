// tb_io_regs: writes every writable register through the processor port and
// reads it back, checks the outputs that drive the rest of the FPGA
// (page-register and PROM write strobes, timer settings, 1553 window,
// command address and start pulse, channel setup, over-run clear pulses),
// checks that the read-only registers show their inputs, and that a write
// outside the I/O window changes nothing.
module tb_io_regs;
  import dcb_pkg::*;
  localparam int NI = 5;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [15:0] addr = 0, wdata = 0, rdata;
  logic        io_sel, wr = 0;
  logic        pg_we, prom_we, prom_wd, timer_en, cmd_start, cmd_busy = 0, cmd_bad = 0;
  logic [1:0]  pg_idx, rate_sel;
  logic [7:0]  pg_wd, win;
  logic [7:0]  page [4];
  logic        prom_on = 1;
  logic [19:0] usec = 0, lusec = 0;
  logic [15:0] sec = 0, lsec = 0;
  logic [21:0] cmd_addr;
  logic        en [NI], clr [NI], ovr [NI], lost [NI];
  logic [2:0]  size [NI];
  logic [11:0] base [NI];
  logic [15:0] outp [NI], inp [NI], wrp [NI], endp [NI];

  assign io_sel = (addr & IO_MASK) == IO_BASE;

  io_regs #(.N_IF(NI)) dut (.clk, .rst_n, .cpu_addr(addr), .io_sel_i(io_sel), .cpu_wr_i(wr),
    .cpu_wdata_i(wdata), .rdata_o(rdata), .pg_we_o(pg_we), .pg_idx_o(pg_idx), .pg_wdata_o(pg_wd),
    .prom_we_o(prom_we), .prom_wdata_o(prom_wd), .page_i(page), .prom_on_i(prom_on),
    .rate_sel_o(rate_sel), .timer_en_o(timer_en), .usec_i(usec), .sec_i(sec),
    .lat_usec_i(lusec), .lat_sec_i(lsec), .win1553_o(win), .cmd_addr_o(cmd_addr),
    .cmd_start_o(cmd_start), .cmd_busy_i(cmd_busy), .cmd_bad_i(cmd_bad),
    .ch_en_o(en), .ch_size_o(size), .ch_base_o(base), .ch_out_o(outp), .ch_clr_o(clr),
    .ch_in_i(inp), .ch_wr_i(wrp), .ch_end_i(endp), .ch_ovr_i(ovr), .ch_lost_i(lost));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // page registers live outside this block: model them
  always @(posedge clk) begin
    if (pg_we) page[pg_idx] <= pg_wd;
    if (prom_we) prom_on <= prom_wd;
  end

  int n_start = 0, n_clr [NI];
  always @(posedge clk) begin
    if (cmd_start) n_start++;
    for (int i = 0; i < NI; i++) if (clr[i]) n_clr[i]++;
  end

  task automatic wr16(input logic [6:0] off, input logic [15:0] d);
    @(negedge clk);
    addr = IO_BASE | 16'(off); wdata = d; wr = 1;
    @(negedge clk);
    wr = 0;
  endtask

  task automatic rdchk(input logic [6:0] off, input logic [15:0] exp, input string what);
    addr = IO_BASE | 16'(off);
    #1;
    check(rdata == exp, $sformatf("%s: read %h expected %h", what, rdata, exp));
  endtask

  initial begin
    logic [15:0] v;
    for (int i = 0; i < NI; i++) n_clr[i] = 0;
    page = '{8'hFF, 0, 0, 0};
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 4; p++) begin
      v = 16'($urandom_range(0, 255));
      wr16(7'(2 * p), v);
      @(negedge clk);
      rdchk(7'(2 * p), v, "page readback");
    end
    wr16(R_CTRL, 16'b1101);
    check(rate_sel == 2'd2 && timer_en && prom_on, "ctrl fields");
    rdchk(R_CTRL, 16'b1101, "ctrl readback");
    wr16(R_CTRL, 16'b0000);
    check(!prom_on && !timer_en, "PROM off");
    usec = 20'h9ABCD; sec = 16'h1234; lusec = 20'h54321; lsec = 16'hBEEF;
    rdchk(R_USEC_LO, 16'hABCD, "usec lo"); rdchk(R_USEC_HI, 16'h9, "usec hi");
    rdchk(R_SEC, 16'h1234, "sec");
    rdchk(R_LUSEC_LO, 16'h4321, "latched usec lo"); rdchk(R_LUSEC_HI, 16'h5, "latched usec hi");
    rdchk(R_LSEC, 16'hBEEF, "latched sec");
    wr16(R_WIN1553, 16'h0088);
    check(win == 8'h88, "1553 window"); rdchk(R_WIN1553, 16'h88, "1553 window");
    wr16(R_CMD_LO, 16'h4560); wr16(R_CMD_HI, 16'h0023);
    check(cmd_addr == 22'h234560, "command list address");
    check(n_start == 0, "no start yet");
    wr16(R_CMD_CTRL, 16'h0001);
    check(n_start == 1, "command start pulse");
    cmd_busy = 1; cmd_bad = 1;
    rdchk(R_CMD_CTRL, 16'h3, "command status");
    for (int i = 0; i < NI; i++) begin
      logic [6:0] cb;
      cb = 7'(32 + 16 * i);
      wr16(cb + 7'(C_BASE), 16'(100 + i));
      wr16(cb + 7'(C_CFG), 16'(8 | i));
      wr16(cb + 7'(C_OUT), 16'(1000 * i + 7));
      check(base[i] == 12'(100 + i) && en[i] && size[i] == 3'(i) && outp[i] == 16'(1000 * i + 7),
            $sformatf("channel %0d setup", i));
      inp[i] = 16'($urandom); wrp[i] = 16'($urandom); endp[i] = 16'($urandom);
      rdchk(cb + 7'(C_IN), inp[i], "in pointer"); rdchk(cb + 7'(C_WR), wrp[i], "wr pointer");
      rdchk(cb + 7'hA, endp[i], "end pointer");
      rdchk(cb + 7'(C_CFG), 16'(8 | i), "cfg readback"); rdchk(cb + 7'(C_BASE), 16'(100 + i), "base readback");
      rdchk(cb + 7'(C_OUT), 16'(1000 * i + 7), "out readback");
      ovr[i] = (i % 2); lost[i] = (i == 3);
    end
    rdchk(R_STATUS, 16'b01000_01010, "status");
    wr16(R_STATUS, 16'b00110);
    check(n_clr[1] == 1 && n_clr[2] == 1 && n_clr[0] == 0, "over-run clear pulses");
    // a write outside the window does nothing
    @(negedge clk); addr = 16'h2008; wdata = 16'hFFFF; wr = 1; @(negedge clk); wr = 0;
    check(rate_sel == 0 && !timer_en && prom_on == 0, "write outside window ignored");
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
