// tb_dma_arb: six requester models (five writers, one reader) issue random
// bursts of transfers, a 1553 model asks for the bus now and then, and a
// processor model answers HOLD with HLDA after a random delay. Checked: no
// memory cycle or 1553 grant without HLDA; every transfer reaches memory
// with its own address, direction and data, reads return memory contents;
// each memory strobe lasts MEM_CYC clocks; the lowest requesting index wins
// and the 1553 chip goes before any serial channel; HOLD is dropped when no
// request is left and only raised again after HLDA has fallen.
module tb_dma_arb;
  import dcb_pkg::*;
  localparam int N = 6, MC = 3;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        hold, hlda = 0, dmar = 0, dmag, mrd, mwr;
  dma_req_t    req [N];
  logic [N-1:0] ack;
  logic [15:0] rdata, wdata, mrdata;
  bus_master_e master;
  logic [21:0] addr;

  dma_arb #(.N_CH(N), .MEM_CYC(MC)) dut (.clk, .rst_n, .hold_o(hold), .hlda_i(hlda),
    .b_dmar_i(dmar), .b_dmag_o(dmag), .req_i(req), .ack_o(ack), .rdata_o(rdata),
    .master_o(master), .addr_o(addr), .mem_rd_o(mrd), .mem_wr_o(mwr), .wdata_o(wdata),
    .mem_rdata_i(mrdata));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // memory: contents are a function of the address
  function automatic logic [15:0] memval(input logic [21:0] a);
    return a[15:0] ^ 16'hA5C3;
  endfunction
  assign mrdata = memval(addr);

  // processor model
  always @(posedge clk) begin
    if (hold && !hlda) begin
      if ($urandom_range(0, 3) == 0) hlda <= 1;
    end else if (!hold && hlda) begin
      if ($urandom_range(0, 1) == 0) hlda <= 0;
    end
  end

  // requester models: each transfer is {we, addr, wdata}
  int done [N];
  int todo [N];
  logic [21:0] nxt_addr [N];
  initial for (int i = 0; i < N; i++) begin
    req[i] = '0; done[i] = 0; todo[i] = 0; nxt_addr[i] = 22'(i << 18);
  end
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++) begin
      if (ack[i]) begin
        check(req[i].req, "ack without request");
        if (!req[i].we) check(rdata == memval(req[i].addr), $sformatf("ch %0d read data", i));
        done[i]++;
        todo[i]--;
        nxt_addr[i] = nxt_addr[i] + 2;
      end
      if (!req[i].req || ack[i]) begin
        if (todo[i] == 0 && $urandom_range(0, 60) == 0) todo[i] = $urandom_range(1, 4);
        req[i] <= '{req: (todo[i] > 0), we: (i != N - 1), addr: nxt_addr[i],
                    wdata: 16'($urandom)};
      end
    end
  end

  // 1553 model
  int n1553 = 0, hold_len = 0;
  initial begin
    @(posedge rst_n);
    forever begin
      repeat ($urandom_range(100, 400)) @(posedge clk);
      dmar <= 1;
      @(posedge clk iff dmag);
      n1553++;
      repeat ($urandom_range(2, 10)) begin
        @(posedge clk);
        check(hlda && master == M_1553, "1553 owns the bus under HLDA");
      end
      dmar <= 0;
    end
  end

  // bus monitor
  int strobe = 0, n_xfer = 0, n_multi = 0, n_sessions = 0, xfers_in_session = 0;
  logic hold_d = 0, hlda_seen_low = 1;
  int lowest_prev = -1;
  logic dmar_prev = 0;
  always @(posedge clk) begin
    int l;
    l = -1;
    for (int i = N - 1; i >= 0; i--) if (req[i].req) l = i;
    lowest_prev <= l;
    dmar_prev   <= dmar;
  end
  always @(posedge clk) if (rst_n) begin
    hold_d <= hold;
    if ((mrd || mwr || dmag)) check(hlda, "bus used without HLDA");
    if (mrd || mwr) begin
      check(!(mrd && mwr), "read and write together");
      check(master == M_DMA, "master is DMA during transfer");
      if (strobe == 0) begin
        check(lowest_prev >= 0 && dut.sel == 3'(lowest_prev),
              $sformatf("priority: sel %0d lowest %0d", dut.sel, lowest_prev));
        check(!dmar_prev, "1553 request must win over serial channels");
        check(addr == req[dut.sel].addr && mwr == req[dut.sel].we, "transfer matches request");
        if (mwr) check(wdata == req[dut.sel].wdata, "write data");
        n_xfer++; xfers_in_session++;
      end
      strobe++;
    end else begin
      if (strobe != 0) check(strobe == MC, $sformatf("strobe length %0d", strobe));
      strobe = 0;
    end
    if (hold && !hold_d) begin
      check(!hlda, "HOLD raised again before HLDA fell");
      n_sessions++; xfers_in_session = 0;
    end
    if (!hold && hold_d) begin
      if (xfers_in_session > 1) n_multi++;
    end
  end

  initial begin
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (30000) @(posedge clk);
    for (int i = 0; i < N; i++) check(done[i] > 10, $sformatf("channel %0d served %0d", i, done[i]));
    check(n1553 > 10, $sformatf("1553 grants %0d", n1553));
    check(n_multi > 0, "several transfers under one HOLD");
    $display("transfers %0d, hold sessions %0d, multi %0d, 1553 %0d", n_xfer, n_sessions, n_multi, n1553);
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
