// tb_tlm_sizes: runs one telemetry channel through every buffer size the
// design offers (1, 2, 4, 8, 16, 32, 64 and 128 KB, size codes 0-7), each at
// a random, deliberately misaligned base.
// For each size the channel first receives blocks of random length while the
// processor keeps up, until the buffer has wrapped at least once. The
// processor then stops moving its output pointer, and blocks keep arriving
// until an over-run has dropped a block. Every DMA write is compared in
// order with a word-level model of the buffer rules. The model checks the
// address (inside the size-aligned buffer, wrapping at the buffer size) and
// the data. After each block the address, block-end and block-in pointers and
// the over-run flag are compared too.
// Words arrive every 6 clocks and the DMA acknowledge comes after 1-3 clocks,
// much faster than 1 Mbps, so the largest buffers fill in a short run; the
// queue-overflow flag must stay clear throughout.
module tb_tlm_sizes;
  import dcb_pkg::*;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        enable = 0, ovr_clr = 0, bs = 0, wv = 0, ack = 0;
  logic [2:0]  size = 0;
  logic [11:0] base = 0;
  logic [15:0] out_ptr = 0, w = 0;
  dma_req_t    dreq;
  logic [15:0] wr_ptr, end_ptr, in_ptr;
  logic        ovr, lost, blk_evt;

  tlm_dma_chan dut (.clk, .rst_n, .enable, .size_code(size), .base_kb(base), .out_ptr_i(out_ptr),
    .ovr_clr, .word_i(w), .blk_start_i(bs), .word_valid_i(wv), .dma_o(dreq), .dma_ack_i(ack),
    .wr_ptr_o(wr_ptr), .end_ptr_o(end_ptr), .in_ptr_o(in_ptr), .ovr_o(ovr), .lost_o(lost),
    .blk_evt_o(blk_evt));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // model of the buffer: expected DMA writes in order
  int nw = 512, base_b = 0;
  int m_wr = 0, m_end = 0, m_in = 0, n_ovr = 0, n_wraps = 0;
  bit m_disc = 1, m_ovr = 0;
  logic [PA_W-1:0] exp_addr [$];
  logic [15:0]     exp_data [$];

  function automatic void model_word(input bit f, input logic [15:0] d);
    int at;
    at = m_end;
    if (f) begin
      if (!m_disc) begin m_in = m_end; at = m_wr; end
      m_end = at;
      m_disc = 0;
    end
    if (!m_disc) begin
      if (((m_wr + 1) % nw) == int'(out_ptr)) begin
        m_ovr = 1; m_disc = 1; m_wr = at; n_ovr++;
      end else begin
        exp_addr.push_back(PA_W'(base_b + 2 * m_wr));
        exp_data.push_back(d);
        if (m_wr == nw - 1) n_wraps++;
        m_wr = (m_wr + 1) % nw;
      end
    end
  endfunction

  // arbiter model: acknowledge after 1-3 clocks, compare with the model
  initial forever begin
    @(posedge clk);
    if (dreq.req && !ack) begin
      repeat ($urandom_range(1, 3)) @(posedge clk);
      checks++;
      if (exp_addr.size() == 0) begin
        failures++;
        $display("FAIL: unexpected DMA write to %h", dreq.addr);
      end else begin
        if (!dreq.we || dreq.addr != exp_addr[0] || dreq.wdata != exp_data[0]) begin
          failures++;
          if (failures < 20)
            $display("FAIL: size %0d write %h=%h expected %h=%h", size, dreq.addr, dreq.wdata,
                     exp_addr[0], exp_data[0]);
        end
        void'(exp_addr.pop_front());
        void'(exp_data.pop_front());
      end
      ack <= 1;
      @(posedge clk);
      ack <= 0;
    end
  end

  task automatic send_word(input bit f, input logic [15:0] d);
    @(negedge clk);
    w = d; bs = f; wv = 1;
    model_word(f, d);
    @(negedge clk);
    wv = 0;
    repeat (4) @(negedge clk);
  endtask

  task automatic sync_and_compare(input string tag);
    wait (dut.q_cnt == 0 && !dut.pend && !ack);
    repeat (2) @(posedge clk);
    #1;
    check(exp_addr.size() == 0, $sformatf("%s: %0d writes missing", tag, exp_addr.size()));
    check(int'(wr_ptr) == m_wr, $sformatf("%s: wr %0d expected %0d", tag, wr_ptr, m_wr));
    check(int'(end_ptr) == m_end, $sformatf("%s: end %0d expected %0d", tag, end_ptr, m_end));
    check(int'(in_ptr) == m_in, $sformatf("%s: in %0d expected %0d", tag, in_ptr, m_in));
    check(ovr == m_ovr, $sformatf("%s: ovr %0b expected %0b", tag, ovr, m_ovr));
  endtask

  task automatic send_block(input int len);
    for (int i = 0; i < len; i++) send_word(i == 0, 16'($urandom));
  endtask

  int sizes_done = 0;

  initial begin
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 8; s++) begin
      // reconfigure: disable, new size and base, output pointer 0, enable
      @(negedge clk);
      enable = 0; ovr_clr = 1;
      size = 3'(s);
      base = 12'($urandom);
      nw = 512 << s;
      base_b = (int'(base) & ~((1 << s) - 1)) * 1024;
      out_ptr = 0;
      m_wr = 0; m_end = 0; m_in = 0; m_disc = 1; m_ovr = 0; n_ovr = 0; n_wraps = 0;
      @(negedge clk);
      ovr_clr = 0; enable = 1;
      // phase 1: processor keeps up until the buffer has wrapped
      while (n_wraps == 0) begin
        send_block($urandom_range(16, 200));
        sync_and_compare($sformatf("size %0d keep-up", s));
        out_ptr = 16'(m_in);
      end
      check(!ovr, $sformatf("size %0d: no over-run while the processor keeps up", s));
      // phase 2: processor stops, buffer fills
      while (n_ovr == 0) begin
        send_block($urandom_range(16, 200));
        sync_and_compare($sformatf("size %0d stopped", s));
      end
      // one more block: it is received normally only if it fits, and the
      // word at the output pointer is never written
      send_block(8);
      sync_and_compare($sformatf("size %0d after over-run", s));
      check(ovr, $sformatf("size %0d: over-run flagged", s));
      check(!lost, $sformatf("size %0d: no queue overflow", s));
      sizes_done++;
    end
    check(sizes_done == 8, "all eight sizes run");
    $display("sizes run: %0d", sizes_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
