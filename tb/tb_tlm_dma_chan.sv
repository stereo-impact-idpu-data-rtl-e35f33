// tb_tlm_dma_chan: feeds telemetry blocks of random length into one channel
// (2 KB buffer at a deliberately misaligned base, so the alignment rule is
// exercised), acknowledges its DMA writes after random delays, and compares
// memory contents and the address, block-end and block-in pointers with a
// word-by-word model of the circular buffer rules. Phase 1 lets the
// "processor" keep up (output pointer follows the block-in pointer) across
// several wraps; phase 2 stops it so the buffer over-runs and the block in
// progress must be dropped without touching unprocessed data; phase 3
// clears the flag and resumes.
module tb_tlm_dma_chan;
  import dcb_pkg::*;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam logic [2:0]  SIZE = 3'd1;            // 2 KB = 1024 words
  localparam logic [11:0] BASE = 12'd13;          // aligned down to 12 KB
  localparam int          NW   = 1024;
  localparam int          BASE_B = 12 * 1024;

  logic        enable = 0, ovr_clr = 0, bs = 0, wv = 0, ack = 0;
  logic [15:0] out_ptr = 0, w = 0;
  dma_req_t    dreq;
  logic [15:0] wr_ptr, end_ptr, in_ptr;
  logic        ovr, lost, blk_evt;

  tlm_dma_chan dut (.clk, .rst_n, .enable, .size_code(SIZE), .base_kb(BASE), .out_ptr_i(out_ptr),
    .ovr_clr, .word_i(w), .blk_start_i(bs), .word_valid_i(wv), .dma_o(dreq), .dma_ack_i(ack),
    .wr_ptr_o(wr_ptr), .end_ptr_o(end_ptr), .in_ptr_o(in_ptr), .ovr_o(ovr), .lost_o(lost),
    .blk_evt_o(blk_evt));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // memory seen by the DMA, and the model
  logic [15:0] mem [int];
  logic [15:0] mmem [int];
  int m_wr = 0, m_end = 0, m_in = 0, n_ovr_model = 0, n_wraps = 0, n_blk = 0;
  bit m_disc = 1, m_ovr = 0;

  function automatic void model_word(input bit f, input logic [15:0] d);
    int at;
    at = m_end;
    if (f) begin
      if (!m_disc) begin m_in = m_end; at = m_wr; n_blk++; end
      m_end = at;
      m_disc = 0;
    end
    if (!m_disc) begin
      if (((m_wr + 1) % NW) == int'(out_ptr)) begin
        m_ovr = 1; m_disc = 1; m_wr = at; n_ovr_model++;
      end else begin
        mmem[BASE_B + 2 * m_wr] = d;
        if (m_wr == NW - 1) n_wraps++;
        m_wr = (m_wr + 1) % NW;
      end
    end
  endfunction

  // arbiter model: random acknowledge delay
  initial forever begin
    @(posedge clk);
    if (dreq.req && !ack) begin
      repeat ($urandom_range(0, 6)) @(posedge clk);
      check(dreq.we, "telemetry DMA must write");
      check(dreq.addr >= 22'(BASE_B) && dreq.addr < 22'(BASE_B + 2 * NW), $sformatf("address %h outside buffer", dreq.addr));
      mem[int'(dreq.addr)] = dreq.wdata;
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
    repeat ($urandom_range(12, 20)) @(negedge clk);
  endtask

  task automatic sync_and_compare(input string tag);
    wait (dut.q_cnt == 0 && !dut.pend && !ack);
    repeat (2) @(posedge clk);
    #1;
    check(int'(wr_ptr) == m_wr, $sformatf("%s: wr %0d expected %0d", tag, wr_ptr, m_wr));
    check(int'(end_ptr) == m_end, $sformatf("%s: end %0d expected %0d", tag, end_ptr, m_end));
    check(int'(in_ptr) == m_in, $sformatf("%s: in %0d expected %0d", tag, in_ptr, m_in));
    check(ovr == m_ovr, $sformatf("%s: ovr %0b expected %0b", tag, ovr, m_ovr));
  endtask

  task automatic send_block(input int len);
    for (int i = 0; i < len; i++) send_word(i == 0, 16'($urandom));
  endtask

  int n_evt = 0;
  always @(posedge clk) if (blk_evt) n_evt++;

  initial begin
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); enable = 1;
    // words before the first block start are ignored
    send_word(0, 16'h1111); send_word(0, 16'h2222);
    sync_and_compare("pre-block");
    // phase 1: processor keeps up
    for (int b = 0; b < 70; b++) begin
      send_block($urandom_range(5, 40));
      sync_and_compare($sformatf("phase1 block %0d", b));
      out_ptr = 16'(m_in);
    end
    check(n_wraps >= 1, "buffer wrapped");
    check(!ovr, "no over-run while processor keeps up");
    // phase 2: processor stops
    for (int b = 0; b < 60; b++) begin
      send_block($urandom_range(5, 40));
      sync_and_compare($sformatf("phase2 block %0d", b));
    end
    check(n_ovr_model > 0 && ovr, "over-run happened and is flagged");
    // the word at out_ptr (oldest unprocessed) was never overwritten
    check(m_wr != int'(out_ptr) || m_disc, "model sanity");
    // phase 3: clear and resume
    @(negedge clk); ovr_clr = 1; @(negedge clk); ovr_clr = 0;
    m_ovr = 0;
    out_ptr = 16'(m_end);
    for (int b = 0; b < 10; b++) begin
      send_block($urandom_range(5, 40));
      sync_and_compare($sformatf("phase3 block %0d", b));
      out_ptr = 16'(m_in);
    end
    check(!ovr, "no over-run after resume");
    // memory image
    check(mem.num() == mmem.num(), $sformatf("%0d words written, model %0d", mem.num(), mmem.num()));
    foreach (mmem[a]) check(mem.exists(a) && mem[a] == mmem[a], $sformatf("memory at %h", a));
    check(n_evt == n_blk, $sformatf("block events %0d expected %0d", n_evt, n_blk));
    check(!lost, "no queue overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
