// dcb_fpga: the FPGA of the IDPU Data Controller Board.
//
// The Data Controller Board links the spacecraft (through a 1553 bus chip)
// and five instruments (MAG, SEP, SWEA/STE-U, STE-D, PLASTIC, each on an
// identical serial interface) to a 16-bit microcontroller with boot PROM,
// EEPROM and 3 MB of RAM. This FPGA holds the glue between them:
//   - clock dividers: processor clock (crystal / CPU_DIV) and the 1 MHz
//     serial clock (crystal / US_DIV);
//   - timebase: 20-bit microsecond and 16-bit seconds counters, the 1 Hz tic,
//     and a latch of both at the 1553 time command;
//   - int_ctrl: 256/128/64/32 Hz timing interrupt and the ORed 1553 interrupt;
//   - mem_pager + mem_decode: four 16 KB data pages, a 64 KB fetch page, PROM
//     power, the I/O window and the chip selects;
//   - five serial_rx + tlm_dma_chan pairs writing telemetry into circular
//     RAM buffers with block pointers and over-run protection;
//   - cmd_seq + cmd_tx: commands read by DMA from a list in RAM and steered
//     to one instrument, plus the time command broadcast on every tic;
//   - dma_arb: takes the bus from the processor with HOLD/HLDA for the serial
//     DMA channels and the 1553 chip;
//   - io_regs: the processor's registers (map in io_regs.sv).
// Everything runs on the crystal clock `clk` (24 MHz assumed: it gives the
// 8 MHz processor clock by 3 and the 1 MHz serial clock by 24); slower rates
// are clock enables. The processor bus is modelled as a demultiplexed,
// synchronous bus with one-cycle read/write strobes; data to and from memory
// passes through the FPGA. Which functions exist follows the document; bus
// timing, the register map and the serial framing are this design's own.
module dcb_fpga
  import dcb_pkg::*;
#(
  parameter int unsigned CPU_DIV    = 3,          // 24 MHz -> 8 MHz
  parameter int unsigned US_DIV     = 24,         // 24 MHz -> 1 MHz
  parameter int unsigned US_PER_SEC = 1_000_000,
  parameter int unsigned GUARD_US   = 32,
  parameter int unsigned MEM_CYC    = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  // processor
  output logic              cpu_clk_o,
  input  logic [15:0]       cpu_addr,
  input  logic              cpu_inst,
  input  logic              cpu_rd,
  input  logic              cpu_wr,
  input  logic [15:0]       cpu_wdata,
  output logic [15:0]       cpu_rdata,
  output logic              cpu_bus16_o,
  output logic              cpu_hold_o,
  input  logic              cpu_hlda_i,
  output logic              cpu_int_timer_o,
  output logic              cpu_int_1553_o,
  // memory
  output logic [PA_W-1:0]   mem_addr,
  output logic              mem_rd,
  output logic              mem_wr,
  output logic [15:0]       mem_wdata,
  input  logic [15:0]       mem_rdata,
  output logic [2:0]        ram_cs,
  output logic              eeprom_cs,
  output logic              prom_cs,
  output logic              prom_pwr_o,
  // 1553 chip
  input  logic              b_dmar_i,
  output logic              b_dmag_o,
  input  logic [15:0]       b_addr_i,
  input  logic              b_rd_i,
  input  logic              b_wr_i,
  input  logic [15:0]       b_wdata_i,
  output logic [15:0]       b_rdata_o,
  input  logic [1:0]        b_int_i,
  input  logic              b_time_i,
  // serial instrument interfaces
  output logic              sclk_o,
  output logic              tic_o,
  input  logic [N_INST-1:0] tlm_i,
  output logic [N_INST-1:0] cmd_o
);
  localparam int unsigned NCH = N_INST + 1;

  // clocks and time
  logic        us_tick, cpu_tick;
  logic [19:0] usec, lat_usec;
  logic [15:0] sec, lat_sec;
  logic        lat_evt;

  clk_div #(.DIV(CPU_DIV)) u_cpu_clk (.clk, .rst_n, .clk_o(cpu_clk_o), .tick_o(cpu_tick));
  clk_div #(.DIV(US_DIV))  u_us_clk  (.clk, .rst_n, .clk_o(sclk_o),    .tick_o(us_tick));

  timebase #(.US_PER_SEC(US_PER_SEC)) u_time (
    .clk, .rst_n, .us_tick, .time_cmd_i(b_time_i),
    .usec_o(usec), .sec_o(sec), .tic_o,
    .lat_usec_o(lat_usec), .lat_sec_o(lat_sec), .lat_evt_o(lat_evt));

  // registers
  logic [1:0]       rate_sel;
  logic             timer_en;
  logic             pg_we, prom_we, prom_wdata, prom_on;
  logic [1:0]       pg_idx;
  logic [BLK_W-1:0] pg_wdata, win1553;
  logic [BLK_W-1:0] page [4];
  logic [PA_W-1:0]  cpu_phys, cmd_addr;
  logic             io_sel, cmd_start, cmd_busy, cmd_bad, time_sent;
  logic [15:0]      io_rdata;
  logic             ch_en [N_INST], ch_clr [N_INST], ch_ovr [N_INST], ch_lost [N_INST];
  logic [2:0]       ch_size [N_INST];
  logic [11:0]      ch_base [N_INST];
  logic [15:0]      ch_out [N_INST], ch_in [N_INST], ch_wr [N_INST], ch_end [N_INST];

  int_ctrl #(.US_PER_SEC(US_PER_SEC), .N1553(2)) u_int (
    .clk, .rst_n, .us_tick, .usec_i(usec), .rate_sel, .timer_en,
    .b1553_int_i(b_int_i), .timer_int_o(cpu_int_timer_o), .int1553_o(cpu_int_1553_o));

  mem_pager u_pager (
    .clk, .rst_n, .pg_we, .pg_idx, .pg_wdata, .prom_we, .prom_wdata,
    .page_o(page), .prom_on_o(prom_on),
    .cpu_addr, .cpu_inst, .phys_o(cpu_phys), .io_sel_o(io_sel));

  io_regs #(.N_IF(N_INST)) u_regs (
    .clk, .rst_n, .cpu_addr, .io_sel_i(io_sel), .cpu_wr_i(cpu_wr), .cpu_wdata_i(cpu_wdata),
    .rdata_o(io_rdata),
    .pg_we_o(pg_we), .pg_idx_o(pg_idx), .pg_wdata_o(pg_wdata),
    .prom_we_o(prom_we), .prom_wdata_o(prom_wdata), .page_i(page), .prom_on_i(prom_on),
    .rate_sel_o(rate_sel), .timer_en_o(timer_en),
    .usec_i(usec), .sec_i(sec), .lat_usec_i(lat_usec), .lat_sec_i(lat_sec),
    .win1553_o(win1553),
    .cmd_addr_o(cmd_addr), .cmd_start_o(cmd_start), .cmd_busy_i(cmd_busy), .cmd_bad_i(cmd_bad),
    .ch_en_o(ch_en), .ch_size_o(ch_size), .ch_base_o(ch_base), .ch_out_o(ch_out),
    .ch_clr_o(ch_clr), .ch_in_i(ch_in), .ch_wr_i(ch_wr), .ch_end_i(ch_end),
    .ch_ovr_i(ch_ovr), .ch_lost_i(ch_lost));

  // DMA requesters: telemetry channels 0..4, command channel 5
  dma_req_t         dreq [NCH];
  logic [NCH-1:0]   dack;
  logic [15:0]      drdata;
  bus_master_e      master;
  logic [PA_W-1:0]  dma_addr;
  logic             dma_rd, dma_wr;
  logic [15:0]      dma_wdata;

  for (genvar i = 0; i < N_INST; i++) begin : g_if
    logic [15:0] w;
    logic        bs, wv, blk_evt;
    serial_rx u_rx (.clk, .rst_n, .bit_tick(us_tick), .sdata_i(tlm_i[i]),
                    .word_o(w), .blk_start_o(bs), .word_valid_o(wv));
    tlm_dma_chan u_ch (
      .clk, .rst_n, .enable(ch_en[i]), .size_code(ch_size[i]), .base_kb(ch_base[i]),
      .out_ptr_i(ch_out[i]), .ovr_clr(ch_clr[i]),
      .word_i(w), .blk_start_i(bs), .word_valid_i(wv),
      .dma_o(dreq[i]), .dma_ack_i(dack[i]),
      .wr_ptr_o(ch_wr[i]), .end_ptr_o(ch_end[i]), .in_ptr_o(ch_in[i]),
      .ovr_o(ch_ovr[i]), .lost_o(ch_lost[i]), .blk_evt_o(blk_evt));
  end

  logic        tx_busy, tx_start;
  logic [23:0] tx_word;
  logic [4:0]  tx_steer;

  cmd_seq #(.US_PER_SEC(US_PER_SEC), .GUARD_US(GUARD_US)) u_cmd (
    .clk, .rst_n, .start_i(cmd_start), .list_addr_i(cmd_addr),
    .tic_i(tic_o), .usec_i(usec), .sec_i(sec),
    .dma_o(dreq[N_INST]), .dma_ack_i(dack[N_INST]), .dma_rdata_i(drdata),
    .tx_busy_i(tx_busy), .tx_start_o(tx_start), .tx_word_o(tx_word), .tx_steer_o(tx_steer),
    .busy_o(cmd_busy), .bad_pfx_o(cmd_bad), .time_sent_o(time_sent));

  cmd_tx #(.N_OUT(N_INST)) u_tx (
    .clk, .rst_n, .bit_tick(us_tick), .start_i(tx_start), .word_i(tx_word),
    .steer_i(tx_steer), .busy_o(tx_busy), .cmd_o);

  dma_arb #(.N_CH(NCH), .MEM_CYC(MEM_CYC)) u_arb (
    .clk, .rst_n, .hold_o(cpu_hold_o), .hlda_i(cpu_hlda_i),
    .b_dmar_i, .b_dmag_o,
    .req_i(dreq), .ack_o(dack), .rdata_o(drdata),
    .master_o(master), .addr_o(dma_addr), .mem_rd_o(dma_rd), .mem_wr_o(dma_wr),
    .wdata_o(dma_wdata), .mem_rdata_i(mem_rdata));

  mem_decode u_dec (
    .master_i(master), .prom_on_i(prom_on),
    .cpu_phys_i(cpu_phys), .cpu_io_i(io_sel), .cpu_rd_i(cpu_rd), .cpu_wr_i(cpu_wr),
    .cpu_wdata_i(cpu_wdata),
    .dma_addr_i(dma_addr), .dma_rd_i(dma_rd), .dma_wr_i(dma_wr), .dma_wdata_i(dma_wdata),
    .win1553_i(win1553), .b_addr_i, .b_rd_i, .b_wr_i, .b_wdata_i,
    .mem_addr_o(mem_addr), .mem_rd_o(mem_rd), .mem_wr_o(mem_wr), .mem_wdata_o(mem_wdata),
    .ram_cs_o(ram_cs), .eeprom_cs_o(eeprom_cs), .prom_cs_o(prom_cs), .bus16_o(cpu_bus16_o));

  assign prom_pwr_o = prom_on;
  assign b_rdata_o  = mem_rdata;
  assign cpu_rdata  = io_sel ? io_rdata : mem_rdata;
endmodule
