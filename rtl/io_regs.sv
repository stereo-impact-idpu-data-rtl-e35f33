// io_regs: processor-visible registers of the DCB FPGA.
//
// The registers occupy the 128-byte I/O window at 1E00H (io_sel_i from
// mem_pager). All are 16-bit word registers at even byte offsets:
//   00-06  PAGE0-3    8-bit physical block of each 16 KB segment (in mem_pager)
//   08     CTRL       [0] boot PROM power, [2:1] timer rate (256/128/64/32 Hz),
//                     [3] timer interrupt enable
//   0A/0C  USEC       1 MHz counter bits 15:0 / 19:16 (read only)
//   0E     SEC        seconds counter (read only)
//   10-14  LATCH      USEC lo/hi and SEC captured at the 1553 time command
//   16     WIN1553    base block of the 128 KB window the 1553 chip uses
//   18/1A  CMDADDR    byte address of the command list, bits 15:0 / 21:16
//   1C     CMDCTRL    write bit 0 = 1: start; read [0] busy, [1] bad prefix
//   1E     STATUS     [4:0] buffer over-run per channel, [9:5] word lost;
//                     writing 1 to bit n (n<5) clears both flags of channel n
//   20+10H*n, channel n = 0..4:
//     +0 BASE (buffer base in KB), +2 CFG ([2:0] size code, [3] enable),
//     +4 OUT (output pointer), +6 IN (block-in pointer, read only),
//     +8 WR (address pointer, read only), +A END (start of the block being
//     received, read only)
// Writes take effect on the clock edge of a one-cycle cpu_wr_i; reads are
// combinational. Which quantities the processor can read and program follows
// the document; the addresses and bit positions are this design's choices.
module io_regs
  import dcb_pkg::*;
#(
  parameter int unsigned N_IF = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [15:0]      cpu_addr,
  input  logic             io_sel_i,
  input  logic             cpu_wr_i,
  input  logic [15:0]      cpu_wdata_i,
  output logic [15:0]      rdata_o,
  // mem_pager
  output logic             pg_we_o,
  output logic [1:0]       pg_idx_o,
  output logic [BLK_W-1:0] pg_wdata_o,
  output logic             prom_we_o,
  output logic             prom_wdata_o,
  input  logic [BLK_W-1:0] page_i [4],
  input  logic             prom_on_i,
  // timers and interrupts
  output logic [1:0]       rate_sel_o,
  output logic             timer_en_o,
  input  logic [19:0]      usec_i,
  input  logic [15:0]      sec_i,
  input  logic [19:0]      lat_usec_i,
  input  logic [15:0]      lat_sec_i,
  // 1553
  output logic [BLK_W-1:0] win1553_o,
  // command sequencer
  output logic [PA_W-1:0]  cmd_addr_o,
  output logic             cmd_start_o,
  input  logic             cmd_busy_i,
  input  logic             cmd_bad_i,
  // telemetry channels
  output logic             ch_en_o    [N_IF],
  output logic [2:0]       ch_size_o  [N_IF],
  output logic [11:0]      ch_base_o  [N_IF],
  output logic [15:0]      ch_out_o   [N_IF],
  output logic             ch_clr_o   [N_IF],
  input  logic [15:0]      ch_in_i    [N_IF],
  input  logic [15:0]      ch_wr_i    [N_IF],
  input  logic [15:0]      ch_end_i   [N_IF],
  input  logic             ch_ovr_i   [N_IF],
  input  logic             ch_lost_i  [N_IF]
);
  logic [6:0] off;
  logic       we;
  logic [2:0] chn;
  logic [3:0] creg;
  logic       in_ch;

  assign off   = cpu_addr[6:0];
  assign we    = cpu_wr_i && io_sel_i;
  assign chn   = 3'(off[6:4] - 3'd2);
  assign creg  = off[3:0];
  assign in_ch = (off >= R_CH0) && (32'(chn) < N_IF);

  // write strobes into mem_pager
  always_comb begin
    pg_we_o      = we && (off < R_CTRL);
    pg_idx_o     = off[2:1];
    pg_wdata_o   = cpu_wdata_i[BLK_W-1:0];
    prom_we_o    = we && (off == R_CTRL);
    prom_wdata_o = cpu_wdata_i[0];
    cmd_start_o  = we && (off == R_CMD_CTRL) && cpu_wdata_i[0];
    for (int i = 0; i < N_IF; i++)
      ch_clr_o[i] = we && (off == R_STATUS) && cpu_wdata_i[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rate_sel_o <= '0;
      timer_en_o <= 1'b0;
      win1553_o  <= '0;
      cmd_addr_o <= '0;
      for (int i = 0; i < N_IF; i++) begin
        ch_en_o[i]   <= 1'b0;
        ch_size_o[i] <= '0;
        ch_base_o[i] <= '0;
        ch_out_o[i]  <= '0;
      end
    end else if (we) begin
      if (off == R_CTRL) begin
        rate_sel_o <= cpu_wdata_i[2:1];
        timer_en_o <= cpu_wdata_i[3];
      end
      if (off == R_WIN1553) win1553_o <= cpu_wdata_i[BLK_W-1:0];
      if (off == R_CMD_LO)  cmd_addr_o[15:0] <= cpu_wdata_i;
      if (off == R_CMD_HI)  cmd_addr_o[PA_W-1:16] <= cpu_wdata_i[PA_W-17:0];
      if (in_ch) begin
        unique case (creg)
          C_BASE: ch_base_o[chn] <= cpu_wdata_i[11:0];
          C_CFG: begin
            ch_size_o[chn] <= cpu_wdata_i[2:0];
            ch_en_o[chn]   <= cpu_wdata_i[3];
          end
          C_OUT:  ch_out_o[chn] <= cpu_wdata_i;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    rdata_o = '0;
    if (off < R_CTRL) rdata_o = 16'(page_i[off[2:1]]);
    else if (in_ch) begin
      unique case (creg)
        C_BASE: rdata_o = 16'(ch_base_o[chn]);
        C_CFG:  rdata_o = {12'd0, ch_en_o[chn], ch_size_o[chn]};
        C_OUT:  rdata_o = ch_out_o[chn];
        C_IN:   rdata_o = ch_in_i[chn];
        C_WR:   rdata_o = ch_wr_i[chn];
        4'hA:   rdata_o = ch_end_i[chn];
        default: rdata_o = '0;
      endcase
    end else begin
      unique case (off)
        R_CTRL:     rdata_o = {12'd0, timer_en_o, rate_sel_o, prom_on_i};
        R_USEC_LO:  rdata_o = usec_i[15:0];
        R_USEC_HI:  rdata_o = {12'd0, usec_i[19:16]};
        R_SEC:      rdata_o = sec_i;
        R_LUSEC_LO: rdata_o = lat_usec_i[15:0];
        R_LUSEC_HI: rdata_o = {12'd0, lat_usec_i[19:16]};
        R_LSEC:     rdata_o = lat_sec_i;
        R_WIN1553:  rdata_o = 16'(win1553_o);
        R_CMD_LO:   rdata_o = cmd_addr_o[15:0];
        R_CMD_HI:   rdata_o = 16'(cmd_addr_o[PA_W-1:16]);
        R_CMD_CTRL: rdata_o = {14'd0, cmd_bad_i, cmd_busy_i};
        R_STATUS:   for (int i = 0; i < N_IF; i++) begin
                      rdata_o[i]     = ch_ovr_i[i];
                      rdata_o[5 + i] = ch_lost_i[i];
                    end
        default:    rdata_o = '0;
      endcase
    end
  end
endmodule
