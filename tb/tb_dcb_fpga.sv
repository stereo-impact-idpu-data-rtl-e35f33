// tb_dcb_fpga: end-to-end test of the whole FPGA with a shortened time
// scale (serial clock = crystal / 4, a "second" of 1000 microseconds) so
// that twelve seconds of operation -- boot, paging, telemetry through all
// five channels including wrap and over-run, the command list across
// several time commands, timing interrupts at two rates, 1553 traffic --
// run in a fraction of a second. The models and the program are in
// dcb_tb_env.
module tb_dcb_fpga;
  import dcb_pkg::*;
  localparam int unsigned US_DIV = 4, US_PER_SEC = 1000, N_SEC = 12;

  logic        clk, rst_n, cpu_clk_o, cpu_inst, cpu_rd, cpu_wr, cpu_bus16_o, cpu_hold_o, cpu_hlda_i;
  logic        cpu_int_timer_o, cpu_int_1553_o, mem_rd, mem_wr, eeprom_cs, prom_cs, prom_pwr_o;
  logic        b_dmar_i, b_dmag_o, b_rd_i, b_wr_i, b_time_i, sclk_o, tic_o, guard_wait_i;
  logic [15:0] cpu_addr, cpu_wdata, cpu_rdata, mem_wdata, mem_rdata, b_addr_i, b_wdata_i, b_rdata_o;
  logic [21:0] mem_addr;
  logic [2:0]  ram_cs;
  logic [1:0]  b_int_i;
  logic [4:0]  tlm_i, cmd_o;

  dcb_fpga #(.US_DIV(US_DIV), .US_PER_SEC(US_PER_SEC)) dut (.*);
  dcb_tb_env #(.US_DIV(US_DIV), .US_PER_SEC(US_PER_SEC), .N_SEC(N_SEC)) env (.*);

  assign guard_wait_i = dut.u_cmd.busy_o && dut.u_cmd.in_guard && !dut.u_cmd.tx_busy_i &&
                        !dut.u_cmd.dma_o.req;
endmodule
