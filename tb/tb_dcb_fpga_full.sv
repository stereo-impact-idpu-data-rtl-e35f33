// tb_dcb_fpga_full: the end-to-end test of dcb_fpga at its default
// parameters -- 24 MHz crystal, 1 MHz serial clock, a real second of
// 1,000,000 microseconds -- for three seconds of operation: boot, paging,
// five telemetry streams at the full 1 Mbps with buffer wrap and over-run,
// a command list across a time command, timing interrupts at 256 Hz and
// then 32 Hz, and 1553 traffic. The models and the program are in
// dcb_tb_env.
module tb_dcb_fpga_full;
  import dcb_pkg::*;

  logic        clk, rst_n, cpu_clk_o, cpu_inst, cpu_rd, cpu_wr, cpu_bus16_o, cpu_hold_o, cpu_hlda_i;
  logic        cpu_int_timer_o, cpu_int_1553_o, mem_rd, mem_wr, eeprom_cs, prom_cs, prom_pwr_o;
  logic        b_dmar_i, b_dmag_o, b_rd_i, b_wr_i, b_time_i, sclk_o, tic_o, guard_wait_i;
  logic [15:0] cpu_addr, cpu_wdata, cpu_rdata, mem_wdata, mem_rdata, b_addr_i, b_wdata_i, b_rdata_o;
  logic [21:0] mem_addr;
  logic [2:0]  ram_cs;
  logic [1:0]  b_int_i;
  logic [4:0]  tlm_i, cmd_o;

  dcb_fpga dut (.*);
  dcb_tb_env #(.N_SEC(3)) env (.*);

  assign guard_wait_i = dut.u_cmd.busy_o && dut.u_cmd.in_guard && !dut.u_cmd.tx_busy_i &&
                        !dut.u_cmd.dma_o.req;
endmodule
