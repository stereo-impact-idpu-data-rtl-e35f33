// tb_mem_decode: for each bus master (processor, DMA, 1553) drives random
// addresses and strobes and checks the routed address, strobes and write data
// and the chip selects against a decode of the block map written here,
// including the I/O-window mask, the PROM power gate and the 1553 window.
module tb_mem_decode;
  import dcb_pkg::*;
  int checks = 0, failures = 0;

  bus_master_e master = M_CPU;
  logic        prom_on = 1, cpu_io = 0, cpu_rd = 0, cpu_wr = 0, dma_rd = 0, dma_wr = 0;
  logic        b_rd = 0, b_wr = 0;
  logic [21:0] cpu_phys = 0, dma_addr = 0;
  logic [15:0] cpu_wdata = 0, dma_wdata = 0, b_addr = 0, b_wdata = 0;
  logic [7:0]  win = 0;
  logic [21:0] maddr;
  logic        mrd, mwr, ecs, pcs, bus16;
  logic [15:0] mwdata;
  logic [2:0]  rcs;

  mem_decode dut (.master_i(master), .prom_on_i(prom_on), .cpu_phys_i(cpu_phys), .cpu_io_i(cpu_io),
    .cpu_rd_i(cpu_rd), .cpu_wr_i(cpu_wr), .cpu_wdata_i(cpu_wdata),
    .dma_addr_i(dma_addr), .dma_rd_i(dma_rd), .dma_wr_i(dma_wr), .dma_wdata_i(dma_wdata),
    .win1553_i(win), .b_addr_i(b_addr), .b_rd_i(b_rd), .b_wr_i(b_wr), .b_wdata_i(b_wdata),
    .mem_addr_o(maddr), .mem_rd_o(mrd), .mem_wr_o(mwr), .mem_wdata_o(mwdata),
    .ram_cs_o(rcs), .eeprom_cs_o(ecs), .prom_cs_o(pcs), .bus16_o(bus16));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int n_ram = 0, n_ee = 0, n_prom = 0, n_none = 0;

  task automatic check_cs(input logic [21:0] a, input bit active);
    int blk;
    logic [2:0] er;
    logic ee, pr;
    blk = int'(a >> 14);
    er = 0; ee = 0; pr = 0;
    if (active) begin
      if (blk < 192) er[blk / 64] = 1;
      else if (blk >= 192 && blk < 208) ee = 1;
      else if (blk >= 252) pr = prom_on;
    end
    if (er != 0) n_ram++; else if (ee) n_ee++; else if (pr) n_prom++; else n_none++;
    check(rcs == er && ecs == ee && pcs == pr && bus16 == !pr,
          $sformatf("addr %h: cs ram %b ee %b prom %b", a, rcs, ecs, pcs));
  endtask

  initial begin
    for (int it = 0; it < 3000; it++) begin
      master = bus_master_e'($urandom_range(0, 2));
      prom_on = ($urandom_range(0, 3) != 0);
      cpu_phys = 22'($urandom); dma_addr = 22'($urandom); b_addr = 16'($urandom);
      win = 8'($urandom);
      if (it % 3 == 0) cpu_phys[21:16] = 6'h3F;      // aim at the PROM often
      cpu_io = ($urandom_range(0, 7) == 0);
      {cpu_rd, cpu_wr, dma_rd, dma_wr, b_rd, b_wr} = 6'($urandom);
      cpu_wdata = 16'($urandom); dma_wdata = 16'($urandom); b_wdata = 16'($urandom);
      #1;
      case (master)
        M_CPU: begin
          check(maddr == cpu_phys && mwdata == cpu_wdata, "cpu routing");
          check(mrd == (cpu_rd && !cpu_io) && mwr == (cpu_wr && !cpu_io), "cpu strobes / io mask");
          check_cs(cpu_phys, !cpu_io);
        end
        M_DMA: begin
          check(maddr == dma_addr && mwdata == dma_wdata && mrd == dma_rd && mwr == dma_wr, "dma routing");
          check_cs(dma_addr, 1);
        end
        default: begin
          check(maddr == {win[7:3], b_addr, 1'b0}, $sformatf("1553 window %h", maddr));
          check(mwdata == b_wdata && mrd == b_rd && mwr == b_wr, "1553 routing");
          check_cs({win[7:3], b_addr, 1'b0}, 1);
        end
      endcase
    end
    check(n_ram > 0 && n_ee > 0 && n_prom > 0 && n_none > 0, "all decode classes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
