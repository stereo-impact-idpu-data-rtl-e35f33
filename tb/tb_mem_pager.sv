// tb_mem_pager: checks the reset state (page 0 on the boot PROM, PROM power
// on, reset vector 2080H fetched from the PROM), then writes random page
// registers and compares the physical address of random data and instruction
// cycles with a reference computed here, plus the I/O window detection.
module tb_mem_pager;
  import dcb_pkg::*;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic             pg_we = 0, prom_we = 0, prom_wdata = 0, cpu_inst = 0;
  logic [1:0]       pg_idx = 0;
  logic [7:0]       pg_wdata = 0;
  logic [7:0]       page [4];
  logic             prom_on, io_sel;
  logic [15:0]      cpu_addr = 0;
  logic [21:0]      phys;
  logic [7:0]       model [4];

  mem_pager dut (.clk, .rst_n, .pg_we, .pg_idx, .pg_wdata, .prom_we, .prom_wdata,
    .page_o(page), .prom_on_o(prom_on), .cpu_addr, .cpu_inst, .phys_o(phys), .io_sel_o(io_sel));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [21:0] ref_phys(input logic [15:0] a, input bit inst);
    if (inst) return (22'(model[0] >> 2) << 16) | 22'(a);
    return (22'(model[a >> 14]) << 14) | 22'(a & 16'h3FFF);
  endfunction

  initial begin
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    check(page[0] == 8'hFF && prom_on, "reset: page 0 on PROM, PROM on");
    cpu_addr = 16'h2080; cpu_inst = 1; #1;
    check(phys == 22'h3F2080, $sformatf("reset vector fetch -> %h", phys));
    check(phys[21:16] == 6'h3F, "reset vector lands in PROM blocks");
    cpu_inst = 0; #1;
    check(phys == 22'h3FE080, $sformatf("data read 2080H -> %h", phys));
    model = '{8'hFF, 8'h00, 8'h00, 8'h00};
    for (int it = 0; it < 200; it++) begin
      @(negedge clk);
      pg_we = 1; pg_idx = 2'($urandom_range(0, 3)); pg_wdata = 8'($urandom);
      @(negedge clk);
      pg_we = 0;
      model[pg_idx] = pg_wdata;
      for (int k = 0; k < 5; k++) begin
        cpu_addr = 16'($urandom); cpu_inst = 1'($urandom);
        #1;
        check(phys == ref_phys(cpu_addr, cpu_inst),
              $sformatf("addr %h inst %0b -> %h expected %h", cpu_addr, cpu_inst, phys,
                        ref_phys(cpu_addr, cpu_inst)));
        check(io_sel == (cpu_addr >= 16'h1E00 && cpu_addr <= 16'h1E7F), "io_sel");
      end
    end
    foreach (model[i]) check(page[i] == model[i], "page readback");
    cpu_addr = 16'h1E00; #1; check(io_sel, "io window start");
    cpu_addr = 16'h1E7F; #1; check(io_sel, "io window end");
    cpu_addr = 16'h1E80; #1; check(!io_sel, "above io window");
    cpu_addr = 16'h1DFF; #1; check(!io_sel, "below io window");
    @(negedge clk); prom_we = 1; prom_wdata = 0; @(negedge clk); prom_we = 0;
    check(!prom_on, "PROM powered off");
    @(negedge clk); prom_we = 1; prom_wdata = 1; @(negedge clk); prom_we = 0;
    check(prom_on, "PROM powered on");
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
