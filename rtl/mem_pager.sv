// mem_pager: maps the processor's 64 KB address space onto physical memory.
//
// Data cycles: the address space is four 16 KB segments (cpu_addr[15:14]).
// Each segment has a page register holding the 8-bit number of the 16 KB
// physical block it shows (see dcb_pkg for the block numbering), so any 16 KB
// block of RAM, EEPROM or PROM can appear in any segment.
// Instruction fetches (cpu_inst high) use the first page register for the
// whole 64 KB: the fetch address is {page0[7:2], cpu_addr[15:0]}, i.e. the
// 64 KB-aligned physical region that contains the block page 0 selects.
// Reset sets page 0 to the boot PROM (block FFH) and turns the PROM power on,
// so the reset vector at 2080H is fetched from the PROM.
// Accesses inside the I/O register window (1E00H-1E7FH) raise io_sel_o; the
// memory decoder then selects no memory, masking whatever page 0 maps there.
//
// Registers are written with a one-cycle write strobe from the register file;
// the mapping itself is combinational. Four segments, 16 KB pages, the 64 KB
// fetch page and the reset state follow the document; the block numbering,
// the aligned fetch region and the window address are this design's choices.
module mem_pager
  import dcb_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // register write port
  input  logic              pg_we,
  input  logic [1:0]        pg_idx,
  input  logic [BLK_W-1:0]  pg_wdata,
  input  logic              prom_we,
  input  logic              prom_wdata,
  output logic [BLK_W-1:0]  page_o [4],
  output logic              prom_on_o,
  // processor cycle
  input  logic [15:0]       cpu_addr,
  input  logic              cpu_inst,
  output logic [PA_W-1:0]   phys_o,
  output logic              io_sel_o
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      page_o[0] <= PROM_BLOCK;
      page_o[1] <= '0;
      page_o[2] <= '0;
      page_o[3] <= '0;
      prom_on_o <= 1'b1;
    end else begin
      if (pg_we)   page_o[pg_idx] <= pg_wdata;
      if (prom_we) prom_on_o      <= prom_wdata;
    end
  end

  always_comb begin
    if (cpu_inst) phys_o = {page_o[0][BLK_W-1:2], cpu_addr};
    else          phys_o = {page_o[cpu_addr[15:14]], cpu_addr[13:0]};
    io_sel_o = ((cpu_addr & IO_MASK) == IO_BASE);
  end
endmodule
