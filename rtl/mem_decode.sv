// mem_decode: memory bus master selection and chip-select decoding.
//
// Three masters share the board's memory bus: the processor (through the
// page mapping of mem_pager), the FPGA's own DMA engine for the serial
// instrument interfaces, and the 1553 chip with its built-in DMA. The DMA
// arbiter says which one owns the bus (master_i); this block routes that
// master's physical address, strobes and write data to the memories and
// decodes the 8-bit block number (top of the 22-bit physical address):
//   00-BF  RAM, bank = block[7:6] (ram_cs_o[2:0], 1 MB = two 512Kx8 each)
//   C0-CF  EEPROM (eeprom_cs_o)
//   FC-FF  boot PROM (prom_cs_o), only while its power is on
// A processor cycle in the I/O register window selects no memory.
// The 1553 chip addresses 64K 16-bit words; its accesses land in a 128 KB
// RAM window whose base block is win1553_i (low 3 bits ignored), the
// "programmable part of the DCB RAM" the 1553 chip transfers into.
// bus16_o tells the processor the width of the selected memory: low only for
// the byte-wide PROM. Purely combinational.
// The memory sizes, chip counts and PROM power switch follow the document;
// the block map and the 1553 window layout are this design's choices.
module mem_decode
  import dcb_pkg::*;
(
  input  bus_master_e      master_i,
  input  logic             prom_on_i,
  // processor
  input  logic [PA_W-1:0]  cpu_phys_i,
  input  logic             cpu_io_i,
  input  logic             cpu_rd_i,
  input  logic             cpu_wr_i,
  input  logic [15:0]      cpu_wdata_i,
  // serial-interface DMA
  input  logic [PA_W-1:0]  dma_addr_i,
  input  logic             dma_rd_i,
  input  logic             dma_wr_i,
  input  logic [15:0]      dma_wdata_i,
  // 1553 chip
  input  logic [BLK_W-1:0] win1553_i,
  input  logic [15:0]      b_addr_i,
  input  logic             b_rd_i,
  input  logic             b_wr_i,
  input  logic [15:0]      b_wdata_i,
  // memory bus
  output logic [PA_W-1:0]  mem_addr_o,
  output logic             mem_rd_o,
  output logic             mem_wr_o,
  output logic [15:0]      mem_wdata_o,
  output logic [2:0]       ram_cs_o,
  output logic             eeprom_cs_o,
  output logic             prom_cs_o,
  output logic             bus16_o
);
  logic [BLK_W-1:0] blk;
  logic             active;

  always_comb begin
    unique case (master_i)
      M_DMA: begin
        mem_addr_o  = dma_addr_i;
        mem_rd_o    = dma_rd_i;
        mem_wr_o    = dma_wr_i;
        mem_wdata_o = dma_wdata_i;
        active      = 1'b1;
      end
      M_1553: begin
        mem_addr_o  = {win1553_i[BLK_W-1:3], b_addr_i, 1'b0};
        mem_rd_o    = b_rd_i;
        mem_wr_o    = b_wr_i;
        mem_wdata_o = b_wdata_i;
        active      = 1'b1;
      end
      default: begin
        mem_addr_o  = cpu_phys_i;
        mem_rd_o    = cpu_rd_i && !cpu_io_i;
        mem_wr_o    = cpu_wr_i && !cpu_io_i;
        mem_wdata_o = cpu_wdata_i;
        active      = !cpu_io_i;
      end
    endcase

    blk         = mem_addr_o[PA_W-1 -: BLK_W];
    ram_cs_o    = '0;
    eeprom_cs_o = 1'b0;
    prom_cs_o   = 1'b0;
    if (active) begin
      if (blk <= RAM_LAST)                 ram_cs_o[blk[7:6]] = 1'b1;
      else if (blk[7:4] == EEPROM_HI)      eeprom_cs_o        = 1'b1;
      else if (blk[7:2] == PROM_HI)        prom_cs_o          = prom_on_i;
    end
    bus16_o = !prom_cs_o;
  end
endmodule
