// dcb_pkg: types and constants shared by the Data Controller Board FPGA.
//
// Physical memory map. The FPGA works with a 22-bit physical byte address
// made of an 8-bit 16 KB block number and a 14-bit offset. The block numbers
// are this design's own encoding of the three memories the board carries:
//   blocks 0x00-0xBF  3 MB RAM (three 1 MB banks of two 512Kx8 SRAMs)
//   blocks 0xC0-0xCF  256 KB EEPROM (two 128Kx8 chips, 16 bits wide)
//   blocks 0xFC-0xFF  8 KB byte-wide boot PROM, repeated through the 64 KB
// Anything else selects no memory and reads as zero.
//
// Processor register window. The processor's I/O registers sit just below
// 2000H (1E00H-1E7FH); memory in segment 0 is masked there.
//
// DMA requests from the serial-interface channels to the arbiter use
// dma_req_t; the arbiter answers with a one-cycle ack and read data.
package dcb_pkg;

  localparam int PA_W   = 22;          // physical byte address width
  localparam int BLK_W  = 8;           // 16 KB block number width
  localparam int N_INST = 5;           // MAG, SEP, SWEA/STE-U, STE-D, PLASTIC

  localparam logic [BLK_W-1:0] PROM_BLOCK   = 8'hFF;  // page 0 after reset
  localparam logic [BLK_W-1:0] RAM_LAST     = 8'hBF;
  localparam logic [3:0]       EEPROM_HI    = 4'hC;   // blocks C0-CF
  localparam logic [5:0]       PROM_HI      = 6'h3F;  // blocks FC-FF

  localparam logic [15:0] IO_BASE = 16'h1E00;
  localparam logic [15:0] IO_MASK = 16'hFF80;         // 128-byte window

  // register offsets inside the window (byte addresses, word registers)
  localparam logic [6:0] R_PAGE0    = 7'h00;
  localparam logic [6:0] R_PAGE1    = 7'h02;
  localparam logic [6:0] R_PAGE2    = 7'h04;
  localparam logic [6:0] R_PAGE3    = 7'h06;
  localparam logic [6:0] R_CTRL     = 7'h08;  // [0] PROM on [2:1] rate [3] timer int en
  localparam logic [6:0] R_USEC_LO  = 7'h0A;
  localparam logic [6:0] R_USEC_HI  = 7'h0C;
  localparam logic [6:0] R_SEC      = 7'h0E;
  localparam logic [6:0] R_LUSEC_LO = 7'h10;
  localparam logic [6:0] R_LUSEC_HI = 7'h12;
  localparam logic [6:0] R_LSEC     = 7'h14;
  localparam logic [6:0] R_WIN1553  = 7'h16;
  localparam logic [6:0] R_CMD_LO   = 7'h18;
  localparam logic [6:0] R_CMD_HI   = 7'h1A;
  localparam logic [6:0] R_CMD_CTRL = 7'h1C;  // write [0]=1 starts, read [0] busy [1] bad prefix
  localparam logic [6:0] R_STATUS   = 7'h1E;  // [4:0] over-run flags, write 1 to clear
  localparam logic [6:0] R_CH0      = 7'h20;  // channel n at 20H + 10H*n
  // channel register offsets
  localparam logic [3:0] C_BASE = 4'h0;       // buffer base in KB (12 bits)
  localparam logic [3:0] C_CFG  = 4'h2;       // [2:0] size code, [3] enable
  localparam logic [3:0] C_OUT  = 4'h4;       // output pointer, word offset
  localparam logic [3:0] C_IN   = 4'h6;       // block-in pointer (read only)
  localparam logic [3:0] C_WR   = 4'h8;       // address pointer (read only)

  // command prefix codes
  localparam logic [7:0] PFX_END      = 8'hFF;
  localparam logic [7:0] TIME_CMD_OPC = 8'hC0;  // opcode byte of time command

  typedef struct packed {
    logic            req;
    logic            we;
    logic [PA_W-1:0] addr;
    logic [15:0]     wdata;
  } dma_req_t;

  typedef enum logic [1:0] {
    M_CPU  = 2'd0,
    M_DMA  = 2'd1,
    M_1553 = 2'd2
  } bus_master_e;

endpackage
