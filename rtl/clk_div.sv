// clk_div: divides the crystal clock by DIV.
//
// The board derives its slower clocks (processor clock, 1 MHz serial clock)
// from one crystal. This divider keeps a modulo-DIV counter and gives two
// views of the divided clock:
//   clk_o  - a registered square wave, high for the first DIV/2 (rounded
//            down) input cycles of each period, to leave the chip as a clock;
//   tick_o - a one-input-cycle pulse at the start of each period, used as a
//            clock enable by the logic inside the FPGA, which all runs on
//            the crystal clock.
// The document lists the divided clocks; a synchronous divider with an enable
// tick (rather than ripple counters) is this design's choice. The period
// starts on the first cycle after reset.
module clk_div #(
  parameter int unsigned DIV = 24       // 24 MHz / 24 = 1 MHz
) (
  input  logic clk,
  input  logic rst_n,
  output logic clk_o,
  output logic tick_o
);
  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;
  localparam int unsigned HI = (DIV > 1) ? DIV / 2 : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      clk_o  <= 1'b0;
      tick_o <= 1'b0;
    end else begin
      if (cnt == CW'(DIV - 1)) cnt <= '0;
      else                     cnt <= cnt + 1'b1;
      tick_o <= (cnt == '0);
      clk_o  <= (cnt < CW'(HI));
    end
  end

  initial assert (DIV >= 2) else $error("clk_div: DIV must be at least 2");
endmodule
