// int_ctrl: processor interrupt sources of the DCB FPGA.
//
// Timing interrupt. A programmable-rate interrupt of 256, 128, 64 or 32 Hz
// (rate_sel 0..3), locked to the 1 Hz sampling tic. A phase accumulator adds
// the selected rate on every 1 MHz tick and fires when it passes US_PER_SEC,
// so the interrupts fall at the microsecond counts ceil(k*US_PER_SEC/rate):
// exactly `rate` per second with no drift even though 1e6/256 is not an
// integer. When the microsecond counter wraps (the 1 Hz tic) the accumulator
// is cleared and an interrupt is issued, so every second starts in phase with
// the tic, also after a rate change. timer_int_o is a pulse one microsecond
// wide (until the next 1 MHz tick); it is gated by timer_en.
//
// 1553 interrupts. The interrupt outputs of the 1553 chip are synchronized to
// the FPGA clock and ORed into the single level int1553_o.
//
// The rates, the tic synchronization and the OR follow the document; the
// accumulator method, the pulse width and the number of 1553 interrupt lines
// are this design's choices.
module int_ctrl #(
  parameter int unsigned US_PER_SEC = 1_000_000,
  parameter int unsigned N1553      = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             us_tick,
  input  logic [19:0]      usec_i,      // microsecond count from timebase
  input  logic [1:0]       rate_sel,    // 0:256 1:128 2:64 3:32 Hz
  input  logic             timer_en,
  input  logic [N1553-1:0] b1553_int_i, // asynchronous, active high
  output logic             timer_int_o,
  output logic             int1553_o
);
  logic [20:0] acc, sum;
  logic [8:0]  rate;
  logic [N1553-1:0] s1, s2;

  assign rate = 9'd256 >> rate_sel;
  assign sum  = acc + 21'(rate);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc         <= '0;
      timer_int_o <= 1'b0;
      s1          <= '0;
      s2          <= '0;
      int1553_o   <= 1'b0;
    end else begin
      if (us_tick) begin
        timer_int_o <= 1'b0;
        if (usec_i == 20'(US_PER_SEC - 1)) begin
          acc         <= '0;
          timer_int_o <= timer_en;
        end else if (sum >= 21'(US_PER_SEC)) begin
          acc         <= sum - 21'(US_PER_SEC);
          timer_int_o <= timer_en;
        end else begin
          acc <= sum;
        end
      end
      s1        <= b1553_int_i;
      s2        <= s1;
      int1553_o <= |s2;
    end
  end
endmodule
