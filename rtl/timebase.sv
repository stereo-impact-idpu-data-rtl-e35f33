// timebase: the IDPU clock and time counters.
//
// On every 1 MHz enable tick (us_tick) a 20-bit microsecond counter advances
// and wraps after US_PER_SEC counts. Its wrap is the 1 Hz synchronization tic
// (tic_o, one crystal cycle), which also advances a 16-bit seconds counter.
// Both counters can be read by the processor, and the seconds counter feeds
// the time command sent to the instruments.
//
// time_cmd_i is the 1553 "1 Hz time" event. It is not synchronous to the FPGA
// clock, so it passes a two-flop synchronizer; on its rising edge the current
// microsecond and seconds counts are copied into the latch registers.
// Counter widths, the 1 Hz tic and the latch follow the document; the
// synchronizer and edge detection are this design's choices.
// The 1 MHz count just before the tic is US_PER_SEC-1; tic_o is high in the
// same cycle that usec_o returns to 0 and sec_o increments.
module timebase #(
  parameter int unsigned US_PER_SEC = 1_000_000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        us_tick,      // 1 MHz enable
  input  logic        time_cmd_i,   // asynchronous 1553 time command strobe
  output logic [19:0] usec_o,
  output logic [15:0] sec_o,
  output logic        tic_o,
  output logic [19:0] lat_usec_o,
  output logic [15:0] lat_sec_o,
  output logic        lat_evt_o     // one cycle when a latch was taken
);
  logic [2:0] sync;
  logic       wrap;

  assign wrap = us_tick && (usec_o == 20'(US_PER_SEC - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      usec_o     <= '0;
      sec_o      <= '0;
      tic_o      <= 1'b0;
      sync       <= '0;
      lat_usec_o <= '0;
      lat_sec_o  <= '0;
      lat_evt_o  <= 1'b0;
    end else begin
      tic_o <= 1'b0;
      if (us_tick) begin
        if (wrap) begin
          usec_o <= '0;
          sec_o  <= sec_o + 1'b1;
          tic_o  <= 1'b1;
        end else begin
          usec_o <= usec_o + 1'b1;
        end
      end
      sync      <= {sync[1:0], time_cmd_i};
      lat_evt_o <= 1'b0;
      if (sync[1] && !sync[2]) begin
        lat_usec_o <= usec_o;
        lat_sec_o  <= sec_o;
        lat_evt_o  <= 1'b1;
      end
    end
  end

  initial assert (US_PER_SEC >= 2 && US_PER_SEC <= (1 << 20))
    else $error("timebase: US_PER_SEC out of range");
endmodule
