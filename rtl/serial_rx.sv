// serial_rx: telemetry receiver of one serial instrument interface.
//
// The instrument sends telemetry as a bit stream clocked by the IDPU's
// 1 MHz serial clock; the FPGA samples the (asynchronous, so double-flopped)
// data line once per 1 MHz tick. The line idles high. A word is framed as
//   start bit (0), block flag, 16 data bits MSB first
// where the block flag is 1 on the first word of a telemetry block. Words may
// follow each other with no idle bit between them, giving the 1 Mbps
// continuous stream the interface must sustain (18 bit times per word).
// After the last data bit the receiver outputs the word for one crystal
// cycle (word_valid_o) with blk_start_o set for a block's first word.
//
// The line's framing is defined in a separate interface document that is
// not available here; this framing is this design's choice and is the first
// thing to change to match real instruments.
module serial_rx (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bit_tick,     // 1 MHz sampling enable
  input  logic        sdata_i,      // asynchronous serial data in
  output logic [15:0] word_o,
  output logic        blk_start_o,
  output logic        word_valid_o
);
  typedef enum logic [1:0] {S_IDLE, S_FLAG, S_DATA} state_e;

  state_e      state;
  logic [1:0]  sync;
  logic [3:0]  nbit;
  logic [15:0] shreg;
  logic        flag;
  logic        din;

  assign din = sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync         <= 2'b11;
      state        <= S_IDLE;
      nbit         <= '0;
      shreg        <= '0;
      flag         <= 1'b0;
      word_o       <= '0;
      blk_start_o  <= 1'b0;
      word_valid_o <= 1'b0;
    end else begin
      sync         <= {sync[0], sdata_i};
      word_valid_o <= 1'b0;
      if (bit_tick) begin
        unique case (state)
          S_IDLE: if (!din) state <= S_FLAG;
          S_FLAG: begin
            flag  <= din;
            nbit  <= '0;
            state <= S_DATA;
          end
          S_DATA: begin
            shreg <= {shreg[14:0], din};
            nbit  <= nbit + 1'b1;
            if (nbit == 4'd15) begin
              word_o       <= {shreg[14:0], din};
              blk_start_o  <= flag;
              word_valid_o <= 1'b1;
              state        <= S_IDLE;
            end
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end
endmodule
