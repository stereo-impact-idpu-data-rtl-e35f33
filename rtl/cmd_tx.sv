// cmd_tx: steerable command serializer.
//
// One shift register serves all five instrument command lines; the steer
// mask chooses which lines carry the command and the rest stay idle (high).
// A command is sent at the 1 MHz bit rate as
//   start bit (0), 24 command bits MSB first, stop bit (1)
// i.e. FRAME_BITS = 26 bit times, after which busy_o drops. A start request
// (start_i while not busy) is taken at once; the start bit goes out at the
// next bit tick. The broadcast time command simply uses an all-ones mask.
// A single shared serializer with steering follows the document; the frame
// format is this design's choice (the serial interface document that defines
// it is not available).
module cmd_tx #(
  parameter int unsigned N_OUT = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             bit_tick,
  input  logic             start_i,
  input  logic [23:0]      word_i,
  input  logic [N_OUT-1:0] steer_i,
  output logic             busy_o,
  output logic [N_OUT-1:0] cmd_o
);
  localparam int unsigned FRAME_BITS = 26;

  logic [25:0]      sh;        // bits still to send, MSB first
  logic [4:0]       left;      // bit times left
  logic [N_OUT-1:0] steer;
  logic             line;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh     <= '1;
      left   <= '0;
      steer  <= '0;
      busy_o <= 1'b0;
      line   <= 1'b1;
    end else begin
      if (start_i && !busy_o) begin
        sh     <= {1'b0, word_i, 1'b1};
        steer  <= steer_i;
        left   <= 5'(FRAME_BITS);
        busy_o <= 1'b1;
      end else if (busy_o && bit_tick) begin
        if (left == 0) begin
          busy_o <= 1'b0;
          line   <= 1'b1;
        end else begin
          line <= sh[25];
          sh   <= {sh[24:0], 1'b1};
          left <= left - 1'b1;
        end
      end
    end
  end

  always_comb
    for (int i = 0; i < N_OUT; i++) cmd_o[i] = steer[i] ? line : 1'b1;
endmodule
