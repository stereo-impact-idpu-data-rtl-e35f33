// cmd_seq: command sequencer of the serial instrument interfaces.
//
// Command list. The processor builds a list of 32-bit entries in memory,
// writes its byte address and starts the sequencer. Each entry is two 16-bit
// words read by DMA: the first holds the 8-bit prefix code (bits 15:8) and
// command bits 23:16, the second command bits 15:0. Prefix 0..4 selects the
// instrument (MAG, SEP, SWEA/STE-U, STE-D, PLASTIC) whose line carries the
// 24-bit command; prefix FFH ends the list and the sequencer goes idle. Any
// other prefix is skipped and sets bad_pfx_o (sticky until the next start).
//
// Time command. On every 1 Hz tic the sequencer sends, to all instruments at
// once, the time command {TIME_CMD_OPC, seconds}. To keep that slot clear, a
// list command is not started once the microsecond counter has reached
// US_PER_SEC - GUARD_US; a command started before that has finished (27 bit
// times) when the tic comes. A time command waits only for a command already
// on the line, which the guard makes impossible in normal operation.
//
// Timing: DMA fetches take the arbiter's latency; the serializer is started
// by a one-cycle tx_start_o and reports busy from the following cycle.
// Entry format, end code, broadcast time command and slot guard follow the
// document; the word order, code values and guard length are this design's
// choices.
module cmd_seq
  import dcb_pkg::*;
#(
  parameter int unsigned US_PER_SEC = 1_000_000,
  parameter int unsigned GUARD_US   = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start_i,      // from register write
  input  logic [PA_W-1:0] list_addr_i,
  input  logic            tic_i,
  input  logic [19:0]     usec_i,
  input  logic [15:0]     sec_i,
  // DMA
  output dma_req_t        dma_o,
  input  logic            dma_ack_i,
  input  logic [15:0]     dma_rdata_i,
  // serializer
  input  logic            tx_busy_i,
  output logic            tx_start_o,
  output logic [23:0]     tx_word_o,
  output logic [4:0]      tx_steer_o,
  // status
  output logic            busy_o,
  output logic            bad_pfx_o,
  output logic            time_sent_o   // one cycle per time command
);
  typedef enum logic [2:0] {C_IDLE, C_FETCH0, C_FETCH1, C_READY} cstate_e;

  cstate_e         state;
  logic [PA_W-1:0] addr;
  logic [15:0]     w0;
  logic [23:0]     cmd;
  logic [4:0]      steer;
  logic            time_pend;
  logic            tx_free;
  logic            started;
  logic            in_guard;

  assign tx_free  = !tx_busy_i && !started;
  assign in_guard = (usec_i >= 20'(US_PER_SEC - GUARD_US));
  assign busy_o   = (state != C_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= C_IDLE;
      addr        <= '0;
      w0          <= '0;
      cmd         <= '0;
      steer       <= '0;
      time_pend   <= 1'b0;
      started     <= 1'b0;
      tx_start_o  <= 1'b0;
      tx_word_o   <= '0;
      tx_steer_o  <= '0;
      bad_pfx_o   <= 1'b0;
      time_sent_o <= 1'b0;
      dma_o       <= '0;
    end else begin
      tx_start_o  <= 1'b0;
      time_sent_o <= 1'b0;
      started     <= tx_start_o;
      if (tic_i) time_pend <= 1'b1;

      // serializer: time command first, then the list
      if (tx_free && !tx_start_o) begin
        if (time_pend) begin
          tx_start_o  <= 1'b1;
          tx_word_o   <= {TIME_CMD_OPC, sec_i};
          tx_steer_o  <= '1;
          time_pend   <= 1'b0;
          time_sent_o <= 1'b1;
        end else if (state == C_READY && !in_guard && !tic_i) begin
          tx_start_o <= 1'b1;
          tx_word_o  <= cmd;
          tx_steer_o <= steer;
          state      <= C_FETCH0;
          dma_o      <= '{req: 1'b1, we: 1'b0, addr: addr, wdata: '0};
        end
      end

      unique case (state)
        C_IDLE: if (start_i) begin
          state     <= C_FETCH0;
          addr      <= list_addr_i;
          bad_pfx_o <= 1'b0;
          dma_o     <= '{req: 1'b1, we: 1'b0, addr: list_addr_i, wdata: '0};
        end
        C_FETCH0: if (dma_ack_i) begin
          w0         <= dma_rdata_i;
          state      <= C_FETCH1;
          dma_o.addr <= addr + PA_W'(2);
        end
        C_FETCH1: if (dma_ack_i) begin
          addr      <= addr + PA_W'(4);
          dma_o.req <= 1'b0;
          if (w0[15:8] == PFX_END) begin
            state <= C_IDLE;
          end else if (w0[15:8] < 8'd5) begin
            cmd   <= {w0[7:0], dma_rdata_i};
            steer <= 5'(1) << w0[10:8];
            state <= C_READY;
          end else begin
            bad_pfx_o <= 1'b1;
            state     <= C_FETCH0;
            dma_o     <= '{req: 1'b1, we: 1'b0, addr: addr + PA_W'(4), wdata: '0};
          end
        end
        default: ;
      endcase
    end
  end

  a_no_start_busy: assert property (@(posedge clk) disable iff (!rst_n)
                                    tx_start_o |-> !tx_busy_i);
endmodule
