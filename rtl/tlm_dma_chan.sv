// tlm_dma_chan: circular-buffer DMA channel of one telemetry interface.
//
// Words from serial_rx are written into a circular buffer in RAM through the
// DMA arbiter, with no handshake towards the instrument. The buffer holds
// 1, 2, 4, ... 128 KB (size code 0..7, i.e. 512 << code 16-bit words) and
// starts at a multiple of its own size: the base is given in KB and its low
// `code` bits are ignored, so a buffer address is a plain OR of base and
// offset. All pointers are word offsets within the buffer.
//   wr_ptr_o   address pointer: where the next word goes
//   end_ptr_o  start of the block being received (end of the last complete one)
//   in_ptr_o   start of the most recent complete block; it jumps forward when
//              the first word of the next block arrives
//   out_ptr_i  written by the processor: the oldest block not yet processed
// A block is complete when the first word of the following block arrives.
// Over-run: if writing a word would make the address pointer catch up with
// the output pointer, the word is not written, ovr_o is set (sticky until
// ovr_clr), the block being received is dropped and the address pointer
// goes back to end_ptr_o; it stays there, discarding words, until the next
// block starts. After enable the channel likewise waits for a block start.
// A two-word queue decouples the serial line from DMA latency; if it ever
// overflows, lost_o is set (sticky until ovr_clr).
// Clearing `enable` resets all pointers to zero and empties the queue.
// The buffer sizes, alignment, the three pointers and the over-run rule
// follow the document; the word queue, the block-completion rule and the
// "full" test (next write address equal to out_ptr) are this design's choices.
module tlm_dma_chan
  import dcb_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // configuration
  input  logic        enable,
  input  logic [2:0]  size_code,
  input  logic [11:0] base_kb,
  input  logic [15:0] out_ptr_i,
  input  logic        ovr_clr,
  // from serial_rx
  input  logic [15:0] word_i,
  input  logic        blk_start_i,
  input  logic        word_valid_i,
  // to DMA arbiter
  output dma_req_t    dma_o,
  input  logic        dma_ack_i,
  // status
  output logic [15:0] wr_ptr_o,
  output logic [15:0] end_ptr_o,
  output logic [15:0] in_ptr_o,
  output logic        ovr_o,
  output logic        lost_o,
  output logic        blk_evt_o     // one cycle when a block completes
);
  // two-entry word queue
  logic [16:0] q [2];
  logic [1:0]  q_cnt;
  logic        q_pop;
  logic        discard;     // waiting for next block start
  logic        pend;        // DMA write outstanding
  logic [15:0] mask, wr_next;
  logic [11:0] kb_mask;

  assign mask    = 16'((17'd512 << size_code) - 17'd1);
  assign kb_mask = 12'((13'd1 << size_code) - 13'd1);
  assign wr_next = (wr_ptr_o + 16'd1) & mask;

  // a queued word is handled when no DMA write is outstanding
  assign q_pop = enable && (q_cnt != 0) && !pend;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q[0] <= '0; q[1] <= '0;
      q_cnt     <= '0;
      discard   <= 1'b1;
      pend      <= 1'b0;
      wr_ptr_o  <= '0;
      end_ptr_o <= '0;
      in_ptr_o  <= '0;
      ovr_o     <= 1'b0;
      lost_o    <= 1'b0;
      blk_evt_o <= 1'b0;
      dma_o     <= '0;
    end else if (!enable) begin
      q_cnt     <= '0;
      discard   <= 1'b1;
      pend      <= 1'b0;
      wr_ptr_o  <= '0;
      end_ptr_o <= '0;
      in_ptr_o  <= '0;
      blk_evt_o <= 1'b0;
      dma_o     <= '0;
      if (ovr_clr) begin ovr_o <= 1'b0; lost_o <= 1'b0; end
    end else begin
      blk_evt_o <= 1'b0;
      if (ovr_clr) begin ovr_o <= 1'b0; lost_o <= 1'b0; end

      // finish an outstanding write
      if (pend && dma_ack_i) begin
        pend      <= 1'b0;
        dma_o.req <= 1'b0;
        wr_ptr_o  <= wr_next;
      end

      // handle the word at the head of the queue
      if (q_pop) begin
        logic        bs;
        logic        disc;
        logic [15:0] blk_at;
        bs     = q[0][16];
        disc   = discard;
        blk_at = end_ptr_o;
        if (bs) begin
          if (!discard) begin
            in_ptr_o  <= end_ptr_o;     // previous block is complete
            blk_evt_o <= 1'b1;
            blk_at     = wr_ptr_o;
          end
          end_ptr_o <= blk_at;
          disc       = 1'b0;
        end
        if (!disc) begin
          if (wr_next == out_ptr_i) begin
            ovr_o    <= 1'b1;
            disc      = 1'b1;
            wr_ptr_o <= blk_at;        // drop the block in progress
          end else begin
            pend        <= 1'b1;
            dma_o.req   <= 1'b1;
            dma_o.we    <= 1'b1;
            dma_o.addr  <= {(base_kb & ~kb_mask), 10'b0} | PA_W'({wr_ptr_o & mask, 1'b0});
            dma_o.wdata <= q[0][15:0];
          end
        end
        discard <= disc;
      end

      // queue bookkeeping
      if (q_pop) q[0] <= q[1];
      if (word_valid_i) begin
        if (q_pop) begin
          if (q_cnt == 2'd1) q[0] <= {blk_start_i, word_i};
          else               q[1] <= {blk_start_i, word_i};
        end else if (q_cnt == 2'd0) q[0] <= {blk_start_i, word_i};
        else if (q_cnt == 2'd1)     q[1] <= {blk_start_i, word_i};
        else                        lost_o <= 1'b1;
      end
      q_cnt <= q_cnt + ((word_valid_i && (q_pop || q_cnt != 2'd2)) ? 2'd1 : 2'd0)
                     - (q_pop ? 2'd1 : 2'd0);
    end
  end

  // the arbiter must not acknowledge a channel that is not requesting
  a_ack_has_req: assert property (@(posedge clk) disable iff (!rst_n)
                                  dma_ack_i |-> dma_o.req);
endmodule
