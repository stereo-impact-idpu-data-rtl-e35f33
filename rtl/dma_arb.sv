// dma_arb: DMA arbiter and transfer engine of the DCB FPGA.
//
// The serial-interface DMA channels and the 1553 chip move data to and from
// RAM on the processor's own memory bus. When any of them asks, the arbiter
// raises HOLD to the processor and waits for HLDA (hold acknowledge); the
// processor has then floated its address, data and control lines. The
// arbiter then serves requests one after another, highest priority first:
//   1. the 1553 chip (b_dmar_i): granted the bus with b_dmag_o, it runs its
//      own transfers and keeps the grant until it drops its request;
//   2. the telemetry channels 0..N_CH-2 (writes), lowest index first;
//   3. the command channel, index N_CH-1 (reads).
// A serial-interface transfer is a memory cycle of MEM_CYC crystal clocks
// with mem_rd_o or mem_wr_o held high; read data is sampled in its last
// clock. The cycle after the transfer acknowledges it (ack_o one-hot, with
// rdata_o valid), and the next request is taken one cycle later, so a
// requester may keep `req` high for back-to-back transfers. When nothing is
// left the arbiter drops HOLD and waits for HLDA to fall before it may ask
// again. master_o tells the memory decoder who drives the bus.
// HOLD/HLDA use, "one or more transfers then release" and arbitration
// between the 1553 chip and the serial interfaces follow the document; the
// priority order and the cycle length are this design's choices.
module dma_arb
  import dcb_pkg::*;
#(
  parameter int unsigned N_CH    = 6,   // 5 telemetry + 1 command
  parameter int unsigned MEM_CYC = 3    // crystal clocks per memory cycle
) (
  input  logic             clk,
  input  logic             rst_n,
  // processor hold
  output logic             hold_o,
  input  logic             hlda_i,
  // 1553 chip
  input  logic             b_dmar_i,
  output logic             b_dmag_o,
  // serial-interface requesters
  input  dma_req_t         req_i [N_CH],
  output logic [N_CH-1:0]  ack_o,
  output logic [15:0]      rdata_o,
  // memory bus
  output bus_master_e      master_o,
  output logic [PA_W-1:0]  addr_o,
  output logic             mem_rd_o,
  output logic             mem_wr_o,
  output logic [15:0]      wdata_o,
  input  logic [15:0]      mem_rdata_i
);
  typedef enum logic [2:0] {A_IDLE, A_HOLD, A_ARB, A_XFER, A_ACK, A_1553, A_REL} astate_e;

  astate_e state;
  logic [$clog2(N_CH)-1:0] sel;
  logic [$clog2(MEM_CYC+1)-1:0] cnt;
  logic [N_CH-1:0] reqs;
  logic            any_req;
  logic [$clog2(N_CH)-1:0] first;

  always_comb begin
    for (int i = 0; i < N_CH; i++) reqs[i] = req_i[i].req;
    any_req = |reqs;
    first   = '0;
    for (int i = N_CH - 1; i >= 0; i--) if (reqs[i]) first = i[$clog2(N_CH)-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= A_IDLE;
      sel      <= '0;
      cnt      <= '0;
      hold_o   <= 1'b0;
      b_dmag_o <= 1'b0;
      rdata_o  <= '0;
      addr_o   <= '0;
      wdata_o  <= '0;
      mem_rd_o <= 1'b0;
      mem_wr_o <= 1'b0;
    end else begin
      unique case (state)
        A_IDLE: if (b_dmar_i || any_req) begin
          hold_o <= 1'b1;
          state  <= A_HOLD;
        end
        A_HOLD: if (hlda_i) state <= A_ARB;
        A_ARB: begin
          if (b_dmar_i) begin
            b_dmag_o <= 1'b1;
            state    <= A_1553;
          end else if (any_req) begin
            sel      <= first;
            addr_o   <= req_i[first].addr;
            wdata_o  <= req_i[first].wdata;
            mem_wr_o <= req_i[first].we;
            mem_rd_o <= !req_i[first].we;
            cnt      <= '0;
            state    <= A_XFER;
          end else begin
            hold_o <= 1'b0;
            state  <= A_REL;
          end
        end
        A_XFER: begin
          cnt <= cnt + 1'b1;
          if (cnt == $bits(cnt)'(MEM_CYC - 1)) begin
            rdata_o  <= mem_rdata_i;
            mem_rd_o <= 1'b0;
            mem_wr_o <= 1'b0;
            state    <= A_ACK;
          end
        end
        A_ACK: state <= A_ARB;
        A_1553: if (!b_dmar_i) begin
          b_dmag_o <= 1'b0;
          state    <= A_ARB;
        end
        A_REL: if (!hlda_i) state <= A_IDLE;
        default: state <= A_IDLE;
      endcase
    end
  end

  always_comb begin
    ack_o = '0;
    if (state == A_ACK) ack_o[sel] = 1'b1;
    unique case (state)
      A_XFER, A_ACK: master_o = M_DMA;
      A_1553:        master_o = M_1553;
      default:       master_o = M_CPU;
    endcase
  end

  // the bus is only taken while the processor has granted it
  a_hold_before_xfer: assert property (@(posedge clk) disable iff (!rst_n)
                                       (mem_rd_o || mem_wr_o || b_dmag_o) |-> hlda_i);
endmodule
