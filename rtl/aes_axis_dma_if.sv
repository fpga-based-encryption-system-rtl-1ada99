// aes_axis_dma_if: the FIFO/DMA stream interface of the AES IP block.
//
// The processor's DMA engine streams the data as 32-bit AXI4-Stream words. This block takes
// four words (one 16-byte AES state; the first word becomes state bits [127:96], i.e. state
// bytes 0..3 with byte 0 in bits [31:24]), starts the core on it, waits for the core's done
// flag, sends the four result words back in the same order with TLAST on the fourth, and
// then clears the core's state machine, which the core requires after every state. One word
// moves per clock in each direction, so reading or sending a state takes four clocks.
// s_axis_tready is low from the fourth input word until the result has been sent and the
// core cleared: a whole state is finished before the next one is accepted. The start is held
// back while the core has no key, is busy, or a key load is being issued.
// The 32-bit width, the 4-clock transfer, the ready control and the reset after every state
// follow the source; word and byte order and the TLAST framing are this design's choices.
module aes_axis_dma_if
  import aes_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // AXI4-Stream slave (from the DMA, memory-to-stream)
  input  logic [31:0] s_axis_tdata,
  input  logic        s_axis_tvalid,
  output logic        s_axis_tready,
  // AXI4-Stream master (to the DMA, stream-to-memory)
  output logic [31:0] m_axis_tdata,
  output logic        m_axis_tvalid,
  input  logic        m_axis_tready,
  output logic        m_axis_tlast,
  // to / from the core
  output block_t      blk_in,
  output logic        core_start,
  output logic        core_clear,
  input  logic        core_done,
  input  logic        core_key_ready,
  input  logic        core_busy,
  input  logic        key_load,
  input  block_t      blk_out
);
  typedef enum logic [2:0] {S_RX, S_START, S_WAIT, S_TX, S_CLEAR} state_e;

  state_e     state;
  logic [1:0] cnt;
  block_t     obuf;

  assign s_axis_tready = (state == S_RX);
  assign m_axis_tvalid = (state == S_TX);
  assign m_axis_tdata  = obuf[127:96];
  assign m_axis_tlast  = (state == S_TX) && (cnt == 2'd3);
  assign core_start    = (state == S_START) && core_key_ready && !core_busy && !key_load;
  assign core_clear    = (state == S_CLEAR);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_RX;
      cnt    <= '0;
      blk_in <= '0;
      obuf   <= '0;
    end else begin
      unique case (state)
        S_RX: if (s_axis_tvalid) begin
          blk_in <= {blk_in[95:0], s_axis_tdata};
          cnt    <= cnt + 1'b1;
          if (cnt == 2'd3) state <= S_START;
        end
        S_START: if (core_start) state <= S_WAIT;
        S_WAIT: if (core_done) begin
          obuf  <= blk_out;
          state <= S_TX;
        end
        S_TX: if (m_axis_tready) begin
          obuf <= {obuf[95:0], 32'h0};
          cnt  <= cnt + 1'b1;
          if (cnt == 2'd3) state <= S_CLEAR;
        end
        S_CLEAR: state <= S_RX;
        default: state <= S_RX;
      endcase
    end
  end

  // AXI4-Stream rule: data and last hold while valid waits for ready
  a_m_stable: assert property (@(posedge clk) disable iff (!rst_n)
    m_axis_tvalid && !m_axis_tready |=> m_axis_tvalid && $stable(m_axis_tdata) && $stable(m_axis_tlast));
endmodule
