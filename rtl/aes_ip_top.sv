// aes_ip_top: the AES IP block as the processor sees it: an AES-128 core behind a register
// interface (AXI4-Lite, key and mode) and a FIFO/DMA stream interface (AXI4-Stream, 32-bit
// data in and out).
//
// Use: write the key to KEY0..KEY3, write CTRL with KEY_LOAD set (and MODE), wait for
// STATUS.key_ready (about 12 clocks), then stream the data in 16-byte states of four words.
// Each state comes back as four words, the last with TLAST, about 22 clocks after its first
// word went in when neither side stalls. Changing MODE between states switches between
// encryption and decryption without reloading the key. A chaining mode such as CBC is not
// done here: the XOR with the previous block is left to software, as in the source.
// The core's d_in carries the key while a key load is issued and the stream block otherwise;
// the core's ctrl_in is assembled from the two interfaces (bit map in aes_pkg).
module aes_ip_top
  import aes_pkg::*;
#(
  parameter int unsigned ADDR_W = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  // register interface (AXI4-Lite slave)
  input  logic [ADDR_W-1:0] s_axil_awaddr,
  input  logic              s_axil_awvalid,
  output logic              s_axil_awready,
  input  logic [31:0]       s_axil_wdata,
  input  logic [3:0]        s_axil_wstrb,
  input  logic              s_axil_wvalid,
  output logic              s_axil_wready,
  output logic [1:0]        s_axil_bresp,
  output logic              s_axil_bvalid,
  input  logic              s_axil_bready,
  input  logic [ADDR_W-1:0] s_axil_araddr,
  input  logic              s_axil_arvalid,
  output logic              s_axil_arready,
  output logic [31:0]       s_axil_rdata,
  output logic [1:0]        s_axil_rresp,
  output logic              s_axil_rvalid,
  input  logic              s_axil_rready,
  // stream interface (AXI4-Stream slave and master)
  input  logic [31:0]       s_axis_tdata,
  input  logic              s_axis_tvalid,
  output logic              s_axis_tready,
  output logic [31:0]       m_axis_tdata,
  output logic              m_axis_tvalid,
  input  logic              m_axis_tready,
  output logic              m_axis_tlast
);
  block_t      key, blk_in, d_in, d_out;
  logic        mode, key_load, core_start, core_clear;
  logic [31:0] ctrl_in, ctrl_out;

  aes_axil_regs #(.ADDR_W(ADDR_W)) u_regs (
    .clk, .rst_n,
    .s_axil_awaddr, .s_axil_awvalid, .s_axil_awready,
    .s_axil_wdata, .s_axil_wstrb, .s_axil_wvalid, .s_axil_wready,
    .s_axil_bresp, .s_axil_bvalid, .s_axil_bready,
    .s_axil_araddr, .s_axil_arvalid, .s_axil_arready,
    .s_axil_rdata, .s_axil_rresp, .s_axil_rvalid, .s_axil_rready,
    .key, .mode, .key_load,
    .status (ctrl_out)
  );

  aes_axis_dma_if u_dma_if (
    .clk, .rst_n,
    .s_axis_tdata, .s_axis_tvalid, .s_axis_tready,
    .m_axis_tdata, .m_axis_tvalid, .m_axis_tready, .m_axis_tlast,
    .blk_in,
    .core_start, .core_clear,
    .core_done      (ctrl_out[STAT_DONE]),
    .core_key_ready (ctrl_out[STAT_KEY_READY]),
    .core_busy      (ctrl_out[STAT_BUSY]),
    .key_load,
    .blk_out        (d_out)
  );

  always_comb begin
    ctrl_in                 = '0;
    ctrl_in[CTRL_KEY_START] = key_load;
    ctrl_in[CTRL_START]     = core_start;
    ctrl_in[CTRL_MODE]      = mode;
    ctrl_in[CTRL_CLEAR]     = core_clear;
  end

  assign d_in = key_load ? key : blk_in;

  aes_core u_core (
    .clk, .rst_n,
    .d_in, .ctrl_in,
    .d_out, .ctrl_out
  );
endmodule
