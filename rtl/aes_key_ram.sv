// aes_key_ram: the round-key RAM next to the key expansion (11 x 128 bits for AES-128).
//
// One synchronous write port, driven by the key expansion, and one asynchronous read port,
// whose address is selected between the encryption and decryption modules by a multiplexer
// in the core. The read is combinational so that a round module sees the key of the address
// it presents in the same cycle, which lets it apply one round per clock; on an FPGA this maps
// to distributed (LUT) RAM. The RAM has no reset: its contents are only read after the key
// expansion has filled them. Depth and the asynchronous read are this design's choices; the
// source only shows a block labelled RAM beside the key expansion.
module aes_key_ram #(
  parameter int unsigned DEPTH = aes_pkg::NUM_RKEYS,
  parameter int unsigned AW    = aes_pkg::RK_AW,
  parameter int unsigned DW    = 128
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we && waddr < AW'(DEPTH)) mem[waddr] <= wdata;

  assign rdata = (raddr < AW'(DEPTH)) ? mem[raddr] : '0;
endmodule
