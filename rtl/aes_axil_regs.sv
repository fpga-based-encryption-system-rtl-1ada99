// aes_axil_regs: the register interface of the AES IP block, an AXI4-Lite slave used by the
// processor to set the cipher key and the mode and to read the core's status.
//
// Register map (byte addresses, 32-bit registers):
//   0x00 CTRL    bit 0 MODE (read/write, 0 encrypt, 1 decrypt);
//                bit 1 KEY_LOAD (write 1: expand the key held in KEY0..KEY3; reads 0)
//   0x04 STATUS  read only: the core's 32-bit control output (done, key ready, busy, mode)
//   0x10 KEY0    key bits [127:96] (first four key bytes, first byte in bits [31:24])
//   0x14 KEY1    key bits [95:64]
//   0x18 KEY2    key bits [63:32]
//   0x1C KEY3    key bits [31:0]
// Other addresses read 0 and ignore writes. A write is accepted in the cycle in which both
// AWVALID and WVALID are high and no response is pending; the response (OKAY) follows one
// clock later and is held until BREADY. A read is answered one clock after ARVALID. Byte
// strobes are honoured on KEY0..KEY3 and CTRL. The source states that this interface sets the
// key and the mode; the map and the handshake timing are this design's own.
module aes_axil_regs #(
  parameter int unsigned ADDR_W = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  // AXI4-Lite slave
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
  // to / from the core
  output logic [127:0]      key,
  output logic              mode,
  output logic              key_load,   // one-clock pulse
  input  logic [31:0]       status
);
  localparam logic [ADDR_W-1:0] A_CTRL   = ADDR_W'('h00);
  localparam logic [ADDR_W-1:0] A_STATUS = ADDR_W'('h04);
  localparam logic [ADDR_W-1:0] A_KEY0   = ADDR_W'('h10);

  logic wr_fire;
  logic [ADDR_W-1:0] wa, ra;

  assign wr_fire        = s_axil_awvalid && s_axil_wvalid && !s_axil_bvalid;
  assign s_axil_awready = wr_fire;
  assign s_axil_wready  = wr_fire;
  assign s_axil_bresp   = 2'b00;
  assign s_axil_rresp   = 2'b00;
  assign s_axil_arready = !s_axil_rvalid;
  assign wa             = {s_axil_awaddr[ADDR_W-1:2], 2'b00};
  assign ra             = {s_axil_araddr[ADDR_W-1:2], 2'b00};

  function automatic logic [31:0] apply_strb(logic [31:0] old, logic [31:0] d, logic [3:0] s);
    logic [31:0] r;
    for (int b = 0; b < 4; b++) r[8*b +: 8] = s[b] ? d[8*b +: 8] : old[8*b +: 8];
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key           <= '0;
      mode          <= 1'b0;
      key_load      <= 1'b0;
      s_axil_bvalid <= 1'b0;
    end else begin
      key_load <= 1'b0;
      if (s_axil_bvalid && s_axil_bready) s_axil_bvalid <= 1'b0;
      if (wr_fire) begin
        s_axil_bvalid <= 1'b1;
        if (wa == A_CTRL && s_axil_wstrb[0]) begin
          mode     <= s_axil_wdata[0];
          key_load <= s_axil_wdata[1];
        end
        for (int i = 0; i < 4; i++)
          if (wa == A_KEY0 + ADDR_W'(4*i))
            key[127 - 32*i -: 32] <= apply_strb(key[127 - 32*i -: 32], s_axil_wdata, s_axil_wstrb);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_axil_rvalid <= 1'b0;
      s_axil_rdata  <= '0;
    end else begin
      if (s_axil_rvalid && s_axil_rready) s_axil_rvalid <= 1'b0;
      if (s_axil_arvalid && s_axil_arready) begin
        s_axil_rvalid <= 1'b1;
        s_axil_rdata  <= '0;
        if (ra == A_CTRL)   s_axil_rdata <= {31'b0, mode};
        if (ra == A_STATUS) s_axil_rdata <= status;
        for (int i = 0; i < 4; i++)
          if (ra == A_KEY0 + ADDR_W'(4*i)) s_axil_rdata <= key[127 - 32*i -: 32];
      end
    end
  end

  // AXI4-Lite rule: a raised valid stays up until its ready
  a_bvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axil_bvalid && !s_axil_bready |=> s_axil_bvalid);
  a_rvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axil_rvalid && !s_axil_rready |=> s_axil_rvalid && $stable(s_axil_rdata));
endmodule
