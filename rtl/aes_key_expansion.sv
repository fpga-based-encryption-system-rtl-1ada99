// aes_key_expansion: iterative AES-128 key schedule that fills the round-key RAM.
//
// A pulse on y_start_exp captures key_in (the cipher key). On that clock round key 0, the
// cipher key itself, is written to RAM address 0; on each of the next ten clocks the next
// round key is computed from the previous one (RotWord, SubWord, Rcon and the XOR chain of
// FIPS-197) and written to the following address. x_end_exp pulses for one clock after
// round key 10 has been written, 11 clocks after the start. Rcon is kept in a register and
// advanced by a GF(2^8) doubling, so no Rcon table is needed. A start while busy is ignored.
// The source names the block and its start/end handshake (Fig. 2); the one-round-key-per-clock
// schedule is this design's choice, matching the one-round-per-clock cipher.
module aes_key_expansion
  import aes_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             y_start_exp,
  input  block_t           key_in,
  output logic             x_end_exp,
  output logic             busy,
  // RAM write port
  output logic             rk_we,
  output logic [RK_AW-1:0] rk_waddr,
  output block_t           rk_wdata
);
  block_t           cur_key;
  byte_t            rcon;
  logic [RK_AW-1:0] idx;      // address of the round key written this clock

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      cur_key   <= '0;
      rcon      <= 8'h01;
      idx       <= '0;
      x_end_exp <= 1'b0;
    end else begin
      x_end_exp <= 1'b0;
      if (!busy) begin
        if (y_start_exp) begin
          busy    <= 1'b1;
          cur_key <= key_in;
          rcon    <= 8'h01;
          idx     <= RK_AW'(1);
        end
      end else begin
        cur_key <= next_round_key(cur_key, rcon);
        rcon    <= xtime(rcon);
        if (idx == RK_AW'(NR)) begin
          busy      <= 1'b0;
          idx       <= '0;
          x_end_exp <= 1'b1;
        end else begin
          idx <= idx + 1'b1;
        end
      end
    end
  end

  always_comb begin
    rk_we    = 1'b0;
    rk_waddr = '0;
    rk_wdata = key_in;
    if (!busy) begin
      rk_we = y_start_exp;
    end else begin
      rk_we    = 1'b1;
      rk_waddr = idx;
      rk_wdata = next_round_key(cur_key, rcon);
    end
  end
endmodule
