// aes_decrypt: iterative AES-128 inverse cipher, one round per clock (the decryption module).
//
// On a y_start_dec pulse the block on ciphertext_in is XORed with round key 10. Each following
// clock applies InvShiftRows, InvSubBytes, AddRoundKey with the round key on round_key_in and
// InvMixColumns, counting the round-key address down from 9 to 0; the last step (key 0) omits
// InvMixColumns. round_key_addr rests at 10 while idle so that the first key is ready at the
// start. x_end_dec pulses one clock after the last step, 11 clocks after the start, with the
// result on plaintext_out. A start while busy is ignored. The round-per-clock structure follows
// the source; the handshake timing is this design's choice.
module aes_decrypt
  import aes_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             y_start_dec,
  input  block_t           ciphertext_in,
  input  block_t           round_key_in,
  output logic [RK_AW-1:0] round_key_addr,
  output block_t           plaintext_out,
  output logic             x_end_dec,
  output logic             busy
);
  block_t           state;
  logic [RK_AW-1:0] round;
  block_t           t;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= '0;
      round     <= RK_AW'(NR);
      busy      <= 1'b0;
      x_end_dec <= 1'b0;
    end else begin
      x_end_dec <= 1'b0;
      if (!busy) begin
        if (y_start_dec) begin
          state <= ciphertext_in ^ round_key_in;
          round <= RK_AW'(NR - 1);
          busy  <= 1'b1;
        end
      end else if (round == '0) begin
        state     <= t;
        round     <= RK_AW'(NR);
        busy      <= 1'b0;
        x_end_dec <= 1'b1;
      end else begin
        state <= inv_mix_columns(t);
        round <= round - 1'b1;
      end
    end
  end

  assign t              = inv_sub_bytes(inv_shift_rows(state)) ^ round_key_in;
  assign round_key_addr = round;
  assign plaintext_out  = state;
endmodule
