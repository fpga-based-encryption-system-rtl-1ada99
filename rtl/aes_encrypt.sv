// aes_encrypt: iterative AES-128 cipher, one round per clock (the encryption module).
//
// On a y_start_enc pulse the block on plaintext_in is XORed with round key 0 (initial
// AddRoundKey). Each following clock applies SubBytes, ShiftRows, MixColumns and AddRoundKey
// with the round key on round_key_in; the tenth round omits MixColumns. round_key_addr is the
// round counter, so the key for round r is read from the round-key RAM during round r (the RAM
// read is combinational). x_end_enc pulses one clock after the tenth round, i.e. 11 clocks after
// the start, with the result on ciphertext_out, which holds until the next start. A start
// while busy is ignored. The round-per-clock structure follows the source; the handshake
// timing is this design's choice.
module aes_encrypt
  import aes_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             y_start_enc,
  input  block_t           plaintext_in,
  input  block_t           round_key_in,
  output logic [RK_AW-1:0] round_key_addr,
  output block_t           ciphertext_out,
  output logic             x_end_enc,
  output logic             busy
);
  block_t           state;
  logic [RK_AW-1:0] round;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= '0;
      round     <= '0;
      busy      <= 1'b0;
      x_end_enc <= 1'b0;
    end else begin
      x_end_enc <= 1'b0;
      if (!busy) begin
        if (y_start_enc) begin
          state <= plaintext_in ^ round_key_in;
          round <= RK_AW'(1);
          busy  <= 1'b1;
        end
      end else if (round == RK_AW'(NR)) begin
        state     <= shift_rows(sub_bytes(state)) ^ round_key_in;
        round     <= '0;
        busy      <= 1'b0;
        x_end_enc <= 1'b1;
      end else begin
        state <= mix_columns(shift_rows(sub_bytes(state))) ^ round_key_in;
        round <= round + 1'b1;
      end
    end
  end

  assign round_key_addr = round;
  assign ciphertext_out = state;
endmodule
