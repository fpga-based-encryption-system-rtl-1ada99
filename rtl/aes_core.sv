// aes_core: the AES-128 IP core, with a 128-bit data input, a 32-bit control input, a 128-bit
// data output and a 32-bit control output.
//
// Inside are the blocks the source draws: a control unit, a key expansion writing an 11-entry
// round-key RAM, an encryption module and a decryption module (each one round per clock), a
// multiplexer that gives the RAM read port to the active module, a multiplexer that picks the
// ciphertext or plaintext result by mode, and a result register loaded by the control unit's
// y_end. d_in carries either the cipher key (with ctrl_in[CTRL_KEY_START]) or a data block
// (with ctrl_in[CTRL_START]); both modules see d_in, and only the one selected by
// ctrl_in[CTRL_MODE] (0 encrypt, 1 decrypt) is started.
//
// Timing: key expansion takes 11 clocks from the key-start pulse until ctrl_out[STAT_KEY_READY]
// rises one clock later. A block started in cycle t is in d_out, with ctrl_out[STAT_DONE] set, from
// cycle t+12 on, and stays there until a ctrl_in[CTRL_CLEAR] pulse; only then is a new start
// accepted. The control bit assignment is listed in aes_pkg and is this design's own.
module aes_core
  import aes_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  block_t      d_in,
  input  logic [31:0] ctrl_in,
  output block_t      d_out,
  output logic [31:0] ctrl_out
);
  logic y_start_exp, x_end_exp, y_start_enc, x_end_enc, y_start_dec, x_end_dec;
  logic mux_ctrl, y_end, y_done, key_ready, busy;
  logic exp_busy, enc_busy, dec_busy;

  logic             rk_we;
  logic [RK_AW-1:0] rk_waddr, rk_raddr, enc_addr, dec_addr;
  block_t           rk_wdata, round_key;
  block_t           ciphertext_out, plaintext_out;
  mode_e            result_mode;

  aes_control u_control (
    .clk, .rst_n,
    .x_key_start (ctrl_in[CTRL_KEY_START]),
    .x_start     (ctrl_in[CTRL_START]),
    .x_mode      (ctrl_in[CTRL_MODE]),
    .x_clear     (ctrl_in[CTRL_CLEAR]),
    .y_start_exp, .x_end_exp,
    .y_start_enc, .x_end_enc,
    .y_start_dec, .x_end_dec,
    .mux_ctrl, .y_end, .y_done, .key_ready, .busy
  );

  aes_key_expansion u_key_expansion (
    .clk, .rst_n,
    .y_start_exp,
    .key_in   (d_in),
    .x_end_exp,
    .busy     (exp_busy),
    .rk_we, .rk_waddr, .rk_wdata
  );

  aes_key_ram u_key_ram (
    .clk,
    .we    (rk_we),
    .waddr (rk_waddr),
    .wdata (rk_wdata),
    .raddr (rk_raddr),
    .rdata (round_key)
  );

  aes_encrypt u_encrypt (
    .clk, .rst_n,
    .y_start_enc,
    .plaintext_in   (d_in),
    .round_key_in   (round_key),
    .round_key_addr (enc_addr),
    .ciphertext_out,
    .x_end_enc,
    .busy           (enc_busy)
  );

  aes_decrypt u_decrypt (
    .clk, .rst_n,
    .y_start_dec,
    .ciphertext_in  (d_in),
    .round_key_in   (round_key),
    .round_key_addr (dec_addr),
    .plaintext_out,
    .x_end_dec,
    .busy           (dec_busy)
  );

  // round_key_addr multiplexer
  assign rk_raddr = mux_ctrl ? dec_addr : enc_addr;

  // output multiplexer and result register (clock enable y_end)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_out       <= '0;
      result_mode <= MODE_ENC;
    end else if (y_end) begin
      d_out       <= mux_ctrl ? plaintext_out : ciphertext_out;
      result_mode <= mode_e'(mux_ctrl);
    end
  end

  always_comb begin
    ctrl_out                 = '0;
    ctrl_out[STAT_DONE]      = y_done;
    ctrl_out[STAT_KEY_READY] = key_ready;
    ctrl_out[STAT_BUSY]      = busy | exp_busy | enc_busy | dec_busy;
    ctrl_out[STAT_MODE]      = result_mode;
  end
endmodule
