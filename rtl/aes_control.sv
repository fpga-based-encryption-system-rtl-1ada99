// aes_control: the control unit of the AES core, a four-state machine.
//
// IDLE    waits for a command from ctrl_in. A key-start pulse launches the key expansion
//         (y_start_exp) and moves to EXPAND; a start pulse, once a key has been expanded,
//         latches the mode and launches the encryption or the decryption module.
// EXPAND  waits for x_end_exp, then flags the key as ready and returns to IDLE.
// RUN     waits for the end pulse of the selected module; that pulse is passed on as y_end,
//         the clock enable of the result register, and the machine moves to DONE.
// DONE    raises y_done and holds until a clear pulse returns it to IDLE: as in the source,
//         the block must be reset after every 16-byte state before the next one is accepted.
//         The clear does not erase the round keys.
// mux_ctrl selects which module addresses the round-key RAM and which result reaches the
// result register; in IDLE it follows the mode input so that the module being started reads
// its first round key in the start cycle. The source names the control signals (Fig. 2) and
// the need to reset after each state; the states and their order are this design's reading.
module aes_control
  import aes_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  // decoded command fields of ctrl_in
  input  logic x_key_start,
  input  logic x_start,
  input  logic x_mode,
  input  logic x_clear,
  // handshakes with the datapath
  output logic y_start_exp,
  input  logic x_end_exp,
  output logic y_start_enc,
  input  logic x_end_enc,
  output logic y_start_dec,
  input  logic x_end_dec,
  output logic mux_ctrl,
  output logic y_end,
  // status
  output logic y_done,
  output logic key_ready,
  output logic busy
);
  typedef enum logic [1:0] {S_IDLE, S_EXPAND, S_RUN, S_DONE} state_e;

  state_e state, state_nx;
  mode_e  mode_r;
  logic   key_ready_nx;
  mode_e  mode_nx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      mode_r    <= MODE_ENC;
      key_ready <= 1'b0;
    end else begin
      state     <= state_nx;
      mode_r    <= mode_nx;
      key_ready <= key_ready_nx;
    end
  end

  always_comb begin
    state_nx     = state;
    mode_nx      = mode_r;
    key_ready_nx = key_ready;
    y_start_exp  = 1'b0;
    y_start_enc  = 1'b0;
    y_start_dec  = 1'b0;
    y_end        = 1'b0;
    mux_ctrl     = mode_r;
    unique case (state)
      S_IDLE: begin
        mux_ctrl = x_mode;
        if (x_key_start) begin
          y_start_exp  = 1'b1;
          key_ready_nx = 1'b0;
          state_nx     = S_EXPAND;
        end else if (x_start && key_ready) begin
          mode_nx     = mode_e'(x_mode);
          y_start_enc = (x_mode == MODE_ENC);
          y_start_dec = (x_mode == MODE_DEC);
          state_nx    = S_RUN;
        end
      end
      S_EXPAND: begin
        if (x_end_exp) begin
          key_ready_nx = 1'b1;
          state_nx     = S_IDLE;
        end
      end
      S_RUN: begin
        y_end = (mode_r == MODE_DEC) ? x_end_dec : x_end_enc;
        if (y_end) state_nx = S_DONE;
      end
      S_DONE: begin
        if (x_clear) state_nx = S_IDLE;
      end
      default: state_nx = S_IDLE;
    endcase
  end

  assign y_done = (state == S_DONE);
  assign busy   = (state == S_EXPAND) || (state == S_RUN);
endmodule
