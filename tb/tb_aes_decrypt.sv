// tb_aes_decrypt: checks the iterative inverse cipher against the FIPS-197 example vectors and the
// reference model on random keys and blocks, and checks that the result arrives 11 clocks
// after the start. The testbench plays the round-key RAM: it answers round_key_addr with the
// reference model's round key in the same cycle.
module tb_aes_decrypt;
  import aes_ref_pkg::*;

  logic clk = 0, rst_n = 1;
  logic start = 0;
  logic [127:0] pt, rkey, ct;
  logic [3:0] addr;
  logic done, busy;
  int checks = 0, failures = 0;
  aes_model m;

  always #5 clk = ~clk;

  aes_decrypt dut (
    .clk, .rst_n, .y_start_dec(start), .ciphertext_in(pt), .round_key_in(rkey),
    .round_key_addr(addr), .plaintext_out(ct), .x_end_dec(done), .busy
  );

  always_comb rkey = (m != null && addr < 11) ? m.rk[addr] : '0;

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic run(logic [127:0] key, logic [127:0] p, logic [127:0] exp);
    int cyc;
    m.set_key(key);
    pt = p;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    pt = $urandom;  // the module must have captured its input
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    check("plaintext", ct, exp);
    check("latency", 128'(cyc), 128'd11);
  endtask

  initial begin
    logic [127:0] k, p;
    m = new();
    pt = '0;
    // the reference model against FIPS-197 Appendix C.1
    m.set_key(128'h000102030405060708090a0b0c0d0e0f);
    check("model C.1", m.decrypt(128'h69c4e0d86a7b0430d8cdb78070b4c55a),
          128'h00112233445566778899aabbccddeeff);
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h69c4e0d86a7b0430d8cdb78070b4c55a,
        128'h00112233445566778899aabbccddeeff);
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3925841d02dc09fbdc118597196a0b32,
        128'h3243f6a8885a308d313198a2e0370734);
    for (int i = 0; i < 30; i++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom, $urandom, $urandom};
      m.set_key(k);
      run(k, p, m.decrypt(p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
