// tb_aes_core: exercises the AES core through its 128-bit data and 32-bit control ports:
// key loading (FIPS-197 keys and random keys), encryption and decryption of FIPS-197 vectors
// and random blocks against the reference model, key-ready and done latencies (12 clocks
// each), a start ignored before any key, a start ignored in the done state until a clear,
// mode switching without reloading the key, and the status bits of ctrl_out.
module tb_aes_core;
  import aes_ref_pkg::*;
  import aes_pkg::*;

  logic clk = 0, rst_n = 1;
  logic [127:0] d_in = 0, d_out;
  logic [31:0] ctrl_in = 0, ctrl_out;
  int checks = 0, failures = 0;
  aes_model m;

  always #5 clk = ~clk;

  aes_core dut (.clk, .rst_n, .d_in, .ctrl_in, .d_out, .ctrl_out);

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic pulse(int unsigned bitpos, bit mode);
    @(negedge clk);
    ctrl_in = '0;
    ctrl_in[bitpos] = 1'b1;
    ctrl_in[CTRL_MODE] = mode;
    @(negedge clk);
    ctrl_in[bitpos] = 1'b0;
  endtask

  task automatic load_key(logic [127:0] k);
    int cyc;
    d_in = k;
    pulse(CTRL_KEY_START, 0);
    d_in = {$urandom, $urandom, $urandom, $urandom};
    check("busy while expanding", 128'(ctrl_out[STAT_BUSY]), 128'd1);
    cyc = 1;
    while (!ctrl_out[STAT_KEY_READY] && cyc < 100) begin
      @(negedge clk);
      cyc++;
    end
    check("key ready latency", 128'(cyc), 128'd12);
    m.set_key(k);
  endtask

  task automatic block(logic [127:0] din, bit mode, logic [127:0] exp);
    int cyc;
    logic [127:0] held;
    d_in = din;
    pulse(CTRL_START, mode);
    d_in = {$urandom, $urandom, $urandom, $urandom};
    cyc = 1;
    while (!ctrl_out[STAT_DONE] && cyc < 100) begin
      @(negedge clk);
      cyc++;
    end
    check("block latency", 128'(cyc), 128'd12);
    check(mode ? "decrypt" : "encrypt", d_out, exp);
    check("status mode", 128'(ctrl_out[STAT_MODE]), 128'(mode));
    check("not busy when done", 128'(ctrl_out[STAT_BUSY]), 128'd0);
    // a start without a clear must be ignored
    held = d_out;
    pulse(CTRL_START, !mode);
    repeat (14) @(negedge clk);
    check("start ignored in done", d_out, held);
    check("still done", 128'(ctrl_out[STAT_DONE]), 128'd1);
    pulse(CTRL_CLEAR, 0);
    check("cleared", 128'(ctrl_out[STAT_DONE]), 128'd0);
  endtask

  initial begin
    logic [127:0] k, p;
    m = new();
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // no key yet: a start does nothing
    d_in = 128'h1;
    pulse(CTRL_START, 0);
    repeat (14) @(negedge clk);
    check("no key: not done", 128'(ctrl_out[STAT_DONE]), 128'd0);
    check("no key: not ready", 128'(ctrl_out[STAT_KEY_READY]), 128'd0);

    load_key(128'h000102030405060708090a0b0c0d0e0f);
    block(128'h00112233445566778899aabbccddeeff, 0, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    block(128'h69c4e0d86a7b0430d8cdb78070b4c55a, 1, 128'h00112233445566778899aabbccddeeff);
    load_key(128'h2b7e151628aed2a6abf7158809cf4f3c);
    block(128'h3243f6a8885a308d313198a2e0370734, 0, 128'h3925841d02dc09fbdc118597196a0b32);
    block(128'h3925841d02dc09fbdc118597196a0b32, 1, 128'h3243f6a8885a308d313198a2e0370734);
    for (int i = 0; i < 6; i++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      load_key(k);
      for (int j = 0; j < 4; j++) begin
        p = {$urandom, $urandom, $urandom, $urandom};
        if ($urandom_range(0, 1) == 0) block(p, 0, m.encrypt(p));
        else block(p, 1, m.decrypt(p));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
