// tb_aes_key_expansion: checks that the key schedule writes the 11 AES-128 round keys to
// addresses 0..10 (captured here in a testbench array), against FIPS-197 Appendix A.1 and the
// reference model on random keys, that x_end_exp comes 11 clocks after the start, and that a
// start while busy is ignored.
module tb_aes_key_expansion;
  import aes_ref_pkg::*;

  logic clk = 0, rst_n = 1;
  logic start = 0, done, busy, we;
  logic [127:0] key, wdata;
  logic [3:0] waddr;
  logic [127:0] cap [16];
  int nwrites;
  int checks = 0, failures = 0;
  aes_model m;

  always #5 clk = ~clk;

  aes_key_expansion dut (
    .clk, .rst_n, .y_start_exp(start), .key_in(key), .x_end_exp(done), .busy,
    .rk_we(we), .rk_waddr(waddr), .rk_wdata(wdata)
  );

  always @(posedge clk) if (we) begin
    cap[waddr] <= wdata;
    nwrites++;
  end

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic run(logic [127:0] k, bit poke);
    int cyc;
    for (int i = 0; i < 16; i++) cap[i] = '0;
    nwrites = 0;
    key = k;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    key = {$urandom, $urandom, $urandom, $urandom};
    cyc = 1;
    while (!done) begin
      if (poke && cyc == 4) start = 1; else start = 0;
      @(negedge clk);
      cyc++;
    end
    start = 0;
    @(negedge clk);
    m.set_key(k);
    for (int r = 0; r < 11; r++) check($sformatf("round key %0d", r), cap[r], m.rk[r]);
    check("write count", 128'(nwrites), 128'd11);
    check("latency", 128'(cyc), 128'd11);
  endtask

  initial begin
    m = new();
    key = '0;
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, 0);
    // FIPS-197 Appendix A.1, round keys 1 and 10
    check("FIPS rk1", cap[1], 128'ha0fafe1788542cb123a339392a6c7605);
    check("FIPS rk10", cap[10], 128'hd014f9a8c9ee2589e13f0cc8b6630ca6);
    run(128'h000102030405060708090a0b0c0d0e0f, 1);
    check("FIPS C.1 rk10", cap[10], 128'h13111d7fe3944a17f307a78b4d2b30c5);
    for (int i = 0; i < 20; i++) run({$urandom, $urandom, $urandom, $urandom}, i[0]);
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
