// tb_aes_key_ram: writes random words to all 11 entries, reads them back through the
// combinational read port in random order, checks that a disabled write changes nothing and
// that addresses past the last entry read as zero.
module tb_aes_key_ram;
  logic clk = 0;
  logic we = 0;
  logic [3:0] waddr = 0, raddr = 0;
  logic [127:0] wdata = 0, rdata;
  logic [127:0] shadow [11];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  aes_key_ram dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    for (int pass = 0; pass < 4; pass++) begin
      for (int a = 0; a < 11; a++) begin
        @(negedge clk);
        we = 1;
        waddr = 4'(a);
        wdata = {$urandom, $urandom, $urandom, $urandom};
        shadow[a] = wdata;
      end
      @(negedge clk);
      // a write with we low must not land
      we = 0;
      waddr = 4'($urandom_range(0, 10));
      wdata = ~shadow[waddr];
      @(negedge clk);
      for (int i = 0; i < 30; i++) begin
        raddr = 4'($urandom_range(0, 10));
        #1 check($sformatf("read %0d", raddr), rdata, shadow[raddr]);
      end
      for (int a = 11; a < 16; a++) begin
        raddr = 4'(a);
        #1 check("out of range", rdata, '0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
