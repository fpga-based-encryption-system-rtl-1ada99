// tb_aes_axil_regs: AXI4-Lite master tasks write and read the register map: key words with
// full and partial byte strobes, the mode bit, the one-clock KEY_LOAD pulse, the read-only
// status word, unmapped addresses, and responses held under BREADY/RREADY back-pressure.
module tb_aes_axil_regs;
  logic clk = 0, rst_n = 1;
  logic [5:0] awaddr = 0, araddr = 0;
  logic awvalid = 0, wvalid = 0, bready = 0, arvalid = 0, rready = 0;
  logic [31:0] wdata = 0, rdata, status = 0;
  logic [3:0] wstrb = 0;
  logic awready, wready, bvalid, arready, rvalid;
  logic [1:0] bresp, rresp;
  logic [127:0] key;
  logic mode, key_load;
  int checks = 0, failures = 0, pulses = 0;

  always #5 clk = ~clk;

  aes_axil_regs dut (
    .clk, .rst_n,
    .s_axil_awaddr(awaddr), .s_axil_awvalid(awvalid), .s_axil_awready(awready),
    .s_axil_wdata(wdata), .s_axil_wstrb(wstrb), .s_axil_wvalid(wvalid), .s_axil_wready(wready),
    .s_axil_bresp(bresp), .s_axil_bvalid(bvalid), .s_axil_bready(bready),
    .s_axil_araddr(araddr), .s_axil_arvalid(arvalid), .s_axil_arready(arready),
    .s_axil_rdata(rdata), .s_axil_rresp(rresp), .s_axil_rvalid(rvalid), .s_axil_rready(rready),
    .key, .mode, .key_load, .status
  );

  always @(posedge clk) if (key_load) pulses++;

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic wr(logic [5:0] a, logic [31:0] d, logic [3:0] s = 4'hf, int bdelay = 0);
    @(negedge clk);
    awaddr = a; wdata = d; wstrb = s; awvalid = 1; wvalid = 1; bready = 0;
    #1;
    while (!(awready && wready)) begin
      @(negedge clk);
      #1;
    end
    @(negedge clk);
    awvalid = 0; wvalid = 0;
    repeat (bdelay) begin
      check("bvalid held", 128'(bvalid), 128'd1);
      @(negedge clk);
    end
    bready = 1;
    while (!bvalid) @(negedge clk);
    check("bresp", 128'(bresp), 128'd0);
    @(negedge clk);
    bready = 0;
  endtask

  task automatic rd(logic [5:0] a, output logic [31:0] d, input int rdelay = 0);
    @(negedge clk);
    araddr = a; arvalid = 1; rready = 0;
    #1;
    while (!arready) begin
      @(negedge clk);
      #1;
    end
    @(negedge clk);
    arvalid = 0;
    repeat (rdelay) @(negedge clk);
    while (!rvalid) @(negedge clk);
    d = rdata;
    check("rresp", 128'(rresp), 128'd0);
    rready = 1;
    @(negedge clk);
    rready = 0;
  endtask

  initial begin
    logic [31:0] d;
    logic [127:0] k;
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 6; it++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      for (int i = 0; i < 4; i++) wr(6'h10 + 6'(4*i), k[127 - 32*i -: 32], 4'hf, it);
      check("key out", key, k);
      for (int i = 0; i < 4; i++) begin
        rd(6'h10 + 6'(4*i), d, it);
        check("key readback", 128'(d), 128'(k[127 - 32*i -: 32]));
      end
    end
    // byte strobes: change only byte 1 of KEY2
    k = key;
    wr(6'h18, 32'hdeadbeef, 4'b0010);
    k[47:40] = 8'hbe;
    check("strobed write", key, k);
    // mode and key load pulse
    pulses = 0;
    wr(6'h00, 32'h1);
    check("mode set", 128'(mode), 128'd1);
    check("no pulse", 128'(pulses), 128'd0);
    wr(6'h00, 32'h3);
    repeat (2) @(negedge clk);
    check("one pulse", 128'(pulses), 128'd1);
    rd(6'h00, d);
    check("ctrl readback", 128'(d), 128'd1);
    wr(6'h00, 32'h0);
    check("mode clear", 128'(mode), 128'd0);
    // status is read-only
    status = 32'h0000_000b;
    rd(6'h04, d);
    check("status", 128'(d), 128'hb);
    wr(6'h04, 32'hffff_ffff);
    rd(6'h04, d, 3);
    check("status read-only", 128'(d), 128'hb);
    rd(6'h2c, d);
    check("unmapped", 128'(d), 128'd0);
    check("key untouched", key, k);
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
