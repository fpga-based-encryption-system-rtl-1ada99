// tb_aes_ip_top: end-to-end test of the AES IP block at its default parameters, playing the
// processor (AXI4-Lite register accesses) and the DMA engine (AXI4-Stream words in and out).
//
// It loads the FIPS-197 key and checks the FIPS-197 example block; runs a file of 64 states
// (1 KiB) through in CBC mode, with the chaining XOR done here in the testbench as the
// software does it, first encrypting and then, after a mode switch, decrypting the result back;
// reloads a random key and repeats with random stream gaps on both sides; and times one
// state with no stalls (four words in on consecutive clocks, four words out on consecutive
// clocks, 20 clocks from the first word in to the last word out). Every result is checked
// against the reference model. It counts each mechanism of the block and fails if one never
// happened: key load, encryption, decryption, mode switch, input stall while a state is in
// flight, output back-pressure, the per-state clear, and TLAST.
module tb_aes_ip_top;
  import aes_ref_pkg::*;

  logic clk = 0, rst_n = 1;
  logic [5:0] awaddr = 0, araddr = 0;
  logic awvalid = 0, wvalid = 0, bready = 0, arvalid = 0, rready = 0;
  logic [31:0] wdata = 0, rdata;
  logic [3:0] wstrb = 0;
  logic awready, wready, bvalid, arready, rvalid;
  logic [1:0] bresp, rresp;
  logic [31:0] s_tdata = 0, m_tdata;
  logic s_tvalid = 0, s_tready, m_tvalid, m_tready = 0, m_tlast;
  int checks = 0, failures = 0;
  int n_keyload = 0, n_enc = 0, n_dec = 0, n_modesw = 0, n_install = 0, n_backpr = 0;
  int n_clear = 0, n_tlast = 0;
  bit gaps_in = 0, gaps_out = 0;
  aes_model m;

  always #5 clk = ~clk;

  aes_ip_top dut (
    .clk, .rst_n,
    .s_axil_awaddr(awaddr), .s_axil_awvalid(awvalid), .s_axil_awready(awready),
    .s_axil_wdata(wdata), .s_axil_wstrb(wstrb), .s_axil_wvalid(wvalid), .s_axil_wready(wready),
    .s_axil_bresp(bresp), .s_axil_bvalid(bvalid), .s_axil_bready(bready),
    .s_axil_araddr(araddr), .s_axil_arvalid(arvalid), .s_axil_arready(arready),
    .s_axil_rdata(rdata), .s_axil_rresp(rresp), .s_axil_rvalid(rvalid), .s_axil_rready(rready),
    .s_axis_tdata(s_tdata), .s_axis_tvalid(s_tvalid), .s_axis_tready(s_tready),
    .m_axis_tdata(m_tdata), .m_axis_tvalid(m_tvalid), .m_axis_tready(m_tready),
    .m_axis_tlast(m_tlast)
  );

  // mechanism counters, from the block's ports and its core's control word
  logic prev_mode = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.ctrl_in[0]) n_keyload++;
    if (dut.ctrl_in[1] && !dut.ctrl_in[2]) n_enc++;
    if (dut.ctrl_in[1] && dut.ctrl_in[2]) n_dec++;
    if (dut.ctrl_in[3]) n_clear++;
    if (dut.ctrl_in[2] != prev_mode) n_modesw++;
    prev_mode <= dut.ctrl_in[2];
    if (s_tvalid && !s_tready) n_install++;
    if (m_tvalid && !m_tready) n_backpr++;
    if (m_tvalid && m_tready && m_tlast) n_tlast++;
  end

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic wr(logic [5:0] a, logic [31:0] d);
    @(negedge clk);
    awaddr = a; wdata = d; wstrb = 4'hf; awvalid = 1; wvalid = 1; bready = 1;
    #1;
    while (!(awready && wready)) begin
      @(negedge clk);
      #1;
    end
    @(negedge clk);
    awvalid = 0; wvalid = 0;
    while (!bvalid) @(negedge clk);
    @(negedge clk);
    bready = 0;
  endtask

  task automatic rd(logic [5:0] a, output logic [31:0] d);
    @(negedge clk);
    araddr = a; arvalid = 1; rready = 1;
    #1;
    while (!arready) begin
      @(negedge clk);
      #1;
    end
    @(negedge clk);
    arvalid = 0;
    while (!rvalid) @(negedge clk);
    d = rdata;
    @(negedge clk);
    rready = 0;
  endtask

  task automatic set_key(logic [127:0] k, bit mode);
    logic [31:0] st;
    int n;
    for (int i = 0; i < 4; i++) wr(6'h10 + 6'(4*i), k[127 - 32*i -: 32]);
    wr(6'h00, {30'b0, 1'b1, mode});
    n = 0;
    do begin
      rd(6'h04, st);
      n++;
    end while (!st[1] && n < 50);
    check("key ready", 128'(st[1]), 128'd1);
    m.set_key(k);
  endtask

  task automatic set_mode(bit mode);
    wr(6'h00, {31'b0, mode});
  endtask

  task automatic send(logic [127:0] blks [$]);
    foreach (blks[b])
      for (int w = 0; w < 4; w++) begin
        @(negedge clk);
        while (gaps_in && $urandom_range(0, 3) == 0) begin
          s_tvalid = 0;
          @(negedge clk);
        end
        s_tvalid = 1;
        s_tdata = blks[b][127 - 32*w -: 32];
        @(posedge clk);
        while (!s_tready) @(posedge clk);
        #1 s_tvalid = (w != 3) || (b != blks.size() - 1);
      end
    @(negedge clk);
    s_tvalid = 0;
  endtask

  task automatic receive(int n, output logic [127:0] got [$]);
    got = {};
    for (int b = 0; b < n; b++) begin
      logic [127:0] v;
      for (int w = 0; w < 4; w++) begin
        @(negedge clk);
        m_tready = !(gaps_out && $urandom_range(0, 2) == 0);
        @(posedge clk);
        while (!(m_tvalid && m_tready)) begin
          @(negedge clk);
          m_tready = !(gaps_out && $urandom_range(0, 2) == 0);
          @(posedge clk);
        end
        v[127 - 32*w -: 32] = m_tdata;
        checks++;
        if (m_tlast !== (w == 3)) begin
          failures++;
          $display("FAIL tlast on word %0d", w);
        end
      end
      got.push_back(v);
    end
    @(negedge clk);
    m_tready = 0;
  endtask

  // CBC over the block: the chaining XOR is software's job, so it is done here
  task automatic cbc_file(int n, logic [127:0] iv);
    logic [127:0] pt [$], ctin [$], ct [$], back [$], prev;
    for (int i = 0; i < n; i++) pt.push_back({$urandom, $urandom, $urandom, $urandom});
    // encryption: one state at a time, since each input depends on the previous output
    set_mode(0);
    prev = iv;
    for (int i = 0; i < n; i++) begin
      logic [127:0] one [$], res [$];
      one = {pt[i] ^ prev};
      fork send(one); receive(1, res); join
      check("cbc encrypt", res[0], m.encrypt(pt[i] ^ prev));
      prev = res[0];
      ct.push_back(res[0]);
    end
    // decryption: all states can be queued back to back
    set_mode(1);
    fork send(ct); receive(n, back); join
    prev = iv;
    for (int i = 0; i < n; i++) begin
      check("cbc decrypt", back[i] ^ prev, pt[i]);
      prev = ct[i];
    end
  endtask

  initial begin
    logic [127:0] q [$], res [$];
    logic [31:0] st;
    int t0, t1, tin [$], tout [$];
    m = new();
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    rd(6'h04, st);
    check("no key after reset", 128'(st[1]), 128'd0);

    // FIPS-197 Appendix C.1 through the whole block
    set_key(128'h000102030405060708090a0b0c0d0e0f, 0);
    q = {128'h00112233445566778899aabbccddeeff};
    fork send(q); receive(1, res); join
    check("FIPS encrypt", res[0], 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    set_mode(1);
    q = {128'h69c4e0d86a7b0430d8cdb78070b4c55a};
    fork send(q); receive(1, res); join
    check("FIPS decrypt", res[0], 128'h00112233445566778899aabbccddeeff);

    // timing of one state with no stalls
    set_mode(0);
    q = {128'h0123456789abcdeffedcba9876543210};
    fork
      send(q);
      receive(1, res);
      begin
        for (int i = 0; i < 4; i++) begin
          do @(posedge clk); while (!(s_tvalid && s_tready));
          tin.push_back($time);
        end
        for (int i = 0; i < 4; i++) begin
          do @(posedge clk); while (!(m_tvalid && m_tready));
          tout.push_back($time);
        end
      end
    join
    check("timed block", res[0], m.encrypt(q[0]));
    check("4 words in, 4 clocks", 128'((tin[3] - tin[0]) / 10), 128'd3);
    check("4 words out, 4 clocks", 128'((tout[3] - tout[0]) / 10), 128'd3);
    check("first word in to last word out", 128'((tout[3] - tin[0]) / 10), 128'd20);

    // a 1 KiB file in CBC mode, no stalls
    cbc_file(64, {$urandom, $urandom, $urandom, $urandom});

    // new key, random gaps on both stream sides
    gaps_in = 1;
    gaps_out = 1;
    set_key({$urandom, $urandom, $urandom, $urandom}, 0);
    cbc_file(32, {$urandom, $urandom, $urandom, $urandom});

    repeat (5) @(negedge clk);
    // mechanism coverage
    check("key loads", 128'(n_keyload), 128'd2);
    checks++; if (n_enc == 0)     begin failures++; $display("FAIL no encryption"); end
    checks++; if (n_dec == 0)     begin failures++; $display("FAIL no decryption"); end
    checks++; if (n_modesw < 2)   begin failures++; $display("FAIL no mode switch"); end
    checks++; if (n_install == 0) begin failures++; $display("FAIL no input stall"); end
    checks++; if (n_backpr == 0)  begin failures++; $display("FAIL no output back-pressure"); end
    check("one clear per state", 128'(n_clear), 128'(n_enc + n_dec));
    check("one TLAST per state", 128'(n_tlast), 128'(n_enc + n_dec));
    $display("mechanisms: key_load=%0d encrypt=%0d decrypt=%0d mode_switch=%0d input_stall=%0d back_pressure=%0d clear=%0d tlast=%0d",
             n_keyload, n_enc, n_dec, n_modesw, n_install, n_backpr, n_clear, n_tlast);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
