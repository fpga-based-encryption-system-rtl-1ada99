// tb_aes_file_workload: runs whole files through the AES IP block the way the host does:
// the file is cut into 16-byte states (the last one zero-padded), each state is streamed in as
// four 32-bit words and read back as four words. Files: the 11-byte "HELLO WORLD" text of the
// use case (one state), a 2 KiB file and a 64 KiB file, each encrypted and then decrypted
// back (ECB per state here; chaining is software's concern and is tested elsewhere). The
// results are checked against the reference model and the round trip against the original.
// The testbench measures clocks per state with the stream kept full and checks the projected
// time for a 10 MB file against the 4 seconds quoted for the original system, at an assumed
// 100 MHz fabric clock.
module tb_aes_file_workload;
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


  function automatic void file_to_states(byte unsigned f [$], output logic [127:0] q [$]);
    q = {};
    for (int i = 0; i < f.size(); i += 16) begin
      logic [127:0] v = '0;
      for (int j = 0; j < 16; j++) if (i + j < f.size()) v[127 - 8*j -: 8] = f[i + j];
      q.push_back(v);
    end
  endfunction

  task automatic run_file(string name, byte unsigned f [$]);
    logic [127:0] pt [$], ct [$], back [$];
    longint t0, t1;
    real cps, secs;
    file_to_states(f, pt);
    set_mode(0);
    @(negedge clk);
    t0 = $time;
    fork send(pt); receive(pt.size(), ct); join
    t1 = $time;
    foreach (pt[i]) check({name, " encrypt"}, ct[i], m.encrypt(pt[i]));
    cps = real'(t1 - t0) / 10.0 / pt.size();
    set_mode(1);
    fork send(ct); receive(ct.size(), back); join
    foreach (pt[i]) check({name, " round trip"}, back[i], pt[i]);
    secs = cps * (10.0 * 1024 * 1024 / 16) / 100.0e6;
    $display("%s: %0d bytes, %0d states, %.1f clocks per state, 10 MB would take %.3f s at 100 MHz",
             name, f.size(), pt.size(), cps, secs);
    checks++;
    if (secs >= 4.0) begin
      failures++;
      $display("FAIL %s: slower than 4 s per 10 MB", name);
    end
  endtask

  initial begin
    byte unsigned f [$];
    string hello = "HELLO WORLD";
    m = new();
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    set_key({$urandom, $urandom, $urandom, $urandom}, 0);
    f = {};
    for (int i = 0; i < hello.len(); i++) f.push_back(hello[i]);
    // the use-case data bytes 48 45 4c 4c 4f 20 57 4f 52 4c 44
    check("use-case bytes", {f[0], f[1], f[2], f[10]}, 32'h48454c44);
    run_file("HELLO WORLD", f);
    f = {};
    repeat (2048) f.push_back(8'($urandom));
    run_file("2 KiB file", f);
    f = {};
    repeat (65536) f.push_back(8'($urandom));
    run_file("64 KiB file", f);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
