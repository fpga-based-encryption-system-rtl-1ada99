// tb_aes_axis_dma_if: drives the stream interface with random valid/ready gaps against a
// small behavioural stand-in for the core (result = block XOR a constant, ready a fixed number
// of clocks after the start). It checks the assembly of four words into a block, the order
// of the four result words and TLAST on the fourth, that no input is taken while a state is in
// flight, that the start waits for the key, that one clear follows every state, and that a
// state moves in and out in four clocks each when neither side stalls.
module tb_aes_axis_dma_if;
  logic clk = 0, rst_n = 1;
  logic [31:0] s_tdata = 0, m_tdata;
  logic s_tvalid = 0, s_tready, m_tvalid, m_tready = 0, m_tlast;
  logic [127:0] blk_in, blk_out;
  logic core_start, core_clear, core_done = 0, key_ready = 0, core_busy = 0, key_load = 0;
  int checks = 0, failures = 0, starts = 0, clears = 0, stalls = 0;
  localparam logic [127:0] MASK = 128'h0f1e2d3c4b5a69788796a5b4c3d2e1f0;

  always #5 clk = ~clk;

  aes_axis_dma_if dut (
    .clk, .rst_n,
    .s_axis_tdata(s_tdata), .s_axis_tvalid(s_tvalid), .s_axis_tready(s_tready),
    .m_axis_tdata(m_tdata), .m_axis_tvalid(m_tvalid), .m_axis_tready(m_tready),
    .m_axis_tlast(m_tlast),
    .blk_in, .core_start, .core_clear, .core_done, .core_key_ready(key_ready),
    .core_busy, .key_load, .blk_out
  );

  // core stand-in
  initial begin
    blk_out = '0;
    forever begin
      @(posedge clk);
      if (core_start) begin
        starts++;
        core_busy <= 1;
        repeat (11) @(posedge clk);
        core_busy <= 0;
        blk_out   <= blk_in ^ MASK;
        core_done <= 1;
        while (!core_clear) @(posedge clk);
        clears++;
        core_done <= 0;
      end
    end
  end

  always @(posedge clk) if (s_tvalid && !s_tready) stalls++;

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  logic [127:0] sent [$];

  task automatic send(int nblocks, bit gaps);
    for (int b = 0; b < nblocks; b++) begin
      logic [127:0] blk = {$urandom, $urandom, $urandom, $urandom};
      sent.push_back(blk);
      for (int w = 0; w < 4; w++) begin
        @(negedge clk);
        while (gaps && $urandom_range(0, 2) == 0) begin
          s_tvalid = 0;
          @(negedge clk);
        end
        s_tvalid = 1;
        s_tdata = blk[127 - 32*w -: 32];
        @(posedge clk);
        while (!s_tready) @(posedge clk);
      end
      @(negedge clk);
      s_tvalid = 0;
    end
  endtask

  task automatic receive(int nblocks, bit gaps);
    for (int b = 0; b < nblocks; b++) begin
      logic [127:0] got, exp;
      for (int w = 0; w < 4; w++) begin
        @(negedge clk);
        m_tready = !(gaps && $urandom_range(0, 2) == 0);
        @(posedge clk);
        while (!(m_tvalid && m_tready)) begin
          @(negedge clk);
          m_tready = !(gaps && $urandom_range(0, 2) == 0);
          @(posedge clk);
        end
        got[127 - 32*w -: 32] = m_tdata;
        checks++;
        if (m_tlast !== (w == 3)) begin
          failures++;
          $display("FAIL tlast on word %0d", w);
        end
      end
      @(negedge clk);
      m_tready = 0;
      exp = sent.pop_front() ^ MASK;
      check("result block", got, exp);
    end
  endtask

  initial begin
    int t0, t1;
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // without a key the first state is taken in but not started
    fork send(1, 0); join
    repeat (20) @(negedge clk);
    check("no start without key", 128'(starts), 128'd0);
    check("input closed while waiting", 128'(s_tready), 128'd0);
    key_ready = 1;
    key_load = 1;  // a key load in progress holds the start back
    repeat (3) @(negedge clk);
    check("no start during key load", 128'(starts), 128'd0);
    key_load = 0;
    receive(1, 0);
    // back-to-back, no gaps: time the first word in to the last word out
    @(negedge clk);
    t0 = $time;
    fork send(1, 0); receive(1, 0); join
    t1 = $time;
    // 4 words in, start, 12 clocks in the core stand-in, 4 words out
    checks++;
    if ((t1 - t0) / 10 > 24) begin
      failures++;
      $display("FAIL slow transfer: %0d clocks", (t1 - t0) / 10);
    end
    fork send(30, 1); receive(30, 1); join
    repeat (5) @(negedge clk);
    check("one clear per start", 128'(clears), 128'(starts));
    check("states started", 128'(starts), 128'd32);
    checks++;
    if (stalls == 0) begin
      failures++;
      $display("FAIL input was never stalled");
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
