// tb_aes_control: drives the control unit's command and handshake inputs by hand and checks
// its outputs cycle by cycle: no start before a key, key expansion handshake, start of the
// module chosen by the mode, the end pulse of the other module being ignored, y_end, the
// done state holding until a clear, and mux_ctrl following the latched mode while running.
module tb_aes_control;
  logic clk = 0, rst_n = 1;
  logic ks = 0, st = 0, md = 0, cl = 0;
  logic ee = 0, ene = 0, ende = 0;
  logic se, sen, sde, mux, yend, ydone, kr, busy;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  aes_control dut (
    .clk, .rst_n, .x_key_start(ks), .x_start(st), .x_mode(md), .x_clear(cl),
    .y_start_exp(se), .x_end_exp(ee), .y_start_enc(sen), .x_end_enc(ene),
    .y_start_dec(sde), .x_end_dec(ende), .mux_ctrl(mux), .y_end(yend),
    .y_done(ydone), .key_ready(kr), .busy
  );

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %b expected %b", what, $time, got, exp);
    end
  endtask

  // outputs packed as {se, sen, sde, mux, yend, ydone, kr, busy}
  function automatic logic [7:0] outs();
    return {se, sen, sde, mux, yend, ydone, kr, busy};
  endfunction

  task automatic step();
    @(negedge clk);
    {ks, st, cl, ee, ene, ende} = '0;
  endtask

  task automatic block(bit mode);
    md = mode; st = 1;
    #1 check("start", outs(), {1'b0, !mode, mode, mode, 4'b0010});
    step();
    md = !mode;  // mode input changes while running: must not matter
    #1 check("run", outs(), {3'b000, mode, 4'b0011});
    if (mode) ene = 1; else ende = 1;  // the other module's end is ignored
    #1 check("wrong end", outs(), {3'b000, mode, 4'b0011});
    step();
    repeat (3) step();
    if (mode) ende = 1; else ene = 1;
    #1 check("y_end", outs(), {3'b000, mode, 4'b1011});
    step();
    st = 1;  // a start in DONE is ignored
    #1 check("done", outs(), {3'b000, mode, 4'b0110});
    step();
    #1 check("still done", outs(), {3'b000, mode, 4'b0110});
    cl = 1;
    step();
    md = mode;
    #1 check("idle again", outs(), {3'b000, mode, 4'b0010});
  endtask

  initial begin
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    #1 check("reset", outs(), 8'b0000_0000);
    st = 1;  // no key yet: ignored
    #1 check("start without key", outs(), 8'b0000_0000);
    step();
    #1 check("still idle", outs(), 8'b0000_0000);
    ks = 1;
    #1 check("key start", outs(), 8'b1000_0000);
    step();
    repeat (5) begin
      #1 check("expanding", outs(), 8'b0000_0001);
      step();
    end
    ee = 1;
    step();
    #1 check("key ready", outs(), 8'b0000_0010);
    for (int i = 0; i < 8; i++) block(i[0] ^ i[2]);
    // a new key load clears key_ready until it ends
    ks = 1;
    step();
    #1 check("reload", outs(), 8'b0000_0001);
    ee = 1;
    step();
    #1 check("reloaded", outs(), 8'b0000_0010);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
