// tb_express_ctrl: walks the control unit through start, one-cycle init,
// run, pause, resume, completion and a second start, checking the outputs
// in each state.
module tb_express_ctrl;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start_set = 0, start_clr = 0, fe_done = 0;
  logic init, run, busy, done;
  int checks = 0, failures = 0;

  express_ctrl dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    check(!init && !run && !busy && !done, "idle after reset");
    for (int k = 0; k < 2; k++) begin
      pulse(start_set);
      check(init && !run && busy, "init for one cycle after start");
      @(negedge clk);
      check(!init && run && busy, "run after init");
      pulse(start_clr);
      check(!run && busy && !done, "paused");
      repeat (3) @(negedge clk);
      check(!run && busy, "still paused");
      start_set = 1; @(negedge clk); start_set = 0;
      check(run && !init, "resumed without init");
      fe_done = 1; @(negedge clk); fe_done = 0;
      check(done && !busy && !run, "done after fe_done");
      @(negedge clk);
      check(done, "done holds");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
