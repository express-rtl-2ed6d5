// tb_express_nz_reg: pushes a numbered token stream through the Idx/Value
// register with random valid and ready patterns and checks that every token
// arrives once, in order, and that with both sides always ready a token
// passes every cycle.
module tb_express_nz_reg;
  import express_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0;
  always #5 clk = ~clk;
  logic    in_valid, in_ready, out_valid, out_ready;
  nz_tok_t in_tok, out_tok;
  int checks = 0, failures = 0;
  int sent = 0, rcvd = 0, cyc = 0;
  bit rand_mode = 1;

  express_nz_reg dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (rst_n) begin
      if (!in_valid || in_ready_q) in_valid = rand_mode ? ($urandom_range(3) != 0) : 1'b1;
      in_tok = '{row: 16'(sent >> 4), col: 16'(sent), val: 32'(sent * 7 + 1)};
      out_ready = rand_mode ? ($urandom_range(2) != 0) : 1'b1;
    end
  end
  logic in_ready_q;
  always @(posedge clk) begin
    in_ready_q <= in_ready;
    cyc <= cyc + 1;
    if (in_valid && in_ready) sent <= sent + 1;
    if (out_valid && out_ready) begin
      checks++;
      if (out_tok.val != 32'(rcvd * 7 + 1) || out_tok.col != 16'(rcvd)) begin
        failures++;
        $display("FAIL token %0d got val %0d", rcvd, out_tok.val);
      end
      rcvd <= rcvd + 1;
    end
  end

  initial begin
    in_valid = 0; out_ready = 0; in_tok = '0; in_ready_q = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (rcvd >= 2000);
    // full-rate phase
    @(negedge clk); rand_mode = 0;
    repeat (5) @(posedge clk);
    begin
      int r0, c0;
      r0 = rcvd; c0 = cyc;
      repeat (100) @(posedge clk);
      checks++;
      if (rcvd - r0 != 100) begin
        failures++;
        $display("FAIL rate: %0d tokens in 100 cycles", rcvd - r0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
