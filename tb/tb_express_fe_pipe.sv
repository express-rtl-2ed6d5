// tb_express_fe_pipe: feeds the front-end pipeline the non-zero tokens of
// random matrices (including empty rows and trailing zeros) with random
// token and buffer-space gaps, and compares the dense element stream and
// mask bits with the matrix. A final pass with tokens and space always
// available checks the rate of one element per cycle.
module tb_express_fe_pipe;
  import express_pkg::*;
  logic clk = 0, rst_n = 0, init = 0, run = 0;
  always #5 clk = ~clk;
  logic [15:0] n_rows, n_cols;
  logic tok_valid, tok_ready, be_done;
  nz_tok_t tok;
  logic wr_valid, wr_ready, wr_mask, fe_done, zero_ins;
  logic [31:0] wr_data;
  int checks = 0, failures = 0;

  int dense[];
  nz_tok_t toks[$];
  int ti, oi;
  bit gate_tok, gate_wr;
  int first_cyc, last_cyc, cyc = 0;

  express_fe_pipe dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  assign tok       = (ti < toks.size()) ? toks[ti] : '0;
  assign tok_valid = (ti < toks.size()) && gate_tok;
  assign be_done   = (ti == toks.size());
  assign wr_ready  = gate_wr;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && !init) begin
      if (tok_valid && tok_ready) ti <= ti + 1;
      if (wr_valid && wr_ready) begin
        if (oi == 0) first_cyc = cyc;
        last_cyc = cyc;
        check(oi < dense.size() && wr_data == 32'(dense[oi]) && wr_mask == (dense[oi] != 0),
              $sformatf("element %0d", oi));
        oi <= oi + 1;
      end
    end
  end

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one(int nr, int nc, int sp, bit full_rate);
    n_rows = 16'(nr); n_cols = 16'(nc);
    dense = new[nr * nc];
    toks = {};
    foreach (dense[i]) dense[i] = ($urandom_range(99) < sp) ? 0 : int'($urandom | 1);
    if (nr > 2) for (int c = 0; c < nc; c++) dense[nc + c] = 0;       // empty row
    for (int c = nc / 2; c < nc; c++) dense[(nr - 1) * nc + c] = 0;   // trailing zeros
    foreach (dense[i]) if (dense[i] != 0)
      toks.push_back('{row: 16'(i / nc), col: 16'(i % nc), val: 32'(dense[i])});
    @(negedge clk);
    ti = 0; oi = 0; init = 1;
    @(negedge clk);
    init = 0; run = 1;
    while (!(fe_done && oi == nr * nc)) begin
      gate_tok = full_rate ? 1'b1 : 1'($urandom_range(3) != 0);
      gate_wr  = full_rate ? 1'b1 : 1'($urandom_range(2) != 0);
      if (!full_rate && $urandom_range(40) == 0) run = 0; else run = 1;
      @(negedge clk);
    end
    check(oi == nr * nc, "element count");
    if (full_rate)
      check(last_cyc - first_cyc == nr * nc - 1,
            $sformatf("one element per cycle: %0d elements in %0d cycles", nr * nc, last_cyc - first_cyc + 1));
  endtask

  initial begin
    gate_tok = 0; gate_wr = 0; ti = 0; oi = 0; n_rows = 0; n_cols = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_one(3, 3, 44, 0);
    run_one(10, 17, 50, 0);
    run_one(6, 40, 80, 0);
    run_one(8, 8, 10, 0);
    run_one(12, 33, 40, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
