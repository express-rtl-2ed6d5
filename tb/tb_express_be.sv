// tb_express_be: runs the back-end on CSR, Bitmap and Run-Length encodings
// of random matrices held in the SRAM model (with random memory stalls and
// random token back-pressure) and checks that the tokens are exactly the
// non-zeros of the matrix, in row-major order, with the right row, column
// and sign-extended value. A row wider than 32 columns with long zero
// stretches exercises bitmap words that hold only zeros. Memory reads take
// a random 1 to 6 cycles, so several are in flight at once; the test checks
// that this happened and that no more than four were ever outstanding.
module tb_express_be;
  import express_pkg::*;
  import express_tb_pkg::*;
  logic clk = 0, rst_n = 0, init = 0, run = 0;
  always #5 clk = ~clk;
  cfg_t cfg;
  logic mem_req, mem_gnt, mem_rvalid, tok_valid, tok_ready, be_done;
  logic [31:0] mem_addr, mem_rdata;
  nz_tok_t tok;
  int checks = 0, failures = 0;
  int exp_r[$], exp_c[$], exp_v[$];

  express_be dut (.*);
  sram_model #(.WORDS(8192), .STALL_PCT(25), .MAX_LAT(6)) u_mem (
    .clk, .req(mem_req), .addr(mem_addr), .gnt(mem_gnt), .rvalid(mem_rvalid), .rdata(mem_rdata));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) tok_ready = 1'($urandom_range(3) != 0);

  always @(posedge clk) if (rst_n && tok_valid && tok_ready) begin
    if (exp_r.size() == 0) check(0, "token beyond the last non-zero");
    else begin
      automatic int r = exp_r.pop_front();
      automatic int c = exp_c.pop_front();
      automatic int v = exp_v.pop_front();
      check(tok.row == 16'(r) && tok.col == 16'(c) && tok.val == 32'(v),
            $sformatf("token (%0d,%0d,%0d) exp (%0d,%0d,%0d)", tok.row, tok.col, $signed(tok.val), r, c, v));
    end
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_fmt(int fmt, int nr, int nc, int sp, int rl, int vsz, int csz, int rsz);
    sparse_matrix m;
    m = new(nr, nc);
    m.vsz = vsz; m.csz = csz; m.rsz = rsz;
    m.randomize_matrix(sp, rl);
    for (int c = 0; c < nc; c++) m.dense[c] = 0;               // empty first row
    for (int p = nc; p < nc + 70 && p < nr * nc; p++) m.dense[p] = 0;
    m.encode(fmt, 32'h40);
    foreach (u_mem.mem[i]) u_mem.mem[i] = '0;
    for (int i = 0; i < m.img.size(); i += 4)
      u_mem.mem[i / 4] = {m.img[i + 3], m.img[i + 2], m.img[i + 1], m.img[i]};
    exp_r = {}; exp_c = {}; exp_v = {};
    foreach (m.dense[i]) if (m.dense[i] != 0) begin
      exp_r.push_back(i / nc); exp_c.push_back(i % nc); exp_v.push_back(m.dense[i]);
    end
    cfg = '0;
    cfg.n_rows = 16'(nr); cfg.n_cols = 16'(nc);
    cfg.fmt = sparse_fmt_e'(fmt);
    cfg.rows_base = m.rows_base; cfg.cols_base = m.cols_base; cfg.vals_base = m.vals_base;
    cfg.vals_sz = 3'(vsz); cfg.cols_sz = 3'(csz); cfg.rows_sz = 3'(rsz);
    @(negedge clk); init = 1;
    @(negedge clk); init = 0; run = 1;
    while (!be_done) begin
      run = 1'($urandom_range(30) != 0);
      @(negedge clk);
    end
    check(exp_r.size() == 0, $sformatf("all %0d non-zeros delivered (fmt %0d)", m.nnz(), fmt));
  endtask

  initial begin
    tok_ready = 0; cfg = '0;
    // longer than the slowest memory read, so nothing granted before the
    // first edge comes back after reset
    repeat (8) @(posedge clk);
    rst_n = 1;
    run_fmt(0, 3, 3, 40, 2, 4, 4, 4);
    run_fmt(1, 3, 3, 40, 2, 4, 4, 4);
    run_fmt(2, 3, 3, 40, 2, 4, 4, 4);
    run_fmt(0, 16, 45, 50, 3, 2, 2, 4);
    run_fmt(1, 16, 45, 60, 2, 1, 4, 2);
    run_fmt(2, 16, 45, 30, 4, 2, 1, 1);
    run_fmt(1, 20, 70, 20, 5, 2, 4, 4);
    run_fmt(2, 20, 70, 70, 1, 1, 2, 2);
    check(u_mem.max_inflight > 1, "mechanism: several reads in flight");
    check(u_mem.max_inflight <= 4, $sformatf("at most four reads in flight (saw %0d)", u_mem.max_inflight));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
