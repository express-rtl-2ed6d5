// tb_express_nbuf2: end-to-end test of the engine with two buffers.
//
// With NBUF = 2 the engine fills one VEC-element buffer while the CPU reads
// the other, so it can work ahead of the CPU. The test runs the three
// formats through the top module built with two buffers, checks every value
// and mask bit, and counts how often the read side and the write side move
// from one buffer to the other, how often both buffers are full at once and
// how often the write side works in one buffer while the read side is in the
// other. A count that stays at zero is a failure. The memory model stalls
// 20 % of requests and answers each read after 1 to 4 cycles.
module tb_express_nbuf2;
  import express_pkg::*;
  import express_tb_pkg::*;

  localparam int VEC = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                 cpu_req, cpu_we, cpu_vec, cpu_gnt, cpu_rvalid;
  logic [31:0]          cpu_addr, cpu_wdata;
  logic [VEC-1:0][31:0] cpu_rdata;
  logic [VEC-1:0]       cpu_rmask;
  logic                 mem_req, mem_gnt, mem_rvalid;
  logic [31:0]          mem_addr, mem_rdata;
  logic                 busy, done, zero_ins;

  express #(.NBUF(2)) dut (.*);

  sram_model #(.WORDS(16384), .STALL_PCT(20), .MAX_LAT(4)) u_mem (
    .clk, .req(mem_req), .addr(mem_addr), .gnt(mem_gnt), .rvalid(mem_rvalid), .rdata(mem_rdata));

  int checks = 0, failures = 0;
  int cycles = 0;

  // mechanism counters
  int n_cpu_stall = 0, n_zero_ins = 0, n_buf_full = 0, n_be_throttle = 0;
  int n_pause = 0, n_vec_load = 0, n_scalar_load = 0, n_partial_vec = 0;
  int n_empty_row = 0, n_zero_word = 0, n_fmt[3] = '{0, 0, 0};
  int n_rd_switch = 0, n_wr_switch = 0, n_both_full = 0, n_ahead = 0;
  logic [7:0] last_rd_buf = '0, last_wr_buf = '0;
  int n_sz[5] = '{0, 0, 0, 0, 0};

  always @(posedge clk) begin
    cycles <= cycles + 1;
    if (cpu_req && !cpu_gnt) n_cpu_stall++;
    if (zero_ins) n_zero_ins++;
    if (dut.status.full) n_buf_full++;
    if (dut.be_tok_valid && !dut.be_tok_ready) n_be_throttle++;
    if (rst_n) begin
      if (dut.status.rd_buf != last_rd_buf) n_rd_switch++;
      if (dut.status.wr_buf != last_wr_buf) n_wr_switch++;
      if (dut.status.full) n_both_full++;
      if (dut.status.busy && dut.status.rd_buf != dut.status.wr_buf) n_ahead++;
      last_rd_buf <= dut.status.rd_buf;
      last_wr_buf <= dut.status.wr_buf;
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic cpu_write(logic [31:0] a, logic [31:0] d);
    @(negedge clk);
    cpu_req = 1; cpu_we = 1; cpu_vec = 0; cpu_addr = a; cpu_wdata = d;
    do @(posedge clk); while (!cpu_gnt);
    @(negedge clk);
    cpu_req = 0; cpu_we = 0;
  endtask

  task automatic cpu_read(logic [31:0] a, bit vec,
                          output logic [VEC-1:0][31:0] d, output logic [VEC-1:0] m);
    @(negedge clk);
    cpu_req = 1; cpu_we = 0; cpu_vec = vec; cpu_addr = a;
    do @(posedge clk); while (!cpu_gnt);
    @(negedge clk);
    cpu_req = 0;
    check(cpu_rvalid, "rvalid one cycle after gnt");
    d = cpu_rdata; m = cpu_rmask;
  endtask

  task automatic run_case(int fmt, int nr, int nc, int sp, int rl,
                          int vsz, int csz, int rsz,
                          bit vec, bit do_pause, int cpu_gap,
                          bit empty_row, bit zero_words);
    sparse_matrix m;
    logic [VEC-1:0][31:0] d;
    logic [VEC-1:0] mk;
    int total, idx, exp_v;
    m = new(nr, nc);
    m.vsz = vsz; m.csz = csz; m.rsz = rsz;
    m.randomize_matrix(sp, rl);
    if (empty_row) begin
      for (int c = 0; c < nc; c++) m.dense[nc + c] = 0;   // row 1 empty
      n_empty_row++;
    end
    if (zero_words) begin
      // rows 2.. hold at least 64 zeros in a row: whole bitmap words of 0
      for (int p = 2 * nc; p < 2 * nc + 70 && p < nr * nc; p++) m.dense[p] = 0;
      n_zero_word++;
    end
    m.encode(fmt, 32'h100);
    foreach (u_mem.mem[i]) u_mem.mem[i] = '0;
    for (int i = 0; i < m.img.size(); i += 4)
      u_mem.mem[i / 4] = {m.img[i + 3], m.img[i + 2], m.img[i + 1], m.img[i]};
    n_fmt[fmt]++;
    n_sz[vsz]++;

    cpu_write(EXP_BASE + 4 * REG_N_ROWS,    nr);
    cpu_write(EXP_BASE + 4 * REG_N_COLS,    nc);
    cpu_write(EXP_BASE + 4 * REG_FORMAT,    fmt);
    cpu_write(EXP_BASE + 4 * REG_ROWS_BASE, m.rows_base);
    cpu_write(EXP_BASE + 4 * REG_COLS_BASE, m.cols_base);
    cpu_write(EXP_BASE + 4 * REG_VALS_BASE, m.vals_base);
    cpu_write(EXP_BASE + 4 * REG_ELE_SZ,    m.ele_sz_word());
    cpu_read(EXP_BASE + 4 * REG_COLS_BASE, 0, d, mk);
    check(d[0] == m.cols_base, "register read-back");
    cpu_write(EXP_BASE + 4 * REG_START, 1);

    total = nr * nc;
    idx = 0;
    while (idx < total) begin
      if (do_pause && idx >= total / 2 && idx < total / 2 + VEC) begin
        cpu_write(EXP_BASE + 4 * REG_START, 0);
        repeat (30) @(posedge clk);
        check(busy && !done, "paused engine stays busy");
        cpu_write(EXP_BASE + 4 * REG_START, 1);
        n_pause++;
        do_pause = 0;
      end
      repeat (cpu_gap) @(posedge clk);
      cpu_read(EXP_BUFFER, vec, d, mk);
      if (vec) n_vec_load++; else n_scalar_load++;
      for (int l = 0; l < (vec ? VEC : 1); l++) begin
        if (idx < total) begin
          exp_v = m.dense[idx];
          check(d[l] == exp_v && mk[l] == (exp_v != 0),
                $sformatf("fmt %0d elem %0d: got %0d/%0b exp %0d", fmt, idx, $signed(d[l]), mk[l], exp_v));
          idx++;
        end else begin
          check(d[l] == 0 && mk[l] == 0, "lanes past the end are 0 with mask 0");
          if (l == VEC - 1) n_partial_vec++;
        end
      end
    end
    repeat (5) @(posedge clk);
    check(done && !busy, "done after the last element");
    cpu_read(EXP_STATUS, 0, d, mk);
    check(d[0][3] == 1'b1 && d[0][1] == 1'b1, "status: buffers empty and fill done at the end");
  endtask

  initial begin
    cpu_req = 0; cpu_we = 0; cpu_vec = 0; cpu_addr = 0; cpu_wdata = 0;
    // longer than the slowest memory read, so nothing granted before the
    // first edge comes back after reset
    repeat (8) @(posedge clk);
    rst_n = 1;
    //        fmt nr  nc  sp rl vsz csz rsz vec pause gap  empty zw
    run_case(0, 12, 20, 50, 3, 2,  2,  4,  1,  1,    0,   1,    0);
    run_case(1, 12, 37, 60, 2, 1,  4,  2,  1,  0,    6,   1,    1);
    run_case(2, 10, 25, 40, 4, 4,  1,  1,  0,  1,    3,   1,    0);
    run_case(0,  9, 45, 30, 3, 1,  2,  4,  1,  0,   12,   0,    1);

    check(n_rd_switch > 0, "mechanism: read side moved to the other buffer");
    check(n_wr_switch > 0, "mechanism: write side moved to the other buffer");
    check(n_both_full > 0, "mechanism: both buffers full");
    check(n_ahead > 0,     "mechanism: filling one buffer while the other is read");
    check(n_cpu_stall > 0,   "mechanism: CPU load stalled");
    check(n_zero_ins > 0,    "mechanism: zero inserted");
    check(n_buf_full > 0,    "mechanism: buffers full");
    check(n_be_throttle > 0, "mechanism: back-end throttled");
    check(n_pause > 0,       "mechanism: pause and resume");
    check(n_vec_load > 0,    "mechanism: vector load");
    check(n_scalar_load > 0, "mechanism: scalar load");
    check(n_partial_vec > 0, "mechanism: partial last vector");
    check(u_mem.stalls > 0,  "mechanism: memory stall");
    check(n_empty_row > 0 && n_zero_word > 0, "mechanism: empty row, zero bitmap word");
    foreach (n_fmt[i]) check(n_fmt[i] > 0, $sformatf("mechanism: format %0d", i));
    check(n_sz[1] > 0 && n_sz[2] > 0 && n_sz[4] > 0, "mechanism: 1/2/4-byte values");
    $display("rd_switch=%0d wr_switch=%0d both_full=%0d ahead=%0d", n_rd_switch, n_wr_switch, n_both_full, n_ahead);
    $display("cpu_stall=%0d zero_ins=%0d buf_full=%0d be_throttle=%0d pause=%0d vec=%0d scalar=%0d partial=%0d mem_stall=%0d",
             n_cpu_stall, n_zero_ins, n_buf_full, n_be_throttle, n_pause, n_vec_load, n_scalar_load,
             n_partial_vec, u_mem.stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
