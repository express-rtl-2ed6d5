// tb_express_synth: synthetic square matrices of 64, 256, 1024 and 4096
// rows at sparsities from 10 % to 70 % in steps of 10 %, as in the
// synthetic evaluation set, on the engine at its default configuration.
// 64 x 64 and 256 x 256 run at every sparsity in all three formats;
// 1024 x 1024 runs at every sparsity with the format rotating; 4096 x 4096
// runs at 10 %, 40 % and 70 % with one format each, to bound simulation
// time. Values are 16-bit, mean non-zero run 4 (10 at 10 % sparsity). Every value and mask bit is
// checked and the cycles per element are reported.
module tb_express_synth;
  import express_pkg::*;
  import express_tb_pkg::*;
  localparam int MEM_WORDS = 1 << 24;
  localparam int WATCHDOG  = 400000000;
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

  express dut (.*);

  sram_model #(.WORDS(MEM_WORDS), .STALL_PCT(0)) u_mem (
    .clk, .req(mem_req), .addr(mem_addr), .gnt(mem_gnt), .rvalid(mem_rvalid), .rdata(mem_rdata));

  int checks = 0, failures = 0;
  longint cycles = 0, n_stall = 0;

  always @(posedge clk) begin
    cycles <= cycles + 1;
    if (cpu_req && !cpu_gnt) n_stall <= n_stall + 1;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
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

  // Program the engine for one matrix and stream it out with vector loads,
  // checking every value and mask bit. Returns the cycles it took.
  task automatic run_workload(string name, int nr, int nc, int sp, int rl, int fmt, int vsz, int csz);
    sparse_matrix m;
    int idx, total;
    longint t0;
    m = new(nr, nc);
    m.vsz = vsz; m.csz = csz; m.rsz = 4;
    m.randomize_matrix(sp, rl);
    m.encode(fmt, 32'h100);
    if (m.img.size() > 4 * MEM_WORDS) begin
      check(0, $sformatf("%s does not fit the memory model", name));
      return;
    end
    for (int i = 0; i < m.img.size(); i += 4)
      u_mem.mem[i / 4] = {m.img[i + 3], m.img[i + 2], m.img[i + 1], m.img[i]};
    cpu_write(EXP_BASE + 4 * REG_N_ROWS,    nr);
    cpu_write(EXP_BASE + 4 * REG_N_COLS,    nc);
    cpu_write(EXP_BASE + 4 * REG_FORMAT,    fmt);
    cpu_write(EXP_BASE + 4 * REG_ROWS_BASE, m.rows_base);
    cpu_write(EXP_BASE + 4 * REG_COLS_BASE, m.cols_base);
    cpu_write(EXP_BASE + 4 * REG_VALS_BASE, m.vals_base);
    cpu_write(EXP_BASE + 4 * REG_ELE_SZ,    m.ele_sz_word());
    cpu_write(EXP_BASE + 4 * REG_START,     1);
    t0 = cycles;
    total = nr * nc;
    idx = 0;
    @(negedge clk);
    cpu_req = 1; cpu_we = 0; cpu_vec = 1; cpu_addr = EXP_BUFFER;
    while (idx < total) begin
      @(posedge clk);
      if (cpu_gnt) begin
        @(negedge clk);
        if (idx + VEC >= total) cpu_req = 0;
        for (int l = 0; l < VEC; l++) begin
          int e;
          e = (idx < total) ? m.dense[idx] : 0;
          checks++;
          if (!(cpu_rdata[l] == 32'(e) && cpu_rmask[l] == (e != 0))) begin
            failures++;
            if (failures < 20) $display("FAIL %s elem %0d got %0d exp %0d", name, idx, $signed(cpu_rdata[l]), e);
          end
          idx++;
        end
      end
    end
    cpu_req = 0;
    repeat (4) @(posedge clk);
    check(done, {name, ": done"});
    $display("%-12s fmt %0d %5d x %5d sparsity %0d%% (measured %0d%%): %0d cycles, %0.2f cycles/element",
             name, fmt, nr, nc, sp, 100 - (100 * m.nnz()) / total, cycles - t0, real'(cycles - t0) / total);
  endtask

  // Mean non-zero run of 4, lengthened where the sparsity could not be
  // reached with it (zero runs are at least one element long).
  function automatic int rl_for(int sp);
    return ((100 - sp) / sp + 1 > 4) ? (100 - sp) / sp + 1 : 4;
  endfunction

  initial begin
    cpu_req = 0; cpu_we = 0; cpu_vec = 0; cpu_addr = 0; cpu_wdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int sp = 10; sp <= 70; sp += 10)
      for (int fmt = 0; fmt < 3; fmt++) begin
        run_workload("synth64", 64, 64, sp, rl_for(sp), fmt, 2, 2);
        run_workload("synth256", 256, 256, sp, rl_for(sp), fmt, 2, 2);
      end
    for (int sp = 10; sp <= 70; sp += 10)
      run_workload("synth1024", 1024, 1024, sp, rl_for(sp), (sp / 10) % 3, 2, 2);
    run_workload("synth4096", 4096, 4096, 10, rl_for(10), 0, 2, 2);
    run_workload("synth4096", 4096, 4096, 40, 4, 1, 2, 2);
    run_workload("synth4096", 4096, 4096, 70, 4, 2, 2, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
