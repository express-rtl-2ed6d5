// tb_express_dnn: the fully connected layers of the seven DNN workloads the
// design was evaluated on (Table of workloads: DenseNet, MobileNetV2,
// MobileNet, ResNet, ResNetV2, VGG16, VGG19), at their full sizes, each in
// CSR, Bitmap and Run-Length form, on the engine at its default
// configuration. The matrices are random with the published sparsity and
// mean non-zero run length (rounded to an integer); values are 8-bit,
// column indices 16-bit. Every value and mask bit of the dense stream is
// checked and the cycles per element are reported.
module tb_express_dnn;
  import express_pkg::*;
  import express_tb_pkg::*;
  localparam int MEM_WORDS = 1 << 22;
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

  typedef struct { string name; int nr; int nc; int sp; int rl; } wl_t;
  wl_t wl[7] = '{
    '{"DenseNet",    1024, 1000, 49, 11},
    '{"MobileNetV2", 1280, 1000, 11,  9},
    '{"MobileNet",   1024, 1000, 30,  3},
    '{"ResNet",      2048, 1000, 53,  2},
    '{"ResNetV2",    2048, 1000, 34,  4},
    '{"VGG16",       4096, 1000, 12,  8},
    '{"VGG19",       4096, 1000, 12,  8}};

  initial begin
    cpu_req = 0; cpu_we = 0; cpu_vec = 0; cpu_addr = 0; cpu_wdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (wl[i])
      for (int fmt = 0; fmt < 3; fmt++)
        run_workload(wl[i].name, wl[i].nr, wl[i].nc, wl[i].sp, wl[i].rl, fmt, 1, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
