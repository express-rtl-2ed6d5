// tb_express_full: one complete operation of the engine at its default
// configuration (8 lanes of 32 bits, one buffer) on a full-size workload:
// the 1024 x 1000 fully connected layer of a DenseNet-like network at 49 %
// sparsity with a mean non-zero run of 11 elements, 8-bit values, stored
// as a bitmap. A CPU model streams the whole dense matrix out with vector
// loads and checks every value and mask bit; the memory is a one-cycle SRAM.
// It reports the cycles spent per element and per non-zero.
module tb_express_full;
  import express_pkg::*;
  import express_tb_pkg::*;

  localparam int VEC = 8;
  localparam int NR = 1024, NC = 1000, SP = 49, RL = 11, FMT = 1;

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

  sram_model #(.WORDS(1 << 19), .STALL_PCT(0)) u_mem (
    .clk, .req(mem_req), .addr(mem_addr), .gnt(mem_gnt), .rvalid(mem_rvalid), .rdata(mem_rdata));

  int checks = 0, failures = 0;
  longint cycles = 0, n_stall = 0;

  always @(posedge clk) begin
    cycles <= cycles + 1;
    if (cpu_req && !cpu_gnt) n_stall <= n_stall + 1;
  end

  initial begin
    repeat (40000000) @(posedge clk);
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

  initial begin
    sparse_matrix m;
    int idx, total, mismatches;
    longint t0, t1;
    cpu_req = 0; cpu_we = 0; cpu_vec = 0; cpu_addr = 0; cpu_wdata = 0;
    m = new(NR, NC);
    m.vsz = 1; m.csz = 4; m.rsz = 4;
    m.randomize_matrix(SP, RL);
    m.encode(FMT, 32'h100);
    for (int i = 0; i < m.img.size(); i += 4)
      u_mem.mem[i / 4] = {m.img[i + 3], m.img[i + 2], m.img[i + 1], m.img[i]};
    $display("matrix %0d x %0d, %0d non-zeros, image %0d bytes", NR, NC, m.nnz(), m.img.size());
    repeat (3) @(posedge clk);
    rst_n = 1;
    cpu_write(EXP_BASE + 4 * REG_N_ROWS,    NR);
    cpu_write(EXP_BASE + 4 * REG_N_COLS,    NC);
    cpu_write(EXP_BASE + 4 * REG_FORMAT,    FMT);
    cpu_write(EXP_BASE + 4 * REG_ROWS_BASE, m.rows_base);
    cpu_write(EXP_BASE + 4 * REG_COLS_BASE, m.cols_base);
    cpu_write(EXP_BASE + 4 * REG_VALS_BASE, m.vals_base);
    cpu_write(EXP_BASE + 4 * REG_ELE_SZ,    m.ele_sz_word());
    cpu_write(EXP_BASE + 4 * REG_START,     1);
    t0 = cycles;
    total = NR * NC;
    idx = 0;
    mismatches = 0;
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
            if (failures < 20) $display("FAIL elem %0d got %0d exp %0d", idx, $signed(cpu_rdata[l]), e);
          end
          idx++;
        end
      end
    end
    cpu_req = 0;
    t1 = cycles;
    repeat (5) @(posedge clk);
    check(done, "done after the whole matrix");
    $display("%0d elements in %0d cycles (%0.2f cycles/element, %0.2f cycles/non-zero), CPU stalled %0d cycles",
             total, t1 - t0, real'(t1 - t0) / total, real'(t1 - t0) / m.nnz(), n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
