// tb_express_cpu_port: checks the address decode and timing of the CPU
// port: register writes and reads, the status word, scalar and vector
// buffer loads with data and mask one cycle after the grant, a load
// stalled until the buffer reports data, ignored buffer stores and
// out-of-range accesses.
module tb_express_cpu_port;
  import express_pkg::*;
  localparam int VEC = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cpu_req = 0, cpu_we = 0, cpu_vec = 0, cpu_gnt, cpu_rvalid;
  logic [31:0] cpu_addr = 0, cpu_wdata = 0;
  logic [VEC-1:0][31:0] cpu_rdata;
  logic [VEC-1:0] cpu_rmask;
  logic mmr_wr_en;
  logic [2:0] mmr_idx;
  logic [31:0] mmr_wdata, mmr_rdata;
  buf_status_t status;
  logic buf_rd_vec, buf_rd_ok = 0, buf_rd_req;
  logic [VEC-1:0][31:0] buf_rd_data;
  logic [VEC-1:0] buf_rd_mask;
  int checks = 0, failures = 0;
  logic [31:0] regs [8];
  int n_rd_req = 0;

  express_cpu_port #(.VEC(VEC)) dut (.*);

  // simple register file and buffer stand-ins
  assign mmr_rdata = regs[mmr_idx];
  always @(posedge clk) begin
    if (mmr_wr_en) regs[mmr_idx] <= mmr_wdata;
    if (buf_rd_req) n_rd_req <= n_rd_req + 1;
  end
  always_comb for (int l = 0; l < VEC; l++) buf_rd_data[l] = 32'(1000 + 10 * n_rd_req + l);
  assign buf_rd_mask = 8'hA5;
  assign status = '{rd_buf: 8'd1, wr_buf: 8'd2, rd_slot: 6'd3, wr_slot: 6'd4,
                    empty: 1'b0, full: 1'b1, fill_done: 1'b0, busy: 1'b1};

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic access(bit we, bit vec, logic [31:0] a, logic [31:0] d, output int wait_cycles);
    @(negedge clk);
    cpu_req = 1; cpu_we = we; cpu_vec = vec; cpu_addr = a; cpu_wdata = d;
    wait_cycles = 0;
    @(posedge clk);
    while (!cpu_gnt) begin wait_cycles++; @(posedge clk); end
    @(negedge clk);
    cpu_req = 0; cpu_we = 0;
    check(cpu_rvalid == !we, "rvalid only for loads, one cycle after gnt");
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w;
    foreach (regs[i]) regs[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 8; i++) access(1, 0, EXP_BASE + 4 * i, 32'h1111 * (i + 1), w);
    for (int i = 0; i < 8; i++) begin
      access(0, 0, EXP_BASE + 4 * i, 0, w);
      check(cpu_rdata[0] == 32'h1111 * (i + 1) && cpu_rmask == 0, $sformatf("register %0d", i));
    end
    access(0, 0, EXP_STATUS, 0, w);
    check(cpu_rdata[0] == 32'h0102_0C45, $sformatf("status word %h", cpu_rdata[0]));
    // load stalled until the buffer has data
    fork
      access(0, 1, EXP_BUFFER, 0, w);
      begin repeat (7) @(posedge clk); @(negedge clk); buf_rd_ok = 1; end
    join
    check(w >= 6, $sformatf("load stalled while buffer not ready (%0d cycles)", w));
    check(cpu_rdata[3] == 32'd1003 && cpu_rmask == 8'hA5, "vector data and mask");
    check(n_rd_req == 1, "one buffer read");
    access(0, 0, EXP_BUFFER + 32'h10, 0, w);
    check(w == 0 && cpu_rdata[0] == 32'd1010 && n_rd_req == 2, "scalar load anywhere in the buffer page");
    access(1, 0, EXP_BUFFER, 32'hDEAD, w);
    check(n_rd_req == 2 && regs[0] == 32'h1111, "buffer store ignored");
    access(0, 0, 32'h0000_1000, 0, w);
    check(cpu_rdata == '0 && cpu_rmask == '0, "out-of-range load returns 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
