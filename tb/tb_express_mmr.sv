// tb_express_mmr: writes every configuration register, reads each back,
// checks the decoded configuration (including the three packed element
// sizes and the size normalisation) and the start/stop pulses.
module tb_express_mmr;
  import express_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en = 0;
  logic [2:0] wr_idx = 0, rd_idx = 0;
  logic [31:0] wr_data = 0, rd_data;
  cfg_t cfg;
  logic start_set, start_clr;
  int checks = 0, failures = 0;
  logic [31:0] vals [8];

  express_mmr dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(int i, logic [31:0] d);
    @(negedge clk); wr_en = 1; wr_idx = 3'(i); wr_data = d;
    @(negedge clk); wr_en = 0;
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
    vals = '{32'd1000, 32'd1024, 32'd2, 32'h100, 32'h2000, 32'h3004, 32'h00020401, 32'd0};
    for (int i = 0; i < 7; i++) wr(i, vals[i]);
    for (int i = 0; i < 7; i++) begin
      rd_idx = 3'(i); #1;
      check(rd_data == vals[i], $sformatf("read-back reg %0d", i));
    end
    check(cfg.n_rows == 1000 && cfg.n_cols == 1024, "sizes");
    check(cfg.fmt == FMT_RL, "format");
    check(cfg.rows_base == 32'h100 && cfg.cols_base == 32'h2000 && cfg.vals_base == 32'h3004, "bases");
    check(cfg.vals_sz == 1 && cfg.cols_sz == 4 && cfg.rows_sz == 2, "packed sizes");
    wr(6, 32'h0);
    check(cfg.vals_sz == 4 && cfg.cols_sz == 4 && cfg.rows_sz == 4, "size 0 reads as 4");
    @(negedge clk); wr_en = 1; wr_idx = 3'(REG_START); wr_data = 1;
    @(negedge clk); wr_en = 0;
    check(start_set && !start_clr, "start pulse");
    @(negedge clk);
    check(!start_set && !start_clr, "pulse is one cycle");
    @(negedge clk); wr_en = 1; wr_idx = 3'(REG_START); wr_data = 0;
    @(negedge clk); wr_en = 0;
    check(!start_set && start_clr, "stop pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
