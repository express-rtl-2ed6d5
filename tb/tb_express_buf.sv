// tb_express_buf: drives random fills and random scalar/vector reads into
// a double-buffered instance (NBUF = 2) and compares every lane and mask bit
// with a queue model; checks full/empty flags, that a vector read waits for
// a whole buffer until the fill is done, and the final partial vector.
module tb_express_buf;
  import express_pkg::*;
  localparam int VEC = 8, NBUF = 2;
  logic clk = 0, rst_n = 0, clear = 0;
  always #5 clk = ~clk;
  logic wr_valid = 0, wr_ready, wr_mask = 0, fill_done = 0, busy = 1;
  logic [31:0] wr_data = 0;
  logic rd_vec = 0, rd_ok, rd_req = 0;
  logic [VEC-1:0][31:0] rd_data;
  logic [VEC-1:0] rd_mask;
  buf_status_t status;
  int checks = 0, failures = 0;
  int q_d[$];
  bit q_m[$];
  int n_wr = 0, n_full = 0, n_partial = 0;
  localparam int TOTAL = 501;

  express_buf #(.VEC(VEC), .NBUF(NBUF)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model and checks at the clock edge
  always @(posedge clk) if (rst_n) begin
    check(status.empty == (q_d.size() == 0) && status.full == (q_d.size() == VEC * NBUF), "flags");
    check(rd_ok == (rd_vec ? (q_d.size() >= VEC || (fill_done && q_d.size() > 0)) : q_d.size() > 0), "rd_ok");
    if (status.full) n_full++;
    if (rd_req && rd_ok) begin
      automatic int n = rd_vec ? VEC : 1;
      for (int l = 0; l < n; l++) begin
        if (q_d.size() > 0) begin
          automatic int d = q_d.pop_front();
          automatic bit m = q_m.pop_front();
          check(rd_data[l] == 32'(d) && rd_mask[l] == m, $sformatf("lane %0d data got %h exp %h q=%0d", l, rd_data[l], d, q_d.size()));
        end else begin
          check(rd_data[l] == 0 && rd_mask[l] == 0, "lane past end");
          n_partial++;
        end
      end
    end
    if (wr_valid && wr_ready) begin
      q_d.push_back(int'(wr_data));
      q_m.push_back(wr_mask);
      n_wr++;
    end
  end

  bit wr_taken = 0;
  always @(posedge clk) if (rst_n && wr_valid && wr_ready) wr_taken <= 1;

  always @(negedge clk) if (rst_n) begin
    if (!wr_valid || wr_taken) begin
      wr_taken = 0;
      wr_valid = (n_wr < TOTAL) && ($urandom_range(3) != 0);
      wr_data  = $urandom;
      wr_mask  = wr_data[0];
    end
    fill_done = (n_wr == TOTAL);
    rd_vec = 1'($urandom_range(1));
    rd_req = ($urandom_range(4) == 0) || (n_wr == TOTAL);
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    wait (n_wr == TOTAL && q_d.size() == 0);
    repeat (3) @(posedge clk);
    check(n_full > 0, "buffers became full");
    check(status.empty, "empty at the end");
    $display("partial lanes=%0d full cycles=%0d", n_partial, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
