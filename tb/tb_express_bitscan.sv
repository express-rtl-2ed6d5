// tb_express_bitscan: checks the bitmap priority encoder against a
// straightforward loop over random words and random [lo, hi) windows,
// including empty windows and all-zero words.
module tb_express_bitscan;
  logic [31:0] word;
  logic [4:0]  lo;
  logic [5:0]  hi;
  logic        found;
  logic [4:0]  pos;
  int checks = 0, failures = 0;

  express_bitscan #(.W(32)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 5000; t++) begin
      bit ef;
      int ep;
      word = $urandom;
      if (t % 5 == 0) word = word & $urandom & $urandom;  // sparse words
      if (t % 50 == 0) word = '0;
      lo = 5'($urandom_range(31));
      hi = 6'($urandom_range(32));
      #1;
      ef = 0; ep = 0;
      for (int i = 31; i >= 0; i--)
        if (word[i] && i >= lo && i < hi) begin ef = 1; ep = i; end
      checks++;
      if (found !== ef || (ef && pos != 5'(ep))) begin
        failures++;
        if (failures < 10) $display("FAIL word=%h lo=%0d hi=%0d got %0b/%0d exp %0b/%0d", word, lo, hi, found, pos, ef, ep);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
