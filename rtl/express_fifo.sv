// express_fifo: small synchronous first-in first-out queue used inside the
// back-end (column queue, value queue, outstanding-read tags).
//
// DEPTH entries of W bits. `dout` shows the oldest entry whenever `empty`
// is low; `pop` removes it and `push` appends `din` at the clock edge. Both
// may happen in the same cycle. Pushing when full or popping when empty is
// a usage error and is flagged by an assertion. `clear` empties the queue.
module express_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 4
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         clear,
  input  logic                         push,
  input  logic [W-1:0]                 din,
  input  logic                         pop,
  output logic [W-1:0]                 dout,
  output logic                         full,
  output logic                         empty,
  output logic [$clog2(DEPTH+1)-1:0]   count
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [PW-1:0] wp, rp;

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (int'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  assign full  = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign empty = (count == '0);
  assign dout  = mem[rp];

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else begin
      if (push) begin
        mem[wp] <= din;
        wp      <= inc(wp);
      end
      if (pop) rp <= inc(rp);
      count <= count + ($clog2(DEPTH+1))'(push) - ($clog2(DEPTH+1))'(pop);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n || clear) !(push && full && !pop));
  assert property (@(posedge clk) disable iff (!rst_n || clear) !(pop && empty));
endmodule
