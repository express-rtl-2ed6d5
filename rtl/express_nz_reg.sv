// express_nz_reg: the Idx/Value register between back-end and front-end.
//
// Holds one (row, column, value) token produced by the back-end until the
// front-end takes it. It is a single-entry register with valid/ready flow
// control on both sides: it accepts a new token when empty or when its
// current token leaves in the same cycle, so a steady stream passes at one
// token per cycle. When the front-end stops taking tokens, in_ready drops
// and the back-end stalls. The valid/ready handshake is this design's
// choice; the document only names the two registers.
// Timing: a token written at edge n is visible on out_tok from edge n.
module express_nz_reg
  import express_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    clear,
  input  logic    in_valid,
  output logic    in_ready,
  input  nz_tok_t in_tok,
  output logic    out_valid,
  input  logic    out_ready,
  output nz_tok_t out_tok
);

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      out_valid <= 1'b0;
      out_tok   <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) out_tok <= in_tok;
    end
  end

  // A held token must not change until it is taken.
  property p_hold;
    @(posedge clk) disable iff (!rst_n || clear)
      (out_valid && !out_ready) |=> (out_valid && $stable(out_tok));
  endproperty
  assert property (p_hold);

endmodule
