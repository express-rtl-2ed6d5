// express_fe_pipe: format-agnostic front-end pipeline that turns the
// back-end's stream of non-zeros into a dense stream of values and mask bits.
//
// Four stages, as in the front-end pipeline of the design:
//   1 Read Next Idx  - take the next (row, col, value) token from the
//                      Idx/Value register into the stage-1 register.
//   2 Calc Gap       - compare the token's position with the current dense
//                      position (row, col). Equal: the element is the
//                      token's value and the token is consumed. Token ahead:
//                      the element is an inserted zero and the token waits.
//                      When the back-end has finished and no token is left,
//                      the rest of the matrix is zeros. The position then
//                      advances by one, wrapping at n_cols.
//   3 Read Value     - select the value or zero and form the mask bit
//                      (1 = stored non-zero, 0 = inserted zero).
//   4 Fill Buffer    - offer the element to the buffers (wr_valid/wr_ready).
// Comparing full (row, col) positions rather than bare columns lets the
// same comparator produce a row's trailing zeros and whole empty rows; that
// and dropping a token that lies behind the current position (which only
// malformed metadata can cause) are this design's choices.
//
// Timing: with tokens and buffer space available the pipeline writes one
// element per cycle, including inserted zeros. The first element reaches the
// buffer three cycles after its token enters stage 1. `run` low stops stage 2
// from producing; `init` clears every stage and the position. fe_done rises
// once all n_rows * n_cols elements have been handed to the buffers.
module express_fe_pipe
  import express_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             init,
  input  logic             run,
  input  logic [IDX_W-1:0] n_rows,
  input  logic [IDX_W-1:0] n_cols,
  // from the Idx/Value register
  input  logic             tok_valid,
  output logic             tok_ready,
  input  nz_tok_t          tok,
  input  logic             be_done,
  // to the buffers
  output logic             wr_valid,
  input  logic             wr_ready,
  output logic [31:0]      wr_data,
  output logic             wr_mask,
  output logic             fe_done,
  // activity, for performance counting
  output logic             zero_ins
);

  // stage 1: Read Next Idx
  logic             s1_valid;
  nz_tok_t          s1_tok;
  // stage 2: Calc Gap (owns the dense position)
  logic [IDX_W-1:0] pos_row, pos_col;
  logic             s2_valid, s2_nz;
  logic [31:0]      s2_val;
  // stage 3: Read Value
  logic             s3_valid, s3_mask;
  logic [31:0]      s3_data;

  logic s3_ready, s2_ready;
  logic finished, produce, take_s1, drop_s1, no_more_tok;
  logic tok_here, tok_behind;

  assign finished    = (pos_row >= n_rows) || (n_cols == '0);
  assign no_more_tok = be_done && !tok_valid && !s1_valid;
  assign tok_here    = s1_valid && (s1_tok.row == pos_row) && (s1_tok.col == pos_col);
  assign tok_behind  = s1_valid && ((s1_tok.row < pos_row) ||
                                    (s1_tok.row == pos_row && s1_tok.col < pos_col));

  assign s3_ready = !s3_valid || wr_ready;
  assign s2_ready = !s2_valid || s3_ready;

  always_comb begin
    produce = 1'b0;
    take_s1 = 1'b0;
    drop_s1 = 1'b0;
    if (run && !finished) begin
      if (tok_behind) begin
        drop_s1 = 1'b1;
      end else if (s2_ready && (s1_valid || no_more_tok)) begin
        produce = 1'b1;
        take_s1 = tok_here;
      end
    end
  end

  assign tok_ready = !s1_valid || take_s1 || drop_s1;
  assign zero_ins  = produce && !tok_here;

  always_ff @(posedge clk) begin
    if (!rst_n || init) begin
      s1_valid <= 1'b0;
      s1_tok   <= '0;
      pos_row  <= '0;
      pos_col  <= '0;
      s2_valid <= 1'b0;
      s2_nz    <= 1'b0;
      s2_val   <= '0;
      s3_valid <= 1'b0;
      s3_mask  <= 1'b0;
      s3_data  <= '0;
    end else begin
      // stage 1
      if (tok_ready) begin
        s1_valid <= tok_valid;
        if (tok_valid) s1_tok <= tok;
      end
      // stage 2
      if (produce) begin
        s2_valid <= 1'b1;
        s2_nz    <= tok_here;
        s2_val   <= s1_tok.val;
        if (pos_col == n_cols - 1'b1) begin
          pos_col <= '0;
          pos_row <= pos_row + 1'b1;
        end else begin
          pos_col <= pos_col + 1'b1;
        end
      end else if (s3_ready) begin
        s2_valid <= 1'b0;
      end
      // stage 3
      if (s3_ready) begin
        s3_valid <= s2_valid;
        s3_mask  <= s2_valid && s2_nz;
        s3_data  <= (s2_valid && s2_nz) ? s2_val : 32'd0;
      end
    end
  end

  // stage 4: Fill Buffer
  assign wr_valid = s3_valid;
  assign wr_data  = s3_data;
  assign wr_mask  = s3_mask;
  assign fe_done  = finished && !s2_valid && !s3_valid;

  // An offered element stays until the buffers take it.
  assert property (@(posedge clk) disable iff (!rst_n || init)
    (wr_valid && !wr_ready) |=> (wr_valid && $stable(wr_data) && $stable(wr_mask)));

endmodule
