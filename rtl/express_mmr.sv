// express_mmr: the eight memory-mapped configuration registers.
//
// Software programs the matrix description here before setting the start
// bit: n_rows, n_cols, format, rows_base, cols_base, vals_base, ele_sz and
// start, each 32 bits wide, in that order (the order of the published
// register list). ele_sz packs three byte sizes so that the rows, cols and
// values arrays may each use 1-, 2- or 4-byte elements:
//   ele_sz[7:0] = values size, [15:8] = cols size, [23:16] = rows size.
// A zero field reads as 4 bytes. Packing the three sizes into one register
// is this design's choice.
//
// Interface: one write port and one read port (combinational read) indexed
// by register number. All registers read back, which lets software save and
// restore the configuration across a context switch. Writing the start
// register raises start_set (bit 0 = 1) or start_clr (bit 0 = 0) for one
// cycle; the stored start bit follows the write.
// Timing: writes take effect at the next clock edge.
module express_mmr
  import express_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_en,
  input  logic [2:0]  wr_idx,
  input  logic [31:0] wr_data,
  input  logic [2:0]  rd_idx,
  output logic [31:0] rd_data,
  output cfg_t        cfg,
  output logic        start_set,
  output logic        start_clr
);

  logic [31:0] regs [8];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 8; i++) regs[i] <= '0;
      start_set <= 1'b0;
      start_clr <= 1'b0;
    end else begin
      start_set <= 1'b0;
      start_clr <= 1'b0;
      if (wr_en) begin
        regs[wr_idx] <= wr_data;
        if (wr_idx == REG_START) begin
          start_set <= wr_data[0];
          start_clr <= ~wr_data[0];
        end
      end
    end
  end

  assign rd_data = regs[rd_idx];

  always_comb begin
    cfg           = '0;
    cfg.n_rows    = regs[REG_N_ROWS][IDX_W-1:0];
    cfg.n_cols    = regs[REG_N_COLS][IDX_W-1:0];
    cfg.fmt       = sparse_fmt_e'(regs[REG_FORMAT][1:0]);
    cfg.rows_base = regs[REG_ROWS_BASE];
    cfg.cols_base = regs[REG_COLS_BASE];
    cfg.vals_base = regs[REG_VALS_BASE];
    cfg.vals_sz   = norm_size(regs[REG_ELE_SZ][7:0]);
    cfg.cols_sz   = norm_size(regs[REG_ELE_SZ][15:8]);
    cfg.rows_sz   = norm_size(regs[REG_ELE_SZ][23:16]);
  end

endmodule
