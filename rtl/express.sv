// express: memory-side engine that expands a compressed sparse matrix into a
// dense stream for the CPU.
//
// Software describes a matrix stored in CSR, Bitmap or Run-Length form by
// writing eight configuration registers, sets the start bit, and then simply
// loads from one fixed buffer address, as if the matrix were stored dense
// in row-major order. Each load returns the next value (or VEC values) and,
// on a side-band, one mask bit per value telling the CPU which values are
// stored non-zeros and which are zeros inserted by the engine, so it can
// skip useless multiplications.
//
// Inside, a format-aware back-end (express_be) reads metadata and values
// through the memory port and emits (row, column, value) tokens into the
// Idx/Value register (express_nz_reg). A format-agnostic front-end pipeline
// (express_fe_pipe) compares each token's position with the current dense
// position, inserts zeros for the gap, and fills the buffers (express_buf),
// which the CPU drains through express_cpu_port. A control unit
// (express_ctrl) starts, pauses, resumes and completes the operation; the
// configuration registers are in express_mmr. Back-pressure flows from the
// buffers through the front-end to the back-end, so the back-end stops
// issuing memory reads when all buffers are full, and a CPU load finds the
// buffer empty only when the engine has fallen behind, in which case it is
// stalled.
//
// Interfaces:
//   CPU port    cpu_req/cpu_we/cpu_vec/cpu_addr/cpu_wdata, cpu_gnt (low =
//               stall), cpu_rvalid/cpu_rdata/cpu_rmask one cycle after gnt.
//   Memory port mem_req/mem_addr until mem_gnt, then mem_rvalid/mem_rdata;
//               32-bit words, up to four reads in flight, returned in order.
// Defaults: VEC = 8 lanes of 32 bits (a 32-byte buffer), NBUF = 1 buffer,
// as in the evaluated configuration.
module express
  import express_pkg::*;
#(
  parameter int unsigned VEC  = 8,
  parameter int unsigned NBUF = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cpu_req,
  input  logic                 cpu_we,
  input  logic                 cpu_vec,
  input  logic [31:0]          cpu_addr,
  input  logic [31:0]          cpu_wdata,
  output logic                 cpu_gnt,
  output logic                 cpu_rvalid,
  output logic [VEC-1:0][31:0] cpu_rdata,
  output logic [VEC-1:0]       cpu_rmask,
  output logic                 mem_req,
  output logic [31:0]          mem_addr,
  input  logic                 mem_gnt,
  input  logic                 mem_rvalid,
  input  logic [31:0]          mem_rdata,
  output logic                 busy,
  output logic                 done,
  output logic                 zero_ins
);

  cfg_t        cfg;
  buf_status_t status;

  logic        mmr_wr_en;
  logic [2:0]  mmr_idx;
  logic [31:0] mmr_wdata, mmr_rdata;
  logic        start_set, start_clr;
  logic        init, run, fe_done;

  logic        be_tok_valid, be_tok_ready, be_done;
  nz_tok_t     be_tok;
  logic        fe_tok_valid, fe_tok_ready;
  nz_tok_t     fe_tok;

  logic        wr_valid, wr_ready, wr_mask;
  logic [31:0] wr_data;

  logic                 buf_rd_vec, buf_rd_ok, buf_rd_req;
  logic [VEC-1:0][31:0] buf_rd_data;
  logic [VEC-1:0]       buf_rd_mask;

  express_cpu_port #(.VEC(VEC)) u_cpu_port (
    .clk, .rst_n,
    .cpu_req, .cpu_we, .cpu_vec, .cpu_addr, .cpu_wdata,
    .cpu_gnt, .cpu_rvalid, .cpu_rdata, .cpu_rmask,
    .mmr_wr_en, .mmr_idx, .mmr_wdata, .mmr_rdata, .status,
    .buf_rd_vec, .buf_rd_ok, .buf_rd_req, .buf_rd_data, .buf_rd_mask
  );

  express_mmr u_mmr (
    .clk, .rst_n,
    .wr_en   (mmr_wr_en),
    .wr_idx  (mmr_idx),
    .wr_data (mmr_wdata),
    .rd_idx  (mmr_idx),
    .rd_data (mmr_rdata),
    .cfg,
    .start_set, .start_clr
  );

  express_ctrl u_ctrl (
    .clk, .rst_n,
    .start_set, .start_clr, .fe_done,
    .init, .run, .busy, .done
  );

  express_be u_be (
    .clk, .rst_n, .cfg, .init, .run,
    .mem_req, .mem_addr, .mem_gnt, .mem_rvalid, .mem_rdata,
    .tok_valid (be_tok_valid),
    .tok       (be_tok),
    .tok_ready (be_tok_ready),
    .be_done
  );

  express_nz_reg u_nz_reg (
    .clk, .rst_n,
    .clear     (init),
    .in_valid  (be_tok_valid),
    .in_ready  (be_tok_ready),
    .in_tok    (be_tok),
    .out_valid (fe_tok_valid),
    .out_ready (fe_tok_ready),
    .out_tok   (fe_tok)
  );

  express_fe_pipe u_fe (
    .clk, .rst_n, .init, .run,
    .n_rows    (cfg.n_rows),
    .n_cols    (cfg.n_cols),
    .tok_valid (fe_tok_valid),
    .tok_ready (fe_tok_ready),
    .tok       (fe_tok),
    .be_done,
    .wr_valid, .wr_ready, .wr_data, .wr_mask,
    .fe_done,
    .zero_ins
  );

  express_buf #(.VEC(VEC), .NBUF(NBUF)) u_buf (
    .clk, .rst_n,
    .clear     (init),
    .wr_valid, .wr_ready, .wr_data, .wr_mask,
    .fill_done (done),
    .busy,
    .rd_vec    (buf_rd_vec),
    .rd_ok     (buf_rd_ok),
    .rd_req    (buf_rd_req),
    .rd_data   (buf_rd_data),
    .rd_mask   (buf_rd_mask),
    .status
  );

endmodule
