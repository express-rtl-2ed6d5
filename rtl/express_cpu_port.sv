// express_cpu_port: the engine's face on the CPU load/store interface.
//
// Decodes CPU accesses in the range 0xC000_0000 .. 0xC000_1FFF:
//   0xC000_0000 + 4*i (i = 0..7)  configuration registers, read/write
//   0xC000_0020                   status word, read only
//   0xC000_1000 .. 0xC000_1FFF    the data buffer (any address in this page)
// Loads from the buffer return the next element (scalar, cpu_vec = 0) or the
// next VEC elements (vector, cpu_vec = 1) together with the mask bits on
// the side-band cpu_rmask. A buffer load that cannot be served yet is
// stalled by keeping cpu_gnt low until data is ready. Stores to the buffer
// and accesses outside the decoded registers are accepted and ignored
// (loads return 0). The buffer address follows the published mapping; the
// register and status addresses are this design's choice.
//
// Timing: the CPU holds cpu_req and its address until cpu_gnt; load data
// and mask come back with cpu_rvalid in the following cycle. A store to a
// register takes effect at the edge where it is granted.
module express_cpu_port
  import express_pkg::*;
#(
  parameter int unsigned VEC = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // CPU side
  input  logic                 cpu_req,
  input  logic                 cpu_we,
  input  logic                 cpu_vec,
  input  logic [31:0]          cpu_addr,
  input  logic [31:0]          cpu_wdata,
  output logic                 cpu_gnt,
  output logic                 cpu_rvalid,
  output logic [VEC-1:0][31:0] cpu_rdata,
  output logic [VEC-1:0]       cpu_rmask,
  // configuration registers
  output logic                 mmr_wr_en,
  output logic [2:0]           mmr_idx,
  output logic [31:0]          mmr_wdata,
  input  logic [31:0]          mmr_rdata,
  input  buf_status_t          status,
  // buffers
  output logic                 buf_rd_vec,
  input  logic                 buf_rd_ok,
  output logic                 buf_rd_req,
  input  logic [VEC-1:0][31:0] buf_rd_data,
  input  logic [VEC-1:0]       buf_rd_mask
);

  logic in_range, is_buf, is_mmr, is_status;
  logic [31:0] off;

  assign off       = cpu_addr - EXP_BASE;
  assign in_range  = (cpu_addr >= EXP_BASE) && (cpu_addr < EXP_LIMIT);
  assign is_buf    = in_range && (cpu_addr >= EXP_BUFFER);
  assign is_mmr    = in_range && (off < 32'h20);
  assign is_status = (cpu_addr == EXP_STATUS);

  assign cpu_gnt    = cpu_req && (cpu_we || !is_buf || buf_rd_ok);
  assign buf_rd_vec = cpu_vec;
  assign buf_rd_req = cpu_gnt && !cpu_we && is_buf;

  assign mmr_wr_en  = cpu_gnt && cpu_we && is_mmr;
  assign mmr_idx    = off[4:2];
  assign mmr_wdata  = cpu_wdata;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cpu_rvalid <= 1'b0;
      cpu_rdata  <= '0;
      cpu_rmask  <= '0;
    end else begin
      cpu_rvalid <= cpu_gnt && !cpu_we;
      if (cpu_gnt && !cpu_we) begin
        cpu_rdata <= '0;
        cpu_rmask <= '0;
        if (is_buf) begin
          cpu_rdata <= buf_rd_data;
          cpu_rmask <= buf_rd_mask;
        end else if (is_mmr) begin
          cpu_rdata[0] <= mmr_rdata;
        end else if (is_status) begin
          cpu_rdata[0] <= status;
        end
      end
    end
  end

  // A stalled load keeps its request and address.
  assert property (@(posedge clk) disable iff (!rst_n)
    (cpu_req && !cpu_gnt) |=> (cpu_req && $stable(cpu_addr)));

endmodule
