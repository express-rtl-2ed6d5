// express_buf: the CPU-side data and mask buffers.
//
// NBUF vector-sized buffers of VEC 32-bit slots, each slot with a mask bit,
// used together as one streaming FIFO: the front-end fills slots in order,
// the CPU drains them in order through a single address, and a slot that
// has been read is free to be filled again. With NBUF = 1 this is the
// single-buffer arrangement; NBUF = 2 is double buffering, where the
// front-end fills one buffer while the CPU reads the other.
//
// Reads: a scalar read takes one element (lane 0). A vector read takes a
// whole buffer's worth, VEC elements, and is only possible once that many
// are waiting, or, after the last element of the matrix has been written,
// whatever is left (missing lanes read as value 0, mask 0). rd_ok tells the
// CPU port whether the read it is asked for can be served now; if not, the
// load is stalled. rd_data/rd_mask are combinational views of the slots at
// the read position; the read pointer moves at the clock edge of rd_req.
//
// status is the control-unit state word: active read and write buffer ids,
// next read and write slot, empty, full, fill-done and busy flags.
// Treating the buffers as one ring and the rule for a final partial vector
// are this design's choices.
module express_buf
  import express_pkg::*;
#(
  parameter int unsigned VEC  = 8,
  parameter int unsigned NBUF = 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  // fill side
  input  logic                wr_valid,
  output logic                wr_ready,
  input  logic [31:0]         wr_data,
  input  logic                wr_mask,
  input  logic                fill_done,
  input  logic                busy,
  // CPU side
  input  logic                rd_vec,
  output logic                rd_ok,
  input  logic                rd_req,
  output logic [VEC-1:0][31:0] rd_data,
  output logic [VEC-1:0]      rd_mask,
  output buf_status_t         status
);

  localparam int unsigned DEPTH = VEC * NBUF;
  localparam int unsigned PW    = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW    = $clog2(DEPTH + 1);

  logic [31:0]   data_q [DEPTH];
  logic          mask_q [DEPTH];
  logic [PW-1:0] wr_ptr, rd_ptr;
  logic [CW-1:0] count;
  logic [CW-1:0] n_take;
  logic          do_wr;

  function automatic logic [PW-1:0] wrap_add(input logic [PW-1:0] p, input int unsigned n);
    int unsigned s;
    s = int'(p) + n;
    if (s >= DEPTH) s = s - DEPTH;
    return PW'(s);
  endfunction

  assign wr_ready = (count < CW'(DEPTH));
  assign do_wr    = wr_valid && wr_ready;

  always_comb begin
    if (!rd_vec)                        n_take = CW'(1);
    else if (count >= CW'(VEC))         n_take = CW'(VEC);
    else                                n_take = count;
  end

  assign rd_ok = rd_vec ? ((count >= CW'(VEC)) || (fill_done && count != '0))
                        : (count != '0);

  always_comb begin
    for (int i = 0; i < VEC; i++) begin
      logic [PW-1:0] a;
      a = wrap_add(rd_ptr, i);
      if (i < int'(n_take)) begin
        rd_data[i] = data_q[a];
        rd_mask[i] = mask_q[a];
      end else begin
        rd_data[i] = '0;
        rd_mask[i] = 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
      for (int i = 0; i < DEPTH; i++) begin
        data_q[i] <= '0;
        mask_q[i] <= 1'b0;
      end
    end else begin
      if (do_wr) begin
        data_q[wr_ptr] <= wr_data;
        mask_q[wr_ptr] <= wr_mask;
        wr_ptr         <= wrap_add(wr_ptr, 1);
      end
      if (rd_req && rd_ok) rd_ptr <= wrap_add(rd_ptr, int'(n_take));
      count <= count + CW'(do_wr) - ((rd_req && rd_ok) ? n_take : CW'(0));
    end
  end

  always_comb begin
    status           = '0;
    status.rd_buf    = 8'(int'(rd_ptr) / VEC);
    status.rd_slot   = 6'(int'(rd_ptr) % VEC);
    status.wr_buf    = 8'(int'(wr_ptr) / VEC);
    status.wr_slot   = 6'(int'(wr_ptr) % VEC);
    status.empty     = (count == '0);
    status.full      = (count == CW'(DEPTH));
    status.fill_done = fill_done;
    status.busy      = busy;
  end

  // The ring never overflows or underflows.
  assert property (@(posedge clk) disable iff (!rst_n || clear) count <= CW'(DEPTH));

endmodule
