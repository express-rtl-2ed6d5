// express_pkg: types and constants shared by the sparse-matrix expansion engine.
//
// The engine reads a sparse matrix stored in CSR, Bitmap or Run-Length form
// and hands the CPU a dense, row-major stream of values together with one
// mask bit per value (1 = a stored non-zero, 0 = an inserted zero). This
// package holds the format encoding, the CPU-side address map, the
// configuration record written through the memory-mapped registers, and
// the (row, column, value) token that the back-end passes to the front-end.
//
// The register names and their order follow the published register list;
// the numeric encodings and addresses below the buffer address are this
// design's own choice.
package express_pkg;

  // Sparse formats understood by the back-end.
  typedef enum logic [1:0] {
    FMT_CSR    = 2'd0,
    FMT_BITMAP = 2'd1,
    FMT_RL     = 2'd2
  } sparse_fmt_e;

  // Memory-mapped register indices (word offsets from EXP_BASE).
  typedef enum logic [2:0] {
    REG_N_ROWS    = 3'd0,
    REG_N_COLS    = 3'd1,
    REG_FORMAT    = 3'd2,
    REG_ROWS_BASE = 3'd3,
    REG_COLS_BASE = 3'd4,
    REG_VALS_BASE = 3'd5,
    REG_ELE_SZ    = 3'd6,
    REG_START     = 3'd7
  } mmr_idx_e;

  // CPU-visible address map.
  localparam logic [31:0] EXP_BASE    = 32'hC000_0000; // MMRs, 4 bytes each
  localparam logic [31:0] EXP_STATUS  = 32'hC000_0020; // read-only status word
  localparam logic [31:0] EXP_BUFFER  = 32'hC000_1000; // streaming buffer
  localparam logic [31:0] EXP_LIMIT   = 32'hC000_2000; // end of the range

  localparam int unsigned IDX_W = 16;  // row / column counter width

  // Configuration as seen by the engine.
  typedef struct packed {
    logic [IDX_W-1:0] n_rows;
    logic [IDX_W-1:0] n_cols;
    sparse_fmt_e      fmt;
    logic [31:0]      rows_base;
    logic [31:0]      cols_base;
    logic [31:0]      vals_base;
    logic [2:0]       rows_sz;   // element size in bytes: 1, 2 or 4
    logic [2:0]       cols_sz;
    logic [2:0]       vals_sz;
  } cfg_t;

  // One non-zero, as supplied by the back-end (the "Idx" and "Value" registers).
  typedef struct packed {
    logic [IDX_W-1:0] row;
    logic [IDX_W-1:0] col;
    logic [31:0]      val;
  } nz_tok_t;

  // Control-unit state word of the buffers, readable at EXP_STATUS.
  typedef struct packed {
    logic [7:0] rd_buf;   // active read buffer id
    logic [7:0] wr_buf;   // active write buffer id
    logic [5:0] rd_slot;  // next read slot in the read buffer
    logic [5:0] wr_slot;  // next write slot in the write buffer
    logic       empty;    // no element waiting to be read
    logic       full;     // every slot holds an unread element
    logic       fill_done;// the last element of the matrix has been written
    logic       busy;     // an expansion is in progress
  } buf_status_t;

  // Normalise an element-size field: 1, 2 or 4 bytes, anything else is 4.
  function automatic logic [2:0] norm_size(input logic [7:0] sz);
    case (sz)
      8'd1:    return 3'd1;
      8'd2:    return 3'd2;
      default: return 3'd4;
    endcase
  endfunction

  // Byte address of element idx of an array at base with element size sz.
  function automatic logic [31:0] elem_addr(input logic [31:0] base,
                                            input logic [31:0] idx,
                                            input logic [2:0]  sz);
    case (sz)
      3'd1:    return base + idx;
      3'd2:    return base + (idx << 1);
      default: return base + (idx << 2);
    endcase
  endfunction

  // Extract an element of size sz at byte address addr from the aligned
  // 32-bit word that contains it (little-endian). sext selects sign extension.
  function automatic logic [31:0] elem_extract(input logic [31:0] word,
                                               input logic [1:0]  byte_off,
                                               input logic [2:0]  sz,
                                               input logic        sext);
    logic [31:0] sh;
    sh = word >> {byte_off, 3'b000};
    case (sz)
      3'd1:    return sext ? {{24{sh[7]}},  sh[7:0]}  : {24'd0, sh[7:0]};
      3'd2:    return sext ? {{16{sh[15]}}, sh[15:0]} : {16'd0, sh[15:0]};
      default: return sh;
    endcase
  endfunction

endpackage
