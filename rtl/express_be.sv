// express_be: format-aware back-end of the expansion engine.
//
// The back-end interprets the sparse format programmed in the configuration
// and produces, in row-major order, one token per stored non-zero: its row,
// its column and its value. It reads three arrays from memory:
//   CSR     rows[] = n_rows+1 offsets into cols[]; cols[] = column of each
//           non-zero. The next metadata address is the next rows[] entry at
//           the end of a row and the next cols[] entry inside a row.
//   Bitmap  rows[] = starting bit offset of each row in the bitmap;
//           cols[] = the bitmap, read as 32-bit words, least-significant bit
//           first. Each word is searched for the next 1 inside the row
//           (express_bitscan), and its position turned into a column. Words
//           holding only zeros are skipped without producing a token.
//   RL      rows[] = number of runs in each row; cols[] = pairs
//           (number of non-zeros in the run, start column of the run).
//           Consecutive non-zeros of a run take consecutive columns.
// In every format the i-th value is read from vals_base + i * vals_sz and
// sign-extended to 32 bits; metadata elements are zero-extended. Elements
// are little-endian and naturally aligned inside 32-bit words.
//
// The five steps of the back-end pipeline are spread over parts
// that run concurrently and share one memory read port:
//   walker   - computes metadata addresses, reads metadata and computes the
//              column of each non-zero (steps 1, 2 and 4); it pushes
//              (row, col) into a 4-entry column queue. Once the metadata is
//              in, it finds one non-zero per cycle in every format. In CSR
//              a column fetcher reads the cols array ahead of it, word by
//              word, up to the end of the current row.
//   fetcher  - reads the values array (step 3) word by word, as far as the
//              columns already found reach, with up to four reads in flight,
//              into a 4-entry word queue. Since the values array is read
//              strictly in order, its addresses do not depend on the
//              metadata, and 1- or 2-byte values share one word read.
//   join     - pairs the head column with its value, picked out of the
//              head word, into a token (step 5).
// The arbiter gives the fetcher priority, keeps a request that was not
// granted unchanged until it is, and tags each read so responses (which the
// memory returns in order) go to the part that asked: values first, then
// CSR columns, then the walker. The walker itself has one read in flight,
// and keeps the last metadata word it read, so an element in that word
// needs no further read. The queue depths, the word-wide reads, the
// metadata word cache, the arbitration and the value sign extension are
// this design's choices.
//
// Memory port: mem_req/mem_addr held until mem_gnt; words return in order
// with mem_rvalid, one cycle later for the on-chip SRAM, up to four reads in
// flight. Token port: tok_valid/tok_ready. Control: `init` (one cycle)
// restarts from row 0; `run` low stops new work (reads already in flight
// still complete). be_done rises once the last token has been taken.
module express_be
  import express_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  cfg_t        cfg,
  input  logic        init,
  input  logic        run,
  output logic        mem_req,
  output logic [31:0] mem_addr,
  input  logic        mem_gnt,
  input  logic        mem_rvalid,
  input  logic [31:0] mem_rdata,
  output logic        tok_valid,
  output nz_tok_t     tok,
  input  logic        tok_ready,
  output logic        be_done
);

  typedef enum logic [3:0] {
    S_IDLE,
    S_START,
    S_ROW,
    S_REQ,
    S_RSP,
    S_CSR_NEXT,
    S_BM_NEXT,
    S_BM_SCAN,
    S_RL_NEXT,
    S_RL_VAL,
    S_DONE
  } be_state_e;

  // What an outstanding read is for.
  typedef enum logic [3:0] {
    K_CSR_ROW0,
    K_CSR_ROWEND,
    K_BM_ROW,
    K_BM_WORD,
    K_RL_ROW,
    K_RL_NUM,
    K_RL_START
  } rd_kind_e;

  be_state_e        state;
  rd_kind_e         rd_kind;
  logic [31:0]      rd_addr;
  logic [2:0]       rd_sz;
  logic             rd_sext;

  // The walker keeps the last metadata word it read. A metadata element in
  // that word is taken from it without a memory read; in CSR a column found
  // there is queued in the same cycle.
  logic             wc_valid;
  logic [29:0]      wc_addr;
  logic [31:0]      wc_data;
  logic             wc_hit;

  logic [IDX_W-1:0] row;       // current row
  logic [31:0]      ptr;       // read position in cols[] (CSR, RL)
  logic [31:0]      row_end;   // CSR: end of the current row in cols[]
  logic [31:0]      bitpos;    // Bitmap: next bit to examine
  logic [31:0]      bitend;    // Bitmap: first bit of the next row
  logic [31:0]      bitoff;    // Bitmap: first bit of this row
  logic [31:0]      bm_word;   // Bitmap: word holding bitpos
  logic [31:0]      runs_left; // RL: runs still to read in this row
  logic [31:0]      run_left;  // RL: non-zeros still to emit in this run
  logic [IDX_W-1:0] col;

  // ---- column computation for the Bitmap format -------------------------
  logic [31:0] wbase;
  logic [31:0] hi_full;
  logic [5:0]  scan_hi;
  logic        scan_found;
  logic [4:0]  scan_pos;

  assign wbase   = {bitpos[31:5], 5'd0};
  assign hi_full = bitend - wbase;
  assign scan_hi = (hi_full > 32'd32) ? 6'd32 : hi_full[5:0];

  express_bitscan #(.W(32)) u_scan (
    .word  (bm_word),
    .lo    (bitpos[4:0]),
    .hi    (scan_hi),
    .found (scan_found),
    .pos   (scan_pos)
  );

  // CSR column word queue (see the column fetcher below)
  logic [IDX_W-1:0] c_col;
  logic             cw_full, cw_empty;

  // ---- column queue: walker -> join ---------------------------------------
  localparam int unsigned QD = 4;
  logic                 cq_push, cq_pop, cq_full, cq_empty;
  logic [2*IDX_W-1:0]   cq_din, cq_dout;
  logic [$clog2(QD+1)-1:0] cq_count;
  logic                 push_try;
  logic [IDX_W-1:0]     push_col;
  logic [IDX_W-1:0]     bm_col;

  assign bm_col = IDX_W'((wbase + {27'd0, scan_pos}) - bitoff);

  always_comb begin
    push_try = 1'b0;
    push_col = col;
    unique case (state)
      S_CSR_NEXT: begin push_try = (ptr < row_end) && !cw_empty; push_col = c_col; end
      S_BM_SCAN: begin push_try = scan_found; push_col = bm_col; end
      S_RL_VAL:  push_try = (run_left != 32'd0);
      default:   ;
    endcase
  end
  assign cq_push = run && push_try && !cq_full;
  assign cq_din  = {row, push_col};

  express_fifo #(.W(2 * IDX_W), .DEPTH(QD)) u_colq (
    .clk, .rst_n, .clear(init),
    .push(cq_push), .din(cq_din), .pop(cq_pop), .dout(cq_dout),
    .full(cq_full), .empty(cq_empty), .count(cq_count));

  logic [31:0] rsp_word, rsp_elem;   // metadata element returned to the walker
  logic        rsp_fire;

  // ---- CSR column fetcher ------------------------------------------------------
  // In CSR the cols array, like the values array, is read strictly in order.
  // Once rows[0] is known the fetcher reads it word by word, as far as the
  // end of the current row, into a 4-entry word queue; the walker takes one
  // column per cycle from the head word and releases it after its last
  // column.
  logic        c_active;           // CSR and the start of cols[] is known
  logic [31:0] c_waddr;            // next cols word to read
  logic [31:0] c_last;             // address of the last column of this row
  logic [31:0] c_start;            // address of the first column
  logic [2:0]  c_occ;              // words requested and not yet released
  logic        c_req, c_gnt, c_rvalid, c_pop;
  logic [1:0]  c_off, c_end;
  logic [31:0] cw_dout;
  logic [$clog2(QD+1)-1:0] cw_count;

  assign c_last  = elem_addr(cfg.cols_base, row_end - 32'd1, cfg.cols_sz);
  assign c_start = elem_addr(cfg.cols_base, rsp_elem, cfg.cols_sz);
  assign c_req   = run && c_active && (state != S_DONE) && (row_end != 32'd0) && (c_waddr <= c_last) && (c_occ < 3'(QD));
  assign c_off   = 2'(elem_addr(cfg.cols_base, ptr, cfg.cols_sz));
  assign c_end   = c_off + 2'(cfg.cols_sz);
  assign c_col   = IDX_W'(elem_extract(cw_dout, c_off, cfg.cols_sz, 1'b0));
  assign c_pop   = cq_push && (state == S_CSR_NEXT) && (c_end == 2'd0);

  express_fifo #(.W(32), .DEPTH(QD)) u_colw (
    .clk, .rst_n, .clear(init),
    .push(c_rvalid), .din(mem_rdata), .pop(c_pop), .dout(cw_dout),
    .full(cw_full), .empty(cw_empty), .count(cw_count));

  always_ff @(posedge clk) begin
    if (!rst_n || init) begin
      c_active <= 1'b0;
      c_waddr  <= '0;
      c_occ    <= '0;
    end else begin
      if (rsp_fire && rd_kind == K_CSR_ROW0) begin
        c_active <= 1'b1;
        c_waddr  <= c_start & 32'hFFFF_FFFC;
      end else if (c_gnt) begin
        c_waddr  <= c_waddr + 32'd4;
      end
      c_occ <= c_occ + 3'(c_gnt) - 3'(c_pop);
    end
  end

  // ---- value fetcher ---------------------------------------------------------
  // The fetcher reads whole words of the values array, in order, as far as
  // the columns already found reach, so narrow values are read four or two
  // to a word. The join picks each value out of the word at the queue head
  // and releases the word after its last value.
  logic [31:0] n_push;             // columns found so far
  logic [31:0] v_take;             // values handed over so far
  logic [31:0] v_waddr;            // next values word to read
  logic [31:0] v_last;             // address of the last value needed so far
  logic [2:0]  v_occ;              // words requested and not yet released
  logic        v_req, v_gnt, v_rvalid, v_pop;
  logic [1:0]  v_off, v_end;
  logic        vq_full, vq_empty;
  logic [31:0] vq_dout;
  logic [$clog2(QD+1)-1:0] vq_count;

  assign v_last = elem_addr(cfg.vals_base, n_push - 32'd1, cfg.vals_sz);
  assign v_req  = run && !cq_empty && (v_waddr <= v_last) && (v_occ < 3'(QD));
  assign v_off  = 2'(elem_addr(cfg.vals_base, v_take, cfg.vals_sz));
  assign v_end  = v_off + 2'(cfg.vals_sz);
  assign v_pop  = cq_pop && (v_end == 2'd0);

  express_fifo #(.W(32), .DEPTH(QD)) u_valq (
    .clk, .rst_n, .clear(init),
    .push(v_rvalid), .din(mem_rdata), .pop(v_pop), .dout(vq_dout),
    .full(vq_full), .empty(vq_empty), .count(vq_count));

  // ---- memory arbiter ----------------------------------------------------------
  typedef enum logic [1:0] { SEL_WALK = 2'd0, SEL_VAL = 2'd1, SEL_COL = 2'd2 } sel_e;
  sel_e        sel, sel_q, tag_head;
  logic        hold_q, w_req, w_gnt, w_rvalid, grant, can_issue;
  logic        tag_full, tag_empty;
  logic [$clog2(QD+1)-1:0] tag_count;
  logic [1:0]  tag_dout;

  assign w_req     = (state == S_REQ) && !wc_hit;
  assign can_issue = !tag_full;
  assign sel       = hold_q ? sel_q : (v_req ? SEL_VAL : (c_req ? SEL_COL : SEL_WALK));
  assign mem_req   = hold_q || (can_issue && (v_req || c_req || w_req));
  assign mem_addr  = (sel == SEL_VAL) ? v_waddr :
                     (sel == SEL_COL) ? c_waddr : {rd_addr[31:2], 2'b00};
  assign grant     = mem_req && mem_gnt;
  assign v_gnt     = grant && (sel == SEL_VAL);
  assign w_gnt     = grant && (sel == SEL_WALK);
  assign c_gnt     = grant && (sel == SEL_COL);
  assign tag_head  = sel_e'(tag_dout);
  assign v_rvalid  = mem_rvalid && (tag_head == SEL_VAL);
  assign w_rvalid  = mem_rvalid && (tag_head == SEL_WALK);
  assign c_rvalid  = mem_rvalid && (tag_head == SEL_COL);

  express_fifo #(.W(2), .DEPTH(QD)) u_tags (
    .clk, .rst_n, .clear(init),
    .push(grant), .din(sel), .pop(mem_rvalid), .dout(tag_dout),
    .full(tag_full), .empty(tag_empty), .count(tag_count));

  always_ff @(posedge clk) begin
    if (!rst_n || init) begin
      hold_q  <= 1'b0;
      sel_q   <= SEL_WALK;
      n_push  <= '0;
      v_take  <= '0;
      v_waddr <= {cfg.vals_base[31:2], 2'b00};
      v_occ   <= '0;
    end else begin
      hold_q  <= mem_req && !mem_gnt;
      sel_q   <= sel;
      if (cq_push) n_push  <= n_push + 32'd1;
      if (cq_pop)  v_take  <= v_take + 32'd1;
      if (v_gnt)   v_waddr <= v_waddr + 32'd4;
      v_occ <= v_occ + 3'(v_gnt) - 3'(v_pop);
    end
  end

  assign wc_hit   = wc_valid && (rd_addr[31:2] == wc_addr);
  assign rsp_word = (state == S_REQ) ? wc_data : mem_rdata;
  assign rsp_elem = elem_extract(rsp_word, rd_addr[1:0], rd_sz, rd_sext);
  assign rsp_fire = ((state == S_REQ) && wc_hit) || ((state == S_RSP) && w_rvalid);

  always_ff @(posedge clk) begin
    if (!rst_n || init) begin
      wc_valid <= 1'b0;
      wc_addr  <= '0;
      wc_data  <= '0;
    end else if (w_rvalid) begin
      wc_valid <= 1'b1;
      wc_addr  <= rd_addr[31:2];
      wc_data  <= mem_rdata;
    end
  end

  // ---- join: hand (row, col, value) to the front-end ------------------------
  assign tok_valid = run && !cq_empty && !vq_empty;
  assign tok       = '{row: cq_dout[2*IDX_W-1:IDX_W], col: cq_dout[IDX_W-1:0], val: elem_extract(vq_dout, v_off, cfg.vals_sz, 1'b1)};
  assign cq_pop    = tok_valid && tok_ready;
  assign be_done   = (state == S_DONE) && cq_empty;

  logic [31:0] row_w;
  assign row_w = {{(32-IDX_W){1'b0}}, row};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      rd_kind   <= K_CSR_ROW0;
      rd_addr   <= '0;
      rd_sz     <= 3'd4;
      rd_sext   <= 1'b0;
      row       <= '0;
      ptr       <= '0;
      row_end   <= '0;
      bitpos    <= '0;
      bitend    <= '0;
      bitoff    <= '0;
      bm_word   <= '0;
      runs_left <= '0;
      run_left  <= '0;
      col       <= '0;
    end else if (init) begin
      state     <= S_START;
      row       <= '0;
      ptr       <= '0;
      row_end   <= '0;
      runs_left <= '0;
      run_left  <= '0;
    end else if (run || state == S_REQ || state == S_RSP) begin
      unique case (state)
        S_IDLE, S_DONE: ;

        S_START: begin
          if (cfg.fmt == FMT_CSR) begin
            rd_kind <= K_CSR_ROW0;
            rd_addr <= cfg.rows_base;
            rd_sz   <= cfg.rows_sz;
            rd_sext <= 1'b0;
            state   <= S_REQ;
          end else begin
            state   <= S_ROW;
          end
        end

        // Start of a row: read its aggregate entry from rows[].
        S_ROW: begin
          if (row == cfg.n_rows) begin
            state <= S_DONE;
          end else begin
            rd_sz   <= cfg.rows_sz;
            rd_sext <= 1'b0;
            state   <= S_REQ;
            unique case (cfg.fmt)
              FMT_CSR: begin
                rd_kind <= K_CSR_ROWEND;
                rd_addr <= elem_addr(cfg.rows_base, row_w + 32'd1, cfg.rows_sz);
              end
              FMT_BITMAP: begin
                rd_kind <= K_BM_ROW;
                rd_addr <= elem_addr(cfg.rows_base, row_w, cfg.rows_sz);
              end
              default: begin
                rd_kind <= K_RL_ROW;
                rd_addr <= elem_addr(cfg.rows_base, row_w, cfg.rows_sz);
              end
            endcase
          end
        end

        S_REQ, S_RSP: if (rsp_fire) begin
          unique case (rd_kind)
            K_CSR_ROW0: begin
              ptr   <= rsp_elem;
              state <= S_ROW;
            end
            K_CSR_ROWEND: begin
              row_end <= rsp_elem;
              state   <= S_CSR_NEXT;
            end
            K_BM_ROW: begin
              bitoff <= rsp_elem;
              bitpos <= rsp_elem;
              bitend <= rsp_elem + {{(32-IDX_W){1'b0}}, cfg.n_cols};
              state  <= S_BM_NEXT;
            end
            K_BM_WORD: begin
              bm_word <= rsp_word;
              state   <= S_BM_SCAN;
            end
            K_RL_ROW: begin
              runs_left <= rsp_elem;
              state     <= S_RL_NEXT;
            end
            K_RL_NUM: begin
              run_left <= rsp_elem;
              ptr      <= ptr + 32'd1;
              rd_kind  <= K_RL_START;
              rd_addr  <= elem_addr(cfg.cols_base, ptr + 32'd1, cfg.cols_sz);
              state    <= S_REQ;
            end
            default: begin // K_RL_START
              col       <= rsp_elem[IDX_W-1:0];
              ptr       <= ptr + 32'd1;
              runs_left <= runs_left - 32'd1;
              state     <= S_RL_VAL;
            end
          endcase
        end else if (w_gnt) begin
          state <= S_RSP;
        end

        // CSR: inside the row read the next column, at its end move on.
        S_CSR_NEXT: begin
          if (ptr < row_end) begin
            if (cq_push) ptr <= ptr + 32'd1;
          end else begin
            row   <= row + 1'b1;
            state <= S_ROW;
          end
        end

        // Bitmap: fetch the word holding bitpos, or finish the row.
        S_BM_NEXT: begin
          if (bitpos >= bitend) begin
            row   <= row + 1'b1;
            state <= S_ROW;
          end else begin
            rd_kind <= K_BM_WORD;
            rd_addr <= cfg.cols_base + {3'd0, bitpos[31:5], 2'b00};
            rd_sz   <= 3'd4;
            rd_sext <= 1'b0;
            state   <= S_REQ;
          end
        end

        // Bitmap: search the cached word for the next 1 inside the row.
        S_BM_SCAN: begin
          if (scan_found) begin
            if (cq_push) begin
              bitpos <= wbase + {27'd0, scan_pos} + 32'd1;
              if (scan_pos == 5'd31 || wbase + {27'd0, scan_pos} + 32'd1 >= bitend)
                state <= S_BM_NEXT;
            end
          end else begin
            bitpos <= wbase + 32'd32;
            state  <= S_BM_NEXT;
          end
        end

        // RL: read the next (count, start) pair or finish the row.
        S_RL_NEXT: begin
          if (runs_left == 32'd0) begin
            row   <= row + 1'b1;
            state <= S_ROW;
          end else begin
            rd_kind <= K_RL_NUM;
            rd_addr <= elem_addr(cfg.cols_base, ptr, cfg.cols_sz);
            rd_sz   <= cfg.cols_sz;
            rd_sext <= 1'b0;
            state   <= S_REQ;
          end
        end

        // RL: read the values of the current run one by one.
        S_RL_VAL: begin
          if (run_left == 32'd0) begin
            state <= S_RL_NEXT;
          end else if (cq_push) begin
            col      <= col + 1'b1;
            run_left <= run_left - 32'd1;
          end
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  // Queue bookkeeping: every column waiting for a value is still queued,
  // every value requested and not yet joined is queued or in flight, and
  // responses only arrive for reads that were issued.
  assert property (@(posedge clk) disable iff (!rst_n) n_push - v_take == 32'(cq_count));
  assert property (@(posedge clk) disable iff (!rst_n)
    32'(v_occ) + 32'(c_occ) == 32'(vq_count) + 32'(cw_count) + (32'(tag_count) - 32'(state == S_RSP)));
  assert property (@(posedge clk) disable iff (!rst_n) !(cw_full && c_rvalid));
  assert property (@(posedge clk) disable iff (!rst_n) !(vq_full && v_rvalid));
  assert property (@(posedge clk) disable iff (!rst_n) !(tag_empty && mem_rvalid));

  // A request is held until granted.
  assert property (@(posedge clk) disable iff (!rst_n)
    (mem_req && !mem_gnt) |=> (mem_req && $stable(mem_addr)));

endmodule
