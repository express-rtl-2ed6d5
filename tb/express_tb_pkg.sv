// express_tb_pkg: reference models shared by the testbenches.
//
// Generates a random sparse matrix (row-major, with a chosen sparsity and a
// chosen mean length of non-zero runs) and encodes it, independently of the
// RTL, into the three compressed layouts the engine reads:
//   CSR     rows[] = n+1 offsets, cols[] = column of each non-zero
//   Bitmap  rows[] = bit offset of each row, cols[] = LSB-first bitmap words
//   RL      rows[] = runs per row, cols[] = (count, start column) pairs
// followed by the values array. The encoded arrays are written into a byte
// image that a testbench copies into the memory model.
package express_tb_pkg;

  typedef int          int_q_t[$];
  typedef byte unsigned img_t[];

  class sparse_matrix;
    int n_rows, n_cols;
    int dense[];          // row-major values, 0 = zero
    int vsz, csz, rsz;    // element sizes in bytes of vals, cols, rows
    // byte image and the array bases inside it
    byte unsigned img[];
    int rows_base, cols_base, vals_base;

    function new(int r, int c);
      n_rows = r; n_cols = c;
      dense  = new[r * c];
      vsz = 2; csz = 2; rsz = 4;
    endfunction

    // Random non-zero value representable in vsz bytes (signed).
    function int rand_val();
      int v;
      do begin
        v = $urandom;
        case (vsz)
          1: v = int'(signed'(v[7:0]));
          2: v = int'(signed'(v[15:0]));
          default: ;
        endcase
      end while (v == 0);
      return v;
    endfunction

    // sparsity_pct: percentage of zeros; run_len: mean non-zero run length.
    function void randomize_matrix(int sparsity_pct, int run_len);
      bit in_run;
      int nz_pct;
      nz_pct = 100 - sparsity_pct;
      for (int r = 0; r < n_rows; r++) begin
        in_run = 0;
        for (int c = 0; c < n_cols; c++) begin
          // A Markov chain: continue a run with prob (1 - 1/run_len); start a
          // run with the probability that keeps the mean density at nz_pct.
          if (in_run)              in_run = (run_len > 1) && ($urandom_range(run_len - 1) != 0);
          else if (nz_pct >= 100)  in_run = 1;
          else if (nz_pct <= 0)    in_run = 0;
          else in_run = ($urandom_range(run_len * (100 - nz_pct) - 1) < nz_pct);
          dense[r * n_cols + c] = in_run ? rand_val() : 0;
        end
      end
    endfunction

    function int nnz();
      int n = 0;
      foreach (dense[i]) if (dense[i] != 0) n++;
      return n;
    endfunction

    function void put(int addr, int val, int sz);
      for (int b = 0; b < sz; b++) img[addr + b] = byte'(val >> (8 * b));
    endfunction

    function int align4(int a);
      return (a + 3) & ~3;
    endfunction

    // Encode into img. fmt: 0 = CSR, 1 = Bitmap, 2 = RL.
    function void encode(int fmt, int base);
      int_q_t rows, cols, vals;
      int nbits, nwords, p;
      int bm[];
      rows = {}; cols = {}; vals = {};
      if (fmt == 0) begin
        rows.push_back(0);
        for (int r = 0; r < n_rows; r++) begin
          for (int c = 0; c < n_cols; c++)
            if (dense[r * n_cols + c] != 0) begin
              cols.push_back(c);
              vals.push_back(dense[r * n_cols + c]);
            end
          rows.push_back(cols.size());
        end
      end else if (fmt == 1) begin
        nbits  = n_rows * n_cols;
        nwords = (nbits + 31) / 32;
        bm     = new[nwords];
        foreach (bm[i]) bm[i] = 0;
        for (int r = 0; r < n_rows; r++) begin
          rows.push_back(r * n_cols);
          for (int c = 0; c < n_cols; c++)
            if (dense[r * n_cols + c] != 0) begin
              p = r * n_cols + c;
              bm[p / 32] |= (1 << (p % 32));
              vals.push_back(dense[p]);
            end
        end
        foreach (bm[i]) cols.push_back(bm[i]);
      end else begin
        for (int r = 0; r < n_rows; r++) begin
          int nruns = 0;
          int c = 0;
          while (c < n_cols) begin
            if (dense[r * n_cols + c] != 0) begin
              int s = c;
              while (c < n_cols && dense[r * n_cols + c] != 0) begin
                vals.push_back(dense[r * n_cols + c]);
                c++;
              end
              cols.push_back(c - s);
              cols.push_back(s);
              nruns++;
            end else c++;
          end
          rows.push_back(nruns);
        end
      end
      rows_base = base;
      cols_base = align4(rows_base + rows.size() * rsz);
      vals_base = align4(cols_base + cols.size() * ((fmt == 1) ? 4 : csz));
      img = new[align4(vals_base + vals.size() * vsz) + 4];
      foreach (img[i]) img[i] = 0;
      foreach (rows[i]) put(rows_base + i * rsz, rows[i], rsz);
      foreach (cols[i]) put(cols_base + i * ((fmt == 1) ? 4 : csz), cols[i], (fmt == 1) ? 4 : csz);
      foreach (vals[i]) put(vals_base + i * vsz, vals[i], vsz);
    endfunction

    // Configuration word for the element-size register.
    function int ele_sz_word();
      return (rsz << 16) | (csz << 8) | vsz;
    endfunction
  endclass

endpackage
