// ldpc_ref_pkg: stimulus and reference model shared by the decoder-level
// testbenches.
//
// encode() draws random information bits into codeword[] and fills the
// parity part by back-substitution through the staircase columns. channel()
// maps bits to +/-amp, adds the sum of two uniform noise terms in
// [-spread, spread] and clips to the 5-bit LLR range, writing llr[].
// reference() decodes llr[] with plain layered offset min-sum, one layer
// after another in the given order. It has no pipelining and no compressed
// records: each message is computed directly as the offset minimum over the
// other edges of the check. It uses the same word widths, saturation and
// stopping rule as the hardware (all checks met by the values read and no hard
// decision changed during an iteration, or the iteration limit). Results are
// left in ref_hd[], ref_iters and ref_conv.
package ldpc_ref_pkg;
  import ldpc_pkg::*;

  localparam int Z = Z_DEF;
  localparam int N = NB * Z;

  int codeword [N];
  int llr      [N];
  int ref_hd   [N];
  int ref_iters;
  bit ref_conv;

  // variable node of check row i of block row r in block column c
  function automatic int vidx(input int r, input int c, input int i);
    return c * Z + ((i + BASE[r][c] % Z) % Z);
  endfunction

  task automatic encode();
    for (int v = 0; v < 6 * Z; v++) codeword[v] = $urandom_range(0, 1);
    for (int r = 0; r < MB; r++)
      for (int i = 0; i < Z; i++) begin
        int p = 0;
        for (int c = 0; c < 6; c++)
          if (BASE[r][c] >= 0) p ^= codeword[vidx(r, c, i)];
        if (r > 0) p ^= codeword[(6 + r - 1) * Z + i];
        codeword[(6 + r) * Z + i] = p;
      end
  endtask

  task automatic channel(input int amp, input int spread);
    for (int v = 0; v < N; v++) begin
      int x;
      x = (codeword[v] != 0) ? -amp : amp;
      x += int'($urandom_range(0, 2 * spread)) - spread;
      x += int'($urandom_range(0, 2 * spread)) - spread;
      if (x > 15) x = 15;
      if (x < -15) x = -15;
      llr[v] = x;
    end
  endtask

  function automatic int satv(input int v);
    return v > APP_MAX ? APP_MAX : (v < -APP_MAX ? -APP_MAX : v);
  endfunction

  task automatic reference(input order_t order, input int max_iter, input int offset);
    int app [N];
    int emsg [MB][NB][Z];        // check-to-variable message per edge
    int hd [N];
    ref_conv = 0;
    for (int v = 0; v < N; v++) begin
      app[v] = llr[v];
      hd[v]  = int'(llr[v] < 0);
    end
    for (int r = 0; r < MB; r++) for (int c = 0; c < NB; c++) for (int i = 0; i < Z; i++)
      emsg[r][c][i] = 0;
    ref_iters = 0;
    for (int it = 0; it < max_iter; it++) begin
      bit ok = 1;
      ref_iters = it + 1;
      for (int l = 0; l < MB; l++) begin
        int r = int'(order[l]);
        for (int i = 0; i < Z; i++) begin
          int t [NB];
          int par = 0;
          for (int c = 0; c < NB; c++) if (BASE[r][c] >= 0) begin
            int v = vidx(r, c, i);
            par ^= int'(app[v] < 0);
            t[c] = satv(app[v] - emsg[r][c][i]);
          end
          if (par != 0) ok = 0;
          for (int c = 0; c < NB; c++) if (BASE[r][c] >= 0) begin
            int m = 1000, s = 0, e, v;
            for (int c2 = 0; c2 < NB; c2++) if (BASE[r][c2] >= 0 && c2 != c) begin
              int a = t[c2] < 0 ? -t[c2] : t[c2];
              if (a < m) m = a;
              s ^= int'(t[c2] < 0);
            end
            m = (m > offset) ? m - offset : 0;
            e = (s != 0) ? -m : m;
            emsg[r][c][i] = e;
            v = vidx(r, c, i);
            app[v] = satv(t[c] + e);
            if (int'(app[v] < 0) != hd[v]) begin
              ok = 0;
              hd[v] = int'(app[v] < 0);
            end
          end
        end
      end
      if (ok) begin
        ref_conv = 1;
        break;
      end
    end
    for (int v = 0; v < N; v++) ref_hd[v] = hd[v];
  endtask

endpackage
