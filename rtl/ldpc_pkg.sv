// ldpc_pkg: code definition, word widths, message record and the schedule
// functions shared by the layered LDPC decoder.
//
// The code is quasi-cyclic: the parity-check matrix is an MB x NB array of
// Z x Z sub-matrices, each either null (-1 below) or an identity matrix
// cyclically shifted by the listed amount (taken modulo Z). Every block row is
// one "layer" of the layered decoder. The parity part (columns 6..11) is a
// staircase of unshifted identities so that a codeword can be built by simple
// back-substitution. The particular base matrix, Z = 24, and the layer order
// (default; the decoder takes the order as a parameter) are this design's own
// choice; the 5-bit channel LLR, the 6-bit soft output
// and the limit of 15 iterations follow the source design.
//
// The read and write orders of each layer (the "order ROM" contents) are
// derived here from the base matrix at elaboration time with the rule:
//   write order of layer q : columns shared with layer q+1 first, columns
//                            shared only with layer q+2 last, the rest between;
//   read order of layer q  : columns not used by layers q-1 and q-2 first,
//                            then those shared only with q-2, then those
//                            shared with q-1 (matching q-1's write order).
// Within a group columns are taken in ascending order.
package ldpc_pkg;

  // ---------------- code and word widths ----------------
  localparam int MB       = 6;    // layers (block rows)
  localparam int NB       = 12;   // block columns
  localparam int DMAX     = 5;    // largest layer degree of BASE
  localparam int Z_DEF    = 24;   // sub-matrix size = number of SISO units
  localparam int LLR_W    = 5;    // channel LLR width
  localparam int APP_W    = 6;    // soft output (APP) and T width
  localparam int MAG_W    = APP_W - 1;   // check message magnitude width
  localparam int IDX_W    = $clog2(DMAX);
  localparam int COL_W    = $clog2(NB);
  localparam int LAY_W    = $clog2(MB);
  localparam int MAX_ITER_DEF = 15;
  localparam int OFFSET_DEF   = 1;      // offset min-sum correction (LSBs)
  localparam int APP_MAX  = (1 << (APP_W - 1)) - 1;   // symmetric saturation

  // base matrix: shift of each non-null sub-matrix, -1 = null
  localparam int BASE [MB][NB] = '{
    '{ 3, 17,  9, -1, -1, -1,  0, -1, -1, -1, -1, -1},
    '{-1,  5, -1, 20, 11, -1,  0,  0, -1, -1, -1, -1},
    '{14, -1, 22, -1, -1,  7, -1,  0,  0, -1, -1, -1},
    '{-1, 12, -1,  2, -1, 19, -1, -1,  0,  0, -1, -1},
    '{ 8, -1,  1, -1, 15, -1, -1, -1, -1,  0,  0, -1},
    '{-1, -1, -1, 13,  6, 21, -1, -1, -1, -1,  0,  0}
  };

  // decoding order of the layers: element l is the block row decoded at
  // position l. The default is the natural order.
  typedef logic [MB-1:0][LAY_W-1:0] order_t;

  function automatic order_t natural_order();
    order_t o;
    for (int l = 0; l < MB; l++) o[l] = LAY_W'(l);
    return o;
  endfunction

  localparam order_t LAYER_ORDER = natural_order();

  // compressed check-node message of one check row (two-output approximation)
  typedef struct packed {
    logic [MAG_W-1:0] min1;    // smallest |T| (offset already applied)
    logic [MAG_W-1:0] min2;    // second smallest |T| (offset applied)
    logic [IDX_W-1:0] idx;     // read-slot position of min1
    logic [DMAX-1:0]  signs;   // sign of T for every read slot
  } cn_msg_t;

  typedef logic signed [APP_W-1:0] app_t;

  // ---------------- arithmetic helpers ----------------
  function automatic app_t sat_app(input int v);
    if (v > APP_MAX)       return app_t'(APP_MAX);
    else if (v < -APP_MAX) return app_t'(-APP_MAX);
    else                   return app_t'(v);
  endfunction

  // check-to-variable message for read slot pos, rebuilt from the record
  function automatic int cn_value(input cn_msg_t m, input int pos);
    int mag;
    logic s;
    mag = (pos == int'(m.idx)) ? int'(m.min2) : int'(m.min1);
    s   = (^m.signs) ^ m.signs[pos];
    return s ? -mag : mag;
  endfunction

  // ---------------- schedule (order ROM contents) ----------------
  function automatic bit in_row(input int r, input int c);
    return BASE[r][c] >= 0;
  endfunction

  // block row decoded at position l of order o (cyclic in l)
  function automatic int row_at(input order_t o, input int l);
    return int'(o[((l % MB) + MB) % MB]);
  endfunction

  function automatic int layer_deg(input order_t o, input int l);
    int d = 0;
    for (int c = 0; c < NB; c++) if (in_row(row_at(o, l), c)) d++;
    return d;
  endfunction

  // group of column c in the write order of layer position l
  function automatic int wr_group(input order_t o, input int l, input int c);
    if (in_row(row_at(o, l + 1), c)) return 0;
    if (in_row(row_at(o, l + 2), c)) return 2;
    return 1;
  endfunction

  // group of column c in the read order of layer position l
  function automatic int rd_group(input order_t o, input int l, input int c);
    if (in_row(row_at(o, l - 1), c)) return 2;
    if (in_row(row_at(o, l - 2), c)) return 1;
    return 0;
  endfunction

  // k-th column read (is_wr = 0) or written (is_wr = 1) by layer position l
  function automatic int sched_col(input order_t o, input int l, input int k,
                                   input bit is_wr);
    int n = 0;
    for (int g = 0; g < 3; g++)
      for (int c = 0; c < NB; c++)
        if (in_row(row_at(o, l), c) &&
            ((is_wr ? wr_group(o, l, c) : rd_group(o, l, c)) == g)) begin
          if (n == k) return c;
          n++;
        end
    return 0;
  endfunction

  // read-slot position of the k-th written column of layer position l
  function automatic int sched_wpos(input order_t o, input int l, input int k);
    int c = sched_col(o, l, k, 1'b1);
    for (int j = 0; j < DMAX; j++)
      if (j < layer_deg(o, l) && sched_col(o, l, j, 1'b0) == c) return j;
    return 0;
  endfunction

endpackage
