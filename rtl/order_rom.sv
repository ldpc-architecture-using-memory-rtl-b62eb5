// order_rom: schedule ROM of the layered decoder.
//
// For layer position `layer` (0 .. MB-1 in decoding order) it gives the layer's
// block row, its degree, and for read slot `rslot` and write slot `wslot` the
// block column, the cyclic shift (base-matrix shift modulo Z) and, for the
// write side, the read-slot position of the written column. That position is
// compared with the index stored by the SISO unit to pick min1 or min2 when
// the message is rebuilt in the add-array. The tables are computed at
// elaboration from the base matrix and the ordering rule in ldpc_pkg.
// Combinational lookup. The document describes a ROM holding the order of
// the update process; the table layout is this design's choice.
module order_rom
  import ldpc_pkg::*;
#(
  parameter int     Z     = 24,
  parameter order_t ORDER = LAYER_ORDER   // block row at each decoding position
) (
  input  logic [LAY_W-1:0]       layer,
  input  logic [IDX_W-1:0]       rslot,
  input  logic [IDX_W-1:0]       wslot,
  output logic [LAY_W-1:0]       row,
  output logic [IDX_W:0]         deg,
  output logic [COL_W-1:0]       rd_col,
  output logic [$clog2(Z)-1:0]   rd_shift,
  output logic [COL_W-1:0]       wr_col,
  output logic [$clog2(Z)-1:0]   wr_shift,
  output logic [IDX_W-1:0]       wr_pos
);
  localparam int SH_W = $clog2(Z);

  typedef logic [MB-1:0][DMAX-1:0][COL_W-1:0] col_tab_t;
  typedef logic [MB-1:0][DMAX-1:0][SH_W-1:0]  sh_tab_t;
  typedef logic [MB-1:0][DMAX-1:0][IDX_W-1:0] pos_tab_t;
  typedef logic [MB-1:0][IDX_W:0]             deg_tab_t;
  typedef logic [MB-1:0][LAY_W-1:0]           row_tab_t;

  function automatic col_tab_t make_cols(input bit is_wr);
    col_tab_t t = '0;
    for (int l = 0; l < MB; l++)
      for (int k = 0; k < DMAX; k++)
        if (k < layer_deg(ORDER, l)) t[l][k] = COL_W'(sched_col(ORDER, l, k, is_wr));
    return t;
  endfunction

  function automatic sh_tab_t make_shifts(input bit is_wr);
    sh_tab_t t = '0;
    for (int l = 0; l < MB; l++)
      for (int k = 0; k < DMAX; k++)
        if (k < layer_deg(ORDER, l))
          t[l][k] = SH_W'(BASE[row_at(ORDER, l)][sched_col(ORDER, l, k, is_wr)] % Z);
    return t;
  endfunction

  function automatic pos_tab_t make_wpos();
    pos_tab_t t = '0;
    for (int l = 0; l < MB; l++)
      for (int k = 0; k < DMAX; k++)
        if (k < layer_deg(ORDER, l)) t[l][k] = IDX_W'(sched_wpos(ORDER, l, k));
    return t;
  endfunction

  function automatic deg_tab_t make_deg();
    deg_tab_t t;
    for (int l = 0; l < MB; l++) t[l] = (IDX_W+1)'(layer_deg(ORDER, l));
    return t;
  endfunction

  function automatic row_tab_t make_row();
    row_tab_t t;
    for (int l = 0; l < MB; l++) t[l] = LAY_W'(row_at(ORDER, l));
    return t;
  endfunction

  localparam col_tab_t RD_COL = make_cols(1'b0);
  localparam col_tab_t WR_COL = make_cols(1'b1);
  localparam sh_tab_t  RD_SH  = make_shifts(1'b0);
  localparam sh_tab_t  WR_SH  = make_shifts(1'b1);
  localparam pos_tab_t WR_POS = make_wpos();
  localparam deg_tab_t DEG    = make_deg();
  localparam row_tab_t ROW    = make_row();

  always_comb begin
    row      = ROW[layer];
    deg      = DEG[layer];
    rd_col   = RD_COL[layer][rslot];
    rd_shift = RD_SH[layer][rslot];
    wr_col   = WR_COL[layer][wslot];
    wr_shift = WR_SH[layer][wslot];
    wr_pos   = WR_POS[layer][wslot];
  end
endmodule
