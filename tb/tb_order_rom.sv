// tb_order_rom: for every layer position checks, from the base matrix, that
// the read order and the write order are both permutations of the layer's
// non-null block columns, that each shift is the base shift modulo Z, that
// the write-side position points at the read slot of the same column, and
// that the ordering rule holds: the layer's write order starts with every
// column shared with the next layer, and its read order ends with every
// column shared with the previous layer. Run at Z = 24 and Z = 7.
module tb_order_rom;
  import ldpc_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [LAY_W-1:0] layer;
  logic [IDX_W-1:0] rslot, wslot;
  logic [LAY_W-1:0] row, row7;
  logic [IDX_W:0]   deg, deg7;
  logic [COL_W-1:0] rd_col, wr_col, rd_col7, wr_col7;
  logic [4:0]       rd_sh, wr_sh;
  logic [2:0]       rd_sh7, wr_sh7;
  logic [IDX_W-1:0] wr_pos, wr_pos7;

  order_rom #(.Z(24)) dut (.layer, .rslot, .wslot, .row, .deg, .rd_col,
    .rd_shift(rd_sh), .wr_col, .wr_shift(wr_sh), .wr_pos);
  order_rom #(.Z(7)) dut7 (.layer, .rslot, .wslot, .row(row7), .deg(deg7), .rd_col(rd_col7),
    .rd_shift(rd_sh7), .wr_col(wr_col7), .wr_shift(wr_sh7), .wr_pos(wr_pos7));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l < MB; l++) begin
      int r, rn, rp, d;
      int rc [DMAX];
      int wc [DMAX];
      bit seen_r [NB];
      bit seen_w [NB];
      r  = int'(LAYER_ORDER[l]);
      rn = int'(LAYER_ORDER[(l + 1) % MB]);
      rp = int'(LAYER_ORDER[(l + MB - 1) % MB]);
      d = 0;
      for (int c = 0; c < NB; c++) begin
        if (BASE[r][c] >= 0) d++;
        seen_r[c] = 0; seen_w[c] = 0;
      end
      layer = LAY_W'(l);
      for (int k = 0; k < d; k++) begin
        rslot = IDX_W'(k); wslot = IDX_W'(k);
        @(posedge clk);
        check(int'(row) == r && int'(deg) == d && deg7 == deg && row7 == row,
              $sformatf("layer %0d row/degree", l));
        rc[k] = rd_col; wc[k] = wr_col;
        check(BASE[r][rd_col] >= 0 && !seen_r[rd_col], $sformatf("layer %0d read slot %0d", l, k));
        check(BASE[r][wr_col] >= 0 && !seen_w[wr_col], $sformatf("layer %0d write slot %0d", l, k));
        seen_r[rd_col] = 1; seen_w[wr_col] = 1;
        check(int'(rd_sh) == BASE[r][rd_col] % 24 && int'(wr_sh) == BASE[r][wr_col] % 24,
              $sformatf("layer %0d slot %0d shifts", l, k));
        check(int'(rd_sh7) == BASE[r][rd_col7] % 7 && int'(wr_sh7) == BASE[r][wr_col7] % 7,
              $sformatf("layer %0d slot %0d shifts Z=7", l, k));
      end
      // write position = read slot of the same column
      for (int k = 0; k < d; k++) begin
        wslot = IDX_W'(k);
        rslot = wr_pos;
        @(posedge clk);
        rslot = wr_pos;
        #1;
        check(rd_col == wr_col, $sformatf("layer %0d write slot %0d position", l, k));
      end
      // ordering rule
      for (int k = 1; k < d; k++) begin
        check(!(BASE[rn][wc[k]] >= 0 && BASE[rn][wc[k-1]] < 0),
              $sformatf("layer %0d: shared-with-next column written late", l));
        check(!(BASE[rp][rc[k]] < 0 && BASE[rp][rc[k-1]] >= 0),
              $sformatf("layer %0d: shared-with-previous column read early", l));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
