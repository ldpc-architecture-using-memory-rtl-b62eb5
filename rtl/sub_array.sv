// sub_array: the Z parallel subtractors in front of the SISO units.
//
// For each check row i of the layer it removes the check node's own previous
// message from the APP value: T[i] = sat(APP[i] - E_old[i]), where E_old is
// rebuilt from the stored two-output record (min1, min2, index, signs) of
// that row for read slot `pos`. On the first iteration (first_iter = 1) the
// old message is zero, as in the initialisation E(0) = 0. The result is
// saturated symmetrically to APP_W bits. Combinational.
// Follows the document's sub-array; the saturation is this design's choice.
module sub_array
  import ldpc_pkg::*;
#(
  parameter int Z = 24
) (
  input  app_t    [Z-1:0]   app,         // shifted APP values
  input  cn_msg_t [Z-1:0]   old_msg,     // previous-iteration records
  input  logic [IDX_W-1:0]  pos,         // read slot of this block column
  input  logic              first_iter,
  output app_t    [Z-1:0]   t
);
  always_comb begin
    for (int i = 0; i < Z; i++) begin
      int e;
      e    = first_iter ? 0 : cn_value(old_msg[i], int'(pos));
      t[i] = sat_app(int'(app[i]) - e);
    end
  end
endmodule
