// add_array: the Z parallel adders behind the SISO units.
//
// For each check row i it adds the new check-to-variable message to the
// stored intermediate value: APP[i] = sat(T[i] + E_new[i]). E_new is taken
// from the new two-output record: magnitude min2 when `pos` (the read slot of
// this block column, supplied by the order ROM) equals the record's index,
// min1 otherwise, and sign = product of all signs times the slot's own sign.
// Combinational; the pipeline register after it lives in the decoder.
// Follows the document's add-array; the saturation is this design's choice.
module add_array
  import ldpc_pkg::*;
#(
  parameter int Z = 24
) (
  input  app_t    [Z-1:0]   t,
  input  cn_msg_t [Z-1:0]   new_msg,
  input  logic [IDX_W-1:0]  pos,
  output app_t    [Z-1:0]   app
);
  always_comb begin
    for (int i = 0; i < Z; i++)
      app[i] = sat_app(int'(t[i]) + cn_value(new_msg[i], int'(pos)));
  end
endmodule
