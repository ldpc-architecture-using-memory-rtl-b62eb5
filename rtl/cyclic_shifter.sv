// cyclic_shifter: rotates a vector of Z messages by the shift of a circulant
// sub-matrix, so that message i of the output belongs to check row i of the
// current layer.
//
// Forward (INVERSE = 0): out[i] = in[(i + shift) mod Z]. This moves the APP
// values of one block column into check-row order on their way to the
// sub-array. Inverse (INVERSE = 1): out[(i + shift) mod Z] = in[i], which
// puts updated values back into natural column order before they are written
// to the channel RAM. Purely combinational; each output is a Z:1 multiplexer,
// so any Z (not only powers of two) is supported. The document only says a
// shifter performs the cyclic shift; the multiplexer structure is this
// design's choice. shift must be below Z.
module cyclic_shifter #(
  parameter int Z       = 24,
  parameter int W       = 6,
  parameter bit INVERSE = 1'b0
) (
  input  logic [Z-1:0][W-1:0]       din,
  input  logic [$clog2(Z)-1:0]      shift,
  output logic [Z-1:0][W-1:0]       dout
);
  always_comb begin
    for (int i = 0; i < Z; i++) begin
      int src;
      src = INVERSE ? (i - int'(shift)) : (i + int'(shift));
      if (src >= Z) src -= Z;
      if (src < 0)  src += Z;
      dout[i] = din[src];
    end
  end
endmodule
