// siso_unit: one min-sum check-node processor using the two-output
// approximation. The decoder instantiates Z of them, one per check row of a
// layer, all working in parallel.
//
// The variable-to-check messages T of a check row arrive one per cycle
// (in_valid), in read-slot order pos = 0 .. degree-1; in_first marks slot 0
// and restarts the unit. For every input the unit keeps the smallest and
// second smallest magnitude, the slot index of the smallest, and the sign of
// each slot. `result` is the finished record including the input of the
// current cycle, so it is valid in the same cycle as the last input; the
// offset-min-sum correction (subtract OFFSET, floor at 0) is applied there.
// Outgoing message for slot k = (product of all signs) * sign_k *
// (k == idx ? min2 : min1).
// The record format follows the document (two magnitudes, an index and the
// signs); the offset correction value is this design's choice.
module siso_unit
  import ldpc_pkg::*;
#(
  parameter int OFFSET = OFFSET_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             in_first,
  input  app_t             t,
  input  logic [IDX_W-1:0] pos,
  output cn_msg_t          result
);
  localparam logic [MAG_W-1:0] MAG_MAX = '1;

  logic [MAG_W-1:0] min1_q, min2_q, min1_d, min2_d;
  logic [IDX_W-1:0] idx_q, idx_d;
  logic [DMAX-1:0]  signs_q, signs_d;

  always_comb begin
    logic [MAG_W-1:0] mag;
    logic [MAG_W-1:0] m1, m2;
    logic [IDX_W-1:0] ix;
    logic [DMAX-1:0]  sg;
    // start values: a fresh row when in_first
    m1 = in_first ? MAG_MAX : min1_q;
    m2 = in_first ? MAG_MAX : min2_q;
    ix = in_first ? '0      : idx_q;
    sg = in_first ? '0      : signs_q;
    mag = t[APP_W-1] ? MAG_W'(-t) : MAG_W'(t);
    if (in_valid) begin
      sg[pos] = t[APP_W-1];
      if (mag < m1) begin
        m2 = m1;
        m1 = mag;
        ix = pos;
      end else if (mag < m2) begin
        m2 = mag;
      end
    end
    min1_d  = m1;
    min2_d  = m2;
    idx_d   = ix;
    signs_d = sg;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      min1_q  <= MAG_MAX;
      min2_q  <= MAG_MAX;
      idx_q   <= '0;
      signs_q <= '0;
    end else if (in_valid) begin
      min1_q  <= min1_d;
      min2_q  <= min2_d;
      idx_q   <= idx_d;
      signs_q <= signs_d;
    end
  end

  always_comb begin
    result.min1  = (min1_d > MAG_W'(OFFSET)) ? min1_d - MAG_W'(OFFSET) : '0;
    result.min2  = (min2_d > MAG_W'(OFFSET)) ? min2_d - MAG_W'(OFFSET) : '0;
    result.idx   = idx_d;
    result.signs = signs_d;
  end
endmodule
