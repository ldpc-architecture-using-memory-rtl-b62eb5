// bypass_unit: memory-bypassing control and the mux-array in front of the
// shifter.
//
// A block column is "pending" from the cycle a layer issues its read (its
// entry in the combined RAM then holds T, not APP) until the updated APP of
// that layer is written back through W0. When the read side asks for column
// rd_col (rd_req) the unit decides, in the same cycle:
//   * not pending                          -> normal read through R0;
//   * pending, and the add-array is producing that very column this cycle
//     (ws_valid, ws_col)                   -> bypass: the read is issued, the
//     registered add-array output is taken through the mux-array the next
//     cycle, and the W0 write of that value is dropped (the reading layer
//     will write the column again), so neither R0 nor W0 is used;
//   * pending, and the post-add register is writing that column through W0
//     this cycle (w0_en, w0_col)           -> forward: the value being written
//     is captured and taken through the mux-array the next cycle; R0 is not
//     used (the RAM would still return the old contents);
//   * pending otherwise                    -> stall (an idle cycle).
// rd_fire = rd_req & ~rd_stall. rd_bypass / rd_fwd mark fires of the two
// forwarding kinds; the decoder registers rd_bypass as the "drop this W0
// write" flag of the post-add register. One cycle after a fire, mux_data is
// pa_data for a bypassed read, the captured W0 value for a forwarded read,
// and ram_data otherwise.
// The bypass rule follows the document (mux-array selecting the add-array
// output or the channel RAM, pipeline register after the add-array); the
// pending-bit bookkeeping, the forward from the W0 cycle and the exact timing
// are this design's choice.
module bypass_unit #(
  parameter int NB    = 12,
  parameter int WIDTH = 144
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   flush,
  input  logic                   rd_req,
  input  logic [$clog2(NB)-1:0]  rd_col,
  output logic                   rd_stall,
  output logic                   rd_fire,
  output logic                   rd_bypass,
  output logic                   rd_fwd,
  input  logic                   ws_valid,      // add-array result this cycle
  input  logic [$clog2(NB)-1:0]  ws_col,
  input  logic                   w0_en,         // post-add register writes W0
  input  logic [$clog2(NB)-1:0]  w0_col,
  input  logic [WIDTH-1:0]       ram_data,      // R0 output
  input  logic [WIDTH-1:0]       pa_data,       // post-add register
  output logic [WIDTH-1:0]       mux_data
);
  logic [NB-1:0]    pending;
  logic             sel_pa, sel_fwd;
  logic [WIDTH-1:0] fwd_q;
  logic             hit_ws, hit_w0;

  always_comb begin
    hit_ws    = ws_valid && (ws_col == rd_col);
    hit_w0    = w0_en && (w0_col == rd_col);
    rd_bypass = rd_req && pending[rd_col] && hit_ws;
    rd_fwd    = rd_req && pending[rd_col] && !hit_ws && hit_w0;
    rd_stall  = rd_req && pending[rd_col] && !hit_ws && !hit_w0;
    rd_fire   = rd_req && !rd_stall;
  end

  always_ff @(posedge clk) if (rd_fwd) fwd_q <= pa_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending <= '0;
      sel_pa  <= 1'b0;
      sel_fwd <= 1'b0;
    end else if (flush) begin
      pending <= '0;
      sel_pa  <= 1'b0;
      sel_fwd <= 1'b0;
    end else begin
      sel_pa  <= rd_bypass;
      sel_fwd <= rd_fwd;
      for (int c = 0; c < NB; c++) begin
        if (rd_fire && rd_col == ($clog2(NB))'(c))   pending[c] <= 1'b1;
        else if (w0_en && w0_col == ($clog2(NB))'(c))  pending[c] <= 1'b0;
      end
    end
  end

  assign mux_data = sel_pa ? pa_data : (sel_fwd ? fwd_q : ram_data);

  // a W0 write always belongs to a pending column
  a_w0_pending: assert property (@(posedge clk) disable iff (!rst_n || flush)
    w0_en |-> pending[w0_col])
    else $error("bypass_unit: W0 write to column %0d that is not pending", w0_col);
endmodule
