// hd_unit: hard decisions and the early-termination check.
//
// Holds one hard-decision bit per code bit (NB x Z), loaded from the signs of
// the channel LLRs and refreshed with the signs of every updated APP column
// the add-array produces (upd_*). upd_changed flags a column whose hard
// decisions differ from the stored ones.
// Parity check: while a layer is read, the signs of its shifted APP values
// are XOR-accumulated per check row (syn_*); syn_ok is high when all Z
// checks of the layer are satisfied, counting the current cycle's input.
// The decoder stores that flag with the layer. When the last column of a
// layer has been written (job_end), the layer passes if its checks were met
// and none of its written columns changed a hard decision. If every layer of
// an iteration passes, the stored hard decisions satisfy all parity checks:
// `stop` and `converged` rise. `stop` also rises, with converged = 0, at the
// end of the last allowed iteration. stop/converged are registered.
// Stopping when all checks are met or after a fixed number of iterations
// follows the document; how the check is carried out is this design's choice.
// rd_col/rd_bits read the hard decisions combinationally.
module hd_unit #(
  parameter int NB = 12,
  parameter int Z  = 24
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,       // new frame: clear status
  // load
  input  logic                  ld_en,
  input  logic [$clog2(NB)-1:0] ld_col,
  input  logic [Z-1:0]          ld_bits,
  // update from the add-array
  input  logic                  upd_en,
  input  logic [$clog2(NB)-1:0] upd_col,
  input  logic [Z-1:0]          upd_bits,
  output logic                  upd_changed,
  // per-layer parity check on the read side
  input  logic                  syn_en,
  input  logic                  syn_first,
  input  logic [Z-1:0]          syn_bits,
  output logic                  syn_ok,
  // end of a layer's write-back
  input  logic                  job_end,
  input  logic                  job_syn_ok,
  input  logic                  job_iter_end,
  input  logic                  job_last_iter,
  output logic                  stop,
  output logic                  converged,
  // read-out
  input  logic [$clog2(NB)-1:0] rd_col,
  output logic [Z-1:0]          rd_bits
);
  logic [Z-1:0] hd [NB];
  logic [Z-1:0] syn_acc;
  logic         job_chg, iter_ok;
  logic         layer_ok;      // the finishing layer met its checks, no change

  assign layer_ok = job_syn_ok && !job_chg && !upd_changed;

  assign upd_changed = upd_en && (hd[upd_col] != upd_bits);
  assign syn_ok      = ((syn_first ? '0 : syn_acc) ^ syn_bits) == '0;
  assign rd_bits     = hd[rd_col];

  always_ff @(posedge clk) begin
    if (ld_en)  hd[ld_col]  <= ld_bits;
    if (upd_en) hd[upd_col] <= upd_bits;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      syn_acc   <= '0;
      job_chg   <= 1'b0;
      iter_ok   <= 1'b1;
      stop      <= 1'b0;
      converged <= 1'b0;
    end else if (start) begin
      syn_acc   <= '0;
      job_chg   <= 1'b0;
      iter_ok   <= 1'b1;
      stop      <= 1'b0;
      converged <= 1'b0;
    end else begin
      if (syn_en) syn_acc <= (syn_first ? '0 : syn_acc) ^ syn_bits;
      stop <= 1'b0;
      if (job_end) begin
        job_chg  <= 1'b0;
        if (job_iter_end) begin
          iter_ok <= 1'b1;
          if (iter_ok && layer_ok) begin
            stop <= 1'b1; converged <= 1'b1;
          end else if (job_last_iter) begin
            stop <= 1'b1; converged <= 1'b0;
          end
        end else begin
          iter_ok <= iter_ok && layer_ok;
        end
      end else if (upd_changed) begin
        job_chg <= 1'b1;
      end
    end
  end
endmodule
