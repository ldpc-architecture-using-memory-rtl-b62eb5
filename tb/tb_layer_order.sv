// tb_layer_order: the same frames decoded with three different layer orders.
//
// The decoder takes its layer decoding order as a parameter, because the order
// is meant to be chosen offline to make consecutive layers share as many block
// columns as possible. This testbench builds three decoders (Z = 24, 15
// iterations) that differ only in ORDER:
//   natural : 0 1 2 3 4 5  (8 columns shared between cyclically adjacent layers)
//   dense   : 0 1 3 5 4 2  (12 shared columns, the largest possible for this code)
//   sparse  : 0 3 4 1 2 5  (5 shared columns)
// Every frame goes through each decoder in turn. Each result must match the
// reference model (ldpc_ref_pkg) run in that decoder's order: hard decisions,
// iteration count and converged flag. Since the order changes the decoding
// itself, the three results need not agree with each other.
// Over all frames, the dense order must bypass more block-column reads per
// iteration than the sparse order, and make fewer channel-RAM accesses (R0
// reads plus W0 writes) per iteration: more overlap between layers gives more
// chances to bypass, and a bypass saves both a write and a read. Cycle and
// idle counts per order are printed for information only.
module tb_layer_order;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  localparam int ND      = 3;
  localparam int NFRAMES = 12;

  function automatic order_t mk(input int a0, a1, a2, a3, a4, a5);
    order_t o;
    o[0] = LAY_W'(a0); o[1] = LAY_W'(a1); o[2] = LAY_W'(a2);
    o[3] = LAY_W'(a3); o[4] = LAY_W'(a4); o[5] = LAY_W'(a5);
    return o;
  endfunction

  localparam order_t ORDERS [ND] = '{mk(0, 1, 2, 3, 4, 5), mk(0, 1, 3, 5, 4, 2),
                                     mk(0, 3, 4, 1, 2, 5)};
  localparam string NAMES [ND] = '{"natural", "dense", "sparse"};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                    in_valid  [ND];
  logic                    in_ready  [ND];
  logic [Z-1:0][LLR_W-1:0] in_llr;
  logic                    out_valid [ND];
  logic                    out_ready [ND];
  logic                    out_last  [ND];
  logic                    out_conv  [ND];
  logic [Z-1:0]            out_hd    [ND];
  logic [COL_W-1:0]        out_col   [ND];
  logic [4:0]              out_iters [ND];
  logic [31:0]             s_cyc [ND], s_idle [ND], s_byp [ND], s_fwd [ND], s_r0 [ND], s_w0 [ND];

  for (genvar d = 0; d < ND; d++) begin : g_dut
    ldpc_decoder #(.ORDER(ORDERS[d])) dut (
      .clk, .rst_n,
      .in_valid(in_valid[d]), .in_ready(in_ready[d]), .in_llr,
      .out_valid(out_valid[d]), .out_ready(out_ready[d]), .out_hd(out_hd[d]),
      .out_col(out_col[d]), .out_last(out_last[d]), .out_iters(out_iters[d]),
      .out_converged(out_conv[d]),
      .stat_cycles(s_cyc[d]), .stat_idle(s_idle[d]), .stat_bypass(s_byp[d]),
      .stat_forward(s_fwd[d]), .stat_r0_reads(s_r0[d]), .stat_w0_writes(s_w0[d])
    );
  end

  int checks = 0, failures = 0;
  int t_iters [ND], t_cyc [ND], t_idle [ND], t_byp [ND], t_fwd [ND], t_r0 [ND], t_w0 [ND];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_on(input int d, input int f);
    int got [N];
    int mism;
    reference(ORDERS[d], MAX_ITER_DEF, OFFSET_DEF);
    for (int c = 0; c < NB; c++) begin
      in_valid[d] <= 1'b1;
      for (int i = 0; i < Z; i++) in_llr[i] <= LLR_W'(llr[c * Z + i]);
      @(posedge clk);
      while (!in_ready[d]) @(posedge clk);
    end
    in_valid[d] <= 1'b0;
    out_ready[d] <= 1'b1;
    for (int c = 0; c < NB; c++) begin
      @(posedge clk);
      while (!out_valid[d]) @(posedge clk);
      check(int'(out_col[d]) == c, $sformatf("%s frame %0d output column order", NAMES[d], f));
      for (int i = 0; i < Z; i++) got[c * Z + i] = int'(out_hd[d][i]);
      if (c == 0) begin
        check(int'(out_iters[d]) == ref_iters,
              $sformatf("%s frame %0d iterations %0d, expected %0d", NAMES[d], f, out_iters[d], ref_iters));
        check(out_conv[d] == ref_conv,
              $sformatf("%s frame %0d converged %0d, expected %0d", NAMES[d], f, out_conv[d], ref_conv));
      end
    end
    out_ready[d] <= 1'b0;
    mism = 0;
    for (int v = 0; v < N; v++) if (got[v] != ref_hd[v]) mism++;
    check(mism == 0, $sformatf("%s frame %0d: %0d hard decisions differ from reference", NAMES[d], f, mism));
    t_iters[d] += ref_iters;
    t_cyc[d]   += s_cyc[d];
    t_idle[d]  += s_idle[d];
    t_byp[d]   += s_byp[d];
    t_fwd[d]   += s_fwd[d];
    t_r0[d]    += s_r0[d];
    t_w0[d]    += s_w0[d];
  endtask

  initial begin
    for (int d = 0; d < ND; d++) begin
      in_valid[d]  = 1'b0;
      out_ready[d] = 1'b0;
      t_iters[d] = 0; t_cyc[d] = 0; t_idle[d] = 0; t_byp[d] = 0; t_fwd[d] = 0; t_r0[d] = 0; t_w0[d] = 0;
    end
    in_llr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int f = 0; f < NFRAMES; f++) begin
      encode();
      case (f % 3)
        0: channel(6, 3);
        1: channel(5, 4);
        default: channel(2, 9);
      endcase
      for (int d = 0; d < ND; d++) run_on(d, f);
    end
    for (int d = 0; d < ND; d++)
      $display("%-7s: iterations=%0d cycles=%0d idle=%0d bypass=%0d forward=%0d r0=%0d w0=%0d (per iteration x100: cycles=%0d idle=%0d bypass=%0d r0+w0=%0d)",
               NAMES[d], t_iters[d], t_cyc[d], t_idle[d], t_byp[d], t_fwd[d], t_r0[d], t_w0[d],
               100 * t_cyc[d] / t_iters[d], 100 * t_idle[d] / t_iters[d], 100 * t_byp[d] / t_iters[d],
               100 * (t_r0[d] + t_w0[d]) / t_iters[d]);
    // compare per-iteration rates (cross-multiplied to stay in integers)
    check(t_byp[1] * t_iters[2] > t_byp[2] * t_iters[1],
          "dense order does not bypass more reads per iteration than sparse order");
    check((t_r0[1] + t_w0[1]) * t_iters[2] < (t_r0[2] + t_w0[2]) * t_iters[1],
          "dense order does not access the RAM (R0 + W0) less per iteration than sparse order");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
