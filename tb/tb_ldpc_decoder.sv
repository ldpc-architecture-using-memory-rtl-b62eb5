// tb_ldpc_decoder: end-to-end test of the layered LDPC decoder at its default
// parameters (Z = 24, 15 iterations).
//
// For every frame the testbench draws random information bits, encodes them
// with the staircase parity part of the code, maps bits to +/-A, adds
// random noise, saturates to 5-bit LLRs, sends the frame and collects the
// hard decisions (stimulus and model in ldpc_ref_pkg). An independent
// reference model runs the same layered
// offset min-sum decoding one layer after another (no pipelining, messages
// computed directly as "minimum over the other edges", no compressed
// records) with the same stopping rule. The decoder must match it bit for bit
// in hard decisions, iteration count and converged flag, and clean or
// lightly corrupted frames must return the transmitted codeword.
// Mechanisms that must occur at least once: memory bypass, forward from the
// W0 cycle, stall (idle read cycle), early stop, stop at the iteration limit, three layers in flight.
// Cycle checks: each iteration reads every edge once (no iteration can take
// fewer cycles than the number of block-column reads), and with no stall the
// decoding time per iteration equals the sum of the layer degrees.
module tb_ldpc_decoder;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  localparam int MAX_ITER = MAX_ITER_DEF;
  localparam int OFFSET   = OFFSET_DEF;
  localparam int NFRAMES  = 24;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                    in_valid, in_ready;
  logic [Z-1:0][LLR_W-1:0] in_llr;
  logic                    out_valid, out_ready, out_last, out_converged;
  logic [Z-1:0]            out_hd;
  logic [COL_W-1:0]        out_col;
  logic [4:0]              out_iters;
  logic [31:0]             stat_cycles, stat_idle, stat_bypass, stat_forward, stat_r0_reads, stat_w0_writes;

  ldpc_decoder dut (.*);

  int checks = 0, failures = 0;
  int n_bypass = 0, n_fwd = 0, n_stall = 0, n_early = 0, n_maxit = 0, n_three = 0;

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

  // three layers in flight: layer queue holds two finished layers while a
  // third is being read
  always @(posedge clk)
    if (dut.state == dut.S_DEC && dut.inflight == 2'd3 && dut.rd_fire) n_three++;

  // ---------------- one frame through the DUT ----------------
  task automatic run_frame(input int f, input int amp, input int spread, input bit expect_clean);
    int got [N];
    int edges, mism, cw_mism;
    encode();
    channel(amp, spread);
    reference(LAYER_ORDER, MAX_ITER, OFFSET);
    // send
    for (int c = 0; c < NB; c++) begin
      in_valid <= 1'b1;
      for (int i = 0; i < Z; i++) in_llr[i] <= LLR_W'(llr[c * Z + i]);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    in_valid <= 1'b0;
    // receive
    out_ready <= 1'b1;
    for (int c = 0; c < NB; c++) begin
      @(posedge clk);
      while (!out_valid) @(posedge clk);
      check(int'(out_col) == c, $sformatf("frame %0d output column order", f));
      check(out_last == (c == NB - 1), $sformatf("frame %0d out_last", f));
      for (int i = 0; i < Z; i++) got[c * Z + i] = int'(out_hd[i]);
      if (c == 0) begin
        check(int'(out_iters) == ref_iters,
              $sformatf("frame %0d iterations %0d, expected %0d", f, out_iters, ref_iters));
        check(out_converged == ref_conv,
              $sformatf("frame %0d converged %0d, expected %0d", f, out_converged, ref_conv));
      end
    end
    out_ready <= 1'b0;
    mism = 0; cw_mism = 0;
    for (int v = 0; v < N; v++) begin
      if (got[v] != ref_hd[v]) mism++;
      if (got[v] != codeword[v]) cw_mism++;
    end
    check(mism == 0, $sformatf("frame %0d: %0d hard decisions differ from reference", f, mism));
    if (expect_clean)
      check(cw_mism == 0, $sformatf("frame %0d: %0d bit errors on a decodable frame", f, cw_mism));
    // cycle accounting
    edges = 0;
    for (int l = 0; l < MB; l++) edges += layer_deg(LAYER_ORDER, l);
    check(stat_r0_reads + stat_bypass + stat_forward >= edges * ref_iters,
          $sformatf("frame %0d: %0d reads for %0d iterations", f, stat_r0_reads + stat_bypass + stat_forward, ref_iters));
    check(stat_cycles >= edges * ref_iters,
          $sformatf("frame %0d: %0d cycles below %0d edges", f, stat_cycles, edges * ref_iters));
    // decoding time = reads + idle cycles + pipeline drain of the last layer
    check(stat_cycles <= edges * ref_iters + stat_idle + 12,
          $sformatf("frame %0d: %0d cycles, %0d idle", f, stat_cycles, stat_idle));
    // every W0 write is either a decoded value or skipped by a bypass
    check(stat_w0_writes + stat_bypass <= stat_r0_reads + stat_bypass + stat_forward,
          $sformatf("frame %0d: more write-backs than reads", f));
    if (stat_bypass > 0) n_bypass++;
    if (stat_forward > 0) n_fwd++;
    if (stat_idle > 0)   n_stall++;
    if (ref_conv && ref_iters < MAX_ITER) n_early++;
    if (!ref_conv) n_maxit++;
    $display("frame %0d: iters=%0d conv=%0d cycles=%0d idle=%0d bypass=%0d fwd=%0d r0=%0d w0=%0d errors=%0d",
             f, out_iters, out_converged, stat_cycles, stat_idle, stat_bypass, stat_forward,
             stat_r0_reads, stat_w0_writes, cw_mism);
  endtask

  initial begin
    in_valid  = 1'b0;
    out_ready = 1'b0;
    in_llr    = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int f = 0; f < NFRAMES; f++) begin
      case (f % 4)
        0: run_frame(f, 6, 0, 1'b1);   // no noise
        1: run_frame(f, 6, 3, 1'b1);   // light noise
        2: run_frame(f, 5, 4, 1'b0);   // moderate noise
        default: run_frame(f, 2, 9, 1'b0);   // heavy noise
      endcase
    end
    check(n_bypass > 0, "memory bypass never happened");
    check(n_fwd > 0,    "forward from the W0 cycle never happened");
    check(n_stall > 0,  "no stall (idle cycle) ever happened");
    check(n_early > 0,  "early termination never happened");
    check(n_maxit > 0,  "iteration limit never reached");
    check(n_three > 0,  "three layers never in flight");
    $display("mechanisms: bypass frames=%0d forward frames=%0d stall frames=%0d early=%0d maxiter=%0d three-layer=%0d",
             n_bypass, n_fwd, n_stall, n_early, n_maxit, n_three);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
