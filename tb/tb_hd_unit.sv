// tb_hd_unit: load and read-back of hard decisions, change detection on
// updates, the per-layer parity accumulation, and the stop decision: stop
// with converged = 1 after an iteration whose layers all met their checks
// without a change, stop with converged = 0 at the last allowed iteration,
// no stop otherwise. Uses NB = 12, Z = 24 and a 6-layer iteration.
module tb_hd_unit;
  localparam int NB = 12, Z = 24, CW = 4, LAYERS = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          start, ld_en, upd_en, upd_changed, syn_en, syn_first, syn_ok;
  logic          job_end, job_syn_ok, job_iter_end, job_last_iter, stop, converged;
  logic [CW-1:0] ld_col, upd_col, rd_col;
  logic [Z-1:0]  ld_bits, upd_bits, syn_bits, rd_bits;
  logic [Z-1:0]  model [NB];

  hd_unit #(.NB(NB), .Z(Z)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic idle();
    start = 0; ld_en = 0; upd_en = 0; syn_en = 0; syn_first = 0; job_end = 0;
    job_syn_ok = 0; job_iter_end = 0; job_last_iter = 0;
  endtask

  // one layer's write-back: `nchg` of its 3 columns change, syn = its check
  task automatic layer(input bit syn, input int nchg, input bit iter_end, input bit last_iter);
    for (int k = 0; k < 3; k++) begin
      int c;
      @(negedge clk);
      idle();
      c = $urandom_range(0, NB - 1);
      upd_en = 1; upd_col = CW'(c);
      upd_bits = (k < nchg) ? ~model[c] : model[c];
      #1;
      check(upd_changed == (k < nchg), "change detection");
      if (k == 2) begin
        job_end = 1; job_syn_ok = syn; job_iter_end = iter_end; job_last_iter = last_iter;
      end
      @(posedge clk);
      model[c] = upd_bits;
    end
    @(negedge clk);
    idle();
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    idle();
    ld_col = '0; upd_col = '0; rd_col = '0; ld_bits = '0; upd_bits = '0; syn_bits = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // load
    for (int c = 0; c < NB; c++) begin
      @(negedge clk);
      idle();
      start = (c == 0); ld_en = 1; ld_col = CW'(c); ld_bits = Z'($urandom);
      model[c] = ld_bits;
    end
    @(negedge clk);
    idle();
    for (int c = 0; c < NB; c++) begin
      rd_col = CW'(c); #1;
      check(rd_bits == model[c], $sformatf("read-back column %0d", c));
    end
    // parity accumulation over a 4-column layer
    for (int rep = 0; rep < 50; rep++) begin
      logic [Z-1:0] acc;
      acc = '0;
      for (int k = 0; k < 4; k++) begin
        @(negedge clk);
        idle();
        syn_en = 1; syn_first = (k == 0);
        syn_bits = Z'($urandom);
        if (k == 3 && rep % 2 == 0) syn_bits = acc;   // make the layer pass
        acc ^= syn_bits;
        #1;
        check(syn_ok == (acc == '0), $sformatf("parity rep %0d slot %0d", rep, k));
      end
    end
    @(negedge clk);
    idle();
    // iteration with a failing layer: no stop
    for (int l = 0; l < LAYERS; l++) layer(l != 2, 0, l == LAYERS - 1, 1'b0);
    #1; check(!stop, "no stop after failed parity");
    // iteration with a change: no stop
    for (int l = 0; l < LAYERS; l++) layer(1'b1, (l == 4) ? 1 : 0, l == LAYERS - 1, 1'b0);
    #1; check(!stop, "no stop after a hard-decision change");
    // clean iteration: stop, converged
    for (int l = 0; l < LAYERS - 1; l++) layer(1'b1, 0, 1'b0, 1'b0);
    layer(1'b1, 0, 1'b1, 1'b0);
    check(stop && converged, "stop and converged after a clean iteration");
    @(negedge clk);
    check(!stop && converged, "stop is a pulse, converged holds");
    // new frame, last iteration without convergence
    @(negedge clk); start = 1; @(negedge clk); idle();
    check(!converged, "start clears converged");
    for (int l = 0; l < LAYERS; l++) layer(1'b0, 1, l == LAYERS - 1, 1'b1);
    check(stop && !converged, "stop without convergence at the iteration limit");
    for (int c = 0; c < NB; c++) begin
      rd_col = CW'(c); #1;
      check(rd_bits == model[c], $sformatf("final read-back column %0d", c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
