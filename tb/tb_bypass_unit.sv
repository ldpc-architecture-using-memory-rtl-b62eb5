// tb_bypass_unit: directed cycles for the pending / stall / bypass / forward
// rules and the mux-array, then random traffic against a pending-bit model.
module tb_bypass_unit;
  localparam int NB = 12, W = 16, CW = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          flush, rd_req, rd_stall, rd_fire, rd_bypass, rd_fwd, ws_valid, w0_en;
  logic [CW-1:0] rd_col, ws_col, w0_col;
  logic [W-1:0]  ram_data, pa_data, mux_data;

  bypass_unit #(.NB(NB), .WIDTH(W)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic drive(input bit req, input int col, input bit wsv, input int wsc,
                       input bit w0, input int w0c);
    @(negedge clk);
    rd_req = req; rd_col = CW'(col); ws_valid = wsv; ws_col = CW'(wsc);
    w0_en = w0; w0_col = CW'(w0c);
    ram_data = W'($urandom); pa_data = W'($urandom);
    #1;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit model [NB];

  initial begin
    bit exp_sel, exp_fsel;
    bit exp_valid;
    logic [W-1:0] exp_w0;
    flush = 0; rd_req = 0; rd_col = '0; ws_valid = 0; ws_col = '0; w0_en = 0; w0_col = '0;
    ram_data = '0; pa_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // column 3 not pending: plain read
    drive(1, 3, 0, 0, 0, 0);
    check(rd_fire && !rd_bypass && !rd_stall, "first read of column 3 fires");
    // column 3 is pending now: a second read stalls
    drive(1, 3, 1, 5, 0, 0);
    check(mux_data == ram_data, "mux passes RAM data after normal read");
    check(rd_stall && !rd_fire, "pending column 3 stalls");
    // add-array producing column 3 this cycle: bypass
    drive(1, 3, 1, 3, 0, 0);
    check(rd_fire && rd_bypass && !rd_stall, "column 3 bypassed");
    drive(0, 0, 0, 0, 0, 0);
    check(mux_data == pa_data, "mux passes post-add data after bypass");
    // still pending after the bypass (new layer owns it): stalls again
    drive(1, 3, 0, 0, 0, 0);
    check(rd_stall && !rd_fwd, "column 3 pending again after the bypass");
    // read in the cycle of the W0 write of column 3: forwarded
    drive(1, 3, 0, 0, 1, 3);
    check(rd_fire && rd_fwd && !rd_bypass, "read in the W0 cycle is forwarded");
    exp_w0 = pa_data;
    drive(0, 0, 0, 0, 0, 0);
    check(mux_data == exp_w0, "mux passes the captured W0 value after a forward");
    // column 3 is pending again: forwarded once more in a W0 cycle
    drive(1, 3, 0, 0, 1, 3);
    check(rd_fwd, "second forward of column 3");
    drive(1, 7, 0, 0, 0, 0);
    check(rd_fire && !rd_bypass && !rd_fwd, "unrelated column fires normally");
    // flush clears pending
    drive(0, 0, 0, 0, 0, 0);
    @(negedge clk); flush = 1; @(negedge clk); flush = 0; #1;
    rd_req = 1; rd_col = CW'(3); ws_valid = 0; #1;
    check(rd_fire, "flush clears pending");
    @(negedge clk); rd_req = 0;
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    // random traffic
    for (int c = 0; c < NB; c++) model[c] = 0;
    exp_valid = 0;
    for (int n = 0; n < 3000; n++) begin
      bit req, wsv, w0;
      int col, wsc, w0c, pend_w0;
      req = $urandom_range(0, 1); col = $urandom_range(0, NB - 1);
      wsv = $urandom_range(0, 1); wsc = (n % 3 == 0) ? col : $urandom_range(0, NB - 1);
      // W0 only for pending columns
      w0 = 0; w0c = 0;
      pend_w0 = $urandom_range(0, NB - 1);
      if (n % 4 == 0) pend_w0 = col;
      if (model[pend_w0] && $urandom_range(0, 2) == 0) begin w0 = 1; w0c = pend_w0; end
      drive(req, col, wsv, wsc, w0, w0c);
      if (exp_valid)
        check(mux_data == (exp_sel ? pa_data : (exp_fsel ? exp_w0 : ram_data)), $sformatf("mux data at %0d", n));
      check(rd_bypass == (req && model[col] && wsv && wsc == col), $sformatf("bypass at %0d", n));
      check(rd_fwd == (req && model[col] && !(wsv && wsc == col) && w0 && w0c == col), $sformatf("forward at %0d", n));
      check(rd_stall == (req && model[col] && !(wsv && wsc == col) && !(w0 && w0c == col)), $sformatf("stall at %0d", n));
      check(rd_fire == (req && !rd_stall), $sformatf("fire at %0d", n));
      exp_valid = 1;
      exp_sel = rd_bypass;
      exp_fsel = rd_fwd;
      if (rd_fwd) exp_w0 = pa_data;
      if (w0) model[w0c] = 0;
      if (rd_fire) model[col] = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
