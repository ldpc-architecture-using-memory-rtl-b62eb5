// tb_add_array: random T values and random check-node records; the
// expected APP = sat(T + E_new) is computed here from the definition of the
// record (magnitude min2 at the stored index, min1 elsewhere, sign = XOR of
// the other slots' signs).
module tb_add_array;
  import ldpc_pkg::*;
  localparam int Z = 24;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  app_t    [Z-1:0]  t, app;
  cn_msg_t [Z-1:0]  msg;
  logic [IDX_W-1:0] pos;


  add_array #(.Z(Z)) dut (.t, .new_msg(msg), .pos, .app);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 300; rep++) begin
      pos = IDX_W'($urandom_range(0, DMAX - 1));
      for (int i = 0; i < Z; i++) begin
        t[i]         = app_t'($urandom_range(0, 62) - 31);
        msg[i].min1  = MAG_W'($urandom_range(0, 31));
        msg[i].min2  = MAG_W'($urandom_range(0, 31));
        msg[i].idx   = IDX_W'($urandom_range(0, DMAX - 1));
        msg[i].signs = DMAX'($urandom);
      end
      @(posedge clk);
      for (int i = 0; i < Z; i++) begin
        int mag, s, e, x;
        mag = (msg[i].idx == pos) ? msg[i].min2 : msg[i].min1;
        s = 0;
        for (int k = 0; k < DMAX; k++) if (k != pos) s ^= msg[i].signs[k];
        e = s ? -mag : mag;
        x = int'(t[i]) + e;
        if (x > 31) x = 31;
        if (x < -31) x = -31;
        checks++;
        if (int'(app[i]) != x) begin
          failures++;
          $display("FAIL: row %0d t=%0d e=%0d app=%0d expected %0d", i, t[i], e, app[i], x);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
