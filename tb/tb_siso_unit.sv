// tb_siso_unit: feeds check rows of random degree (2..DMAX) with random T
// values, back to back, and checks the finished record in the cycle of the
// last input: min1/min2 (offset subtracted, floored at 0), the slot of the
// first smallest magnitude, and every sign. It also checks that the message
// rebuilt for each slot equals the offset minimum over the *other* slots
// with the product of the other slots' signs.
module tb_siso_unit;
  import ldpc_pkg::*;
  localparam int OFF = 1;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic             in_valid, in_first;
  app_t             t;
  logic [IDX_W-1:0] pos;
  cn_msg_t          result;

  siso_unit #(.OFFSET(OFF)) dut (.clk, .rst_n, .in_valid, .in_first, .t, .pos, .result);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v [DMAX];
    in_valid = 0; in_first = 0; t = '0; pos = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int row = 0; row < 400; row++) begin
      int d, m1, m2, ix;
      d = $urandom_range(2, DMAX);
      for (int k = 0; k < d; k++) begin
        v[k] = (row % 7 == 0) ? int'($urandom_range(0, 4)) - 2     // many ties
                              : int'($urandom_range(0, 62)) - 31;
      end
      if (row % 5 == 0) @(posedge clk);     // idle gap between rows
      for (int k = 0; k < d; k++) begin
        @(negedge clk);
        in_valid = 1; in_first = (k == 0); t = app_t'(v[k]); pos = IDX_W'(k);
        if (k == d - 1) begin
          #1;
          m1 = 99; m2 = 99; ix = 0;
          for (int j = 0; j < d; j++) begin
            automatic int a = v[j] < 0 ? -v[j] : v[j];
            if (a < m1) begin m2 = m1; m1 = a; ix = j; end
            else if (a < m2) m2 = a;
          end
          check(int'(result.min1) == (m1 > OFF ? m1 - OFF : 0), $sformatf("row %0d min1 %0d exp %0d v0=%0d v1=%0d d=%0d", row, result.min1, m1, v[0], v[1], d));
          check(int'(result.min2) == (m2 > OFF ? m2 - OFF : 0), $sformatf("row %0d min2", row));
          check(int'(result.idx) == ix, $sformatf("row %0d idx %0d exp %0d", row, result.idx, ix));
          for (int j = 0; j < DMAX; j++)
            check(result.signs[j] == (j < d ? (v[j] < 0) : 1'b0), $sformatf("row %0d sign %0d", row, j));
          for (int j = 0; j < d; j++) begin
            automatic int mo = 99, so = 0;
            int e, g;
            for (int o = 0; o < d; o++) if (o != j) begin
              automatic int a = v[o] < 0 ? -v[o] : v[o];
              if (a < mo) mo = a;
              so ^= (v[o] < 0);
            end
            mo = mo > OFF ? mo - OFF : 0;
            e = so ? -mo : mo;
            g = (j == int'(result.idx)) ? int'(result.min2) : int'(result.min1);
            if ((^result.signs) ^ result.signs[j]) g = -g;
            check(g == e, $sformatf("row %0d slot %0d message %0d exp %0d", row, j, g, e));
          end
        end
      end
      @(negedge clk);
      in_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
