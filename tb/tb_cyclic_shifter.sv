// tb_cyclic_shifter: checks the forward rotation out[i] = in[(i+s) mod Z] and
// that the inverse shifter undoes it, for random data and every shift value,
// at Z = 24 (not a power of two) and Z = 8.
module tb_cyclic_shifter;
  localparam int W = 6;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [23:0][W-1:0] a_in, a_fwd, a_back;
  logic [4:0]         a_sh;
  logic [7:0][W-1:0]  b_in, b_fwd;
  logic [2:0]         b_sh;

  cyclic_shifter #(.Z(24), .W(W), .INVERSE(1'b0)) u_f (.din(a_in), .shift(a_sh), .dout(a_fwd));
  cyclic_shifter #(.Z(24), .W(W), .INVERSE(1'b1)) u_i (.din(a_fwd), .shift(a_sh), .dout(a_back));
  cyclic_shifter #(.Z(8),  .W(W), .INVERSE(1'b0)) u_8 (.din(b_in), .shift(b_sh), .dout(b_fwd));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 4; rep++)
      for (int s = 0; s < 24; s++) begin
        for (int i = 0; i < 24; i++) a_in[i] = W'($urandom);
        for (int i = 0; i < 8; i++)  b_in[i] = W'($urandom);
        a_sh = 5'(s);
        b_sh = 3'(s % 8);
        @(posedge clk);
        for (int i = 0; i < 24; i++) begin
          checks++;
          if (a_fwd[i] != a_in[(i + s) % 24]) begin
            failures++;
            $display("FAIL: Z=24 shift %0d out[%0d]", s, i);
          end
        end
        checks++;
        if (a_back != a_in) begin failures++; $display("FAIL: inverse shift %0d", s); end
        for (int i = 0; i < 8; i++) begin
          checks++;
          if (b_fwd[i] != b_in[(i + s % 8) % 8]) begin
            failures++;
            $display("FAIL: Z=8 shift %0d out[%0d]", s % 8, i);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
