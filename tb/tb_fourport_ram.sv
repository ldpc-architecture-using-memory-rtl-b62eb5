// tb_fourport_ram: random traffic on all four ports against a shadow array.
// Reads are synchronous and return the contents before a write in the same
// cycle; W0 and W1 never write one entry together (as in the decoder).
module tb_fourport_ram;
  localparam int DEPTH = 12, WIDTH = 144, AW = 4;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic             r0_en, w0_en, r1_en, w1_en;
  logic [AW-1:0]    r0_addr, w0_addr, r1_addr, w1_addr;
  logic [WIDTH-1:0] r0_data, w0_data, r1_data, w1_data;
  logic [WIDTH-1:0] shadow [DEPTH];

  fourport_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  function automatic logic [WIDTH-1:0] rnd();
    logic [WIDTH-1:0] x;
    for (int i = 0; i < WIDTH; i += 32) x[i +: 16] = 16'($urandom);
    for (int i = 16; i < WIDTH; i += 32) x[i +: 16] = 16'($urandom);
    return x;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WIDTH-1:0] e0, e1;
    logic             c0, c1;
    r0_en = 0; r1_en = 0; w0_en = 0; w1_en = 0;
    r0_addr = '0; r1_addr = '0; w0_addr = '0; w1_addr = '0; w0_data = '0; w1_data = '0;
    // fill through both write ports
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      w0_en = (a % 2 == 0); w1_en = (a % 2 == 1);
      w0_addr = AW'(a); w1_addr = AW'(a);
      w0_data = rnd(); w1_data = rnd();
      shadow[a] = (a % 2 == 0) ? w0_data : w1_data;
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      r0_en = $urandom_range(0, 1); r1_en = $urandom_range(0, 1);
      w0_en = $urandom_range(0, 1); w1_en = $urandom_range(0, 1);
      r0_addr = AW'($urandom_range(0, DEPTH - 1)); r1_addr = AW'($urandom_range(0, DEPTH - 1));
      w0_addr = AW'($urandom_range(0, DEPTH - 1)); w1_addr = AW'($urandom_range(0, DEPTH - 1));
      if (w1_addr == w0_addr) w1_en = 0;
      if (n % 3 == 0) r0_addr = w0_addr;     // read-during-write
      w0_data = rnd(); w1_data = rnd();
      e0 = shadow[r0_addr]; e1 = shadow[r1_addr];
      c0 = r0_en; c1 = r1_en;
      @(posedge clk);
      if (w0_en) shadow[w0_addr] = w0_data;
      if (w1_en) shadow[w1_addr] = w1_data;
      #1;
      if (c0) begin checks++; if (r0_data != e0) begin failures++; $display("FAIL: R0 at %0d", n); end end
      if (c1) begin checks++; if (r1_data != e1) begin failures++; $display("FAIL: R1 at %0d", n); end end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
