// tb_message_ram: random reads and writes against a shadow array; the read
// data is valid the cycle after ren, holds while ren is low, and a read of
// the entry being written returns the old contents.
module tb_message_ram;
  localparam int DEPTH = 6, WIDTH = 432, AW = 3;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic             ren, wen;
  logic [AW-1:0]    raddr, waddr;
  logic [WIDTH-1:0] rdata, wdata;
  logic [WIDTH-1:0] shadow [DEPTH];

  message_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  function automatic logic [WIDTH-1:0] rnd();
    logic [WIDTH-1:0] x;
    for (int i = 0; i < WIDTH; i += 16) x[i +: 16] = 16'($urandom);
    return x;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WIDTH-1:0] held;
    ren = 0; wen = 0; raddr = '0; waddr = '0; wdata = '0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      wen = 1; waddr = AW'(a); wdata = rnd(); shadow[a] = wdata;
    end
    held = '0;
    for (int n = 0; n < 1500; n++) begin
      bit r;
      @(negedge clk);
      ren = (n == 0) ? 1 : $urandom_range(0, 1); wen = $urandom_range(0, 1);
      raddr = AW'($urandom_range(0, DEPTH - 1)); waddr = AW'($urandom_range(0, DEPTH - 1));
      if (n % 4 == 0) waddr = raddr;
      wdata = rnd();
      r = ren;
      if (ren) held = shadow[raddr];
      @(posedge clk);
      if (wen) shadow[waddr] = wdata;
      #1;
      checks++;
      if (rdata != held) begin failures++; $display("FAIL: read %0d (ren=%0d)", n, r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
