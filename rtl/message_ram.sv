// message_ram: stores, for every layer, the Z compressed check-node records
// (min1, min2, index, signs) produced by the SISO units, so that the next
// iteration can subtract each check node's previous message.
//
// One synchronous read port (rdata valid the cycle after ren, holding its
// value until the next read) and one write port. A read and a write of the
// same entry in one cycle return the old contents. DEPTH = number of layers.
// The document names the message RAM and its contents; the port timing is
// this design's choice.
module message_ram #(
  parameter int DEPTH = 6,
  parameter int WIDTH = 432
) (
  input  logic                     clk,
  input  logic                     ren,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata,
  input  logic                     wen,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (ren) rdata <= mem[raddr];
    if (wen) mem[waddr] <= wdata;
  end
endmodule
