// fourport_ram: one memory holding both the channel RAM (APP values) and the
// intermediate data RAM (T values), with two read and two write ports.
//
// Entry c belongs to block column c and holds Z words of APP_W bits. While a
// layer is working on column c the entry holds that column's T values
// (written through W1 after the subtraction, read back through R1 for the
// add-array); otherwise it holds the column's APP values (read through R0,
// written through W0). Because a column is never needed as APP and as T at
// the same time, one entry per column is enough for both roles.
// Reads are synchronous: rdata is valid the cycle after ren, and a read sees
// the contents before a write in the same cycle. A write through W0 and W1 to
// the same entry in the same cycle must not happen (asserted); W0 wins.
// Port names follow the document; the read timing is this design's choice.
module fourport_ram #(
  parameter int DEPTH = 12,
  parameter int WIDTH = 144
) (
  input  logic                     clk,
  // R0 / W0: channel RAM role
  input  logic                     r0_en,
  input  logic [$clog2(DEPTH)-1:0] r0_addr,
  output logic [WIDTH-1:0]         r0_data,
  input  logic                     w0_en,
  input  logic [$clog2(DEPTH)-1:0] w0_addr,
  input  logic [WIDTH-1:0]         w0_data,
  // R1 / W1: intermediate data RAM role
  input  logic                     r1_en,
  input  logic [$clog2(DEPTH)-1:0] r1_addr,
  output logic [WIDTH-1:0]         r1_data,
  input  logic                     w1_en,
  input  logic [$clog2(DEPTH)-1:0] w1_addr,
  input  logic [WIDTH-1:0]         w1_data
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (r0_en) r0_data <= mem[r0_addr];
    if (r1_en) r1_data <= mem[r1_addr];
    if (w1_en) mem[w1_addr] <= w1_data;
    if (w0_en) mem[w0_addr] <= w0_data;
  end

  a_no_write_clash: assert property (@(posedge clk)
    !(w0_en && w1_en && w0_addr == w1_addr))
    else $error("fourport_ram: W0 and W1 write entry %0d together", w0_addr);
endmodule
