// ram -- read/write working memory of the module CPU (2 KB by default).
//
// Single port, byte wide. A write (we high) stores wdata at addr on the clock
// edge. Reads are synchronous: rdata shows the byte at the address presented in
// the previous cycle (read-before-write if both hit the same location). The
// 2 KB size follows the design; the port timing is this implementation's choice.
module ram #(
  parameter int unsigned BYTES = 2048,
  localparam int unsigned AW = $clog2(BYTES)
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  logic [7:0]    wdata,
  output logic [7:0]    rdata
);

  logic [7:0] mem [BYTES];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end

endmodule
