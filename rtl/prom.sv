// prom -- program store of the module CPU (8 KB by default).
//
// Holds the software that performs the graphics transformations. The contents
// are loaded through a programming port (prog_we/prog_addr/prog_data), which
// stands in for programming the device; in operation only the read port is used.
// Read timing: synchronous. The address presented in one cycle yields its byte
// in rdata on the following cycle. The 8 KB size follows the design; the
// programming port and the synchronous read are choices of this implementation.
module prom #(
  parameter int unsigned BYTES = 8192,
  localparam int unsigned AW = $clog2(BYTES)
) (
  input  logic          clk,
  // programming port
  input  logic          prog_we,
  input  logic [AW-1:0] prog_addr,
  input  logic [7:0]    prog_data,
  // read port
  input  logic [AW-1:0] addr,
  output logic [7:0]    rdata
);

  logic [7:0] mem [BYTES];

  always_ff @(posedge clk) begin
    if (prog_we) mem[prog_addr] <= prog_data;
    rdata <= mem[addr];
  end

endmodule
