// control_memory -- dual-port mailbox between the system bus and the module CPU.
//
// A master puts the parameters of a task and then its command (the task
// identifier) into this memory over the system bus (port A); the module CPU
// reads and writes it over its internal bus (port B). A port-A write to the
// command location CMD_ADDR raises cmd_written (combinationally, in the
// cycle of the write): that is the event
// that starts a task, setting BUSY and interrupting the CPU.
//
// Both ports: write on the clock edge when we is high; synchronous read, rdata
// valid the cycle after the address. If both ports write one location in the
// same cycle, port A wins. The dual-port access and the interrupt on access
// follow the design; depth, command location and collision rule are this
// implementation's choices.
module control_memory #(
  parameter int unsigned DEPTH    = 16,
  parameter int unsigned CMD_ADDR = 0,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic          clk,
  // port A: system bus
  input  logic [AW-1:0] a_addr,
  input  logic          a_we,
  input  logic [7:0]    a_wdata,
  output logic [7:0]    a_rdata,
  // port B: internal bus
  input  logic [AW-1:0] b_addr,
  input  logic          b_we,
  input  logic [7:0]    b_wdata,
  output logic [7:0]    b_rdata,
  // a task command has been written from the system bus
  output logic          cmd_written
);

  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    for (int i = 0; i < DEPTH; i++) begin
      if (a_we && a_addr == AW'(i))      mem[i] <= a_wdata;
      else if (b_we && b_addr == AW'(i)) mem[i] <= b_wdata;
    end
    a_rdata <= mem[a_addr];
    b_rdata <= mem[b_addr];
  end

  assign cmd_written = a_we && a_addr == AW'(CMD_ADDR);

endmodule
