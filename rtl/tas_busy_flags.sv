// tas_busy_flags -- hardware Test-and-Set and BUSY flags of the module.
//
// The module is a shared resource. A master that wants it reads the TAS flag:
// the read returns the old value, and at the end of that read the flag is
// forced to one, so exactly one master sees ZERO and owns the module. The owner
// releases the module by clearing TAS. Starting a task (writing the command
// into the control memory) sets BUSY; the module's CPU clears BUSY when the task
// is complete, and masters poll BUSY to find the end of the task.
//
// Interface: all inputs are one-cycle strobes sampled on the rising clock edge.
// tas_read marks the completing cycle of a TAS read (tas already shows the
// value to return in that cycle). Timing: flags change on the edge after the
// strobe. These rules follow the design; the reset value ZERO and the
// precedence of task_start over busy_clear are this implementation's choices.
module tas_busy_flags (
  input  logic clk,
  input  logic rst_n,
  input  logic tas_read,    // a master completes a read of TAS
  input  logic tas_clear,   // the owning master releases the resource
  input  logic task_start,  // a task has been started
  input  logic busy_clear,  // module CPU: task complete
  output logic tas,
  output logic busy
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tas  <= 1'b0;
      busy <= 1'b0;
    end else begin
      if (tas_read)       tas <= 1'b1;
      else if (tas_clear) tas <= 1'b0;

      if (task_start)      busy <= 1'b1;
      else if (busy_clear) busy <= 1'b0;
    end
  end

endmodule
