// apu_port -- memory-mapped port from the module CPU to one Am9511 APU.
//
// The CPU moves operands, commands and results to and from an APU with plain
// memory reads and writes. This block turns such a cycle into one APU access:
// address bit 0 drives C/D (0 = data stack, 1 = command/status). The first
// cycle of an access is a set-up cycle; from the second cycle on apu_cs and
// apu_rd or apu_wr are asserted, and the access completes (ready high) on the
// first edge where the APU does not hold PAUSE. The APU is taken to accept a
// write, or pop a read, on that same edge. While the APU is executing it holds
// PAUSE, which keeps ready low and so stretches the CPU cycle.
//
// The APU raises END when a command finishes. Its rising edge becomes a one-
// cycle end_irq for the interrupt system, so the CPU can feed each APU from a
// task queue; when the interrupt is acknowledged (end_ack) the port returns
// apu_eack for one cycle, which clears END in the APU.
//
// Memory mapping and the END interrupt follow the design; the wait cycle, the
// C/D bit assignment and active-high pin polarity are this implementation's.
module apu_port (
  input  logic       clk,
  input  logic       rst_n,
  // CPU side
  input  logic       sel,        // cycle addresses this APU
  input  logic       rd,
  input  logic       wr,
  input  logic       a0,         // address bit 0: C/D
  input  logic [7:0] wdata,
  output logic [7:0] rdata,
  output logic       ready,
  // interrupt system
  output logic       end_irq,
  input  logic       end_ack,
  // APU pins
  output logic       apu_cs,
  output logic       apu_cd,
  output logic       apu_rd,
  output logic       apu_wr,
  output logic [7:0] apu_dbo,
  input  logic [7:0] apu_dbi,
  input  logic       apu_pause,
  input  logic       apu_end,
  output logic       apu_eack
);

  logic active_q;  // set-up cycle done, strobe phase
  logic end_q;
  logic done;

  assign done    = active_q && !apu_pause;
  assign ready   = done;
  assign apu_cs  = sel && active_q;
  assign apu_cd  = a0;
  assign apu_rd  = sel && rd && active_q;
  assign apu_wr  = sel && wr && active_q;
  assign apu_dbo = wdata;
  assign rdata   = apu_dbi;
  assign end_irq = apu_end && !end_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active_q <= 1'b0;
      end_q    <= 1'b0;
      apu_eack <= 1'b0;
    end else begin
      end_q    <= apu_end;
      apu_eack <= end_ack;
      if (done)                         active_q <= 1'b0;
      else if (sel && (rd || wr))       active_q <= 1'b1;
    end
  end

  // an APU access is a read or a write, never both
  a_one_strobe: assert property (@(posedge clk) disable iff (!rst_n) !(apu_rd && apu_wr));

endmodule
