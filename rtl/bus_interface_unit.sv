// bus_interface_unit -- system-bus slave side of the arithmetics module.
//
// Other modules of the terminal use the arithmetics module as a shared
// resource through a small window of the system bus starting at SLAVE_BASE:
//   +0x00  TAS      read: returns {7'b0, TAS} and sets TAS (test-and-set);
//                   write: clears TAS (releases the module)
//   +0x01  STATUS   read: {6'b0, TAS, BUSY}
//   +0x10  control memory, CMEM_BYTES bytes; writing +0x10 (the command
//          byte) starts a task: BUSY is set and the CPU is interrupted.
// The module CPU reaches the control memory through the internal port
// (int_cmem_*) and clears BUSY with int_busy_clear when a task is complete.
//
// Slave timing: a master raises sys_rd or sys_wr with address and data and
// holds them until sys_ack. The unit answers one cycle later: sys_ack is high
// for one cycle, read data are valid in that cycle, and every side effect
// (TAS set or clear, memory write) happens on that edge, once per access.
// drv_en tells the data drivers to put sys_dout on the bus.
//
// The flags, their protocol and the dual-ported control memory follow the
// design; the register layout, window base and acknowledge timing are this
// implementation's choices.
module bus_interface_unit
  import amm_pkg::*;
#(
  parameter addr_t       SLAVE_BASE = 16'hFF00,
  parameter int unsigned CMEM_BYTES = 16,
  localparam int unsigned CAW = $clog2(CMEM_BYTES)
) (
  input  logic           clk,
  input  logic           rst_n,
  // system bus, slave side
  input  addr_t          sys_addr,
  input  logic           sys_rd,
  input  logic           sys_wr,
  input  data_t          sys_din,
  output data_t          sys_dout,
  output logic           sys_ack,
  output logic           drv_en,
  // internal bus
  input  logic [CAW-1:0] int_cmem_addr,
  input  logic           int_cmem_we,
  input  data_t          int_cmem_wdata,
  output data_t          int_cmem_rdata,
  input  logic           int_busy_clear,
  // status
  output logic           tas,
  output logic           busy,
  output logic           task_irq      // one cycle: a task has been started
);

  logic       in_window, sel_tas, sel_status, sel_cmem;
  logic       ack_q;
  logic       cmd_written;
  logic [7:0] offset;
  data_t      cmem_rdata;

  assign in_window  = sys_addr[15:8] == SLAVE_BASE[15:8];
  assign offset     = sys_addr[7:0];
  assign sel_tas    = in_window && offset == 8'(SLV_TAS);
  assign sel_status = in_window && offset == 8'(SLV_STATUS);
  assign sel_cmem   = in_window && offset >= 8'(SLV_CMEM) &&
                      offset < 8'(SLV_CMEM + CMEM_BYTES);

  assign sys_ack = ack_q;
  assign drv_en  = ack_q && sys_rd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ack_q <= 1'b0;
    else        ack_q <= !ack_q && (sys_rd || sys_wr) &&
                         (sel_tas || sel_status || sel_cmem);
  end

  // every access is acknowledged with a single-cycle pulse
  a_ack_pulse: assert property (@(posedge clk) disable iff (!rst_n) sys_ack |=> !sys_ack);

  tas_busy_flags u_flags (
    .clk,
    .rst_n,
    .tas_read   (ack_q && sys_rd && sel_tas),
    .tas_clear  (ack_q && sys_wr && sel_tas),
    .task_start (cmd_written),
    .busy_clear (int_busy_clear),
    .tas,
    .busy
  );

  control_memory #(.DEPTH(CMEM_BYTES), .CMD_ADDR(0)) u_cmem (
    .clk,
    .a_addr      (CAW'(offset - 8'(SLV_CMEM))),
    .a_we        (ack_q && sys_wr && sel_cmem),
    .a_wdata     (sys_din),
    .a_rdata     (cmem_rdata),
    .b_addr      (int_cmem_addr),
    .b_we        (int_cmem_we),
    .b_wdata     (int_cmem_wdata),
    .b_rdata     (int_cmem_rdata),
    .cmd_written
  );

  assign task_irq = cmd_written;

  always_comb begin
    sys_dout = '0;
    if (drv_en) begin
      if (sel_tas)         sys_dout = {7'b0, tas};
      else if (sel_status) sys_dout = {6'b0, tas, busy};
      else if (sel_cmem)   sys_dout = cmem_rdata;
    end
  end

endmodule
