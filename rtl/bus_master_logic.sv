// bus_master_logic -- lets the module CPU load and store data in common memory.
//
// When the CPU addresses the system-bus range (sel), this logic requests the
// system bus from the arbiter and holds the CPU's READY low. Once the arbiter
// grants the bus, it enables the bus drivers and puts the CPU's address, data
// and read or write strobe on the bus. When the addressed slave acknowledges,
// READY goes high in the same cycle, read data pass straight from the bus to
// the CPU, and the CPU completes its cycle on that edge; the request is then
// dropped and the bus released.
//
// States: IDLE -> REQ (bus_req) -> XFER (bus_req, drivers on, strobe) -> IDLE.
// The sequence follows the design; releasing the bus after every transfer and
// the one-to-one mapping of CPU to system-bus addresses are this
// implementation's choices.
module bus_master_logic
  import amm_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  // CPU side
  input  logic  sel,
  input  logic  rd,
  input  logic  wr,
  input  addr_t addr,
  input  data_t wdata,
  output data_t rdata,
  output logic  ready,
  // arbiter
  output logic  bus_req,
  input  logic  bus_grant,
  // system bus, master side
  output logic  drv_en,
  output addr_t sys_addr,
  output data_t sys_dout,
  output logic  sys_rd,
  output logic  sys_wr,
  input  data_t sys_din,
  input  logic  sys_ack
);

  typedef enum logic [1:0] {IDLE, REQ, XFER} state_e;
  state_e state;

  assign bus_req  = state != IDLE;
  assign drv_en   = state == XFER;
  assign sys_addr = drv_en ? addr  : '0;
  assign sys_dout = drv_en ? wdata : '0;
  assign sys_rd   = drv_en && rd;
  assign sys_wr   = drv_en && wr;
  assign ready    = drv_en && sys_ack;
  assign rdata    = sys_din;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= IDLE;
    else begin
      unique case (state)
        IDLE: if (sel && (rd || wr)) state <= REQ;
        REQ:  if (bus_grant)         state <= XFER;
        XFER: if (sys_ack)           state <= IDLE;
        default:                     state <= IDLE;
      endcase
    end
  end

  // the CPU must hold its cycle until READY
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           state == XFER && !sys_ack |=> state == XFER && sel && (rd || wr));

endmodule
