// arith_module -- the arithmetics module of the intelligent graphics terminal.
//
// A shared compute resource of a multi-microprocessor terminal. An 8080 CPU,
// running transformation software from PROM with RAM as working store, drives
// two Am9511 arithmetic processors (one for x, one for y coordinates) through
// memory-mapped ports, loads and stores display-file data in the common memory
// over the system bus, and takes tasks from other modules through a dual-port
// control memory guarded by hardware TAS and BUSY flags. This top holds all of
// the board's logic; the CPU and the APUs are external parts, so their buses
// are ports (cpu_*, apu_*), as are the system bus as master (sysm_*, bus_req,
// bus_grant) and as slave (syss_*).
//
// CPU bus timing: the CPU presents cpu_addr with one of cpu_rd, cpu_wr or
// cpu_inta and holds them until a rising clock edge with cpu_ready high; that
// edge completes the cycle (writes take effect, cpu_din is valid in that
// cycle). Internal devices answer in the second cycle; APU cycles are also
// stretched by PAUSE; system-bus cycles last until the arbiter grants the bus
// and the slave acknowledges. Unmapped addresses read 0xFF.
//
// Interrupt channels: 6 = APU0 END, 5 = APU1 END, 4 = new task in the control
// memory; ext_irq is ORed into all eight channels for other sources. The
// structure (CPU, 8 KB PROM, 2 KB RAM, two APUs, eight-channel interrupt
// system, bus interface with flags and control memory, bus master logic)
// follows the design; addresses, channel numbers and bus timing are this
// implementation's choices.
module arith_module
  import amm_pkg::*;
#(
  parameter int unsigned PROM_BYTES = 8192,
  parameter int unsigned RAM_BYTES  = 2048,
  parameter int unsigned CMEM_BYTES = 16,
  parameter int unsigned N_IRQ      = 8,
  parameter addr_t       SLAVE_BASE = 16'hFF00
) (
  input  logic             clk,
  input  logic             rst_n,
  // 8080 CPU bus
  input  addr_t            cpu_addr,
  input  data_t            cpu_dout,
  output data_t            cpu_din,
  input  logic             cpu_rd,
  input  logic             cpu_wr,
  input  logic             cpu_inta,
  output logic             cpu_ready,
  output logic             cpu_int,
  // PROM programming port
  input  logic             prom_prog_we,
  input  logic [$clog2(PROM_BYTES)-1:0] prom_prog_addr,
  input  data_t            prom_prog_data,
  // two Am9511 APUs
  output logic [1:0]       apu_cs,
  output logic [1:0]       apu_cd,
  output logic [1:0]       apu_rd,
  output logic [1:0]       apu_wr,
  output data_t [1:0]      apu_dbo,
  input  data_t [1:0]      apu_dbi,
  input  logic [1:0]       apu_pause,
  input  logic [1:0]       apu_end,
  output logic [1:0]       apu_eack,
  // system bus: module as master
  output logic             bus_req,
  input  logic             bus_grant,
  output logic             sysm_drv_en,
  output addr_t            sysm_addr,
  output data_t            sysm_dout,
  output logic             sysm_rd,
  output logic             sysm_wr,
  input  data_t            sysm_din,
  input  logic             sysm_ack,
  // system bus: module as slave
  input  addr_t            syss_addr,
  input  logic             syss_rd,
  input  logic             syss_wr,
  input  data_t            syss_din,
  output data_t            syss_dout,
  output logic             syss_ack,
  output logic             syss_drv_en,
  // other interrupt sources
  input  logic [N_IRQ-1:0] ext_irq,
  // flag state, for observation
  output logic             tas,
  output logic             busy
);

  localparam int unsigned PAW = $clog2(PROM_BYTES);
  localparam int unsigned RAW = $clog2(RAM_BYTES);
  localparam int unsigned CAW = $clog2(CMEM_BYTES);

  dev_e  dev;
  logic  acc;
  logic  local_dev;
  logic  wait_q;
  logic  local_done;

  data_t prom_rdata, ram_rdata, cmem_rdata, bm_rdata;
  data_t [1:0] apu_rdata;
  logic  [1:0] apu_ready, apu_end_irq, apu_end_ack;
  logic  bm_ready;

  logic [N_IRQ-1:0] irq, ack_ch, pending;
  data_t vector;
  logic  task_irq;

  assign acc = cpu_rd || cpu_wr || cpu_inta;

  addr_decoder #(.PROM_BYTES(PROM_BYTES), .RAM_BYTES(RAM_BYTES), .CMEM_BYTES(CMEM_BYTES)) u_dec (
    .addr (cpu_addr),
    .inta (cpu_inta),
    .dev
  );

  // one wait cycle for every internal device
  assign local_dev  = !(dev inside {DEV_APU0, DEV_APU1, DEV_SYSBUS});
  assign local_done = wait_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wait_q <= 1'b0;
    else        wait_q <= !wait_q && acc && local_dev;
  end

  prom #(.BYTES(PROM_BYTES)) u_prom (
    .clk,
    .prog_we   (prom_prog_we),
    .prog_addr (prom_prog_addr),
    .prog_data (prom_prog_data),
    .addr      (cpu_addr[PAW-1:0]),
    .rdata     (prom_rdata)
  );

  ram #(.BYTES(RAM_BYTES)) u_ram (
    .clk,
    .addr  (cpu_addr[RAW-1:0]),
    .we    (dev == DEV_RAM && cpu_wr && local_done),
    .wdata (cpu_dout),
    .rdata (ram_rdata)
  );

  for (genvar i = 0; i < 2; i++) begin : g_apu
    apu_port u_apu (
      .clk,
      .rst_n,
      .sel       (dev == (i == 0 ? DEV_APU0 : DEV_APU1)),
      .rd        (cpu_rd),
      .wr        (cpu_wr),
      .a0        (cpu_addr[0]),
      .wdata     (cpu_dout),
      .rdata     (apu_rdata[i]),
      .ready     (apu_ready[i]),
      .end_irq   (apu_end_irq[i]),
      .end_ack   (apu_end_ack[i]),
      .apu_cs    (apu_cs[i]),
      .apu_cd    (apu_cd[i]),
      .apu_rd    (apu_rd[i]),
      .apu_wr    (apu_wr[i]),
      .apu_dbo   (apu_dbo[i]),
      .apu_dbi   (apu_dbi[i]),
      .apu_pause (apu_pause[i]),
      .apu_end   (apu_end[i]),
      .apu_eack  (apu_eack[i])
    );
  end

  always_comb begin
    irq = ext_irq;
    irq[IRQ_APU0] = irq[IRQ_APU0] | apu_end_irq[0];
    irq[IRQ_APU1] = irq[IRQ_APU1] | apu_end_irq[1];
    irq[IRQ_TASK] = irq[IRQ_TASK] | task_irq;
  end
  assign apu_end_ack = {ack_ch[IRQ_APU1], ack_ch[IRQ_APU0]};

  interrupt_ctrl #(.N_CH(N_IRQ)) u_intc (
    .clk,
    .rst_n,
    .irq,
    .status_we    (dev == DEV_INTC && cpu_wr && local_done),
    .status_wdata (cpu_dout[3:0]),
    .inta_done    (dev == DEV_INTA && local_done),
    .int_req      (cpu_int),
    .vector,
    .ack_ch,
    .pending,
    .enabled      ()
  );

  bus_interface_unit #(.SLAVE_BASE(SLAVE_BASE), .CMEM_BYTES(CMEM_BYTES)) u_biu (
    .clk,
    .rst_n,
    .sys_addr       (syss_addr),
    .sys_rd         (syss_rd),
    .sys_wr         (syss_wr),
    .sys_din        (syss_din),
    .sys_dout       (syss_dout),
    .sys_ack        (syss_ack),
    .drv_en         (syss_drv_en),
    .int_cmem_addr  (cpu_addr[CAW-1:0]),
    .int_cmem_we    (dev == DEV_CMEM && cpu_wr && local_done),
    .int_cmem_wdata (cpu_dout),
    .int_cmem_rdata (cmem_rdata),
    .int_busy_clear (dev == DEV_FLAGS && cpu_wr && local_done),
    .tas,
    .busy,
    .task_irq
  );

  bus_master_logic u_bm (
    .clk,
    .rst_n,
    .sel       (dev == DEV_SYSBUS),
    .rd        (cpu_rd),
    .wr        (cpu_wr),
    .addr      (cpu_addr),
    .wdata     (cpu_dout),
    .rdata     (bm_rdata),
    .ready     (bm_ready),
    .bus_req,
    .bus_grant,
    .drv_en    (sysm_drv_en),
    .sys_addr  (sysm_addr),
    .sys_dout  (sysm_dout),
    .sys_rd    (sysm_rd),
    .sys_wr    (sysm_wr),
    .sys_din   (sysm_din),
    .sys_ack   (sysm_ack)
  );

  // read data and READY back to the CPU
  always_comb begin
    unique case (dev)
      DEV_PROM:   cpu_din = prom_rdata;
      DEV_RAM:    cpu_din = ram_rdata;
      DEV_APU0:   cpu_din = apu_rdata[0];
      DEV_APU1:   cpu_din = apu_rdata[1];
      DEV_FLAGS:  cpu_din = {6'b0, tas, busy};
      DEV_INTC:   cpu_din = 8'(pending);
      DEV_CMEM:   cpu_din = cmem_rdata;
      DEV_SYSBUS: cpu_din = bm_rdata;
      DEV_INTA:   cpu_din = vector;
      default:    cpu_din = 8'hFF;
    endcase
    unique case (dev)
      DEV_APU0:   cpu_ready = apu_ready[0];
      DEV_APU1:   cpu_ready = apu_ready[1];
      DEV_SYSBUS: cpu_ready = bm_ready;
      default:    cpu_ready = local_done;
    endcase
  end

endmodule
