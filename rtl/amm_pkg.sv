// amm_pkg -- constants and types shared by the arithmetics module RTL.
//
// The arithmetics module is an 8080-based slave board of a multi-microprocessor
// graphics terminal. Its CPU sees one 64 KB address space in which the PROM,
// RAM, the two Am9511 APUs, the flag and interrupt registers, the control
// memory and a window onto the system bus are mapped. The sizes of PROM (8 KB)
// and RAM (2 KB) and the eight interrupt channels are the design's own figures;
// every address below, the slave register layout and the channel numbering are
// choices of this implementation.
package amm_pkg;

  localparam int unsigned ADDR_W = 16;
  localparam int unsigned DATA_W = 8;

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DATA_W-1:0] data_t;

  // ---- internal (CPU) memory map ----
  localparam addr_t PROM_BASE   = 16'h0000;  // 8 KB, 0x0000-0x1FFF
  localparam addr_t RAM_BASE    = 16'h2000;  // 2 KB, 0x2000-0x27FF
  localparam addr_t APU0_BASE   = 16'h3000;  // +0 data, +1 command/status
  localparam addr_t APU1_BASE   = 16'h3002;
  localparam addr_t FLAGS_ADDR  = 16'h3010;  // read {TAS,BUSY}, write clears BUSY
  localparam addr_t INTC_ADDR   = 16'h3020;  // interrupt controller status register
  localparam addr_t CMEM_BASE   = 16'h3100;  // control memory, internal port
  localparam addr_t SYSBUS_BASE = 16'h4000;  // 0x4000-0xFFFF goes to the system bus

  // Device selected by a CPU cycle.
  typedef enum logic [3:0] {
    DEV_NONE,
    DEV_PROM,
    DEV_RAM,
    DEV_APU0,
    DEV_APU1,
    DEV_FLAGS,
    DEV_INTC,
    DEV_CMEM,
    DEV_SYSBUS,
    DEV_INTA
  } dev_e;

  // ---- system-bus slave window (offsets from the window base) ----
  localparam int unsigned SLV_TAS    = 32'h00; // read: test-and-set, write: clear TAS
  localparam int unsigned SLV_STATUS = 32'h01; // read: {.., TAS, BUSY}
  localparam int unsigned SLV_CMEM   = 32'h10; // control memory, 16 bytes

  // ---- interrupt channels (channel 7 has the highest priority) ----
  localparam int unsigned IRQ_APU0 = 6;
  localparam int unsigned IRQ_APU1 = 5;
  localparam int unsigned IRQ_TASK = 4;

  // RST n instruction returned in an interrupt-acknowledge cycle.
  function automatic data_t rst_opcode(input logic [2:0] n);
    return 8'hC7 | data_t'({n, 3'b000});
  endfunction

endpackage
