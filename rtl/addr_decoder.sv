// addr_decoder -- selects the device addressed by a CPU cycle.
//
// The CPU reaches every resource of the module through its memory map: PROM,
// RAM, the two APUs (memory-mapped, as the design prescribes), the flag and
// interrupt-controller registers, the internal port of the control memory and,
// above SYSBUS_BASE, the common memory over the system bus. An interrupt-
// acknowledge fetch (inta) selects the interrupt controller regardless of the
// address. Purely combinational. The address values come from amm_pkg and are
// this implementation's choice; the document fixes only the sizes.
module addr_decoder
  import amm_pkg::*;
#(
  parameter int unsigned PROM_BYTES = 8192,
  parameter int unsigned RAM_BYTES  = 2048,
  parameter int unsigned CMEM_BYTES = 16
) (
  input  addr_t addr,
  input  logic  inta,
  output dev_e  dev
);

  always_comb begin
    if (inta)                                                    dev = DEV_INTA;
    else if (addr >= SYSBUS_BASE)                                dev = DEV_SYSBUS;
    else if (addr < PROM_BASE + addr_t'(PROM_BYTES))             dev = DEV_PROM;
    else if (addr >= RAM_BASE && addr < RAM_BASE + addr_t'(RAM_BYTES)) dev = DEV_RAM;
    else if (addr[15:1] == APU0_BASE[15:1])                      dev = DEV_APU0;
    else if (addr[15:1] == APU1_BASE[15:1])                      dev = DEV_APU1;
    else if (addr == FLAGS_ADDR)                                 dev = DEV_FLAGS;
    else if (addr == INTC_ADDR)                                  dev = DEV_INTC;
    else if (addr >= CMEM_BASE && addr < CMEM_BASE + addr_t'(CMEM_BYTES)) dev = DEV_CMEM;
    else                                                         dev = DEV_NONE;
  end

endmodule
