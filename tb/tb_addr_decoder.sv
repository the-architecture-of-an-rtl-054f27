// tb_addr_decoder -- exhaustive check of the CPU address decoder: all 65536
// addresses are compared with a reference written from the memory map table,
// and an acknowledge cycle must select the interrupt controller.
module tb_addr_decoder;
  import amm_pkg::*;
  int checks = 0, failures = 0;
  addr_t addr = 0;
  logic  inta = 0;
  dev_e  dev;
  int    hits [10];

  addr_decoder dut (.*);

  function automatic dev_e expected(input int unsigned a);
    if (a < 'h2000)                return DEV_PROM;
    if (a < 'h2800)                return DEV_RAM;
    if (a == 'h3000 || a == 'h3001) return DEV_APU0;
    if (a == 'h3002 || a == 'h3003) return DEV_APU1;
    if (a == 'h3010)               return DEV_FLAGS;
    if (a == 'h3020)               return DEV_INTC;
    if (a >= 'h3100 && a < 'h3110) return DEV_CMEM;
    if (a >= 'h4000)               return DEV_SYSBUS;
    return DEV_NONE;
  endfunction

  initial begin
    for (int a = 0; a < 65536; a++) begin
      addr = addr_t'(a); inta = 0;
      #1;
      checks++;
      hits[int'(dev)]++;
      if (dev != expected(a)) begin
        failures++;
        if (failures < 10) $display("FAIL: addr %h -> %s expected %s", a, dev.name(), expected(a).name());
      end
      if (a % 4096 == 7) begin
        inta = 1; #1; checks++;
        if (dev != DEV_INTA) begin failures++; $display("FAIL: inta at %h", a); end
      end
    end
    for (int d = 0; d < 9; d++) begin
      checks++;
      if (hits[d] == 0) begin failures++; $display("FAIL: device %0d never selected", d); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
