// tb_bus_interface_unit -- self-checking test of the system-bus slave side.
//
// Two bus masters in turn go through the resource protocol: read TAS (the
// first gets ZERO, the second ONE), write parameters and the command into the
// control memory (BUSY rises, task_irq pulses once), poll STATUS, let the
// module CPU read the parameters and clear BUSY, read back results the CPU
// left in the control memory, and release TAS. It also checks that every
// access is acknowledged exactly one cycle after the strobe, that the data
// drivers are enabled only for reads, and that addresses outside the window
// are not answered.
module tb_bus_interface_unit;
  import amm_pkg::*;
  localparam addr_t BASE = 16'hFF00;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so the asynchronous reset fires
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  addr_t sys_addr = 0;
  logic  sys_rd = 0, sys_wr = 0;
  data_t sys_din = 0, sys_dout;
  logic  sys_ack, drv_en;
  logic [3:0] int_cmem_addr = 0;
  logic  int_cmem_we = 0, int_busy_clear = 0;
  data_t int_cmem_wdata = 0, int_cmem_rdata;
  logic  tas, busy, task_irq;
  int    n_irq = 0;

  bus_interface_unit #(.SLAVE_BASE(BASE), .CMEM_BYTES(16)) dut (.*);

  always @(posedge clk) if (task_irq) n_irq++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic bus(input bit w, input addr_t a, input data_t d, output data_t q);
    int cyc = 0;
    @(negedge clk); sys_addr = a; sys_rd = !w; sys_wr = w; sys_din = d;
    do begin @(posedge clk); #1; cyc++; end while (!sys_ack && cyc < 20);
    q = sys_dout;
    check(cyc == 1, $sformatf("acknowledge after %0d cycles", cyc));
    check(drv_en == !w, "drivers enabled for reads only");
    @(posedge clk); #1; sys_rd = 0; sys_wr = 0;
  endtask

  task automatic cpu_read(input int a, output data_t q);
    @(negedge clk); int_cmem_addr = 4'(a); @(negedge clk); q = int_cmem_rdata;
  endtask
  task automatic cpu_write(input int a, input data_t d);
    @(negedge clk); int_cmem_addr = 4'(a); int_cmem_we = 1; int_cmem_wdata = d;
    @(negedge clk); int_cmem_we = 0;
  endtask

  initial begin
    data_t q;
    repeat (2) @(negedge clk);
    rst_n = 1;
    bus(0, BASE + 0, 0, q); check(q == 0, "first TAS read sees ZERO (free)");
    check(tas, "TAS forced to ONE");
    bus(0, BASE + 0, 0, q); check(q == 1, "second master sees ONE (allocated)");
    for (int i = 1; i < 16; i++) bus(1, BASE + 16'h10 + addr_t'(i), data_t'(i * 7), q);
    check(!busy && n_irq == 0, $sformatf("parameters alone start nothing (busy=%0d irq=%0d)", busy, n_irq));
    bus(1, BASE + 16'h10, 8'h21, q);          // command
    @(negedge clk);
    check(busy && n_irq == 1, "command sets BUSY and interrupts once");
    bus(0, BASE + 1, 0, q); check(q == 8'b11, "STATUS shows TAS and BUSY");
    for (int i = 0; i < 16; i++) begin
      cpu_read(i, q);
      check(q == (i == 0 ? 8'h21 : data_t'(i * 7)), $sformatf("CPU reads control memory %0d", i));
    end
    cpu_write(5, 8'hA5);
    @(negedge clk); int_busy_clear = 1; @(negedge clk); int_busy_clear = 0;
    bus(0, BASE + 1, 0, q); check(q == 8'b10, "BUSY cleared on completion");
    bus(0, BASE + 16'h15, 0, q); check(q == 8'hA5, "master reads the result");
    bus(1, BASE + 0, 0, q); check(!tas, "master write releases TAS");
    bus(0, BASE + 0, 0, q); check(q == 0, "resource free again");
    // outside the window: no answer
    @(negedge clk); sys_addr = 16'hFE00; sys_rd = 1;
    repeat (4) begin @(posedge clk); #1; check(!sys_ack && !drv_en, "no answer outside the window"); end
    sys_rd = 0;
    check(n_irq == 1, "one task interrupt in total");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
