// tb_bus_master_logic -- self-checking test of the system-bus master logic.
//
// A CPU model issues random reads and writes to common memory. An arbiter
// model grants the bus after a random delay and a memory model acknowledges
// after another random delay. Checks: READY stays low until the slave
// acknowledges; nothing is driven on the bus before the grant; the bus
// request is dropped after the transfer; the cycle takes exactly
// 2 + grant delay + slave latency clocks; read data and memory contents match a
// reference model.
module tb_bus_master_logic;
  import amm_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so the asynchronous reset fires
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic  sel = 0, rd = 0, wr = 0;
  addr_t addr = 0;
  data_t wdata = 0, rdata;
  logic  ready, bus_req, bus_grant, drv_en, sys_rd, sys_wr, sys_ack;
  addr_t sys_addr;
  data_t sys_dout, sys_din;

  bus_master_logic dut (.*);

  // arbiter and memory models
  int grant_delay = 0, ack_delay = 0, gcnt = 0, acnt = 0;
  data_t mem [256];
  always_ff @(posedge clk) begin
    if (!bus_req) gcnt <= 0; else if (gcnt < grant_delay) gcnt <= gcnt + 1;
    if (!(sys_rd || sys_wr)) acnt <= 0; else if (acnt <= ack_delay) acnt <= acnt + 1;
    if (sys_wr && sys_ack) mem[sys_addr[7:0]] <= sys_dout;
  end
  assign bus_grant = bus_req && gcnt == grant_delay;
  assign sys_ack   = (sys_rd || sys_wr) && acnt == ack_delay + 1;
  assign sys_din   = sys_rd ? mem[sys_addr[7:0]] : 8'h00;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  data_t ref_mem [256];
  int n_wait = 0;

  initial begin
    for (int i = 0; i < 256; i++) begin mem[i] = 8'($urandom); ref_mem[i] = mem[i]; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      bit w; data_t d, q; int cyc;
      w = 1'($urandom); d = 8'($urandom);
      grant_delay = $urandom_range(3); ack_delay = $urandom_range(3);
      @(negedge clk);
      sel = 1; rd = !w; wr = w; addr = 16'h4000 | addr_t'($urandom_range(255)); wdata = d;
      cyc = 0;
      forever begin
        #1; cyc++;
        if (!bus_grant && !drv_en) check(!sys_rd && !sys_wr, "no strobe before grant");
        if (ready) break;
        check(cyc < 30, "transfer ends");
        if (cyc >= 30) break;
        @(negedge clk);
      end
      q = rdata;
      if (!ready) n_wait++;
      // decode cycle, request cycle(s), strobe cycle(s) until the acknowledge
      check(cyc == 1 + (1 + grant_delay) + (ack_delay + 2),
            $sformatf("cycle took %0d, expected %0d", cyc, 4 + grant_delay + ack_delay));
      if (w) ref_mem[addr[7:0]] = d;
      else   check(q == ref_mem[addr[7:0]], $sformatf("read %h expected %h", q, ref_mem[addr[7:0]]));
      @(posedge clk); #1; sel = 0; rd = 0; wr = 0;
      @(negedge clk);
      check(!bus_req && !drv_en, "bus released after the transfer");
    end
    for (int i = 0; i < 256; i++) check(mem[i] == ref_mem[i], "memory contents");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
