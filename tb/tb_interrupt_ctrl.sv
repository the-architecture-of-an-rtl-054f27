// tb_interrupt_ctrl -- self-checking test of the eight-channel interrupt system.
//
// Checks: a single request produces int_req and RST n during the acknowledge;
// several pending requests are served highest channel first; the controller
// stays disabled after an acknowledge until the status register is written;
// with status-group-select set only channels above the stored level interrupt;
// a level held high requests only once (edge sensitivity); ack_ch pulses for
// the acknowledged channel. A random phase compares against a reference model.
module tb_interrupt_ctrl;
  localparam int unsigned N = 8;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so the asynchronous reset fires
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [N-1:0] irq = 0, ack_ch, pending;
  logic status_we = 0, inta_done = 0, int_req, enabled;
  logic [3:0] status_wdata = 0;
  logic [7:0] vector;

  interrupt_ctrl #(.N_CH(N)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic pulse(input int ch);
    @(negedge clk); irq[ch] = 1; @(negedge clk); irq[ch] = 0;
  endtask

  task automatic write_status(input bit sgs, input int lvl);
    @(negedge clk); status_we = 1; status_wdata = {sgs, 3'(lvl)};
    @(negedge clk); status_we = 0;
  endtask

  // acknowledge; return the channel named by the RST instruction
  task automatic acknowledge(output int ch);
    @(negedge clk);
    check(vector[7:6] == 2'b11 && vector[2:0] == 3'b111, "vector is an RST opcode");
    ch = int'(vector[5:3]);
    inta_done = 1; @(negedge clk); inta_done = 0;
    check(ack_ch == N'(1 << ch), "ack_ch pulses for the acknowledged channel");
  endtask

  initial begin
    int ch;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!int_req, "no request after reset");
    pulse(3);
    check(int_req, "request on channel 3");
    acknowledge(ch);
    check(ch == 3, "RST 3");
    check(!int_req && pending == 0, "request cleared");
    // several pending: highest first, disabled until status write
    pulse(1); pulse(6); pulse(4);
    check(!int_req && !enabled, "disabled after acknowledge");
    write_status(0, 0);
    check(int_req, "re-enabled by status write");
    acknowledge(ch); check(ch == 6, "highest channel 6 first");
    write_status(0, 0); acknowledge(ch); check(ch == 4, "then 4");
    write_status(0, 0); acknowledge(ch); check(ch == 1, "then 1");
    write_status(0, 0);
    check(!int_req, "all served");
    // status comparison
    write_status(1, 4);
    pulse(2); pulse(4);
    check(!int_req, "channels at or below level 4 are held off");
    pulse(5);
    check(int_req, "channel 5 above level 4 interrupts");
    acknowledge(ch); check(ch == 5, "RST 5");
    write_status(0, 0); acknowledge(ch); check(ch == 4, "held-off 4 after lowering the level");
    write_status(0, 0); acknowledge(ch); check(ch == 2, "then 2");
    write_status(0, 0);
    // level held high requests once
    @(negedge clk); irq[7] = 1;
    repeat (3) @(negedge clk);
    acknowledge(ch); check(ch == 7, "RST 7");
    write_status(0, 0);
    repeat (3) @(negedge clk);
    check(!int_req, "a held level requests only once");
    irq[7] = 0;
    // random phase against a model
    begin
      logic [N-1:0] m_pend = 0;
      for (int i = 0; i < 300; i++) begin
        logic [N-1:0] r; int best;
        r = N'($urandom) & N'($urandom);
        @(negedge clk); irq = r; m_pend |= r;
        @(negedge clk); irq = 0;
        check(pending == m_pend, "pending matches model");
        if (m_pend != 0 && $urandom_range(1)) begin
          best = 0;
          for (int c = 0; c < N; c++) if (m_pend[c]) best = c;
          check(int_req, "request while pending");
          acknowledge(ch);
          check(ch == best, $sformatf("random: RST %0d expected %0d", ch, best));
          m_pend[best] = 0;
          write_status(0, 0);
        end
      end
    end
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
