// tb_tas_busy_flags -- self-checking test of the TAS and BUSY flags.
//
// Walks the resource-allocation protocol (read TAS free -> owned, second read
// sees it taken, start task sets BUSY, completion clears it, master clears TAS)
// and then applies random strobe patterns against a reference model,
// including simultaneous start and clear.
module tb_tas_busy_flags;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so the asynchronous reset fires
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic tas_read = 0, tas_clear = 0, task_start = 0, busy_clear = 0;
  logic tas, busy;
  logic m_tas = 0, m_busy = 0;

  tas_busy_flags dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic step(input logic r, input logic c, input logic s, input logic b);
    @(negedge clk); tas_read = r; tas_clear = c; task_start = s; busy_clear = b;
    if (r) check(tas == m_tas, "TAS read returns the flag before setting");
    if (r) m_tas = 1; else if (c) m_tas = 0;
    if (s) m_busy = 1; else if (b) m_busy = 0;
    @(negedge clk); tas_read = 0; tas_clear = 0; task_start = 0; busy_clear = 0;
    check(tas == m_tas && busy == m_busy, $sformatf("flags %b%b expected %b%b", tas, busy, m_tas, m_busy));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(tas == 0 && busy == 0, "flags ZERO after reset");
    step(1, 0, 0, 0);               // master A reads TAS: free, now owned
    check(tas == 1, "TAS forced to ONE by the read");
    step(1, 0, 0, 0);               // master B reads TAS: taken
    step(0, 0, 1, 0);               // A starts a task
    check(busy == 1, "start sets BUSY");
    step(0, 0, 0, 1);               // module completes it
    check(busy == 0, "completion clears BUSY");
    step(0, 1, 0, 0);               // A releases
    check(tas == 0, "release clears TAS");
    step(0, 0, 1, 1);               // start wins over clear
    check(busy == 1, "start wins over clear");
    for (int i = 0; i < 400; i++)
      step(1'($urandom), 1'($urandom), 1'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
