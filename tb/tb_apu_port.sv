// tb_apu_port -- self-checking test of the memory-mapped APU port.
//
// A CPU bus model pushes two 16-bit operands into an Am9511 model through the
// port, issues SADD/SSUB/SMUL commands, polls status and pops the result, and
// checks: each access takes exactly two cycles when the APU is idle, a data
// access while the APU executes is stretched by PAUSE until the command ends,
// the result is right, END produces exactly one end_irq pulse, and end_ack
// returns EACK which clears END.
module tb_apu_port;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so the asynchronous reset fires
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic sel = 0, rd = 0, wr = 0, a0 = 0, end_ack = 0;
  logic [7:0] wdata = 0, rdata;
  logic ready, end_irq;
  logic apu_cs, apu_cd, apu_rd, apu_wr, apu_pause, apu_end, apu_eack;
  logic [7:0] apu_dbo, apu_dbi;
  int irq_count = 0;

  apu_port dut (.*);
  am9511_model #(.LATENCY(6)) apu (.clk, .rst_n, .cs(apu_cs), .cd(apu_cd), .rd(apu_rd), .wr(apu_wr),
    .din(apu_dbo), .dout(apu_dbi), .pause(apu_pause), .end_o(apu_end), .eack(apu_eack));

  always @(posedge clk) if (end_irq) irq_count++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one CPU cycle; returns read data and the number of clocks it took
  task automatic cpu(input bit w, input bit cd, input logic [7:0] d, output logic [7:0] q, output int cyc);
    @(negedge clk); sel = 1; rd = !w; wr = w; a0 = cd; wdata = d; cyc = 0;
    forever begin
      #1; cyc++; q = rdata;
      if (ready) break;
      @(negedge clk);
    end
    @(posedge clk); #1; sel = 0; rd = 0; wr = 0;
  endtask

  task automatic push16(input logic [15:0] v);
    logic [7:0] q; int c;
    cpu(1, 0, v[7:0], q, c);  check(c == 2, "push takes 2 cycles");
    cpu(1, 0, v[15:8], q, c);
  endtask

  task automatic run(input logic [7:0] op, input logic [15:0] a, input logic [15:0] b, input logic [15:0] exp);
    logic [7:0] hi, lo, st; int c, n0;
    n0 = irq_count;
    push16(a); push16(b);
    cpu(1, 1, op, st, c);
    check(c == 2, "command write takes 2 cycles");
    // data read while busy: stretched by PAUSE
    cpu(0, 0, 0, hi, c);
    check(c > 2, $sformatf("read during execution stretched (%0d cycles)", c));
    cpu(0, 0, 0, lo, c);
    check(c == 2, "second read takes 2 cycles");
    check({hi, lo} == exp, $sformatf("op %h: %h %h -> %h, expected %h", op, a, b, {hi, lo}, exp));
    repeat (2) @(posedge clk);
    check(irq_count == n0 + 1, "one end_irq per command");
    check(apu_end == 1, "END held until acknowledged");
    @(negedge clk); end_ack = 1; @(negedge clk); end_ack = 0;
    @(negedge clk);
    check(apu_end == 0, "EACK clears END");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(8'h6C, 16'd1200, 16'd345, 16'd1545);
    run(8'h6D, 16'd1000, 16'd1, 16'd999);
    for (int i = 0; i < 6; i++) begin
      logic [15:0] a, b;
      a = 16'($urandom); b = 16'($urandom);
      run(8'h6E, a, b, 16'(a * b));
    end
    // status read while busy is not stretched
    begin
      logic [7:0] q; int c;
      push16(16'd3); push16(16'd4);
      cpu(1, 1, 8'h6C, q, c);
      cpu(0, 1, 0, q, c);
      check(c == 2 && q[7] == 1'b1, "status read while busy returns BUSY without PAUSE");
      repeat (10) @(posedge clk);
      cpu(0, 1, 0, q, c);
      check(q[7] == 1'b0, "status idle after execution");
      cpu(0, 0, 0, q, c); cpu(0, 0, 0, q, c);
    end
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
