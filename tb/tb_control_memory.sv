// tb_control_memory -- self-checking test of the dual-port control memory.
//
// Random reads and writes on both ports each cycle are checked against a
// reference array (port A wins a same-location collision), and cmd_written
// must pulse exactly for port-A writes to the command location.
module tb_control_memory;
  localparam int unsigned DEPTH = 16;
  localparam int unsigned AW = $clog2(DEPTH);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [AW-1:0] a_addr = 0, b_addr = 0;
  logic a_we = 0, b_we = 0;
  logic [7:0] a_wdata = 0, b_wdata = 0, a_rdata, b_rdata;
  logic cmd_written;
  logic [7:0] ref_mem [DEPTH];
  int n_cmd = 0, n_cmd_exp = 0, n_collide = 0;

  control_memory #(.DEPTH(DEPTH), .CMD_ADDR(0)) dut (.clk, .a_addr, .a_we, .a_wdata, .a_rdata,
    .b_addr, .b_we, .b_wdata, .b_rdata, .cmd_written);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (cmd_written && rst_n) n_cmd++;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < DEPTH; a++) begin
      ref_mem[a] = 8'($urandom);
      @(negedge clk); b_we = 1; b_addr = AW'(a); b_wdata = ref_mem[a];
    end
    @(negedge clk); b_we = 0;
    for (int i = 0; i < 3000; i++) begin
      logic [7:0] ea, eb;
      @(negedge clk);
      a_addr = AW'($urandom); b_addr = ($urandom_range(3) == 0) ? a_addr : AW'($urandom);
      a_we = ($urandom_range(3) == 0); b_we = ($urandom_range(2) == 0);
      a_wdata = 8'($urandom); b_wdata = 8'($urandom);
      ea = ref_mem[a_addr]; eb = ref_mem[b_addr];
      if (a_we && a_addr == 0) n_cmd_exp++;
      if (a_we && b_we && a_addr == b_addr) n_collide++;
      if (b_we) ref_mem[b_addr] = b_wdata;
      if (a_we) ref_mem[a_addr] = a_wdata;
      @(posedge clk); #1;
      a_we = 0; b_we = 0;
      check(a_rdata == ea, $sformatf("port A read %h expected %h", a_rdata, ea));
      check(b_rdata == eb, $sformatf("port B read %h expected %h", b_rdata, eb));
    end
    repeat (3) @(negedge clk);
    check(n_cmd == n_cmd_exp, $sformatf("cmd_written %0d times, expected %0d", n_cmd, n_cmd_exp));
    check(n_collide > 0, "collisions exercised");
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); b_addr = AW'(a);
      @(negedge clk);
      check(b_rdata == ref_mem[a], "final contents");
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
