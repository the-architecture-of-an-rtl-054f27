// tb_ram -- self-checking test of the RAM: random writes and reads compared
// against a reference array, including read-before-write on a write cycle.
module tb_ram;
  localparam int unsigned BYTES = 2048;
  localparam int unsigned AW = $clog2(BYTES);
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [AW-1:0] addr = 0;
  logic we = 0;
  logic [7:0] wdata = 0, rdata;
  logic [7:0] ref_mem [BYTES];

  ram #(.BYTES(BYTES)) dut (.*);

  initial begin
    for (int a = 0; a < BYTES; a++) begin
      ref_mem[a] = 8'($urandom);
      @(negedge clk); we = 1; addr = AW'(a); wdata = ref_mem[a];
    end
    for (int i = 0; i < 6000; i++) begin
      int unsigned a; bit w; logic [7:0] old;
      a = $urandom_range(BYTES - 1); w = ($urandom_range(2) == 0);
      @(negedge clk); addr = AW'(a); we = w; wdata = 8'($urandom);
      old = ref_mem[a];
      if (w) ref_mem[a] = wdata;
      @(negedge clk); we = 0;
      checks++;
      if (rdata !== old) begin
        failures++;
        if (failures < 10) $display("FAIL: addr %0d read %h expected %h", a, rdata, old);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
