// tb_prom -- self-checking test of the PROM: programs every location with a
// value from a hash of its address, then reads all of them back in random
// order and checks each byte arrives one cycle after its address.
module tb_prom;
  localparam int unsigned BYTES = 8192;
  localparam int unsigned AW = $clog2(BYTES);
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic prog_we = 0;
  logic [AW-1:0] prog_addr = 0, addr = 0;
  logic [7:0] prog_data = 0, rdata;

  prom #(.BYTES(BYTES)) dut (.*);

  function automatic logic [7:0] image(input int unsigned a);
    return 8'((a * 37 + (a >> 5) * 11 + 8'h5A) ^ (a >> 8));
  endfunction

  initial begin
    for (int a = 0; a < BYTES; a++) begin
      @(negedge clk); prog_we = 1; prog_addr = AW'(a); prog_data = image(a);
    end
    @(negedge clk); prog_we = 0;
    for (int i = 0; i < 3000; i++) begin
      int unsigned a;
      a = $urandom_range(BYTES - 1);
      @(negedge clk); addr = AW'(a);
      @(negedge clk);
      checks++;
      if (rdata !== image(a)) begin
        failures++;
        if (failures < 10) $display("FAIL: addr %0d read %h expected %h", a, rdata, image(a));
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
