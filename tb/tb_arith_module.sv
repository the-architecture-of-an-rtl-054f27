// tb_arith_module -- end-to-end test of the arithmetics module at its default
// size.
//
// Around the module sit: a CPU bus model that plays the module's software, two
// Am9511 models, a common-memory model, a second bus master standing for the
// other modules of the terminal, and an arbiter that shares the system bus
// between that master and the module.
//
// Scenario. Master A takes the module with a TAS read (master B is refused),
// writes a displacement task (display-file address, point count, dx, dy) into
// the control memory and starts it. The CPU is interrupted (RST 4), reads the
// task, and for each point loads x and y from common memory over the system
// bus, parks them in RAM, has APU0 add dx to x while APU1 adds dy to y, waits
// for both END interrupts (RST 6 before RST 5), reads the results and stores
// them back into common memory. Then it clears BUSY. Master A polls STATUS
// over the bus meanwhile, so the two masters contend for the bus. Master A
// then starts a scaling task (SMUL) straight away, waits for it, releases TAS,
// and master B can take the module. The final display file is compared with
// values computed here, and each mechanism (TAS refusal, BUSY polling, task
// interrupt, APU END interrupts and their priority, PAUSE stretching, bus
// arbitration waits, PROM/RAM use, external interrupt, unmapped read) must
// have happened at least once.
module tb_arith_module;
  import amm_pkg::*;
  localparam addr_t SLV = 16'hFF00;
  localparam addr_t DF  = 16'h5000;       // display file in common memory
  localparam int    NPTS = 12;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;
  int checks = 0, failures = 0;

  // ---------------- DUT ----------------
  addr_t cpu_addr = 0;
  data_t cpu_dout = 0, cpu_din;
  logic  cpu_rd = 0, cpu_wr = 0, cpu_inta = 0, cpu_ready, cpu_int;
  logic  prom_prog_we = 0;
  logic [12:0] prom_prog_addr = 0;
  data_t prom_prog_data = 0;
  logic [1:0] apu_cs, apu_cd, apu_rd, apu_wr, apu_pause, apu_end, apu_eack;
  data_t [1:0] apu_dbo, apu_dbi;
  logic  bus_req, bus_grant, sysm_drv_en, sysm_rd, sysm_wr, sysm_ack;
  addr_t sysm_addr;
  data_t sysm_dout, sysm_din;
  addr_t syss_addr;
  logic  syss_rd, syss_wr, syss_ack, syss_drv_en;
  data_t syss_din, syss_dout;
  logic [7:0] ext_irq = 0;
  logic  tas, busy;

  arith_module dut (.*);

  for (genvar i = 0; i < 2; i++) begin : g_apu
    am9511_model #(.LATENCY(10 + 3 * i)) apu (.clk, .rst_n, .cs(apu_cs[i]), .cd(apu_cd[i]),
      .rd(apu_rd[i]), .wr(apu_wr[i]), .din(apu_dbo[i]), .dout(apu_dbi[i]),
      .pause(apu_pause[i]), .end_o(apu_end[i]), .eack(apu_eack[i]));
  end

  // ---------------- system bus: arbiter, foreign master, common memory ----------------
  logic  fm_req = 0, fm_rd = 0, fm_wr = 0;
  addr_t fm_addr = 0;
  data_t fm_wdata = 0;
  logic  own_dut = 0, own_fm = 0;
  addr_t b_addr;
  logic  b_rd, b_wr, b_ack, mem_ack;
  data_t b_wdata, b_rdata;
  data_t cmem [65536];
  int    mem_cnt = 0, mem_lat = 1;

  always_ff @(posedge clk) begin
    // the owner keeps the bus until it drops its request; a free bus goes to
    // the foreign master first, so the module has to wait now and then
    if (own_dut && !bus_req) own_dut <= 0;
    else if (own_fm && !fm_req) own_fm <= 0;
    else if (!own_dut && !own_fm) begin
      if (fm_req) own_fm <= 1;
      else if (bus_req) own_dut <= 1;
    end
  end
  assign bus_grant = own_dut;
  logic fm_grant;
  assign fm_grant = own_fm;

  assign b_addr  = own_dut ? sysm_addr : fm_addr;
  assign b_rd    = own_dut ? sysm_rd : own_fm && fm_rd;
  assign b_wr    = own_dut ? sysm_wr : own_fm && fm_wr;
  assign b_wdata = own_dut ? sysm_dout : fm_wdata;

  // common memory: 0x4000-0xFEFF, acknowledges mem_lat+1 cycles after the strobe
  logic mem_sel;
  assign mem_sel = b_addr >= 16'h4000 && b_addr < 16'hFF00 && (b_rd || b_wr);
  always_ff @(posedge clk) begin
    if (!mem_sel || mem_ack) mem_cnt <= 0; else mem_cnt <= mem_cnt + 1;
    if (mem_ack && b_wr) cmem[b_addr] <= b_wdata;
  end
  assign mem_ack = mem_sel && mem_cnt == mem_lat;

  assign syss_addr = b_addr;
  assign syss_rd   = b_rd;
  assign syss_wr   = b_wr;
  assign syss_din  = b_wdata;
  assign b_ack     = mem_ack || syss_ack;
  assign b_rdata   = syss_drv_en ? syss_dout : cmem[b_addr];
  assign sysm_ack  = own_dut && b_ack;
  assign sysm_din  = b_rdata;

  // ---------------- mechanism counters ----------------
  int n_tas_refused = 0, n_busy_polls = 0, n_task_irq = 0, n_apu_irq = 0, n_prio = 0;
  int n_pause = 0, n_bus_wait = 0, n_sys_cpu = 0, n_ram = 0, n_prom = 0, n_ext = 0, n_unmapped = 0;
  int n_both_pending = 0, n_tasks = 0;
  always @(posedge clk) begin
    if (bus_req && !bus_grant && own_fm) n_bus_wait++;
    if ((apu_cs[0] && apu_pause[0]) || (apu_cs[1] && apu_pause[1])) n_pause++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // ---------------- CPU bus model ----------------
  task automatic cpu_cycle(input int kind, input addr_t a, input data_t d, output data_t q, output int cyc);
    @(negedge clk);
    cpu_addr = a; cpu_dout = d;
    cpu_rd = kind == 0; cpu_wr = kind == 1; cpu_inta = kind == 2;
    cyc = 0;
    forever begin
      #1; cyc++; q = cpu_din;
      if (cpu_ready) break;
      if (cyc > 400) begin check(0, "CPU cycle never completed"); break; end
      @(negedge clk);
    end
    @(posedge clk); #1;
    cpu_rd = 0; cpu_wr = 0; cpu_inta = 0;
  endtask

  task automatic rd8(input addr_t a, output data_t q);
    int c; cpu_cycle(0, a, 0, q, c);
    if (a >= SYSBUS_BASE) n_sys_cpu++;
  endtask
  task automatic wr8(input addr_t a, input data_t d);
    data_t q; int c; cpu_cycle(1, a, d, q, c);
    if (a >= SYSBUS_BASE) n_sys_cpu++;
  endtask
  task automatic rd16(input addr_t a, output logic [15:0] v);
    data_t lo, hi; rd8(a, lo); rd8(a + 1, hi); v = {hi, lo};
  endtask
  task automatic wr16(input addr_t a, input logic [15:0] v);
    wr8(a, v[7:0]); wr8(a + 1, v[15:8]);
  endtask

  // push a 16-bit operand onto an APU stack: low byte first, same address
  task automatic push16(input addr_t a, input logic [15:0] v);
    wr8(a, v[7:0]); wr8(a, v[15:8]);
  endtask

  // wait for the CPU interrupt, run the acknowledge, re-enable; return channel
  task automatic take_interrupt(output int ch);
    data_t v; int c, guard;
    guard = 0;
    while (!cpu_int && guard < 2000) begin @(negedge clk); guard++; end
    check(cpu_int, "interrupt arrives");
    cpu_cycle(2, 16'h0000, 0, v, c);
    check(v[7:6] == 2'b11 && v[2:0] == 3'b111, "acknowledge returns an RST instruction");
    ch = int'(v[5:3]);
    wr8(INTC_ADDR, 8'h00);
  endtask

  // the module's software: one task from the control memory
  task automatic cpu_software();
    data_t cmd, n, b; logic [15:0] df, px, py, ax, ay, x, y, rx, ry;
    int ch, c0, c1;
    take_interrupt(ch);
    check(ch == IRQ_TASK, $sformatf("task interrupt is RST %0d", ch));
    n_task_irq++;
    rd8(CMEM_BASE + 0, cmd);
    rd8(CMEM_BASE + 1, b); df[7:0] = b;
    rd8(CMEM_BASE + 2, b); df[15:8] = b;
    rd8(CMEM_BASE + 3, n);
    rd8(CMEM_BASE + 4, b); px[7:0] = b;  rd8(CMEM_BASE + 5, b); px[15:8] = b;
    rd8(CMEM_BASE + 6, b); py[7:0] = b;  rd8(CMEM_BASE + 7, b); py[15:8] = b;
    for (int i = 0; i < int'(n); i++) begin
      addr_t pa; data_t q; int c;
      pa = df + addr_t'(4 * i);
      rd16(pa, x); rd16(pa + 2, y);
      // park the point in RAM and take it back
      wr16(RAM_BASE + addr_t'(4 * i), x); wr16(RAM_BASE + addr_t'(4 * i + 2), y);
      rd16(RAM_BASE + addr_t'(4 * i), ax); rd16(RAM_BASE + addr_t'(4 * i + 2), ay);
      check(ax == x && ay == y, "RAM keeps the point");
      n_ram++;
      // x on APU0, y on APU1
      push16(APU0_BASE, ax); push16(APU0_BASE, px);
      push16(APU1_BASE, ay); push16(APU1_BASE, py);
      wr8(APU0_BASE + 1, cmd == 8'h01 ? 8'h6C : 8'h6E);
      wr8(APU1_BASE + 1, cmd == 8'h01 ? 8'h6C : 8'h6E);
      if (i == 0) begin
        // read the result straight away: PAUSE stretches the cycle
        cpu_cycle(0, APU0_BASE, 0, q, c);
        check(c > 5, $sformatf("early APU read stretched (%0d cycles)", c));
        rx[15:8] = q;
        cpu_cycle(0, APU0_BASE, 0, q, c);
        rx[7:0] = q;
        take_interrupt(c0);
        take_interrupt(c1);
        check(c0 == IRQ_APU0 && c1 == IRQ_APU1, "END interrupts of both APUs");
        n_apu_irq += 2;
      end else begin
        // let both END signals arrive, then serve them in priority order
        repeat (20) @(negedge clk);
        rd8(INTC_ADDR, b);
        check(b[IRQ_APU0] && b[IRQ_APU1], "both END requests pending");
        n_both_pending++;
        take_interrupt(c0);
        take_interrupt(c1);
        check(c0 == IRQ_APU0 && c1 == IRQ_APU1, $sformatf("priority: RST %0d then RST %0d", c0, c1));
        if (c0 == IRQ_APU0 && c1 == IRQ_APU1) n_prio++;
        n_apu_irq += 2;
        rd8(APU0_BASE, b); rx[15:8] = b; rd8(APU0_BASE, b); rx[7:0] = b;
      end
      rd8(APU1_BASE, b); ry[15:8] = b; rd8(APU1_BASE, b); ry[7:0] = b;
      wr16(pa, rx); wr16(pa + 2, ry);
    end
    wr8(FLAGS_ADDR, 8'h00);   // task complete: clear BUSY
    n_tasks++;
  endtask

  // ---------------- foreign master ----------------
  task automatic fm_access(input bit w, input addr_t a, input data_t d, output data_t q);
    @(negedge clk); fm_req = 1;
    while (!fm_grant) @(negedge clk);
    fm_addr = a; fm_wdata = d; fm_rd = !w; fm_wr = w;
    do @(posedge clk); while (!b_ack);
    q = b_rdata;
    #1; fm_rd = 0; fm_wr = 0; fm_req = 0;
  endtask

  task automatic start_task(input data_t cmd, input logic [15:0] p, input logic [15:0] q16);
    data_t q;
    fm_access(1, SLV + 16'h11, DF[7:0], q);
    fm_access(1, SLV + 16'h12, DF[15:8], q);
    fm_access(1, SLV + 16'h13, 8'(NPTS), q);
    fm_access(1, SLV + 16'h14, p[7:0], q);  fm_access(1, SLV + 16'h15, p[15:8], q);
    fm_access(1, SLV + 16'h16, q16[7:0], q); fm_access(1, SLV + 16'h17, q16[15:8], q);
    fm_access(1, SLV + 16'h10, cmd, q);
    fm_access(0, SLV + 16'h01, 0, q);
    check(q[0], "BUSY set once the task is started");
  endtask

  task automatic wait_not_busy();
    data_t q;
    forever begin
      repeat (15) @(negedge clk);
      fm_access(0, SLV + 16'h01, 0, q);
      if (!q[0]) break;
      n_busy_polls++;
    end
  endtask

  // ---------------- scenario ----------------
  logic [15:0] ex [NPTS], ey [NPTS];

  initial begin
    data_t q; int c;
    logic [15:0] dx, dy, sx, sy;
    for (int i = 0; i < 65536; i++) cmem[i] = 8'($urandom);
    for (int i = 0; i < NPTS; i++) begin
      ex[i] = {cmem[int'(DF) + 4 * i + 1], cmem[int'(DF) + 4 * i]};
      ey[i] = {cmem[int'(DF) + 4 * i + 3], cmem[int'(DF) + 4 * i + 2]};
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // load a start-up image into the PROM and fetch it
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); prom_prog_we = 1; prom_prog_addr = 13'(i * 509); prom_prog_data = 8'(i * 29 + 3);
    end
    @(negedge clk); prom_prog_we = 0;
    for (int i = 0; i < 16; i++) begin
      rd8(addr_t'(i * 509), q);
      check(q == 8'(i * 29 + 3), "PROM fetch");
      n_prom++;
    end
    // unmapped address
    rd8(16'h3800, q); check(q == 8'hFF, "unmapped address reads 0xFF"); n_unmapped++;

    // masters A and B contend for the module
    fm_access(0, SLV + 16'h00, 0, q); check(q == 0, "master A gets the module");
    fm_access(0, SLV + 16'h00, 0, q); check(q == 1, "master B is refused");
    if (q == 1) n_tas_refused++;

    // task 1: displacement
    dx = 16'($urandom); dy = 16'($urandom);
    for (int i = 0; i < NPTS; i++) begin ex[i] += dx; ey[i] += dy; end
    fork
      begin start_task(8'h01, dx, dy); wait_not_busy(); end
      cpu_software();
    join
    // task 2: scaling, started right after the first one ended
    sx = 16'($urandom_range(1, 9)); sy = 16'($urandom_range(1, 9));
    for (int i = 0; i < NPTS; i++) begin ex[i] *= sx; ey[i] *= sy; end
    mem_lat = 3;
    fork
      begin start_task(8'h02, sx, sy); wait_not_busy(); end
      cpu_software();
    join
    for (int i = 0; i < NPTS; i++) begin
      check({cmem[int'(DF) + 4 * i + 1], cmem[int'(DF) + 4 * i]} == ex[i], $sformatf("point %0d x", i));
      check({cmem[int'(DF) + 4 * i + 3], cmem[int'(DF) + 4 * i + 2]} == ey[i], $sformatf("point %0d y", i));
    end
    // master A releases; master B gets the module
    fm_access(1, SLV + 16'h00, 0, q);
    fm_access(0, SLV + 16'h00, 0, q); check(q == 0, "master B gets the module after release");
    // an external interrupt source
    @(negedge clk); ext_irq[1] = 1; @(negedge clk); ext_irq[1] = 0;
    begin int ch; take_interrupt(ch); check(ch == 1, "external request on channel 1"); n_ext++; end

    // every mechanism must have happened
    check(n_tas_refused > 0, "TAS refusal");
    check(n_busy_polls > 0, "BUSY seen while polling");
    check(n_task_irq == 2 && n_tasks == 2, "two task interrupts / tasks");
    check(n_apu_irq == 4 * NPTS, "APU END interrupts");
    check(n_prio > 0, "interrupt priority");
    check(n_both_pending > 0, "simultaneous END requests");
    check(n_pause > 0, "PAUSE stretched a CPU cycle");
    check(n_bus_wait > 0, "module waited for the bus");
    check(n_sys_cpu > 0, "CPU reached common memory");
    check(n_ram > 0 && n_prom > 0 && n_ext > 0 && n_unmapped > 0, "PROM, RAM, external IRQ, unmapped");
    check(g_apu[0].apu.n_cmds == 2 * NPTS && g_apu[1].apu.n_cmds == 2 * NPTS, "APU command counts");
    $display("mechanisms: tas_refused=%0d busy_polls=%0d task_irq=%0d apu_irq=%0d prio=%0d pause_cycles=%0d bus_wait_cycles=%0d cpu_sysbus=%0d",
             n_tas_refused, n_busy_polls, n_task_irq, n_apu_irq, n_prio, n_pause, n_bus_wait, n_sys_cpu);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
