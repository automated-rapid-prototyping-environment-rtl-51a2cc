// tb_rpt_fpga_top -- end-to-end test of the FPGA top shell at its default
// parameters (N = 8, prototype clock = CPU clock / 10).
//
// The testbench plays the board CPU's software: it reads the size
// registers, then runs BLOCKS prototype runs exactly as the board software
// does (burst-write the input map, set FPGA Control, wait for the
// interrupt, read the output map, clear the interrupt flag). Every output
// word is compared with a bit-exact model of the SRRC filter written here,
// fed with the whole input history, so the filter memory must carry over
// from one block to the next. It also moves data through the common RAM in
// both directions, checks from the CPU side that a run takes 2N prototype clock cycles, and
// sweeps the independent combinational example over all 256 inputs.
// Mechanisms counted (each must occur at least once): prototype runs,
// enable withdrawn by done, interrupt cleared by the CPU, idle periods in
// which nothing moves, writes outside the input map, impulse responses that
// cross a block boundary, common-RAM transfers CPU->DSP and DSP->CPU.
`timescale 1ns/1ps
module tb_rpt_fpga_top;

  localparam int N       = 8;
  localparam int DIV     = 10;
  localparam int BLOCKS  = 10;
  localparam int NSAMP   = N * BLOCKS;
  localparam int AW      = 10;

  logic        cpu_clk = 0, rst = 1, cpu_cs = 0, cpu_we = 0;
  logic [31:0] cpu_addr = '0, cpu_wdata = '0, cpu_rdata;
  logic        cpu_irq;
  logic        dsp_clk = 0, dsp_en = 0, dsp_we = 0;
  logic [AW-1:0] dsp_addr = '0;
  logic [31:0] dsp_wdata = '0, dsp_rdata;
  logic signed [3:0]  ex_a = '0, ex_b = '0;
  logic signed [15:0] ex_c;

  rpt_fpga_top dut (.*);

  always #7.5 cpu_clk = ~cpu_clk;   // ~66 MHz
  always #5   dsp_clk = ~dsp_clk;   // 100 MHz

  int checks = 0, failures = 0;
  int n_runs = 0, n_en_cleared = 0, n_ir_cleared = 0, n_idle = 0,
      n_oob_write = 0, n_cross = 0, n_ram_c2d = 0, n_ram_d2c = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // ------------------------------------------------------------ CPU bus
  task automatic bus_write(input logic [31:0] a, input logic [31:0] d);
    @(negedge cpu_clk);
    cpu_cs = 1; cpu_we = 1; cpu_addr = a; cpu_wdata = d;
    @(negedge cpu_clk);
    cpu_cs = 0; cpu_we = 0;
  endtask

  // combinational windows: data valid in the same cycle
  task automatic bus_read(input logic [31:0] a, output logic [31:0] d);
    @(negedge cpu_clk);
    cpu_cs = 1; cpu_we = 0; cpu_addr = a;
    @(posedge cpu_clk);
    d = cpu_rdata;
    @(negedge cpu_clk);
    cpu_cs = 0;
  endtask

  // common RAM: one cycle of read latency, address held two cycles
  task automatic bus_read_ram(input logic [31:0] a, output logic [31:0] d);
    @(negedge cpu_clk);
    cpu_cs = 1; cpu_we = 0; cpu_addr = a;
    @(posedge cpu_clk);
    @(negedge cpu_clk);
    d = cpu_rdata;
    cpu_cs = 0;
  endtask

  // ------------------------------------------------- reference SRRC model
  real b_real [13];
  int  b_int  [13];
  int  hist   [NSAMP];

  function automatic int wrap16(input int v);
    return int'(shortint'(v));
  endfunction
  function automatic int uh(input int k);
    return (k < 0) ? 0 : hist[k];
  endfunction
  function automatic int ref_y(input int n);
    int k = n / 2, acc = 0;
    if (n % 2 == 0) begin
      for (int j = 0; j < 3; j++)
        acc = wrap16(acc + int'((longint'(b_int[2*j]) * wrap16(uh(k-j) + uh(k-6+j))) >>> 15));
      acc = wrap16(acc + int'((longint'(b_int[6]) * uh(k-3)) >>> 15));
    end else begin
      for (int j = 0; j < 3; j++)
        acc = wrap16(acc + int'((longint'(b_int[2*j+1]) * wrap16(uh(k-j) + uh(k-5+j))) >>> 15));
    end
    return acc;
  endfunction

  // combinational example reference
  function automatic int ref_ex(input int a, input int b);
    int d, e, f, c;
    d = ((a + b) & 15);  d = (d > 7) ? d - 16 : d;
    e = ((d + 1) & 15);  e = (e > 7) ? e - 16 : e;
    f = ((e | d) & 15);  f = (f > 7) ? f - 16 : f;
    c = (f > e) ? f - e : e - f;
    c = c + 6 * a;
    return wrap16(c);
  endfunction

  logic [31:0] rd;
  int t_start, t_end, cyc;
  logic [31:0] snap [3*N];

  always @(posedge cpu_clk) cyc++;

  initial begin
    b_real = '{-0.02584730312872, 0.065168614718020, 0.030577805550879,
               -0.13418905377870, -0.03369143649198, 0.444705414395022,
                0.741884497481248, 0.444705414395022, -0.03369143649198,
               -0.13418905377870, 0.030577805550879, 0.065168614718020,
               -0.02584730312872};
    for (int m = 0; m < 13; m++) b_int[m] = int'($floor(b_real[m] * 32768.0));

    repeat (4) @(posedge cpu_clk);
    rst = 0;
    repeat (40) @(posedge cpu_clk);   // clock manager lock

    // ---------------------------------------------------- size registers
    bus_read(32'hFF00_0028, rd); check(rd == 32'd32, $sformatf("Input RAM Size %0d", rd));
    bus_read(32'hFF00_002C, rd); check(rd == 32'd96, $sformatf("Output RAM Size %0d", rd));
    bus_read(32'hFF00_0030, rd); check(rd == 32'd32, "Input Request Size");
    bus_read(32'hFF00_0034, rd); check(rd == 32'd96, "Output Available Size");
    bus_read(32'hFF00_0038, rd); check(rd == 32'd0, "FPGA Control after reset");
    bus_read(32'hFF00_001C, rd); check(rd == 32'd0 && !cpu_irq, "IR after reset");

    // ------------------------------------------------------- common RAM
    for (int i = 0; i < 8; i++) bus_write(32'hFF10_0000 + 4*i, 32'hC0DE_0000 + i);
    for (int i = 0; i < 8; i++) begin
      @(negedge dsp_clk); dsp_en = 1; dsp_we = 0; dsp_addr = AW'(i);
      @(negedge dsp_clk); dsp_en = 0;
      check(dsp_rdata == 32'hC0DE_0000 + i, $sformatf("DSP read %0d: %h", i, dsp_rdata));
      if (dsp_rdata == 32'hC0DE_0000 + i) n_ram_c2d++;
    end
    for (int i = 0; i < 8; i++) begin
      @(negedge dsp_clk); dsp_en = 1; dsp_we = 1; dsp_addr = AW'(100 + i); dsp_wdata = 32'hD5B0_0000 ^ i;
      @(negedge dsp_clk); dsp_en = 0; dsp_we = 0;
    end
    for (int i = 0; i < 8; i++) begin
      bus_read_ram(32'hFF10_0000 + 4*(100 + i), rd);
      check(rd == (32'hD5B0_0000 ^ i), $sformatf("CPU read of DSP word %0d: %h", i, rd));
      if (rd == (32'hD5B0_0000 ^ i)) n_ram_d2c++;
    end

    // -------------------------------------------------- prototype runs
    for (int blk = 0; blk < BLOCKS; blk++) begin
      for (int i = 0; i < N; i++) begin
        int v;
        if (blk == 0)      v = (i == 0) ? 13107 : 0;   // 0.4 impulse
        else if (blk == 3) v = (i == N-1) ? -9830 : 0; // impulse at block end
        else if (blk < 5)  v = 0;
        else               v = int'($urandom_range(0, 65535)) - 32768;  // full scale
        hist[blk*N + i] = v;
        // upper half of the word must be ignored
        bus_write(32'hFF20_0000 + 4*i, {16'hA5A5, 16'(v)});
      end
      // a write just past the input map must not land anywhere
      bus_write(32'hFF20_0000 + 4*N, 32'h0000_7FFF);
      n_oob_write++;

      // idle: without the enable nothing advances
      for (int k = 0; k < 3*N; k++) begin
        bus_read(32'hFF30_0000 + 4*k, rd);
        snap[k] = rd;
      end
      repeat (3 * DIV) @(posedge cpu_clk);
      begin
        bit same = 1;
        for (int k = 0; k < 3*N; k += 5) begin
          bus_read(32'hFF30_0000 + 4*k, rd);
          if (rd != snap[k]) same = 0;
        end
        check(same, "outputs changed while idle");
        if (same) n_idle++;
      end

      // start, wait for the interrupt
      bus_write(32'hFF00_0038, 32'h1);
      t_start = cyc;
      fork
        wait (cpu_irq);
        begin
          repeat (2 * N * DIV * 4) @(posedge cpu_clk);
        end
      join_any
      disable fork;
      t_end = cyc;
      check(cpu_irq, $sformatf("block %0d: no interrupt", blk));
      if (cpu_irq) n_runs++;
      // From the control write to the interrupt: the first enabled prototype
      // edge comes 1..DIV CPU cycles after the write, 2N-1 prototype cycles
      // later the last step commits, one CPU cycle later the flag is set.
      // So 2N enabled prototype cycles give (2N-1)*DIV+2 .. 2N*DIV+1.
      check(t_end - t_start >= (2*N-1)*DIV + 2 && t_end - t_start <= 2*N*DIV + 1,
            $sformatf("block %0d: %0d CPU cycles to interrupt", blk, t_end - t_start));

      bus_read(32'hFF00_0038, rd);
      check(rd == 32'd0, "FPGA Control not cleared by done");
      if (rd == 32'd0) n_en_cleared++;
      bus_read(32'hFF00_001C, rd);
      check(rd == 32'd1, "IR flag not set");

      // output map: y[0..2N-1], y_dec[0..N-1]
      for (int k = 0; k < 2*N; k++) begin
        int e;
        e = ref_y(blk*2*N + k);
        bus_read(32'hFF30_0000 + 4*k, rd);
        check(rd == 32'(e), $sformatf("blk %0d y[%0d] = %0d, expected %0d", blk, k, $signed(rd), e));
      end
      for (int k = 0; k < N; k++) begin
        int e;
        e = ref_y(blk*2*N + 2*k);
        bus_read(32'hFF30_0000 + 4*(2*N + k), rd);
        check(rd == 32'(e), $sformatf("blk %0d y_dec[%0d] = %0d, expected %0d", blk, k, $signed(rd), e));
      end
      // response of the impulse at the end of block 3 must reach block 4
      if (blk == 4) begin
        bus_read(32'hFF30_0000 + 4*5, rd);
        check(rd != 0, "filter memory lost at block boundary");
        if (rd != 0) n_cross++;
      end

      bus_write(32'hFF00_001C, 32'h0);
      @(negedge cpu_clk);
      check(!cpu_irq, "interrupt not cleared");
      if (!cpu_irq) n_ir_cleared++;
    end

    // ------------------------------------ independent combinational example
    for (int a = -8; a < 8; a++)
      for (int b = -8; b < 8; b++) begin
        ex_a = 4'(a); ex_b = 4'(b);
        #1;
        check(int'(ex_c) == ref_ex(a, b), $sformatf("example a=%0d b=%0d c=%0d", a, b, ex_c));
      end

    // -------------------------------------------------- mechanism coverage
    check(n_runs == BLOCKS,  "prototype runs");
    check(n_en_cleared > 0,  "enable withdrawn by done never seen");
    check(n_ir_cleared > 0,  "interrupt clear never seen");
    check(n_idle > 0,        "idle hold never seen");
    check(n_oob_write > 0,   "out-of-map write never made");
    check(n_cross > 0,       "block-crossing response never seen");
    check(n_ram_c2d > 0 && n_ram_d2c > 0, "common RAM transfers");
    $display("mechanisms: runs=%0d en_cleared=%0d ir_cleared=%0d idle=%0d oob_write=%0d cross=%0d ram_c2d=%0d ram_d2c=%0d",
             n_runs, n_en_cleared, n_ir_cleared, n_idle, n_oob_write, n_cross, n_ram_c2d, n_ram_d2c);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge cpu_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
