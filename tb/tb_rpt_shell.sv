// tb_rpt_shell -- checks the register wrapper with its SRRC prototype.
//
// Clocks: a CPU clock and a phase-aligned prototype clock at a quarter of
// its rate, both generated by one process. The testbench writes the input
// map (with junk in the unused upper half-words and a write beyond the
// map), raises iInDataRdy, counts enabled prototype cycles until
// oOutDataRdy, withdraws iInDataRdy as the control register would, and
// reads the whole output map, comparing it with a bit-exact filter model
// written here. It checks that oOutDataRdy is a single prototype-cycle
// pulse, that a run takes 2N prototype cycles, that outputs are
// sign-extended, that words beyond the map read zero, and that with
// iInDataRdy left high the runs repeat every 2N+1 prototype cycles.
`timescale 1ns/1ps
module tb_rpt_shell;
  localparam int N      = 8;
  localparam int DIV    = 4;
  localparam int BLOCKS = 6;

  logic iClk = 0, iClkRPTCalc = 0, iRst = 1;
  logic [19:0] iAddr = '0;
  logic [31:0] iData = '0, oData;
  logic iEnInput = 0, iEnWr = 0, iInDataRdy = 0, oOutDataRdy;

  rpt_shell #(.N(N)) dut (.*);

  // phase-aligned clocks from one process
  int ph = 0;
  initial forever begin
    #5;
    iClk = ~iClk;
    if (iClk) begin
      iClkRPTCalc = (ph < DIV/2);
      ph = (ph + 1) % DIV;
    end
  end

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  real b_real [13];
  int  b_int  [13];
  int  hist   [N*(BLOCKS+4)];

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

  task automatic cpu_write(input int word, input logic [31:0] d);
    @(negedge iClk); iEnInput = 1; iEnWr = 1; iAddr = 20'(4*word); iData = d;
    @(negedge iClk); iEnInput = 0; iEnWr = 0;
  endtask
  task automatic cpu_read(input int word, output logic [31:0] d);
    @(negedge iClk); iAddr = 20'(4*word);
    #1 d = oData;
  endtask

  int enabled_cycles, pulse_len;
  always @(posedge iClkRPTCalc) begin
    if (dut_en()) enabled_cycles++;
    if (oOutDataRdy) pulse_len++;
  end
  function automatic bit dut_en();
    return iInDataRdy && !oOutDataRdy;
  endfunction

  logic [31:0] r;

  initial begin
    b_real = '{-0.02584730312872, 0.065168614718020, 0.030577805550879,
               -0.13418905377870, -0.03369143649198, 0.444705414395022,
                0.741884497481248, 0.444705414395022, -0.03369143649198,
               -0.13418905377870, 0.030577805550879, 0.065168614718020,
               -0.02584730312872};
    for (int m = 0; m < 13; m++) b_int[m] = int'($floor(b_real[m] * 32768.0));
    repeat (3) @(posedge iClk);
    #1 iRst = 0;

    for (int blk = 0; blk < BLOCKS; blk++) begin
      for (int i = 0; i < N; i++) begin
        int v;
        v = (blk == 0) ? ((i == 0) ? 16384 : 0) : int'($urandom_range(0, 65535)) - 32768;
        hist[blk*N + i] = v;
        cpu_write(i, {16'($urandom), 16'(v)});
      end
      cpu_write(N, 32'h0000_4000);       // beyond the input map: ignored
      cpu_write(N + 3, 32'h0000_1234);
      enabled_cycles = 0; pulse_len = 0;
      @(negedge iClk); iInDataRdy = 1;
      wait (oOutDataRdy);
      @(negedge iClk); iInDataRdy = 0;   // what the control register does
      wait (!oOutDataRdy);
      check(enabled_cycles == 2*N, $sformatf("blk %0d: %0d prototype cycles", blk, enabled_cycles));
      check(pulse_len == 1, $sformatf("blk %0d: done pulse %0d cycles", blk, pulse_len));
      for (int k = 0; k < 3*N; k++) begin
        int e;
        e = (k < 2*N) ? ref_y(blk*2*N + k) : ref_y(blk*2*N + 2*(k - 2*N));
        cpu_read(k, r);
        check(r == 32'(e), $sformatf("blk %0d word %0d = %h expected %0d", blk, k, r, e));
      end
      cpu_read(3*N, r);     check(r == 0, "read beyond output map");
      cpu_read(3*N + 7, r); check(r == 0, "read beyond output map");
    end

    // iInDataRdy left high: back-to-back runs, one idle cycle in between
    begin
      int t0, t1;
      t0 = -1;
      for (int b = 0; b < 3; b++) for (int i = 0; i < N; i++) hist[(BLOCKS+b)*N + i] = hist[(BLOCKS-1)*N + i];
      @(negedge iClk); iInDataRdy = 1;
      for (int run = 0; run < 3; run++) begin
        @(posedge oOutDataRdy);
        t1 = $time;
        if (t0 >= 0) check((t1 - t0) == (2*N + 1) * DIV * 10,
                           $sformatf("back-to-back period %0d ns", t1 - t0));
        t0 = t1;
      end
      @(negedge iClk); iInDataRdy = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
