// tb_srrc_opt -- self-checking testbench for the SRRC filter prototype.
//
// Feeds blocks of N samples (an impulse block, silence, then random blocks),
// runs the prototype with a randomly gapped enable and collects every output
// sample through y_sel / ydec_sel. Each sample is compared with two models
// written here independently of the design:
//   * a bit-exact model of the phase-split filter working on the whole input
//     history (coefficients re-derived from their real values), and
//   * the plain 13-tap real-valued FIR of the zero-stuffed input, with a
//     tolerance of 2**-11 for 16-bit quantisation.
// It also checks that a block takes exactly 2N enabled cycles, that done is
// high only in the last one, and that nothing is selected while enable is low.
`timescale 1ns/1ps
module tb_srrc_opt;
  import rpt_pkg::*;

  localparam int N       = 8;
  localparam int BLOCKS  = 12;
  localparam int NSAMP   = N * BLOCKS;

  logic   clk = 0, rst_a = 1, enable = 0;
  fix16_t u [N];
  fix16_t y_sample;
  logic [2*N-1:0] y_sel;
  logic [N-1:0]   ydec_sel;
  logic   done;

  srrc_opt #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // reference coefficients b0..b12 from the published real values
  real b_real [13];
  int  b_int  [13];
  int  hist   [NSAMP];   // every input sample applied so far

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  function automatic int wrap16(input int v);
    return int'(shortint'(v));
  endfunction
  function automatic int floor15(input longint v);  // floor(v / 2**15)
    return int'(v >>> 15);
  endfunction
  function automatic int uh(input int k);
    return (k < 0) ? 0 : hist[k];
  endfunction

  // bit-exact output sample number n (of the upsampled stream)
  function automatic int ref_exact(input int n);
    int k = n / 2, acc = 0;
    if (n % 2 == 0) begin
      for (int j = 0; j < 3; j++)
        acc = wrap16(acc + floor15(longint'(b_int[2*j]) * wrap16(uh(k-j) + uh(k-6+j))));
      acc = wrap16(acc + floor15(longint'(b_int[6]) * uh(k-3)));
    end else begin
      for (int j = 0; j < 3; j++)
        acc = wrap16(acc + floor15(longint'(b_int[2*j+1]) * wrap16(uh(k-j) + uh(k-5+j))));
    end
    return acc;
  endfunction

  // real-valued direct-form FIR of the zero-stuffed input
  function automatic real ref_real(input int n);
    real s = 0.0;
    for (int m = 0; m < 13; m++) begin
      int q = n - m;
      if (q >= 0 && q % 2 == 0) s += b_real[m] * (real'(uh(q/2)) / 32768.0);
    end
    return s;
  endfunction

  int got_y    [2*N];
  int got_ydec [N];
  int steps;

  initial begin
    b_real = '{-0.02584730312872, 0.065168614718020, 0.030577805550879,
               -0.13418905377870, -0.03369143649198, 0.444705414395022,
                0.741884497481248, 0.444705414395022, -0.03369143649198,
               -0.13418905377870, 0.030577805550879, 0.065168614718020,
               -0.02584730312872};
    for (int m = 0; m < 13; m++) b_int[m] = int'($floor(b_real[m] * 32768.0));
    for (int i = 0; i < N; i++) u[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst_a = 0;

    for (int blk = 0; blk < BLOCKS; blk++) begin
      // input block
      for (int i = 0; i < N; i++) begin
        int v;
        if (blk == 0)      v = (i == 0) ? 13107 : 0;              // 0.4 impulse
        else if (blk < 3)  v = 0;
        else               v = int'($urandom_range(0, 22936)) - 11468; // |u| < 0.35
        u[i] = fix16_t'(v);
        hist[blk*N + i] = v;
      end
      for (int i = 0; i < 2*N; i++) got_y[i] = 99999;
      for (int i = 0; i < N; i++)   got_ydec[i] = 99999;
      steps = 0;
      // run until done, with random idle cycles
      forever begin
        @(negedge clk);
        enable = ($urandom_range(0, 3) != 0);
        #1;
        if (!enable) begin
          check(y_sel == '0 && ydec_sel == '0, "select while disabled");
          continue;
        end
        steps++;
        check($onehot(y_sel), "y_sel not one-hot");
        for (int i = 0; i < 2*N; i++) if (y_sel[i]) got_y[i] = y_sample;
        for (int i = 0; i < N; i++)   if (ydec_sel[i]) got_ydec[i] = y_sample;
        if (done) begin
          @(posedge clk);
          #1 enable = 0;
          break;
        end
        check(steps < 2*N, "done missing after 2N steps");
        if (steps >= 2*N) break;
      end
      check(steps == 2*N, $sformatf("block %0d took %0d steps, expected %0d", blk, steps, 2*N));
      // compare
      for (int i = 0; i < 2*N; i++) begin
        int n, e;
        real r, d;
        n = blk*2*N + i;
        e = ref_exact(n);
        r = ref_real(n);
        check(got_y[i] == e, $sformatf("blk %0d y[%0d]=%0d expected %0d", blk, i, got_y[i], e));
        d = real'(got_y[i]) / 32768.0 - r;
        check(d < 0.0005 && d > -0.0005, $sformatf("blk %0d y[%0d] off real FIR by %f", blk, i, d));
      end
      for (int i = 0; i < N; i++)
        check(got_ydec[i] == got_y[2*i], $sformatf("blk %0d y_dec[%0d] mismatch", blk, i));
    end
    // the impulse response peak: centre tap times 0.4
    check(ref_exact(6) > 9700 && ref_exact(6) < 9760, "impulse peak");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
