// tb_art_comb_example -- exhaustive test of the combinational example
// component: all 256 input pairs against an integer model written here.
`timescale 1ns/1ps
module tb_art_comb_example;
  logic signed [3:0]  a, b;
  logic signed [15:0] c;

  art_comb_example dut (.*);

  int checks = 0, failures = 0;

  function automatic int s4(input int v);   // wrap to a 4-bit signed value
    v = v & 15;
    return (v > 7) ? v - 16 : v;
  endfunction

  function automatic int model(input int ai, input int bi);
    int d, e, f, r;
    d = s4(ai + bi);
    e = s4(d + 1);
    f = s4(e | d);
    r = (f > e) ? f - e : e - f;
    for (int i = 0; i < 4; i++) r += ai * i;
    return int'(shortint'(r));
  endfunction

  initial begin
    for (int ai = -8; ai < 8; ai++)
      for (int bi = -8; bi < 8; bi++) begin
        a = 4'(ai); b = 4'(bi);
        #1;
        checks++;
        if (int'(c) != model(ai, bi)) begin
          failures++;
          $display("FAIL: a=%0d b=%0d c=%0d expected %0d", ai, bi, c, model(ai, bi));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
