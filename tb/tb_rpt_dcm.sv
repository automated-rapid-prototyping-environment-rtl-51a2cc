// tb_rpt_dcm -- checks the clock-manager model: CLK0 follows CLKIN, CLKDV
// has a period of exactly CLKDV_DIVIDE input cycles with its rising edge on
// an input rising edge, a 50 % duty cycle, and LOCKED rises after the lock
// time. Runs the default divider (10) and a second instance dividing by 4.
`timescale 1ns/1ps
module tb_rpt_dcm;
  logic CLKIN = 0, RST = 1;
  logic CLK0, CLKDV, LOCKED;
  logic CLK0_4, CLKDV_4, LOCKED_4;

  rpt_dcm dut (.*);
  rpt_dcm #(.CLKDV_DIVIDE(4), .LOCK_CYCLES(3)) dut4 (
    .CLKIN(CLKIN), .RST(RST), .CLK0(CLK0_4), .CLKDV(CLKDV_4), .LOCKED(LOCKED_4));

  always #5 CLKIN = ~CLKIN;

  int checks = 0, failures = 0;
  int in_edges = 0;
  int last10 = -1, last4 = -1, high10 = 0, n10 = 0, n4 = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge CLKIN) if (!RST) in_edges++;
  always @(posedge CLKIN) if (!RST && CLKDV) high10++;

  always @(posedge CLKDV) begin
    #0;
    check(CLKIN == 1'b1, "CLKDV edge not on a CLKIN rising edge");
    if (last10 >= 0) begin
      check(in_edges - last10 == 10, $sformatf("divide-by-10 period %0d", in_edges - last10));
      n10++;
    end
    last10 = in_edges;
  end
  always @(posedge CLKDV_4) begin
    #0;
    if (last4 >= 0) begin
      check(in_edges - last4 == 4, $sformatf("divide-by-4 period %0d", in_edges - last4));
      n4++;
    end
    last4 = in_edges;
  end

  initial begin
    repeat (3) @(posedge CLKIN);
    check(!LOCKED && !CLKDV, "outputs during reset");
    #1 RST = 0;
    repeat (15) @(negedge CLKIN);
    check(!LOCKED, "LOCKED too early");
    repeat (2) @(negedge CLKIN);
    check(LOCKED && LOCKED_4, "LOCKED missing");
    repeat (200) begin
      @(negedge CLKIN);
      #1;
      check(CLK0 == CLKIN && CLK0_4 == CLKIN, "CLK0 does not follow CLKIN");
    end
    check(n10 >= 15 && n4 >= 45, "too few divided clock periods");
    check(high10 * 2 >= in_edges - 10 && high10 * 2 <= in_edges + 10, "duty cycle not 50 %");
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
