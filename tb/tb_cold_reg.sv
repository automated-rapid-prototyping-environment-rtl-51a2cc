// tb_cold_reg -- checks the prototyping control/status registers: the size
// registers (with non-default sizes), FPGA Control written by the CPU and
// cleared by the prototype's finish pulse, the interrupt flag set by that
// pulse (once per rising edge) and cleared by the CPU, the priority of the
// hardware event over a simultaneous CPU write, and zero reads elsewhere.
`timescale 1ns/1ps
module tb_cold_reg;
  logic clk = 0, rst = 1, sel = 0, we = 0;
  logic [19:0] addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic out_data_rdy = 0, in_data_rdy, irq;

  cold_reg #(.IN_RAM_BYTES(12), .OUT_RAM_BYTES(40)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic wr(input logic [19:0] a, input logic [31:0] d);
    @(negedge clk); sel = 1; we = 1; addr = a; wdata = d;
    @(negedge clk); sel = 0; we = 0;
  endtask

  task automatic rd(input logic [19:0] a, output logic [31:0] d);
    @(negedge clk); sel = 1; we = 0; addr = a;
    #1 d = rdata;
    @(negedge clk); sel = 0;
  endtask

  logic [31:0] r;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    rd(20'h28, r); check(r == 12, "Input RAM Size");
    rd(20'h2C, r); check(r == 40, "Output RAM Size");
    rd(20'h30, r); check(r == 12, "Input Request Size");
    rd(20'h34, r); check(r == 40, "Output Available Size");
    rd(20'h38, r); check(r == 0 && !in_data_rdy, "control after reset");
    rd(20'h1C, r); check(r == 0 && !irq, "IR after reset");
    rd(20'h3C, r); check(r == 0, "unlisted offset");
    wr(20'h28, 32'hFFFF); rd(20'h28, r); check(r == 12, "size register written");
    @(negedge clk); addr = 20'h28; sel = 0; #1 check(rdata == 0, "read while deselected");

    for (int run = 0; run < 4; run++) begin
      wr(20'h38, 32'h1);
      rd(20'h38, r); check(r == 1 && in_data_rdy, "control set");
      repeat (5) @(negedge clk);
      check(in_data_rdy && !irq, "control held while running");
      // finish pulse lasting several CPU cycles
      out_data_rdy = 1;
      @(negedge clk);
      check(!in_data_rdy && irq, "finish: control cleared, IR set");
      if (run == 1) begin
        // CPU clears the flag while the pulse is still high: stays clear
        wr(20'h1C, 32'h0);
        check(!irq, "IR clear during pulse");
      end
      repeat (3) @(negedge clk);
      out_data_rdy = 0;
      if (run != 1) begin
        check(irq, "IR lost");
        rd(20'h1C, r); check(r == 1, "IR read");
        wr(20'h1C, 32'h0);
        check(!irq, "IR not cleared by CPU");
      end
      rd(20'h1C, r); check(r == 0, "IR read after clear");
    end
    // event beats a CPU write in the same cycle
    wr(20'h38, 32'h1);
    @(negedge clk); sel = 1; we = 1; addr = 20'h38; wdata = 32'h1; out_data_rdy = 1;
    @(negedge clk); sel = 0; we = 0;
    check(!in_data_rdy && irq, "event priority");
    out_data_rdy = 0;
    wr(20'h1C, 32'h0);
    check(!irq, "final IR clear");
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
