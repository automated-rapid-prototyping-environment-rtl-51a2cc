// tb_common_ram -- random traffic on both ports of the dual-ported common
// RAM (different clocks), checked against an array model: data written on
// one port is read back on the other, reads have one cycle of latency and
// return the old word when the same port writes the same address.
`timescale 1ns/1ps
module tb_common_ram;
  localparam int AW = 6;

  logic clk_a = 0, clk_b = 0;
  logic en_a = 0, we_a = 0, en_b = 0, we_b = 0;
  logic [AW-1:0] addr_a = '0, addr_b = '0;
  logic [31:0] wdata_a = '0, wdata_b = '0, rdata_a, rdata_b;

  common_ram #(.ADDR_W(AW)) dut (.*);

  always #7.5 clk_a = ~clk_a;
  always #5   clk_b = ~clk_b;

  int checks = 0, failures = 0;
  logic [31:0] model [2**AW];

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    // fill through port A, verify through port B
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk_a); en_a = 1; we_a = 1; addr_a = AW'(i); wdata_a = $urandom;
      model[i] = wdata_a;
    end
    @(negedge clk_a); en_a = 0; we_a = 0;
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk_b); en_b = 1; we_b = 0; addr_b = AW'(i);
      @(negedge clk_b); en_b = 0;
      check(rdata_b == model[i], $sformatf("B read %0d", i));
    end
    // random traffic on port B, read back through A
    for (int t = 0; t < 200; t++) begin
      int ad;
      ad = $urandom_range(0, 2**AW - 1);
      @(negedge clk_b); en_b = 1; we_b = 1; addr_b = AW'(ad); wdata_b = $urandom;
      @(negedge clk_b); en_b = 0; we_b = 0;
      check(rdata_b == model[ad], "read-first on port B");
      model[ad] = wdata_b;
      ad = $urandom_range(0, 2**AW - 1);
      @(negedge clk_a); en_a = 1; we_a = 0; addr_a = AW'(ad);
      @(negedge clk_a); en_a = 0;
      check(rdata_a == model[ad], $sformatf("A read %0d", ad));
    end
    // disabled port keeps its output
    begin
      logic [31:0] held;
      held = rdata_a;
      @(negedge clk_a); en_a = 0; addr_a = addr_a + 1'b1;
      @(negedge clk_a);
      check(rdata_a == held, "output changed while disabled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
