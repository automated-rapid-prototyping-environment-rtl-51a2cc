// rpt_dcm -- behavioural model of the FPGA clock manager (DCM) that derives
// the prototype clock from the CPU clock. Not synthesizable logic: on the
// FPGA this is a vendor clock-manager hard macro; this model only reproduces
// its clock outputs for simulation.
//
// CLK0 follows CLKIN. CLKDV runs at CLKIN / CLKDV_DIVIDE with its rising
// edge on a rising edge of CLKIN, so the two clocks are phase-aligned and
// logic may pass signals between them without synchronisers. For an even
// divider the duty cycle is 50 %. Both outputs are updated in the same
// process at the same instant, so flip-flops on either clock see the same
// pre-edge values, as in hardware. LOCKED rises LOCK_CYCLES input cycles
// after RST is released; RST (active high, asynchronous) stops CLKDV low.
//
// The divide-by-10 default (66 MHz CPU clock to 6.6 MHz prototype clock) and
// the phase alignment follow the board description; the lock time is this
// model's choice.
module rpt_dcm #(
  parameter int unsigned CLKDV_DIVIDE = 10,
  parameter int unsigned LOCK_CYCLES  = 16
) (
  input  logic CLKIN,
  input  logic RST,
  output logic CLK0,
  output logic CLKDV,
  output logic LOCKED
);

  int unsigned phase;
  int unsigned lock_cnt;

  always @(posedge CLKIN, negedge CLKIN, posedge RST) begin
    CLK0 = CLKIN;
    if (RST) begin
      phase    = 0;
      lock_cnt = 0;
      CLKDV    = 1'b0;
      LOCKED   = 1'b0;
    end else if (CLKIN) begin
      CLKDV = (phase < CLKDV_DIVIDE / 2);
      phase = (phase == CLKDV_DIVIDE - 1) ? 0 : phase + 1;
      if (lock_cnt < LOCK_CYCLES) lock_cnt = lock_cnt + 1;
      LOCKED = (lock_cnt >= LOCK_CYCLES);
    end
  end

endmodule
