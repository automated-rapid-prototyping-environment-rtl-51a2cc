// cold_reg -- CPU-visible control and status registers used for prototyping.
//
// The registers sit in the FPGA's register window of the board CPU's bus
// (byte offsets from rpt_pkg, all 32 bits wide, CPU clock domain):
//   0x1C  Coldfire IR        bit 0: prototype-finished interrupt flag. Set
//                            by the rising edge of out_data_rdy; the CPU
//                            clears it by writing 0 to bit 0 (a write of 1
//                            sets it). irq drives the CPU's external
//                            interrupt pin.
//   0x28  Input RAM Size     read only: bytes in the input port map
//   0x2C  Output RAM Size    read only: bytes in the output port map
//   0x30  Input Request Size read only: mirrors Input RAM Size
//   0x34  Output Avail Size  read only: mirrors Output RAM Size
//   0x38  FPGA Control       bit 0: prototype enable (in_data_rdy). Written
//                            by the CPU after the input burst; cleared by
//                            the rising edge of out_data_rdy.
// Unlisted offsets read as zero and ignore writes. When a hardware event and
// a CPU write hit the same register in the same cycle, the event wins.
//
// Reads are combinational (rdata follows addr while sel is high); writes
// take effect at the clock edge with sel and we high. out_data_rdy comes
// from the phase-aligned prototype clock domain and is edge-detected here.
//
// The addresses, the meaning of the two control bits and the size registers
// follow the board's register map. Write semantics of the interrupt flag,
// the event-over-write priority and the read value of unlisted offsets are
// this design's choices.
module cold_reg
  import rpt_pkg::*;
#(
  parameter int unsigned IN_RAM_BYTES  = 32,  // 8 input words of 4 bytes
  parameter int unsigned OUT_RAM_BYTES = 96   // 24 output words of 4 bytes
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        sel,          // register window selected
  input  logic        we,
  input  logic [19:0] addr,         // byte offset inside the window
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  input  logic        out_data_rdy, // from the wrapper: prototype finished
  output logic        in_data_rdy,  // to the wrapper: run the prototype
  output logic        irq           // to the CPU's external interrupt
);

  logic rdy_prev, rdy_rise;
  logic ctrl_q, ir_q;

  assign rdy_rise = out_data_rdy && !rdy_prev;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      rdy_prev <= 1'b0;
      ctrl_q   <= 1'b0;
      ir_q     <= 1'b0;
    end else begin
      rdy_prev <= out_data_rdy;
      // FPGA Control: CPU write, cleared when the prototype finishes
      if (rdy_rise)
        ctrl_q <= 1'b0;
      else if (sel && we && addr == REG_FPGA_CONTROL)
        ctrl_q <= wdata[0];
      // Coldfire IR: set when the prototype finishes, cleared by the CPU
      if (rdy_rise)
        ir_q <= 1'b1;
      else if (sel && we && addr == REG_COLDFIRE_IR)
        ir_q <= wdata[0];
    end
  end

  assign in_data_rdy = ctrl_q;
  assign irq         = ir_q;

  always_comb begin
    rdata = '0;
    if (sel) begin
      unique case (addr)
        REG_COLDFIRE_IR:  rdata = {31'd0, ir_q};
        REG_IN_RAM_SIZE:  rdata = 32'(IN_RAM_BYTES);
        REG_OUT_RAM_SIZE: rdata = 32'(OUT_RAM_BYTES);
        REG_IN_REQ_SIZE:  rdata = 32'(IN_RAM_BYTES);
        REG_OUT_AVAIL:    rdata = 32'(OUT_RAM_BYTES);
        REG_FPGA_CONTROL: rdata = {31'd0, ctrl_q};
        default:          rdata = '0;
      endcase
    end
  end

endmodule
