// rpt_shell -- register wrapper that connects the SRRC prototype to the CPU bus.
//
// The wrapper turns the prototype's port arrays into two contiguous, 32-bit
// wide memory maps on the board CPU's bus:
//   * Input map (write only): word k (byte address 4k) holds input sample
//     u[k], k = 0..N-1. The CPU writes it in one burst while iEnInput (the
//     chip select from the external address decoder) and iEnWr are high.
//     Only bits [15:0] of each word carry the Fix<16,15> sample; the upper
//     bits are not stored.
//   * Output map (read only): words 0..2N-1 hold y[0..2N-1], words
//     2N..3N-1 hold y_dec[0..N-1], sign-extended to 32 bits. oData is a
//     combinational read multiplexer addressed by iAddr[19:2]; words beyond
//     the map read as zero.
// Input registers are clocked by the CPU clock iClk, output registers and the
// prototype by the prototype clock iClkRPTCalc. The two clocks come from one
// clock manager and are phase-aligned, so no synchronisers are used.
//
// Handshake: iInDataRdy (the "FPGA Control" bit, set by the CPU after the
// input burst) enables the prototype and the output registers. In the cycle
// in which the prototype reports done the last output word is stored and
// oOutDataRdy goes high for exactly one prototype clock cycle; the control
// register uses it to clear iInDataRdy and raise the CPU interrupt. While
// oOutDataRdy is high the prototype is held disabled, so a block is never
// restarted before the enable has been withdrawn.
//
// The memory maps, clocking, enable and done signalling follow the described
// register wrapper. The one-cycle oOutDataRdy pulse, the sign extension of
// outputs and the byte-addressed word index are this design's choices.
module rpt_shell
  import rpt_pkg::*;
#(
  parameter int unsigned N = 8  // prototype input block size
) (
  input  logic        iClk,         // CPU clock
  input  logic        iClkRPTCalc,  // prototype clock
  input  logic        iRst,         // asynchronous, active high

  input  logic [19:0] iAddr,
  input  logic [31:0] iData,
  output logic [31:0] oData,

  input  logic        iEnInput,     // address decoding chip select
  input  logic        iEnWr,        // write enable
  input  logic        iInDataRdy,   // input data complete: run the prototype
  output logic        oOutDataRdy   // prototype finished (interrupt request)
);

  localparam int unsigned N_IN  = N;
  localparam int unsigned N_OUT = 3 * N;

  localparam int unsigned IW = (N_IN > 1) ? $clog2(N_IN) : 1;
  localparam int unsigned OW = $clog2(N_OUT);

  logic [17:0]   word;
  logic [IW-1:0] in_idx;
  logic [OW-1:0] out_idx;
  assign word    = iAddr[19:2];
  assign in_idx  = IW'(word);
  assign out_idx = OW'(word);

  // ------------------------------------------------ input register file
  fix16_t in_reg [N_IN];

  always_ff @(posedge iClk or posedge iRst) begin
    if (iRst) begin
      for (int k = 0; k < N_IN; k++) in_reg[k] <= '0;
    end else if (iEnInput && iEnWr && word < 18'(N_IN)) begin
      in_reg[in_idx] <= iData[15:0];
    end
  end

  // ----------------------------------------------------------- prototype
  logic           proto_en;
  fix16_t         y_sample;
  logic [2*N-1:0] y_sel;
  logic [N-1:0]   ydec_sel;
  logic           done;
  logic           out_rdy_q;

  assign proto_en = iInDataRdy && !out_rdy_q;

  srrc_opt #(.N(N)) u_proto (
    .clk      (iClkRPTCalc),
    .rst_a    (iRst),
    .enable   (proto_en),
    .u        (in_reg),
    .y_sample (y_sample),
    .y_sel    (y_sel),
    .ydec_sel (ydec_sel),
    .done     (done)
  );

  // ----------------------------------------------- output register file
  fix16_t out_reg [N_OUT];

  always_ff @(posedge iClkRPTCalc or posedge iRst) begin
    if (iRst) begin
      for (int k = 0; k < N_OUT; k++) out_reg[k] <= '0;
      out_rdy_q <= 1'b0;
    end else begin
      for (int k = 0; k < 2*N; k++) if (y_sel[k])    out_reg[k]     <= y_sample;
      for (int k = 0; k < N; k++)   if (ydec_sel[k]) out_reg[2*N+k] <= y_sample;
      out_rdy_q <= proto_en && done;
    end
  end

  assign oOutDataRdy = out_rdy_q;

  always_comb begin
    oData = '0;
    if (word < 18'(N_OUT)) oData = 32'(out_reg[out_idx]);
  end

endmodule
