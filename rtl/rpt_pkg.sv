// rpt_pkg -- types and constants shared by the prototyping shell and its
// SRRC filter prototype.
//
// * fix16_t is the 16-bit two's-complement fraction used by the filter
//   (1 sign bit, 15 fraction bits, value = raw / 2**15).
// * The seven distinct coefficients of the 13-tap square-root raised-cosine
//   (SRRC) filter (roll-off 0.18, upsampling 2, group delay 3 symbols) are
//   stored here in that format. The real-valued coefficients are the
//   published filter's; converting them to 16 bits by truncation toward
//   minus infinity (raw = floor(b * 32768)) is this design's choice.
// * The CPU address map of the FPGA (32-bit Coldfire bus) and the offsets of
//   the prototyping registers in the register window follow the board's
//   documented map; the register offsets are byte addresses.
package rpt_pkg;

  // ---------------------------------------------------------------- samples
  localparam int unsigned FIX_W    = 16;  // Fix<16,15>: word length
  localparam int unsigned FIX_FRAC = 15;  // Fix<16,15>: fraction bits
  typedef logic signed [FIX_W-1:0] fix16_t;

  // ------------------------------------------------------------ SRRC filter
  localparam int unsigned SRRC_TAPS    = 13;               // M + 1
  localparam int unsigned SRRC_DEL_LEN = SRRC_TAPS/2 + 1;  // delay line, 7
  localparam int unsigned SRRC_N_EVEN  = SRRC_TAPS/4 + 1;  // 4 even coefficients
  localparam int unsigned SRRC_N_ODD   = SRRC_TAPS/4;      // 3 odd coefficients

  // b0 = b12, b2 = b10, b4 = b8, b6 (centre tap)
  localparam fix16_t COEFF_EVEN [SRRC_N_EVEN] = '{
    -16'sd847,   // -0.02584730312872
    16'sd1001,            //  0.030577805550879
    -16'sd1105,  // -0.03369143649198
    16'sd24310            //  0.741884497481248
  };
  // b1 = b11, b3 = b9, b5 = b7
  localparam fix16_t COEFF_ODD [SRRC_N_ODD] = '{
    16'sd2135,            //  0.065168614718020
    -16'sd4398,  // -0.13418905377870
    16'sd14572            //  0.444705414395022
  };

  // ------------------------------------------------------------ address map
  // CPU address bits [31:20] select one of the FPGA windows.
  localparam logic [11:0] WIN_REGS   = 12'hFF0;  // control / status registers
  localparam logic [11:0] WIN_COMMON = 12'hFF1;  // common RAM (CPU <-> DSP)
  localparam logic [11:0] WIN_INMEM  = 12'hFF2;  // input port memory, write only
  localparam logic [11:0] WIN_OUTMEM = 12'hFF3;  // output port memory, read only

  // Register offsets inside the register window (byte addresses).
  localparam logic [19:0] REG_COLDFIRE_IR   = 20'h0001C;
  localparam logic [19:0] REG_IN_RAM_SIZE   = 20'h00028;
  localparam logic [19:0] REG_OUT_RAM_SIZE  = 20'h0002C;
  localparam logic [19:0] REG_IN_REQ_SIZE   = 20'h00030;
  localparam logic [19:0] REG_OUT_AVAIL     = 20'h00034;
  localparam logic [19:0] REG_FPGA_CONTROL  = 20'h00038;

endpackage
