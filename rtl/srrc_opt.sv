// srrc_opt -- resource-shared, upsampling SRRC transmit filter prototype.
//
// Function: a 13-tap square-root raised-cosine FIR filter with upsampling by
// two. One block of N input samples u[0..N-1] yields 2N filtered samples
// y[0..2N-1] and a decimated copy y_dec[k] = y[2k]. The upsampled input has
// a zero in every odd position, so the filter is split into two phases:
//   even output  y[2k]   = b0(x0+x6) + b2(x1+x5) + b4(x2+x4) + b6 x3
//   odd output   y[2k+1] = b1(x0+x5) + b3(x1+x4) + b5(x2+x3)
// where x0..x6 is a 7-entry delay line of real input samples that shifts in
// u[k] at the start of each even step. Symmetry (b_n = b_12-n) means only
// seven distinct coefficients and at most four multipliers are needed.
//
// Structure: like a component produced by the C-to-VHDL flow this design
// targets, the module is one combinational compute process and one
// sequential update process. The state is the delay line and an 8-bit step
// counter `index`. Each enabled clock edge is one "time frame": it computes
// output sample y[index], commits the new state and advances index. The
// last step of a block (index = 2N-1) raises `done` combinationally during
// that cycle and wraps index to 0, so a block takes exactly 2N enabled
// cycles. The delay line persists across blocks (it is the filter memory).
//
// Interface: u is the complete input port array (all words visible at once,
// as a register wrapper provides). The output sample of the current step is
// presented on y_sample together with one-hot write selects y_sel (index
// into y) and ydec_sel (index into y_dec, even steps only); the wrapper's
// output register file stores it. Nothing is selected while enable is low.
// rst_a is an asynchronous, active-high reset clearing delay line and index.
//
// Arithmetic (Fix<16,15>, 16-bit two's-complement fractions): symmetric sums
// wrap to 16 bits, each 32-bit product is truncated to 16 bits by dropping
// its 15 low bits (floor), and the accumulator wraps. Truncation and
// wrap-around are this design's choice; the algorithm, the coefficient
// values, the word format and N = 8 follow the described filter.
module srrc_opt
  import rpt_pkg::*;
#(
  parameter int unsigned N = 8  // input block size (Generic-C data rate)
) (
  input  logic   clk,
  input  logic   rst_a,
  input  logic   enable,
  input  fix16_t u        [N],
  output fix16_t y_sample,
  output logic [2*N-1:0] y_sel,
  output logic [N-1:0]   ydec_sel,
  output logic   done
);

  localparam int unsigned DL = SRRC_DEL_LEN;  // 7
  localparam int unsigned UW = (N > 1) ? $clog2(N) : 1;  // index into u, y_dec
  localparam int unsigned YW = $clog2(2 * N);            // index into y

  // ----------------------------------------------------------------- state
  fix16_t     x_r   [DL];
  logic [7:0] index_r;

  fix16_t     x_nxt [DL];
  logic [7:0] index_nxt;

  // ------------------------------------------------------- compute process
  logic                 even;
  logic [UW-1:0]        u_idx;
  logic [YW-1:0]        y_idx;
  fix16_t               coeff [SRRC_N_ODD];
  fix16_t               sym   [SRRC_N_ODD];
  logic signed [31:0]   prod  [SRRC_N_EVEN];
  fix16_t               acc;

  always_comb begin
    even  = (index_r[0] == 1'b0);
    u_idx = UW'(index_r >> 1);
    y_idx = YW'(index_r);

    // delay line: shift in a new input sample on even steps only
    x_nxt = x_r;
    if (even) begin
      for (int i = DL - 1; i > 0; i--) x_nxt[i] = x_r[i-1];
      x_nxt[0] = u[u_idx];
    end

    // three shared multipliers for the symmetric coefficient pairs
    acc = '0;
    for (int i = 0; i < SRRC_N_ODD; i++) begin
      if (even) begin
        coeff[i] = COEFF_EVEN[i];
        sym[i]   = x_nxt[i] + x_nxt[DL-1-i];
      end else begin
        coeff[i] = COEFF_ODD[i];
        sym[i]   = x_nxt[i] + x_nxt[DL-2-i];
      end
      prod[i] = coeff[i] * sym[i];
      acc     = acc + prod[i][30:15];
    end
    // fourth multiplier: the centre tap, used on even steps
    prod[SRRC_N_ODD] = COEFF_EVEN[SRRC_N_ODD] * x_nxt[SRRC_N_ODD];
    if (even) acc = acc + prod[SRRC_N_ODD][30:15];

    y_sample = acc;

    done      = (index_r == 8'(2*N - 1));
    index_nxt = done ? 8'd0 : index_r + 8'd1;

    y_sel    = '0;
    ydec_sel = '0;
    if (enable) begin
      y_sel[y_idx] = 1'b1;
      if (even) ydec_sel[u_idx] = 1'b1;
    end
  end

  // ------------------------------------------------- reset / update process
  always_ff @(posedge clk or posedge rst_a) begin
    if (rst_a) begin
      for (int i = 0; i < DL; i++) x_r[i] <= '0;
      index_r <= '0;
    end else if (enable) begin
      x_r     <= x_nxt;
      index_r <= index_nxt;
    end
  end

  // 2N steps must fit the 8-bit step counter
  initial assert (2*N <= 256 && N > 0)
    else $error("srrc_opt: N must be between 1 and 128");

endmodule
