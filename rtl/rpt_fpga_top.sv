// rpt_fpga_top -- FPGA top shell of the prototyping board.
//
// The FPGA sits on the board CPU's 32-bit memory bus. This shell decodes
// the CPU address into four windows and connects them to the blocks behind:
//   FF0xxxxxh  cold_reg    control/status registers (prototype enable,
//                          interrupt flag, memory-map sizes)
//   FF1xxxxxh  common_ram  RAM shared with the DSP (second port brought out)
//   FF2xxxxxh  rpt_shell   input port memory of the prototype (write only)
//   FF3xxxxxh  rpt_shell   output port memory of the prototype (read only)
// A clock manager (rpt_dcm) derives the prototype clock, by default a tenth
// of the CPU clock, phase-aligned to it; the CPU-side logic runs on the
// manager's CLK0 so both domains switch at the same instant. The whole FPGA
// is held in reset until the clock manager reports lock.
//
// One prototype run, as the board software performs it: write the N input
// samples to FF200000h.., write 1 to FPGA Control (FF000038h), wait for the
// interrupt (cpu_irq, flag at FF00001Ch), read the 3N output words from
// FF300000h.., write 0 to FF00001Ch. The prototype needs 2N prototype clock
// cycles. Output-window and register reads are combinational; common-RAM
// reads return the word addressed in the previous CPU clock cycle.
//
// The small combinational example component (art_comb_example) is an
// independent design and is brought out on its own ports.
//
// The window map, the register addresses, the clocking and the control flow
// follow the board and wrapper description; the bus signal set (chip
// select, write enable, flat 32-bit address), the lock-based reset and the
// common-RAM port widths are this design's choices.
module rpt_fpga_top
  import rpt_pkg::*;
#(
  parameter int unsigned N             = 8,   // SRRC input block size
  parameter int unsigned CLK_DIVIDE    = 10,  // prototype clock = CPU clock / 10
  parameter int unsigned COMMON_ADDR_W = 10   // common RAM: 2**10 words
) (
  // board CPU bus (CPU clock domain)
  input  logic                     cpu_clk,
  input  logic                     rst,        // board reset, active high
  input  logic                     cpu_cs,     // FPGA selected, bus cycle valid
  input  logic                     cpu_we,
  input  logic [31:0]              cpu_addr,   // byte address
  input  logic [31:0]              cpu_wdata,
  output logic [31:0]              cpu_rdata,
  output logic                     cpu_irq,    // CPU external interrupt
  // DSP side of the common RAM
  input  logic                     dsp_clk,
  input  logic                     dsp_en,
  input  logic                     dsp_we,
  input  logic [COMMON_ADDR_W-1:0] dsp_addr,
  input  logic [31:0]              dsp_wdata,
  output logic [31:0]              dsp_rdata,
  // independent combinational example
  input  logic signed [3:0]        ex_a,
  input  logic signed [3:0]        ex_b,
  output logic signed [15:0]       ex_c
);

  // -------------------------------------------------------------- clocking
  logic clk, clk_rpt, locked, rst_int;

  rpt_dcm #(.CLKDV_DIVIDE(CLK_DIVIDE)) u_dcm (
    .CLKIN  (cpu_clk),
    .RST    (rst),
    .CLK0   (clk),
    .CLKDV  (clk_rpt),
    .LOCKED (locked)
  );

  assign rst_int = rst || !locked;

  // ------------------------------------------------------ address decoder
  logic [11:0] win;
  logic [19:0] offs;
  logic        sel_regs, sel_common, sel_in, sel_out;

  assign win        = cpu_addr[31:20];
  assign offs       = cpu_addr[19:0];
  assign sel_regs   = cpu_cs && (win == WIN_REGS);
  assign sel_common = cpu_cs && (win == WIN_COMMON);
  assign sel_in     = cpu_cs && (win == WIN_INMEM);
  assign sel_out    = cpu_cs && (win == WIN_OUTMEM);

  // ------------------------------------------------------------ registers
  logic [31:0] regs_rdata;
  logic        in_data_rdy, out_data_rdy;

  cold_reg #(
    .IN_RAM_BYTES  (4 * N),
    .OUT_RAM_BYTES (4 * 3 * N)
  ) u_regs (
    .clk          (clk),
    .rst          (rst_int),
    .sel          (sel_regs),
    .we           (cpu_we),
    .addr         (offs),
    .wdata        (cpu_wdata),
    .rdata        (regs_rdata),
    .out_data_rdy (out_data_rdy),
    .in_data_rdy  (in_data_rdy),
    .irq          (cpu_irq)
  );

  // ------------------------------------------------------------ common RAM
  logic [31:0] common_rdata;

  common_ram #(.ADDR_W(COMMON_ADDR_W)) u_common (
    .clk_a   (clk),
    .en_a    (sel_common),
    .we_a    (sel_common && cpu_we),
    .addr_a  (offs[COMMON_ADDR_W+1:2]),
    .wdata_a (cpu_wdata),
    .rdata_a (common_rdata),
    .clk_b   (dsp_clk),
    .en_b    (dsp_en),
    .we_b    (dsp_we),
    .addr_b  (dsp_addr),
    .wdata_b (dsp_wdata),
    .rdata_b (dsp_rdata)
  );

  // --------------------------------------------- prototype in its wrapper
  logic [31:0] shell_rdata;

  rpt_shell #(.N(N)) u_shell (
    .iClk        (clk),
    .iClkRPTCalc (clk_rpt),
    .iRst        (rst_int),
    .iAddr       (offs),
    .iData       (cpu_wdata),
    .oData       (shell_rdata),
    .iEnInput    (sel_in),
    .iEnWr       (cpu_we),
    .iInDataRdy  (in_data_rdy),
    .oOutDataRdy (out_data_rdy)
  );

  // ------------------------------------------------------- read data mux
  always_comb begin
    cpu_rdata = '0;
    if (sel_regs)        cpu_rdata = regs_rdata;
    else if (sel_common) cpu_rdata = common_rdata;
    else if (sel_out)    cpu_rdata = shell_rdata;
  end

  // ------------------------------------------- independent example design
  art_comb_example u_example (
    .a (ex_a),
    .b (ex_b),
    .c (ex_c)
  );

endmodule
