// common_ram -- dual-ported block RAM shared by the board CPU and the DSP.
//
// The FPGA carries a RAM that both processors of the board can reach: the
// CPU through its 32-bit memory bus (address window FF100000h-FF1FFFFFh),
// the DSP through its external memory interface. It is not used by the
// prototyping path itself, but the board's flash/reconfiguration tool talks
// to the DSP through it, so every FPGA configuration must keep it working.
//
// Implementation: a true dual-port memory of DEPTH 32-bit words. Each port
// has its own clock, enable, write enable and word address. Reads are
// synchronous with one cycle of latency (block-RAM style registered output)
// and return the old contents when the same port writes the same word
// ("read first"). If both ports write one word in the same cycle the result
// is undefined, as in the vendor block RAM.
//
// The memory array is written from two always_ff processes, one per port
// clock. That is the standard way of describing a true dual-port block RAM
// for FPGA synthesis, and it is why a linter reports the array as driven
// from more than one process. The warning is expected for this module.
//
// The existence, dual-port nature and CPU address window follow the board
// description; the depth, the 32-bit DSP-side width and the read-first
// behaviour are this design's choices.
module common_ram #(
  parameter int unsigned ADDR_W = 10   // 1024 words = 4 KByte
) (
  // CPU port
  input  logic              clk_a,
  input  logic              en_a,
  input  logic              we_a,
  input  logic [ADDR_W-1:0] addr_a,
  input  logic [31:0]       wdata_a,
  output logic [31:0]       rdata_a,
  // DSP port
  input  logic              clk_b,
  input  logic              en_b,
  input  logic              we_b,
  input  logic [ADDR_W-1:0] addr_b,
  input  logic [31:0]       wdata_b,
  output logic [31:0]       rdata_b
);

  logic [31:0] mem [2**ADDR_W];

  always_ff @(posedge clk_a) begin
    if (en_a) begin
      rdata_a <= mem[addr_a];
      if (we_a) mem[addr_a] <= wdata_a;
    end
  end

  always_ff @(posedge clk_b) begin
    if (en_b) begin
      rdata_b <= mem[addr_b];
      if (we_b) mem[addr_b] <= wdata_b;
    end
  end

endmodule
