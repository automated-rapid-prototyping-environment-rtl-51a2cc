// art_comb_example -- small purely combinational component used to show how
// the C-to-VHDL flow maps C operations one to one onto hardware operators.
//
// Inputs a and b are 4-bit two's-complement integers, the output c is a
// 16-bit two's-complement integer. The datapath is
//   d = a + b            (4 bits, wraps)
//   e = d + 1            (4 bits, wraps)
//   f = e | d            (bitwise or)
//   c = |f - e|          (signed compare selects f - e or e - f, 16 bits)
//   c = c + a*0 + a*1 + a*2 + a*3   (the unrolled loop: four multiplies and
//                                    adds, each product cut to 16 bits)
// There is no clock: the output is a function of the current inputs only.
// The operations, their order and all widths follow the described example;
// nothing here is this design's own choice beyond writing it in
// SystemVerilog.
module art_comb_example (
  input  logic signed [3:0]  a,
  input  logic signed [3:0]  b,
  output logic signed [15:0] c
);

  logic signed [3:0]  d, e, f;
  logic signed [19:0] prod;
  logic signed [15:0] acc;

  always_comb begin
    d = a + b;
    e = d + 4'sd1;
    f = e | d;
    if (f > e) acc = 16'(f) - 16'(e);
    else       acc = 16'(e) - 16'(f);
    prod = '0;
    for (int i = 0; i < 4; i++) begin
      prod = 20'(a) * 20'(i);
      acc  = acc + prod[15:0];
    end
    c = acc;
  end

endmodule
