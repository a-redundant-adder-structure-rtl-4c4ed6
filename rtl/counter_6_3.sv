// counter_6_3: (6,3) counter.
//
// Counts the ones among six bits of equal weight and returns the count
// (0..6) as a 3-bit binary number: x[0] + ... + x[5] = s[0] + 2*s[1] + 4*s[2].
// Each output bit is a function of exactly six inputs, so on an FPGA with
// 6-input look-up tables the counter maps to three LUTs side by side and
// costs one LUT delay. Purely combinational.
//
// The counter and its one-LUT-level mapping follow the adder this RTL
// implements; writing it as a bit count rather than as a 64-entry table is
// this design's choice (synthesis produces the same truth table).
module counter_6_3 (
  input  logic [5:0] x,  // six bits of weight 1
  output logic [2:0] s   // number of ones in x
);

  always_comb begin
    s = '0;
    for (int i = 0; i < 6; i++) begin
      s = s + 3'(x[i]);
    end
  end

endmodule
