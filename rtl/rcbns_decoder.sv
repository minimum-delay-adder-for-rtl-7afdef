// rcbns_decoder: 6-to-64 line decoder feeding the minimum-delay digit adder.
//
// The six select bits are the two operand digits concatenated, {a, b}, i.e.
// {a0 a1 a2 b0 b1 b2} in the bit names of the adder's truth table, so output
// line k is high exactly when the operand pair is truth-table row k. Exactly
// one of the 64 minterm lines is high at any time. Each line is one 6-input
// AND gate over the select bits, true or inverted as the bits of k require,
// so the adder as a whole is one AND plane and one OR plane. Purely
// combinational. The decoder, its 6-in/64-out size and the AND/OR-array
// form follow the published adder; the coding is this design's own.
module rcbns_decoder (
  input  logic [5:0]  sel,      // {a0 a1 a2 b0 b1 b2}
  output logic [63:0] minterm   // minterm[k] = (sel == k)
);

  for (genvar k = 0; k < 64; k++) begin : g_line
    localparam logic [5:0] K = 6'(k);
    // literal i is sel[i] where bit i of k is 1, ~sel[i] where it is 0
    assign minterm[k] = &(sel ~^ K);
  end

endmodule
