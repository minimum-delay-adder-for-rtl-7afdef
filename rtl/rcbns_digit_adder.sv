// rcbns_digit_adder: 3-bit minimum-delay RCBNS digit adder.
//
// Adds two RCBNS digits (each -3..+3, sign-magnitude, see rcbns_pkg) in one
// level of decoding and one level of OR gates, with no carry: the two digits
// drive a 6-to-64 decoder and each sum bit is the OR of the decoder lines
// (minterms) for which that bit is 1:
//   c0 (sign)      = OR of minterms 5,6,7,14,15,23,37,38,39,40,44,45,46,48,
//                    49,52,53,56,57,58,60
//   c1 (mag, MSB)  = OR of minterms 2,3,6,7,9,10,15,16,17,20,24,28,29,34,35,
//                    38,39,43,45,46,48,52,53,56,57,60
//   c2 (mag, LSB)  = OR of minterms 1,3,5,7,8,10,12,14,17,21,23,24,28,30,33,
//                    35,37,39,40,42,44,46,49,51,53,56,58,60
// These sets, the decoder-plus-OR structure and the truth table they come
// from are those of the published design. When the digit sum lies outside
// -3..+3 (rows 11,18,19,25,26,27,47,54,55,61,62,63, which the truth table
// marks as having no result) no OR gate fires and c reads "000"; this design
// adds a fourth OR gate over exactly those rows, no_result, so that the
// condition is visible to the surrounding logic. The ten rows whose sum is
// zero (0,4,13,22,31,32,36,41,50,59) feed no gate, which lint reports as
// unused decoder lines; that is inherent to the sum-of-minterms form.
// Purely combinational.
module rcbns_digit_adder
  import rcbns_pkg::*;
(
  input  digit_t a,          // operand digit A_n {a0, a1 a2}
  input  digit_t b,          // operand digit B_n {b0, b1 b2}
  output digit_t c,          // sum digit {c0, c1 c2}
  output logic   no_result   // |a + b| > 3: c is not a valid sum
);

  logic [63:0] m;

  rcbns_decoder u_dec (
    .sel     ({a, b}),
    .minterm (m)
  );

  always_comb begin
    c.sign = m[5]  | m[6]  | m[7]  | m[14] | m[15] | m[23] | m[37] |
             m[38] | m[39] | m[40] | m[44] | m[45] | m[46] | m[48] |
             m[49] | m[52] | m[53] | m[56] | m[57] | m[58] | m[60];

    c.mag[1] = m[2]  | m[3]  | m[6]  | m[7]  | m[9]  | m[10] | m[15] |
               m[16] | m[17] | m[20] | m[24] | m[28] | m[29] | m[34] |
               m[35] | m[38] | m[39] | m[43] | m[45] | m[46] | m[48] |
               m[52] | m[53] | m[56] | m[57] | m[60];

    c.mag[0] = m[1]  | m[3]  | m[5]  | m[7]  | m[8]  | m[10] | m[12] |
               m[14] | m[17] | m[21] | m[23] | m[24] | m[28] | m[30] |
               m[33] | m[35] | m[37] | m[39] | m[40] | m[42] | m[44] |
               m[46] | m[49] | m[51] | m[53] | m[56] | m[58] | m[60];

    no_result = m[11] | m[18] | m[19] | m[25] | m[26] | m[27] |
                m[47] | m[54] | m[55] | m[61] | m[62] | m[63];
  end

endmodule
