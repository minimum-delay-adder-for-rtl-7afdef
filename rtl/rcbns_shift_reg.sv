// rcbns_shift_reg: 3-bit-wide operand shift register.
//
// Sits between an input memory and the minimum-delay adder. Each clock with
// shift high, the digit on d enters stage 0 and every stage moves one place
// on; q is the last stage. With the default of one stage it holds exactly one
// 3-bit digit, as in the published block diagram, and digits pass through it
// one per clock with one cycle of latency (STAGES cycles in general). Reset
// clears every stage to the digit 0. The depth parameter and the shift
// enable are this design's own choices.
module rcbns_shift_reg
  import rcbns_pkg::*;
#(
  parameter int unsigned STAGES = 1
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   shift,
  input  digit_t d,
  output digit_t q
);

  digit_t stage [STAGES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(STAGES); i++) stage[i] <= '0;
    end else if (shift) begin
      stage[0] <= d;
      for (int i = 1; i < int'(STAGES); i++) stage[i] <= stage[i-1];
    end
  end

  assign q = stage[STAGES-1];

endmodule
