// rcbns_out_reg: 3-bit sum register between the adder and output memory C.
//
// Captures the sum digit d at each rising edge where load is high and holds
// it on q for the write into memory C, so that the adder's decode-and-OR
// path and the memory write sit in different clock cycles. Reset clears it
// to the digit 0. The register and its place follow the published block
// diagram; the load enable and reset are this design's own.
module rcbns_out_reg
  import rcbns_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load,
  input  digit_t d,
  output digit_t q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= d;
  end

endmodule
