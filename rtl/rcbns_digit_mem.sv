// rcbns_digit_mem: digit-wide memory of the serial RCBNS adder.
//
// Holds DEPTH RCBNS digits, one 3-bit digit per word, word i being digit i
// (weight (-1+j)**i) of the stored number. The same module serves as input
// memory A, input memory B and output memory C. It has one write port and
// one read port, both synchronous to clk:
//   write: mem[waddr] <= wdata at the rising edge where we is high;
//   read : rdata <= mem[raddr] at the rising edge where re is high, so the
//          digit appears one cycle after the address. A read of the word
//          being written in the same edge returns the old contents.
// rdata is cleared by reset; the array itself is not reset. The memories and
// their place in the datapath follow the published block diagram; their word
// organisation, ports and timing are this design's own choice, as the source
// gives no more than their names.
module rcbns_digit_mem
  import rcbns_pkg::*;
#(
  parameter int unsigned DEPTH = 12,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  digit_t        wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output digit_t        rdata
);

  digit_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  rdata <= '0;
    else if (re) rdata <= mem[raddr];
  end

endmodule
