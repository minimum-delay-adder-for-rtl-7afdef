// rcbns_serial_adder: digit-serial adder for Redundant Complex Binary numbers.
//
// Top level. Two RCBNS numbers of up to DIGITS digits (each digit -3..+3,
// weight (-1+j)**i) are loaded digit by digit into input memories A and B.
// A start pulse then streams the digit pairs A_i, B_i, one per clock, from
// the memories through two 3-bit shift registers into the minimum-delay
// digit adder (a 6-to-64 decoder and OR gates, no carry chain); each sum
// digit passes through a 3-bit output register and is written at the same
// index of output memory C, which the user reads back through c_raddr /
// c_rdata (one cycle read latency).
//
// Because RCBNS addition is carry-free digit by digit, memory C holds the
// exact sum A + B whenever every digit sum lies in -3..+3. If any pair sums
// outside that range, the adder has no valid digit for it (that digit is
// written as 0) and range_error is set for the operation; bringing such
// sums back into range needs a normalization step that this design does not
// contain.
//
// Timing: with the start pulse sampled at edge 0, digit i is read in cycle
// i+1 and written to memory C at edge i+4; done pulses (and busy falls) at
// edge n+4 for an n-digit addition. Memories A and B may be written while
// idle; writing them during an operation is not supported.
//
// The datapath (memories A and B, 3-bit shift registers, minimum-delay
// adder, 3-bit register, memory C) follows the published functional
// diagram, and the adder follows its truth table. The controller, the
// memory ports and timing, the depth of 12 digits and range_error are this
// design's own.
module rcbns_serial_adder
  import rcbns_pkg::*;
#(
  parameter int unsigned DIGITS = 12,
  localparam int unsigned AW = (DIGITS > 1) ? $clog2(DIGITS) : 1,
  localparam int unsigned NW = $clog2(DIGITS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // loading of input memory A
  input  logic          a_we,
  input  logic [AW-1:0] a_waddr,
  input  digit_t        a_wdata,
  // loading of input memory B
  input  logic          b_we,
  input  logic [AW-1:0] b_waddr,
  input  digit_t        b_wdata,
  // operation control
  input  logic          start,
  input  logic [NW-1:0] num_digits,
  output logic          busy,
  output logic          done,
  output logic          range_error,
  // read-back of output memory C
  input  logic [AW-1:0] c_raddr,
  output digit_t        c_rdata
);

  localparam int unsigned SR_STAGES = 1;

  logic          rd_en, sr_shift, or_load, wr_en, no_result;
  logic [AW-1:0] rd_addr, wr_addr;
  digit_t        a_mem_q, b_mem_q, a_n, b_n, sum, sum_q;

  rcbns_serial_ctrl #(.DIGITS(DIGITS), .SR_STAGES(SR_STAGES)) u_ctrl (
    .clk, .rst_n, .start, .num_digits, .no_result,
    .rd_en, .rd_addr, .sr_shift, .or_load, .wr_en, .wr_addr,
    .busy, .done, .range_error
  );

  rcbns_digit_mem #(.DEPTH(DIGITS)) u_mem_a (
    .clk, .rst_n, .we(a_we), .waddr(a_waddr), .wdata(a_wdata),
    .re(rd_en), .raddr(rd_addr), .rdata(a_mem_q)
  );

  rcbns_digit_mem #(.DEPTH(DIGITS)) u_mem_b (
    .clk, .rst_n, .we(b_we), .waddr(b_waddr), .wdata(b_wdata),
    .re(rd_en), .raddr(rd_addr), .rdata(b_mem_q)
  );

  rcbns_shift_reg #(.STAGES(SR_STAGES)) u_sr_a (
    .clk, .rst_n, .shift(sr_shift), .d(a_mem_q), .q(a_n)
  );

  rcbns_shift_reg #(.STAGES(SR_STAGES)) u_sr_b (
    .clk, .rst_n, .shift(sr_shift), .d(b_mem_q), .q(b_n)
  );

  rcbns_digit_adder u_add (
    .a(a_n), .b(b_n), .c(sum), .no_result
  );

  rcbns_out_reg u_out (
    .clk, .rst_n, .load(or_load), .d(sum), .q(sum_q)
  );

  rcbns_digit_mem #(.DEPTH(DIGITS)) u_mem_c (
    .clk, .rst_n, .we(wr_en), .waddr(wr_addr), .wdata(sum_q),
    .re(1'b1), .raddr(c_raddr), .rdata(c_rdata)
  );

endmodule
