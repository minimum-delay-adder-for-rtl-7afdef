// rcbns_serial_ctrl: sequencer of the serial RCBNS adder.
//
// The adder handles one digit pair per clock, so an n-digit addition is a
// stream of n digit reads, additions and writes. A one-cycle start pulse
// (ignored while busy) latches num_digits (1..DIGITS; 0 is read as 1, more than
// DIGITS as DIGITS) and starts the stream. The controller then issues one read per cycle to
// memories A and B for digit index 0, 1, ..., n-1, and carries a valid bit
// and the index down a delay line matching the datapath:
//   cycle t            rd_en, rd_addr = i         (memories A and B)
//   cycle t+1          memory outputs valid; shift registers take them
//   cycle t+1+SR       adder inputs valid; or_load (output register)
//   cycle t+2+SR       wr_en, wr_addr = i         (memory C)
// where SR is the shift-register depth. The shift registers shift on every
// cycle of the operation (sr_shift = busy), which keeps the latency fixed.
// done pulses for one cycle after the edge that writes the last digit, when
// busy also falls: an n-digit addition started by a pulse sampled at edge 0
// shows done at edge n+3+SR. range_error is cleared by start and set when
// any digit pair of the operation makes the adder report no_result.
// Digit-serial operation is what the source describes; the schedule,
// handshake and the range flag are this design's own. Immediate assertions
// check that reads, loads and writes stay inside an operation and that done
// is never high together with busy.
module rcbns_serial_ctrl #(
  parameter int unsigned DIGITS    = 12,
  parameter int unsigned SR_STAGES = 1,
  localparam int unsigned AW = (DIGITS > 1) ? $clog2(DIGITS) : 1,
  localparam int unsigned NW = $clog2(DIGITS + 1),
  localparam int unsigned PIPE = SR_STAGES + 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] num_digits,
  input  logic          no_result,   // from the digit adder
  output logic          rd_en,
  output logic [AW-1:0] rd_addr,
  output logic          sr_shift,
  output logic          or_load,
  output logic          wr_en,
  output logic [AW-1:0] wr_addr,
  output logic          busy,
  output logic          done,
  output logic          range_error
);

  logic          issuing;
  logic [AW-1:0] issue_idx;
  logic [AW-1:0] last_idx;
  logic          v_pipe   [1:PIPE];
  logic [AW-1:0] idx_pipe [1:PIPE];
  logic          last_wr;

  assign rd_en    = issuing;
  assign rd_addr  = issue_idx;
  assign sr_shift = busy;
  assign or_load  = v_pipe[PIPE-1];
  assign wr_en    = v_pipe[PIPE];
  assign wr_addr  = idx_pipe[PIPE];
  assign last_wr  = wr_en && (wr_addr == last_idx);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issuing     <= 1'b0;
      issue_idx   <= '0;
      last_idx    <= '0;
      busy        <= 1'b0;
      done        <= 1'b0;
      range_error <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy        <= 1'b1;
        issuing     <= 1'b1;
        issue_idx   <= '0;
        if (num_digits == 0)                 last_idx <= '0;
        else if (num_digits > NW'(DIGITS))   last_idx <= AW'(DIGITS - 1);
        else                                 last_idx <= AW'(num_digits - 1'b1);
        range_error <= 1'b0;
      end else begin
        if (issuing) begin
          if (issue_idx == last_idx) issuing <= 1'b0;
          else                       issue_idx <= issue_idx + 1'b1;
        end
        if (or_load && no_result) range_error <= 1'b1;
        if (last_wr) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 1; k <= int'(PIPE); k++) begin
        v_pipe[k]   <= 1'b0;
        idx_pipe[k] <= '0;
      end
    end else begin
      v_pipe[1]   <= issuing;
      idx_pipe[1] <= issue_idx;
      for (int k = 2; k <= int'(PIPE); k++) begin
        v_pipe[k]   <= v_pipe[k-1];
        idx_pipe[k] <= idx_pipe[k-1];
      end
    end
  end

  // Handshake rules: reads, register loads and writes happen only inside an
  // operation, and done is raised only as the operation ends.
  always_comb begin
    if (rst_n) begin
      a_rd_in_op:   assert (!rd_en   || busy);
      a_ld_in_op:   assert (!or_load || busy);
      a_wr_in_op:   assert (!wr_en   || busy);
      a_done_ends:  assert (!done    || !busy);
    end
  end

endmodule
