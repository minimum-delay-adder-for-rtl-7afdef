// tb_rcbns_digit_adder: exhaustive self-checking test of the minimum-delay
// RCBNS digit adder. For all 64 operand pairs the expected result is worked
// out arithmetically: both 3-bit codes are read as sign-magnitude digits,
// added as integers, and the sum re-encoded; sums outside -3..+3 must give
// no_result = 1 and the digit 000. The test also confirms that exactly 12
// pairs are out of range and spot-checks rows of the adder's truth table.
module tb_rcbns_digit_adder;
  import rcbns_pkg::*;

  digit_t a, b, c;
  logic   no_result;
  int checks = 0, failures = 0;
  int n_out_of_range = 0;

  rcbns_digit_adder dut (.a, .b, .c, .no_result);

  function automatic int sm(logic [2:0] v);
    return v[2] ? -int'(v[1:0]) : int'(v[1:0]);
  endfunction

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 64; k++) begin
      int s;
      logic [2:0] exp_code;
      a = digit_t'(k[5:3]);
      b = digit_t'(k[2:0]);
      #1;
      s = sm(k[5:3]) + sm(k[2:0]);
      if (s > 3 || s < -3) begin
        n_out_of_range++;
        exp_code = 3'b000;
      end else if (s < 0) begin
        exp_code = {1'b1, 2'(-s)};
      end else begin
        exp_code = {1'b0, 2'(s)};
      end
      expect_eq($sformatf("row %0d c", k), int'(c), int'(exp_code));
      expect_eq($sformatf("row %0d no_result", k), int'(no_result),
                int'(s > 3 || s < -3));
    end
    expect_eq("out-of-range rows", n_out_of_range, 12);

    // Rows of the truth table, as {a0a1a2 b0b1b2} -> c0c1c2.
    a = 3'b001; b = 3'b110; #1; expect_eq("row 14", int'(c), int'(3'b101));
    a = 3'b101; b = 3'b000; #1; expect_eq("row 40", int'(c), int'(3'b101));
    a = 3'b111; b = 3'b011; #1; expect_eq("row 59", int'(c), 0);
    a = 3'b010; b = 3'b111; #1; expect_eq("row 23", int'(c), int'(3'b101));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
