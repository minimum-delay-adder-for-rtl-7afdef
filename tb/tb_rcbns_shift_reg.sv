// tb_rcbns_shift_reg: self-checking test of the operand shift register, at
// its default single stage and at three stages. A random digit stream with
// random shift enables is applied to both; a queue per instance models the
// expected contents, so q must equal the digit shifted in STAGES shifts ago.
module tb_rcbns_shift_reg;
  import rcbns_pkg::*;

  logic clk;
  initial clk = 0;
  logic rst_n = 0, shift = 0;
  digit_t d = '0, q1, q3;
  digit_t hist [$];
  int checks = 0, failures = 0;

  rcbns_shift_reg            dut1 (.clk, .rst_n, .shift, .d, .q(q1));
  rcbns_shift_reg #(.STAGES(3)) dut3 (.clk, .rst_n, .shift, .d, .q(q3));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_digit(string what, digit_t got, digit_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    // history starts as the reset contents
    repeat (3) hist.push_front('0);
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 500; t++) begin
      logic sh;
      digit_t nd;
      sh = ($urandom_range(0, 3) != 0);
      nd = digit_t'($urandom_range(0, 7));
      shift <= sh; d <= nd;
      @(posedge clk);
      if (sh) hist.push_front(nd);
      #1;
      expect_digit($sformatf("t=%0d 1-stage", t), q1, hist[0]);
      expect_digit($sformatf("t=%0d 3-stage", t), q3, hist[2]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
