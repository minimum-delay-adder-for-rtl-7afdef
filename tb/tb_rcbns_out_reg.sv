// tb_rcbns_out_reg: self-checking test of the 3-bit sum register. Checks
// the reset value, that q takes d at an edge with load high and holds its
// value at edges with load low, over a random stream.
module tb_rcbns_out_reg;
  import rcbns_pkg::*;

  logic clk;
  initial clk = 0;
  logic rst_n = 0, load = 0;
  digit_t d = 3'b111, q, exp_q;
  int checks = 0, failures = 0;

  rcbns_out_reg dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset value %b", q); end
    exp_q = '0;
    rst_n <= 1;
    for (int t = 0; t < 500; t++) begin
      logic ld;
      digit_t nd;
      ld = $urandom_range(0, 1) != 0;
      nd = digit_t'($urandom_range(0, 7));
      load <= ld; d <= nd;
      @(posedge clk);
      if (ld) exp_q = nd;
      #1;
      checks++;
      if (q !== exp_q) begin
        failures++;
        $display("FAIL t=%0d q=%b expected %b", t, q, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
