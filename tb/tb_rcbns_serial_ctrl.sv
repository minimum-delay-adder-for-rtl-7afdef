// tb_rcbns_serial_ctrl: self-checking test of the serial sequencer at its
// default parameters. For a range of digit counts it checks, cycle by cycle
// after the start pulse (sampled at edge 0), the expected schedule:
//   rd_en with rd_addr = c      after edges c = 0 .. n-1
//   or_load                     after edges 2 .. n+1
//   wr_en with wr_addr = c-3    after edges 3 .. n+2
//   done (one cycle), busy low  after edge n+3
// It also checks that a start during an operation is ignored, that counts
// of 0 and above DIGITS are read as 1 and DIGITS, and that range_error is
// raised by a no_result at an or_load cycle and cleared by the next start.
module tb_rcbns_serial_ctrl;

  localparam int unsigned DIGITS = 12;
  localparam int unsigned AW = $clog2(DIGITS);
  localparam int unsigned NW = $clog2(DIGITS + 1);

  logic clk;
  initial clk = 0;
  logic rst_n = 0, start = 0, no_result = 0;
  logic [NW-1:0] num_digits = '0;
  logic rd_en, sr_shift, or_load, wr_en, busy, done, range_error;
  logic [AW-1:0] rd_addr, wr_addr;
  int checks = 0, failures = 0;

  rcbns_serial_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Run one operation; err_at is the digit index at which no_result is
  // driven (-1 for none); restart_at is a cycle at which start is pulsed
  // again during the operation (-1 for none).
  task automatic run(int req, int err_at, int restart_at);
    int n;
    n = (req == 0) ? 1 : (req > int'(DIGITS)) ? int'(DIGITS) : req;
    start <= 1; num_digits <= NW'(req);
    @(posedge clk);                               // edge 0
    start <= 0; num_digits <= NW'(($urandom_range(0, 15)));
    for (int c = 0; c <= n + 3; c++) begin
      #1;
      expect_eq($sformatf("n=%0d c=%0d rd_en", n, c), int'(rd_en), int'(c < n));
      if (c < n) expect_eq($sformatf("n=%0d c=%0d rd_addr", n, c), int'(rd_addr), c);
      expect_eq($sformatf("n=%0d c=%0d or_load", n, c), int'(or_load),
                int'(c >= 2 && c <= n + 1));
      expect_eq($sformatf("n=%0d c=%0d wr_en", n, c), int'(wr_en),
                int'(c >= 3 && c <= n + 2));
      if (c >= 3 && c <= n + 2)
        expect_eq($sformatf("n=%0d c=%0d wr_addr", n, c), int'(wr_addr), c - 3);
      expect_eq($sformatf("n=%0d c=%0d done", n, c), int'(done), int'(c == n + 3));
      expect_eq($sformatf("n=%0d c=%0d busy", n, c), int'(busy), int'(c < n + 3));
      expect_eq($sformatf("n=%0d c=%0d sr_shift", n, c), int'(sr_shift), int'(c < n + 3));
      if (c == 1) expect_eq("range_error cleared by start", int'(range_error), 0);
      if (c == n + 3)
        expect_eq($sformatf("n=%0d range_error", n), int'(range_error), int'(err_at >= 0));
      no_result <= or_load && (c - 2 == err_at);
      start <= (c == restart_at);
      @(posedge clk);
    end
    no_result <= 0;
    start <= 0;
    #1 expect_eq("done is one cycle", int'(done), 0);
    @(posedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 1; n <= int'(DIGITS); n++) run(n, -1, -1);
    run(0, -1, -1);
    run(15, -1, -1);
    run(12, 5, -1);
    run(7, -1, 3);
    run(12, 0, 9);
    run(4, -1, -1);
    run(3, 2, -1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
