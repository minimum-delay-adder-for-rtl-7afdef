// tb_rcbns_serial_adder: end-to-end self-checking test of the serial RCBNS
// adder at its default parameters (12-digit memories).
//
// Each operation loads memories A and B through their write ports, pulses
// start, waits for done and reads memory C back. Expected results are worked
// out in the testbench in two independent ways: digit by digit (integer sum
// of the two digits, in range or not), and, for in-range operations, as
// complex values, evaluating sum_i x_i (-1+j)^i in Gaussian integers and
// requiring value(C) = value(A) + value(B). The latency from the start edge
// to done (n+4 clock edges for n digits) is checked for every operation.
//
// Cases: the worked 12-digit example (18+j25) + (4+j9) = 22+j34, the 8-digit
// form of 6+j7 added to zero, random in-range operands of every length,
// random operands with out-of-range digit sums (range_error), and a start
// pulse during an operation (must be ignored). Each of these mechanisms is
// counted and a mechanism that never occurs counts as a failure.
module tb_rcbns_serial_adder;
  import rcbns_pkg::*;

  localparam int unsigned DIGITS = 12;
  localparam int unsigned AW = $clog2(DIGITS);
  localparam int unsigned NW = $clog2(DIGITS + 1);

  logic clk, rst_n = 0;

  initial clk = 0;
  logic a_we = 0, b_we = 0, start = 0;
  logic [AW-1:0] a_waddr = '0, b_waddr = '0, c_raddr = '0;
  digit_t a_wdata = '0, b_wdata = '0, c_rdata;
  logic [NW-1:0] num_digits = '0;
  logic busy, done, range_error;

  int checks = 0, failures = 0;
  int n_inrange_ops = 0, n_range_err_ops = 0, n_ignored_starts = 0;
  int n_short_ops = 0, n_value_checks = 0;

  int a_d [DIGITS];     // operand digits, index = weight exponent
  int b_d [DIGITS];
  int c_model [DIGITS]; // expected contents of memory C

  rcbns_serial_adder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  function automatic int sm(digit_t d);
    return d.sign ? -int'(d.mag) : int'(d.mag);
  endfunction

  function automatic digit_t enc(int v);
    return (v < 0) ? digit_t'({1'b1, 2'(-v)}) : digit_t'({1'b0, 2'(v)});
  endfunction

  // Complex value of digits d[0..n-1]: sum d[i] * (-1+j)^i.
  task automatic cvalue(input int d [DIGITS], input int n,
                        output int re, output int im);
    int pr, pi, t;
    re = 0; im = 0; pr = 1; pi = 0;
    for (int i = 0; i < n; i++) begin
      re += d[i] * pr;
      im += d[i] * pi;
      t  = -pr - pi;      // (pr + j pi)(-1 + j)
      pi = pr - pi;
      pr = t;
    end
  endtask

  // Set operands from most-significant-first lists as printed in examples.
  task automatic set_msd_first(input int a_msd [DIGITS], input int b_msd [DIGITS]);
    for (int i = 0; i < int'(DIGITS); i++) begin
      a_d[i] = a_msd[DIGITS-1-i];
      b_d[i] = b_msd[DIGITS-1-i];
    end
  endtask

  task automatic load_operands();
    for (int i = 0; i < int'(DIGITS); i++) begin
      a_we <= 1; a_waddr <= AW'(i); a_wdata <= enc(a_d[i]);
      b_we <= 1; b_waddr <= AW'(i);
      // encode B's zero digits sometimes as minus zero (100)
      b_wdata <= (b_d[i] == 0 && $urandom_range(0, 3) == 0) ? digit_t'(3'b100) : enc(b_d[i]);
      @(posedge clk);
    end
    a_we <= 0; b_we <= 0;
  endtask

  // Run an n-digit addition of the loaded operands and check everything.
  task automatic run_op(int n, bit poke_start);
    int cyc;
    bit exp_err;
    exp_err = 0;
    for (int i = 0; i < n; i++) begin
      int s;
      s = a_d[i] + b_d[i];
      if (s > 3 || s < -3) begin
        exp_err = 1;
        c_model[i] = 0;
      end else begin
        c_model[i] = s;
      end
    end
    start <= 1; num_digits <= NW'(n);
    @(posedge clk);                   // start sampled: edge 0
    start <= 0;
    cyc = 0;
    while (1) begin
      #1;
      if (done) break;
      expect_eq("busy during operation", int'(busy), 1);
      if (poke_start && cyc == 2) begin
        start <= 1; num_digits <= NW'(1);
        n_ignored_starts++;
      end else begin
        start <= 0;
      end
      @(posedge clk);
      cyc++;
      if (cyc > 100) break;
    end
    start <= 0;
    expect_eq($sformatf("n=%0d done latency (edges after start)", n), int'(cyc + 1), int'(n + 4));
    expect_eq($sformatf("n=%0d range_error", n), int'(range_error), int'(exp_err));
    @(posedge clk);
    #1 expect_eq("done is a single cycle", int'(done), 0);
    expect_eq("busy low after done", int'(busy), 0);
    // read back every word of memory C
    for (int i = 0; i < int'(DIGITS); i++) begin
      c_raddr <= AW'(i);
      @(posedge clk);
      #1 expect_eq($sformatf("n=%0d C[%0d]", n, i), sm(c_rdata), c_model[i]);
      checks++;
      if (c_rdata == digit_t'(3'b100)) begin
        failures++;
        $display("FAIL minus zero written at %0d", i);
      end
    end
    if (exp_err) n_range_err_ops++;
    else begin
      int ar, ai, br, bi, cr, ci;
      cvalue(a_d, n, ar, ai);
      cvalue(b_d, n, br, bi);
      cvalue(c_model, n, cr, ci);
      expect_eq("value real part", cr, ar + br);
      expect_eq("value imag part", ci, ai + bi);
      n_value_checks++;
      n_inrange_ops++;
    end
    if (n < int'(DIGITS)) n_short_ops++;
  endtask

  initial begin
    for (int i = 0; i < int'(DIGITS); i++) c_model[i] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // memory C is not reset: clear it with a full-length 0 + 0 addition
    for (int i = 0; i < int'(DIGITS); i++) begin a_d[i] = 0; b_d[i] = 0; end
    load_operands();
    run_op(DIGITS, 0);

    // Worked example: (18+j25) + (4+j9) = 22+j34, digits most significant first.
    begin
      automatic int xa [DIGITS] = '{0, 0, 1, 2, 0, 1, 0, 0, 1, 0, -1, -1};
      automatic int yb [DIGITS] = '{0, 0, 0, 0, 0, 1, 0, -1, 0, 0, 1, 1};
      automatic int sx [DIGITS] = '{0, 0, 1, 2, 0, 2, 0, -1, 1, 0, 0, 0};
      int vr, vi;
      set_msd_first(xa, yb);
      cvalue(a_d, DIGITS, vr, vi);
      expect_eq("example X real", vr, 18);
      expect_eq("example X imag", vi, 25);
      cvalue(b_d, DIGITS, vr, vi);
      expect_eq("example Y real", vr, 4);
      expect_eq("example Y imag", vi, 9);
      load_operands();
      run_op(DIGITS, 0);
      for (int i = 0; i < int'(DIGITS); i++)
        expect_eq($sformatf("example S digit %0d", i), c_model[i], sx[DIGITS-1-i]);
      cvalue(c_model, DIGITS, vr, vi);
      expect_eq("example S real", vr, 22);
      expect_eq("example S imag", vi, 34);
    end

    // 6 + j7 = (0 0 -1 -2 1 -1 -1 -1), plus zero, as an 8-digit operation.
    begin
      automatic int xa [DIGITS] = '{0, 0, 0, 0, 0, 0, -1, -2, 1, -1, -1, -1};
      automatic int zb [DIGITS] = '{0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};
      int vr, vi;
      set_msd_first(xa, zb);
      load_operands();
      run_op(8, 0);
      cvalue(c_model, 8, vr, vi);
      expect_eq("6+j7 real", vr, 6);
      expect_eq("6+j7 imag", vi, 7);
    end

    // Random in-range operands of every length, one with a start poke.
    for (int t = 0; t < 40; t++) begin
      for (int i = 0; i < int'(DIGITS); i++) begin
        a_d[i] = $urandom_range(0, 6) - 3;
        b_d[i] = $urandom_range(0, 6) - 3;
        if (a_d[i] + b_d[i] > 3)  b_d[i] = 3 - a_d[i];
        if (a_d[i] + b_d[i] < -3) b_d[i] = -3 - a_d[i];
      end
      load_operands();
      run_op((t % DIGITS) + 1, t == 5);
    end

    // Fully random operands: some digit sums fall outside -3..+3.
    for (int t = 0; t < 20; t++) begin
      for (int i = 0; i < int'(DIGITS); i++) begin
        a_d[i] = $urandom_range(0, 6) - 3;
        b_d[i] = $urandom_range(0, 6) - 3;
      end
      a_d[t % DIGITS] = 3; b_d[t % DIGITS] = 2;   // make sure of one
      load_operands();
      run_op(DIGITS, t == 7);
    end

    expect_eq("in-range operations happened", int'(n_inrange_ops > 0), 1);
    expect_eq("range_error operations happened", int'(n_range_err_ops > 0), 1);
    expect_eq("starts while busy happened", int'(n_ignored_starts > 0), 1);
    expect_eq("shorter operations happened", int'(n_short_ops > 0), 1);
    $display("operations: in-range %0d, range_error %0d, short %0d, ignored starts %0d, value checks %0d",
             n_inrange_ops, n_range_err_ops, n_short_ops, n_ignored_starts, n_value_checks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
