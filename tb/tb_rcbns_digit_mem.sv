// tb_rcbns_digit_mem: self-checking test of the digit memory at its default
// depth. Fills every word with random digits, reads them back in random
// order and checks the data and the one-cycle read latency, that rdata holds
// while re is low, and that a read colliding with a write returns the old
// word. A reference array in the testbench gives the expected contents.
module tb_rcbns_digit_mem;
  import rcbns_pkg::*;

  localparam int unsigned DEPTH = 12;
  localparam int unsigned AW = $clog2(DEPTH);

  logic clk;
  initial clk = 0;
  logic rst_n = 0;
  logic we = 0, re = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  digit_t wdata = '0, rdata;
  digit_t ref_mem [DEPTH];
  int checks = 0, failures = 0;

  rcbns_digit_mem dut (.*);

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
    repeat (2) @(posedge clk);
    expect_digit("rdata after reset", rdata, '0);
    rst_n <= 1;
    @(posedge clk);
    // fill
    for (int i = 0; i < int'(DEPTH); i++) begin
      ref_mem[i] = digit_t'($urandom_range(0, 7));
      we <= 1; waddr <= AW'(i); wdata <= ref_mem[i];
      @(posedge clk);
    end
    we <= 0;
    // random reads, checked one cycle later
    for (int t = 0; t < 200; t++) begin
      automatic int unsigned ad = $urandom_range(0, DEPTH - 1);
      re <= 1; raddr <= AW'(ad);
      @(posedge clk);
      re <= 0; raddr <= AW'((ad + 1) % DEPTH);
      #1 expect_digit($sformatf("read %0d", ad), rdata, ref_mem[ad]);
      // hold while re is low, even though the address moves on
      @(posedge clk);
      #1 expect_digit($sformatf("hold %0d", ad), rdata, ref_mem[ad]);
    end
    // read during write of the same word returns the old word
    begin
      automatic digit_t nv;
      nv = ~ref_mem[3];
      we <= 1; waddr <= AW'(3); wdata <= nv;
      re <= 1; raddr <= AW'(3);
      @(posedge clk);
      we <= 0; re <= 1;
      #1 expect_digit("read-during-write old", rdata, ref_mem[3]);
      ref_mem[3] = nv;
      @(posedge clk);
      re <= 0;
      #1 expect_digit("read after write new", rdata, ref_mem[3]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
