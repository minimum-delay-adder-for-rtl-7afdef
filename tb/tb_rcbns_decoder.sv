// tb_rcbns_decoder: exhaustive self-checking test of the 6-to-64 decoder.
// Applies all 64 select values and checks that exactly the selected minterm
// line is high. Combinational, so a watchdog on simulated time guards it.
module tb_rcbns_decoder;

  logic [5:0]  sel;
  logic [63:0] minterm;
  int checks = 0, failures = 0;

  rcbns_decoder dut (.sel, .minterm);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 64; k++) begin
      sel = 6'(k);
      #1;
      for (int j = 0; j < 64; j++) begin
        checks++;
        if (minterm[j] !== (j == k)) begin
          failures++;
          $display("FAIL sel=%0d line %0d = %b", k, j, minterm[j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
