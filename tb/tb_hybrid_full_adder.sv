// Self-checking testbench for hybrid_full_adder.
// Applies all eight input combinations and compares sum and carry with the
// arithmetic sum a + b + cin. A watchdog ends the run if it ever hangs.
module tb_hybrid_full_adder;
  logic a, b, cin, sum, cout;
  int checks = 0, failures = 0;

  hybrid_full_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic [1:0] expect_sum;
      {a, b, cin} = 3'(v);
      #1;
      expect_sum = 2'(a) + 2'(b) + 2'(cin);
      checks++;
      if ({cout, sum} !== expect_sum) begin
        failures++;
        $display("FAIL a=%0d b=%0d cin=%0d: got cout,sum=%b%b expected %b",
                 a, b, cin, cout, sum, expect_sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
