// Self-checking testbench for synchronizer.
// Drives both input values and checks that the output is the valid dual-rail
// code word for the input: true rail equal to it, false rail its complement.
module tb_synchronizer;
  import hyb_pkg::*;
  logic in;
  dr_t  out;
  int checks = 0, failures = 0;

  synchronizer dut (.in(in), .out(out));

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 4; rep++) begin
      for (int v = 0; v < 2; v++) begin
        in = 1'(v);
        #1;
        checks++;
        if (out.t !== in || out.f !== !in) begin
          failures++;
          $display("FAIL in=%b: got t=%b f=%b", in, out.t, out.f);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
