// Self-checking testbench for sync_and_gate.
// Each input takes the three legal dual-rail states (null, 0, 1). In
// precharge the output must be null whatever the inputs. In evaluate the
// output must stay null until both inputs are valid, then carry a AND b.
// The expected values are worked out here from the dual-rail code, not from
// the gate's equations.
module tb_sync_and_gate;
  import hyb_pkg::*;
  logic pre;
  dr_t  a, b, out;
  int checks = 0, failures = 0;

  sync_and_gate dut (.pre(pre), .a(a), .b(b), .out(out));

  // state 0 = null, 1 = logic 0, 2 = logic 1
  function automatic dr_t code(input int s);
    case (s)
      1:       return '{t: 1'b0, f: 1'b1};
      2:       return '{t: 1'b1, f: 1'b0};
      default: return '{t: 1'b0, f: 1'b0};
    endcase
  endfunction

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 1; p >= 0; p--) begin
      for (int sa = 0; sa < 3; sa++) begin
        for (int sb = 0; sb < 3; sb++) begin
          dr_t expected;
          pre = 1'(p);
          a   = code(sa);
          b   = code(sb);
          #1;
          if (p == 1 || sa == 0 || sb == 0) expected = code(0);
          else if (sa == 2 && sb == 2)      expected = code(2);
          else                              expected = code(1);
          checks++;
          if (out !== expected) begin
            failures++;
            $display("FAIL pre=%0d a=%0d b=%0d: got %b%b expected %b%b",
                     p, sa, sb, out.t, out.f, expected.t, expected.f);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
