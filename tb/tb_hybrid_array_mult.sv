// End-to-end testbench for hybrid_array_mult at its default size (4 x 4).
// Plays the active side of the four-phase request/acknowledge channel for
// every one of the 256 operand pairs, in a random order, and checks:
//   - in the precharge phase every partial product is null, ack is low and
//     the product reads 0;
//   - after req rises, ack rises within a bounded time and the product equals
//     a * b (computed here with the simulator's own multiplication);
//   - the product stays valid while req is held high for a random time;
//   - after req falls, ack falls again.
// It counts how often each mechanism happened (precharge phase, evaluation
// phase, completion detected, return to null detected) and fails if one never
// did. A watchdog ends the run if a handshake hangs.
module tb_hybrid_array_mult;
  localparam int N = 4;
  localparam int OPS = 1 << (2 * N);

  logic           req;
  logic [N-1:0]   a, b;
  logic           ack;
  logic [2*N-1:0] product;
  logic           pp_valid, pp_null;
  int checks = 0, failures = 0;
  int n_precharge = 0, n_evaluate = 0, n_ack_rise = 0, n_ack_fall = 0;

  hybrid_array_mult dut (
    .req(req), .a(a), .b(b), .ack(ack), .product(product),
    .pp_valid(pp_valid), .pp_null(pp_null)
  );

  initial begin : watchdog
    #(OPS * 100 + 1000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at %0t: %s (a=%0d b=%0d product=%0d ack=%b)", $time, what, a, b, product, ack);
    end
  endtask

  // wait up to max_ns for ack to reach level; return whether it did
  task automatic wait_ack(input logic level, input int max_ns, output logic seen);
    seen = 1'b0;
    for (int t = 0; t < max_ns; t++) begin
      if (ack === level) begin
        seen = 1'b1;
        break;
      end
      #1;
    end
  endtask

  initial begin
    int order [OPS];
    logic seen;
    for (int i = 0; i < OPS; i++) order[i] = i;
    for (int i = OPS - 1; i > 0; i--) begin
      int j, tmp;
      j = int'($urandom_range(i, 0));
      tmp = order[i]; order[i] = order[j]; order[j] = tmp;
    end

    req = 1'b0;
    a = '0;
    b = '0;
    #5;
    for (int k = 0; k < OPS; k++) begin
      // precharge phase: apply the operands while the gates are precharged
      {a, b} = (2*N)'(order[k]);
      #2;
      n_precharge++;
      expect_true(pp_null && !pp_valid, "partial products not null in precharge");
      expect_true(ack === 1'b0, "ack high in precharge");
      expect_true(product === '0, "product not zero in precharge");

      // evaluation phase
      req = 1'b1;
      n_evaluate++;
      wait_ack(1'b1, 20, seen);
      expect_true(seen, "ack did not rise");
      if (seen) n_ack_rise++;
      #1;
      expect_true(pp_valid, "partial products not all valid with ack high");
      expect_true(product === (2*N)'(a) * (2*N)'(b), "wrong product");
      // the sender may hold req for a while; product must stay valid
      repeat ($urandom_range(5, 0)) #1;
      expect_true(ack === 1'b1 && product === (2*N)'(a) * (2*N)'(b), "product not held while req high");

      // return to precharge
      req = 1'b0;
      wait_ack(1'b0, 20, seen);
      expect_true(seen, "ack did not fall");
      if (seen) n_ack_fall++;
      #1;
    end

    $display("mechanisms: precharge=%0d evaluate=%0d ack_rise=%0d ack_fall=%0d",
             n_precharge, n_evaluate, n_ack_rise, n_ack_fall);
    expect_true(n_precharge > 0, "precharge never happened");
    expect_true(n_evaluate > 0, "evaluation never happened");
    expect_true(n_ack_rise > 0, "completion never detected");
    expect_true(n_ack_fall > 0, "return to null never detected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
