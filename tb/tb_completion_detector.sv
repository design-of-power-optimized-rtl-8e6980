// Self-checking testbench for completion_detector (default width of 16).
// Repeatedly walks the word from all-null to all-valid and back, changing
// one bit at a time in a random order with random data values. done must
// stay low until the last bit turns valid, then stay high until the last
// bit returns to null (the C-element hysteresis).
module tb_completion_detector;
  import hyb_pkg::*;
  localparam int W = 16;
  dr_t  d [W];
  logic all_valid, all_null, done;
  int checks = 0, failures = 0;
  int holds = 0;

  completion_detector dut (.d(d), .all_valid(all_valid), .all_null(all_null), .done(done));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic exp_done, input logic exp_valid, input logic exp_null);
    checks++;
    if (done !== exp_done || all_valid !== exp_valid || all_null !== exp_null) begin
      failures++;
      $display("FAIL: done=%b all_valid=%b all_null=%b expected %b %b %b",
               done, all_valid, all_null, exp_done, exp_valid, exp_null);
    end
  endtask

  // random permutation of 0..W-1
  task automatic shuffle(output int order [W]);
    for (int i = 0; i < W; i++) order[i] = i;
    for (int i = W - 1; i > 0; i--) begin
      int j, tmp;
      j = int'($urandom_range(i, 0));
      tmp = order[i]; order[i] = order[j]; order[j] = tmp;
    end
  endtask

  initial begin
    int order [W];
    for (int i = 0; i < W; i++) d[i] = '{t: 1'b0, f: 1'b0};
    #1;
    check(1'b0, 1'b0, 1'b1);
    for (int rep = 0; rep < 50; rep++) begin
      // evaluation: bits turn valid one at a time
      shuffle(order);
      for (int k = 0; k < W; k++) begin
        logic v;
        v = 1'($urandom_range(1, 0));
        d[order[k]] = '{t: v, f: ~v};
        #1;
        if (k < W - 1) begin
          check(1'b0, 1'b0, 1'b0);
          holds++;
        end else begin
          check(1'b1, 1'b1, 1'b0);
        end
      end
      // precharge: bits return to null one at a time
      shuffle(order);
      for (int k = 0; k < W; k++) begin
        d[order[k]] = '{t: 1'b0, f: 1'b0};
        #1;
        if (k < W - 1) begin
          check(1'b1, 1'b0, 1'b0);
          holds++;
        end else begin
          check(1'b0, 1'b0, 1'b1);
        end
      end
    end
    checks++;
    if (holds == 0) begin
      failures++;
      $display("FAIL: hold state never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
