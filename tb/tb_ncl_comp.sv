// tb_ncl_comp: self-checking test of the completion component for N = 1, 5,
// 9 and 12 inputs (one and two gate levels).
//
// Inputs rise one at a time in random order and then fall the same way (the
// monotonic wavefronts an NCL circuit produces); the reference is an N-input
// C-element: high once all inputs are high, low once all are low, else held.
module tb_ncl_comp;

  int checks = 0;
  int failures = 0;

  logic [0:0]  in1;
  logic [4:0]  in5;
  logic [8:0]  in9;
  logic [11:0] in12;
  logic        z1, z5, z9, z12;
  logic        r1, r5, r9, r12;

  ncl_comp #(.N(1))  u1  (.ko_in(in1),  .ko(z1));
  ncl_comp #(.N(5))  u5  (.ko_in(in5),  .ko(z5));
  ncl_comp #(.N(9))  u9  (.ko_in(in9),  .ko(z9));
  ncl_comp #(.N(12)) u12 (.ko_in(in12), .ko(z12));

  function automatic logic celem(input logic prev, input logic all1, input logic all0);
    return all1 ? 1'b1 : (all0 ? 1'b0 : prev);
  endfunction

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    in1 = '0; in5 = '0; in9 = '0; in12 = '0; #1;
    r1 = 0; r5 = 0; r9 = 0; r12 = 0;
    check(z12, 1'b0, "all low");
    // Full sweep up and down.
    for (int i = 0; i < 12; i++) begin
      in12[i] = 1'b1; #1;
      check(z12, (i == 11), "rising sweep");
    end
    for (int i = 0; i < 12; i++) begin
      in12[i] = 1'b0; #1;
      check(z12, (i != 11), "falling sweep");
    end
    // Wavefronts in random order.
    for (int n = 0; n < 300; n++) begin
      for (int ph = 1; ph >= 0; ph--) begin
        automatic logic v = (ph == 1);
        automatic int order [12];
        for (int i = 0; i < 12; i++) order[i] = i;
        order.shuffle();
        for (int j = 0; j < 12; j++) begin
          in12[order[j]] = v;
          if (order[j] < 9) in9[order[j]] = v;
          if (order[j] < 5) in5[order[j]] = v;
          if (order[j] < 1) in1[order[j]] = v;
          #1;
          r1 = celem(r1, &in1, ~|in1);
          r5 = celem(r5, &in5, ~|in5);
          r9 = celem(r9, &in9, ~|in9);
          r12 = celem(r12, &in12, ~|in12);
          check(z1, r1, "N=1");
          check(z5, r5, "N=5");
          check(z9, r9, "N=9");
          check(z12, r12, "N=12");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
