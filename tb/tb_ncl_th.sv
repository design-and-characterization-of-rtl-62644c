// tb_ncl_th: self-checking test of the THmn threshold gate.
//
// Drives a TH23, a TH34w2 and a resettable TH22 with every input pattern
// reached by single-input steps (a random walk), and compares each output with
// a reference that applies the threshold rule with hysteresis: set when the
// weighted count reaches the threshold, cleared only when all inputs are low,
// otherwise unchanged. Also checks reset to 0 (N-type) and to 1 (D-type).
module tb_ncl_th;

  int checks = 0;
  int failures = 0;

  logic       rst;
  logic [2:0] in23;
  logic [3:0] in34;
  logic [1:0] in22;
  logic       z23, z34, z22n, z22d;
  logic       ref23, ref34, ref22n, ref22d;

  ncl_th #(.N(3), .M(2)) u_th23 (.rst(1'b0), .in(in23), .z(z23));
  ncl_th #(.N(4), .M(3), .W0(2)) u_th34w2 (.rst(1'b0), .in(in34), .z(z34));
  ncl_th #(.N(2), .M(2), .RESETTABLE(1'b1), .RESET_VAL(1'b0)) u_th22n (.rst(rst), .in(in22), .z(z22n));
  ncl_th #(.N(2), .M(2), .RESETTABLE(1'b1), .RESET_VAL(1'b1)) u_th22d (.rst(rst), .in(in22), .z(z22d));

  function automatic logic hyst(input logic prev, input int unsigned wsum, input int unsigned m,
                                input logic any);
    if (wsum >= m) return 1'b1;
    if (!any) return 1'b0;
    return prev;
  endfunction

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; in23 = '0; in34 = '0; in22 = 2'b11;
    #1;
    check(z22n, 1'b0, "TH22n reset");
    check(z22d, 1'b1, "TH22d reset");
    rst = 1'b0; in22 = '0;
    #1;
    check(z22n, 1'b0, "TH22n after reset, inputs low");
    check(z22d, 1'b0, "TH22d after reset, inputs low");
    ref23 = 1'b0; ref34 = 1'b0; ref22n = 1'b0; ref22d = 1'b0;
    // Explicit hysteresis sequence on TH23: 1 input -> 0, 2 -> 1, back to 1 -> stays 1.
    in23 = 3'b001; #1; check(z23, 1'b0, "TH23 one input");
    in23 = 3'b011; #1; check(z23, 1'b1, "TH23 two inputs");
    in23 = 3'b010; #1; check(z23, 1'b1, "TH23 hysteresis hold");
    in23 = 3'b000; #1; check(z23, 1'b0, "TH23 release");
    // Weighted input alone is not enough for TH34w2; with one other it is.
    in34 = 4'b0001; #1; check(z34, 1'b0, "TH34w2 weighted input alone");
    in34 = 4'b0011; #1; check(z34, 1'b1, "TH34w2 weighted plus one");
    in34 = 4'b0000; #1; check(z34, 1'b0, "TH34w2 release");
    in34 = 4'b1110; #1; check(z34, 1'b1, "TH34w2 three unweighted");
    in34 = 4'b0000; #1;
    ref23 = 1'b0; ref34 = 1'b0;
    // Random walk, one input toggling per step.
    for (int step = 0; step < 400; step++) begin
      int unsigned w;
      in23[$urandom_range(2, 0)] ^= 1'b1;
      in34[$urandom_range(3, 0)] ^= 1'b1;
      in22[$urandom_range(1, 0)] ^= 1'b1;
      #1;
      ref23 = hyst(ref23, $countones(in23), 2, |in23);
      w = 2 * in34[0] + in34[1] + in34[2] + in34[3];
      ref34 = hyst(ref34, w, 3, |in34);
      ref22n = hyst(ref22n, $countones(in22), 2, |in22);
      ref22d = hyst(ref22d, $countones(in22), 2, |in22);
      check(z23, ref23, "TH23 walk");
      check(z34, ref34, "TH34w2 walk");
      check(z22n, ref22n, "TH22n walk");
      check(z22d, ref22d, "TH22d walk");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
