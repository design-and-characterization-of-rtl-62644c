// tb_ncl_full_adder: self-checking test of the dual-rail NCL full adder.
//
// All 8 input combinations, each with every possible late input: with two of
// the three inputs DATA the sum must still be NULL; with all three, sum and
// carry must match x+y+ci. Then NULL with each possible late input: the sum
// must stay DATA until the last input is NULL.
module tb_ncl_full_adder;
  import ncl_pkg::*;

  int checks = 0;
  int failures = 0;

  dr_t x, y, ci, s, co;

  ncl_full_adder dut (.x(x), .y(y), .ci(ci), .s(s), .co(co));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic set_in(input int idx, input dr_t v);
    case (idx)
      0: x = v;
      1: y = v;
      default: ci = v;
    endcase
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    x = '0; y = '0; ci = '0; #1;
    for (int v = 0; v < 8; v++) begin
      for (int late = 0; late < 3; late++) begin
        logic [1:0] sum;
        sum = 2'(v[0]) + 2'(v[1]) + 2'(v[2]);
        for (int i = 0; i < 3; i++) if (i != late) set_in(i, dr_enc(v[i]));
        #1;
        check(dr_is_null(s), $sformatf("sum waits for input %0d", late));
        set_in(late, dr_enc(v[late])); #1;
        check(dr_is_data(s) && s.r1 == sum[0], $sformatf("sum of %b", v[2:0]));
        check(dr_is_data(co) && co.r1 == sum[1], $sformatf("carry of %b", v[2:0]));
        for (int i = 0; i < 3; i++) if (i != late) set_in(i, '0);
        #1;
        check(dr_is_data(s), "sum held until last input NULL");
        set_in(late, '0); #1;
        check(dr_is_null(s) && dr_is_null(co), "NULL out");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
