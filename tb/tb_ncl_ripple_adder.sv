// tb_ncl_ripple_adder: self-checking test of the 4-bit dual-rail ripple
// adder (A+B+Cin) and subtractor (A-B-1+Bin) for all 512 operand sets.
//
// Results are compared with integer arithmetic: for the adder the 5-bit
// value {Cout,F} = A+B+Cin, for the subtractor {Bout,F} = A+(15-B)+Bin.
// Input-completeness: with one random input bit held back, the outputs must
// not all be DATA. Each NULL wavefront must return all outputs to NULL.
module tb_ncl_ripple_adder;
  import ncl_pkg::*;

  int checks = 0;
  int failures = 0;

  dr_t [3:0] a, b, fs, fa;
  dr_t       cin, cs, ca;

  ncl_ripple_adder #(.W(4), .SUB(1'b0)) u_add (.a(a), .b(b), .cin(cin), .f(fa), .cout(ca));
  ncl_ripple_adder #(.W(4), .SUB(1'b1)) u_sub (.a(a), .b(b), .cin(cin), .f(fs), .cout(cs));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic logic all_data(input dr_t [3:0] f, input dr_t c);
    logic ok = dr_is_data(c);
    for (int i = 0; i < 4; i++) ok &= dr_is_data(f[i]);
    return ok;
  endfunction

  function automatic logic [4:0] val(input dr_t [3:0] f, input dr_t c);
    return {c.r1, f[3].r1, f[2].r1, f[1].r1, f[0].r1};
  endfunction

  task automatic set_bit(input int idx, input logic [8:0] v, input logic data);
    dr_t d;
    d = data ? dr_enc(v[idx]) : '0;
    if (idx < 4) a[idx] = d;
    else if (idx < 8) b[idx-4] = d;
    else cin = d;
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    a = '0; b = '0; cin = '0; #1;
    for (int v = 0; v < 512; v++) begin
      logic [8:0] vec;
      logic [4:0] exp_add, exp_sub;
      int hold;
      vec = 9'(v);
      exp_add = 5'(vec[3:0]) + 5'(vec[7:4]) + 5'(vec[8]);
      exp_sub = 5'(vec[3:0]) + {1'b0, ~vec[7:4]} + 5'(vec[8]);
      hold = $urandom_range(8, 0);
      for (int i = 0; i < 9; i++) if (i != hold) set_bit(i, vec, 1'b1);
      #1;
      check(!all_data(fa, ca) && !all_data(fs, cs), "outputs wait for last input");
      set_bit(hold, vec, 1'b1); #1;
      check(all_data(fa, ca) && val(fa, ca) == exp_add, $sformatf("add %h", vec));
      check(all_data(fs, cs) && val(fs, cs) == exp_sub, $sformatf("sub %h", vec));
      a = '0; b = '0; cin = '0; #1;
      check(fa == '0 && fs == '0 && ca == '0 && cs == '0, "NULL out");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
