// tb_ncl_unary_bc: self-checking test of NOT, SHR and SHL with B-completeness.
//
// All 512 values of A, B, Cin: with B still NULL no result bit may be DATA;
// with B DATA the results must match the function table (NOT A; SHR: F =
// {Cin, A3..A1}, Cout = A0; SHL: F = {A2..A0, Cin}, Cout = A3); returning B to
// NULL last, the results must stay DATA until it does.
module tb_ncl_unary_bc;
  import ncl_pkg::*;
  int checks = 0;
  int failures = 0;
  dr_t [3:0] a, b;
  dr_t       cin;
  dr_t [3:0] f [3];
  dr_t       c [3];

  ncl_unary_bc #(.OP(OP_NOT)) u_not (.a(a), .b(b), .cin(cin), .f(f[0]), .cout(c[0]));
  ncl_unary_bc #(.OP(OP_SHR)) u_shr (.a(a), .b(b), .cin(cin), .f(f[1]), .cout(c[1]));
  ncl_unary_bc #(.OP(OP_SHL)) u_shl (.a(a), .b(b), .cin(cin), .f(f[2]), .cout(c[2]));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic logic [3:0] val(input dr_t [3:0] x);
    return {x[3].r1, x[2].r1, x[1].r1, x[0].r1};
  endfunction

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    a = '0; b = '0; cin = '0; #1;
    for (int v = 0; v < 512; v++) begin
      automatic logic [3:0] va = v[3:0];
      automatic logic [3:0] vb = v[7:4];
      automatic logic vc = v[8];
      for (int i = 0; i < 4; i++) a[i] = dr_enc(va[i]);
      cin = dr_enc(vc); #1;
      for (int k = 0; k < 3; k++) check(f[k] == '0, "results wait for B");
      for (int i = 0; i < 4; i++) b[i] = dr_enc(vb[i]);
      #1;
      check(val(f[0]) == ~va, "NOT");
      check(val(f[1]) == {vc, va[3:1]} && c[1] == dr_enc(va[0]), "SHR");
      check(val(f[2]) == {va[2:0], vc} && c[2] == dr_enc(va[3]), "SHL");
      a = '0; cin = '0; #1;
      for (int k = 0; k < 3; k++)
        for (int i = 0; i < 4; i++) check(dr_is_data(f[k][i]), "held until B is NULL");
      b = '0; #1;
      for (int k = 0; k < 3; k++) check(f[k] == '0, "NULL");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
