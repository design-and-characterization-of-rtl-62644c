// tb_ncl_qr_func: self-checking test of the eight quad-rail ALU functions.
//
// For every function and all 512 values of A, B and Cin: the outputs must
// match the function table (reference model in ncl_pkg); with any one input
// signal (a digit of A or B, or Cin for functions 4-7) held NULL, the outputs
// must not all be DATA (input-completeness, including B for NOT and the
// shifts); after all inputs return to NULL, all outputs must be NULL.
module tb_ncl_qr_func;
  import ncl_pkg::*;
  int checks = 0;
  int failures = 0;
  qr_t [1:0] a, b;
  dr_t       cin;
  qr_t [1:0] f    [8];
  dr_t       cout [8];

  for (genvar k = 0; k < 8; k++) begin : g_fn
    ncl_qr_func #(.OP(alu_op_e'(k))) u_fn (.a(a), .b(b), .cin(cin), .f(f[k]), .cout(cout[k]));
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic logic outs_data(input int k);
    return qr_is_data(f[k][0]) && qr_is_data(f[k][1]) && (k < 4 || dr_is_data(cout[k]));
  endfunction

  function automatic logic outs_null(input int k);
    return f[k][0] == '0 && f[k][1] == '0 && cout[k] == DR_NULL;
  endfunction

  // Apply A, B, Cin with input signal `hold` (0,1: A digits, 2,3: B digits,
  // 4: Cin, other: none) left NULL.
  task automatic apply(input logic [8:0] v, input int hold);
    a[0] = (hold == 0) ? '0 : qr_enc(v[1:0]);
    a[1] = (hold == 1) ? '0 : qr_enc(v[3:2]);
    b[0] = (hold == 2) ? '0 : qr_enc(v[5:4]);
    b[1] = (hold == 3) ? '0 : qr_enc(v[7:6]);
    cin  = (hold == 4) ? DR_NULL : dr_enc(v[8]);
  endtask

  task automatic clear();
    a = '0; b = '0; cin = DR_NULL;
  endtask

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    clear(); #1;
    for (int v = 0; v < 512; v++) begin
      automatic logic [8:0] vec = 9'(v);
      // Completeness: hold each input signal back in turn.
      for (int h = 0; h < 5; h++) begin
        apply(vec, h); #1;
        for (int k = 0; k < 8; k++)
          if (h < 4 || k >= 4) check(!outs_data(k), $sformatf("fn %0d complete without input %0d", k, h));
        clear(); #1;
      end
      apply(vec, -1); #1;
      for (int k = 0; k < 8; k++) begin
        automatic logic [4:0] exp = alu_ref(3'(k), vec[3:0], vec[7:4], vec[8]);
        automatic logic [3:0] got = {qr_val(f[k][1]), qr_val(f[k][0])};
        check(outs_data(k), $sformatf("fn %0d outputs DATA", k));
        check(got == exp[3:0], $sformatf("fn %0d v=%h F got %h exp %h", k, vec, got, exp[3:0]));
        if (k >= 4) check(cout[k] == dr_enc(exp[4]), $sformatf("fn %0d v=%h Cout", k, vec));
      end
      clear(); #1;
      for (int k = 0; k < 8; k++) check(outs_null(k), $sformatf("fn %0d NULL", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
