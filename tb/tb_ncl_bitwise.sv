// tb_ncl_bitwise: self-checking test of the input-complete OR, AND and XOR.
//
// All 256 operand pairs. For each: a DATA wavefront with one random operand
// bit held back (the result bit of that position must stay NULL, which is
// what input-completeness means here), then the full wavefront (results
// compared with |, &, ^), then a NULL wavefront with one bit left at DATA
// (that result bit must stay DATA), then full NULL.
module tb_ncl_bitwise;
  import ncl_pkg::*;

  int checks = 0;
  int failures = 0;

  dr_t [3:0] a, b;
  dr_t [3:0] f [3];

  ncl_bitwise #(.OP(OP_OR))  u_or  (.a(a), .b(b), .f(f[0]));
  ncl_bitwise #(.OP(OP_AND)) u_and (.a(a), .b(b), .f(f[1]));
  ncl_bitwise #(.OP(OP_XOR)) u_xor (.a(a), .b(b), .f(f[2]));

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
    a = '0; b = '0; #1;
    for (int v = 0; v < 256; v++) begin
      logic [3:0] va, vb;
      int hb;
      logic ha;
      va = v[3:0]; vb = v[7:4];
      hb = $urandom_range(3, 0); ha = 1'($urandom);
      for (int i = 0; i < 4; i++) begin
        if (!(ha && i == hb)) a[i] = dr_enc(va[i]);
        if (!(!ha && i == hb)) b[i] = dr_enc(vb[i]);
      end
      #1;
      for (int k = 0; k < 3; k++) check(dr_is_null(f[k][hb]), "result bit waits for both operands");
      a[hb] = dr_enc(va[hb]); b[hb] = dr_enc(vb[hb]); #1;
      check(val(f[0]) == (va | vb), $sformatf("OR %h %h", va, vb));
      check(val(f[1]) == (va & vb), $sformatf("AND %h %h", va, vb));
      check(val(f[2]) == (va ^ vb), $sformatf("XOR %h %h", va, vb));
      for (int k = 0; k < 3; k++)
        for (int i = 0; i < 4; i++) check(dr_is_data(f[k][i]), "all result bits DATA");
      hb = $urandom_range(3, 0); ha = 1'($urandom);
      for (int i = 0; i < 4; i++) begin
        if (!(ha && i == hb)) a[i] = '0;
        if (!(!ha && i == hb)) b[i] = '0;
      end
      #1;
      for (int k = 0; k < 3; k++) check(dr_is_data(f[k][hb]), "result bit held until both NULL");
      a = '0; b = '0; #1;
      for (int k = 0; k < 3; k++) check(f[k] == '0, "NULL result");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
