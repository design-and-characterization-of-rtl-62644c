// tb_ncl_demux: self-checking test of the operand demultiplexer, in its
// default form and with B passed to every function (PASS_B_ALL=1).
//
// For every select value and random operands: only the selected function's
// outputs become DATA, carrying A, B (where that function takes B) and Cin
// (functions 4-7); all other outputs stay NULL. For functions 3-5 in the
// default form, A must wait for B (B held back: A stays NULL) and must be held
// until B returns to NULL. Every NULL wavefront must clear all outputs.
module tb_ncl_demux;
  import ncl_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [7:0] sel;
  dr_t  [3:0] a, b;
  dr_t        cin;
  dr_t  [3:0] fa  [2][8];
  dr_t  [3:0] fb  [2][8];
  dr_t        fc  [2][8];

  ncl_demux #(.PASS_B_ALL(1'b0)) u_d0 (.sel(sel), .a(a), .b(b), .cin(cin),
                                       .fa(fa[0]), .fb(fb[0]), .fcin(fc[0]));
  ncl_demux #(.PASS_B_ALL(1'b1)) u_d1 (.sel(sel), .a(a), .b(b), .cin(cin),
                                       .fa(fa[1]), .fb(fb[1]), .fcin(fc[1]));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic dr_t [3:0] enc4(input logic [3:0] v);
    dr_t [3:0] r;
    for (int i = 0; i < 4; i++) r[i] = dr_enc(v[i]);
    return r;
  endfunction

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    sel = '0; a = '0; b = '0; cin = '0; #1;
    for (int n = 0; n < 400; n++) begin
      automatic int k = n % 8;
      automatic logic [3:0] va = 4'($urandom);
      automatic logic [3:0] vb = 4'($urandom);
      automatic logic vc = 1'($urandom);
      automatic logic no_b = (k == 3 || k == 4 || k == 5);
      // B held back first.
      sel = 8'(1 << k); a = enc4(va); cin = dr_enc(vc); #1;
      if (no_b) check(fa[0][k] == '0, "A waits for B (functions 3-5)");
      check(fa[1][k] == enc4(va), "A passes without B when B goes to all functions");
      b = enc4(vb); #1;
      for (int m = 0; m < 2; m++) begin
        for (int j = 0; j < 8; j++) begin
          if (j == k) begin
            check(fa[m][j] == enc4(va), $sformatf("A to function %0d", j));
            if (!no_b || m == 1) check(fb[m][j] == enc4(vb), $sformatf("B to function %0d", j));
            else check(fb[m][j] == '0, "no B to functions 3-5");
            check(fc[m][j] == ((j >= 4) ? dr_enc(vc) : DR_NULL), "Cin to functions 4-7 only");
          end else begin
            check(fa[m][j] == '0 && fb[m][j] == '0 && fc[m][j] == '0,
                  $sformatf("function %0d not selected stays NULL", j));
          end
        end
      end
      // NULL: A, select and Cin first, B last.
      sel = '0; a = '0; cin = '0; #1;
      if (no_b) check(fa[0][k] == enc4(va), "A held until B is NULL");
      b = '0; #1;
      for (int m = 0; m < 2; m++)
        for (int j = 0; j < 8; j++)
          check(fa[m][j] == '0 && fb[m][j] == '0 && fc[m][j] == '0, "all NULL");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
