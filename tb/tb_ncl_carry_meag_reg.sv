// tb_ncl_carry_meag_reg: self-checking test of the Carry MEAG register.
//
// For select rails 0-3 the output rail must wait for Cin/Bin to be DATA and
// stay up until Cin is NULL again; rails 4-7 must not depend on Cin. All
// rails need ki high to rise and ki low to fall; ko follows the outputs.
module tb_ncl_carry_meag_reg;
  import ncl_pkg::*;
  int checks = 0;
  int failures = 0;
  logic       rst, ki, ko;
  logic [7:0] sel, m;
  dr_t        cin;

  ncl_carry_meag_reg dut (.rst(rst), .ki(ki), .sel(sel), .cin(cin), .m(m), .ko(ko));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst = 1'b1; ki = 1'b1; sel = 8'hff; cin = '0; #1;
    check(m == '0 && ko, "reset");
    sel = '0; rst = 1'b0; ki = 1'b1; #1;
    for (int n = 0; n < 160; n++) begin
      automatic int k = n % 8;
      sel = 8'(1 << k); #1;
      if (k < 4) check(m == '0, "rails 0-3 wait for Cin");
      else       check(m == 8'(1 << k), "rails 4-7 do not wait for Cin");
      cin = dr_enc(1'($urandom)); #1;
      check(m == 8'(1 << k) && !ko, "rail up");
      sel = '0; #1;
      check(m == 8'(1 << k), "held while ki high");
      ki = 1'b0; #1;
      if (k < 4) check(m == 8'(1 << k), "rails 0-3 held until Cin is NULL");
      cin = '0; #1;
      check(m == '0 && ko, "cleared");
      ki = 1'b1; #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
