// tb_ncl_wire_sel_reg: self-checking test of the wire-level select register.
//
// Random wire patterns are applied with every combination of the request ki
// and the MEAG rail m: the outputs must follow the data only when both are
// high, hold the data while either stays high after the data has returned to
// zero, and clear once ki and m are both low.
module tb_ncl_wire_sel_reg;
  int checks = 0;
  int failures = 0;
  logic       rst, ki, m;
  logic [9:0] d, q;

  ncl_wire_sel_reg #(.W(10)) dut (.rst(rst), .ki(ki), .m(m), .d(d), .q(q));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    rst = 1'b1; ki = 1'b0; m = 1'b0; d = '0; #1;
    rst = 1'b0; #1;
    check(q == '0, "NULL after reset");
    for (int n = 0; n < 300; n++) begin
      automatic logic [9:0] v = 10'($urandom);
      automatic int gate = n % 4;
      ki = gate[0]; m = gate[1]; d = v; #1;
      check(q == ((ki && m) ? v : '0), "data passes only with ki and m");
      ki = 1'b1; m = 1'b1; #1;
      check(q == v, "data passes");
      d = '0; #1;
      check(q == v, "held after data returns to zero");
      if (n % 2 == 0) begin ki = 1'b0; #1; end else begin m = 1'b0; #1; end
      check(q == v, "held while one of ki, m is high");
      ki = 1'b0; m = 1'b0; #1;
      check(q == '0, "cleared");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
