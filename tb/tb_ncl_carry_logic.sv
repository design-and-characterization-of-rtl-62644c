// tb_ncl_carry_logic: self-checking test of the ALU carry logic, plain and
// as an embedded register (EMBED=1).
//
// Operations 0-3 (S2 = DATA0, Ci NULL): the output must stay NULL until
// Cin/Bin is DATA, then be DATA0 whatever Cin is, and stay DATA0 until Cin and
// S2 are both NULL. Operations 4-7 (S2^0 low, Ci DATA): the output follows Ci.
// The embedded form additionally waits for ki high for DATA, ki low for NULL.
module tb_ncl_carry_logic;
  import ncl_pkg::*;

  int checks = 0;
  int failures = 0;

  logic rst, ki, s2_0;
  dr_t  ci, cin, co, coe;
  logic ko, koe;

  ncl_carry_logic #(.EMBED(1'b0)) u_c (.rst(1'b0), .ki(1'b0), .ci(ci), .cin(cin), .s2_0(s2_0),
                                       .co(co), .ko(ko));
  ncl_carry_logic #(.EMBED(1'b1)) u_e (.rst(rst), .ki(ki), .ci(ci), .cin(cin), .s2_0(s2_0),
                                       .co(coe), .ko(koe));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst = 1'b1; ki = 1'b0; s2_0 = 1'b0; ci = '0; cin = '0; #1;
    check(coe == '0, "embedded reset");
    rst = 1'b0; #1;
    for (int n = 0; n < 200; n++) begin
      automatic logic low_ops = 1'($urandom);
      automatic logic vc = 1'($urandom);
      automatic logic vci = 1'($urandom);
      if (low_ops) begin
        s2_0 = 1'b1; #1;
        check(dr_is_null(co), "waits for Cin");
        cin = dr_enc(vc); #1;
        check(co == dr_enc(1'b0) && !ko, "DATA0 for operations 0-3");
        check(dr_is_null(coe), "embedded waits for ki");
        ki = 1'b1; #1;
        check(coe == dr_enc(1'b0) && !koe, "embedded DATA0");
        cin = '0; #1;
        check(co == dr_enc(1'b0), "held until S2 NULL");
        s2_0 = 1'b0; #1;
        check(dr_is_null(co) && ko, "NULL");
      end else begin
        cin = dr_enc(vc); ci = dr_enc(vci); #1;
        check(co == dr_enc(vci), "follows Ci for operations 4-7");
        ki = 1'b1; #1;
        check(coe == dr_enc(vci), "embedded follows Ci");
        cin = '0; ci = '0; #1;
        check(dr_is_null(co), "NULL");
      end
      check(dr_is_data(coe), "embedded holds while ki high");
      ki = 1'b0; #1;
      check(dr_is_null(coe) && koe, "embedded NULL");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
