// tb_ncl_meag_conv: self-checking test of the select-to-MEAG conversion, in
// combinational form and as an embedded register (EMBED=1).
//
// For all 8 select values: the matching rail, and only it, rises once all
// three select bits are DATA (not before), stays up while the bits return
// to NULL until the last one is NULL (hysteresis), and ko follows. The
// embedded form must also wait for ki high before DATA and ki low before NULL.
module tb_ncl_meag_conv;
  import ncl_pkg::*;

  int checks = 0;
  int failures = 0;

  logic       rst, ki;
  dr_t  [2:0] s;
  logic [7:0] sel_c, sel_e;
  logic       ko_c, ko_e;

  ncl_meag_conv #(.EMBED(1'b0)) u_c (.rst(1'b0), .ki(1'b0), .s(s), .sel(sel_c), .ko(ko_c));
  ncl_meag_conv #(.EMBED(1'b1)) u_e (.rst(rst), .ki(ki), .s(s), .sel(sel_e), .ko(ko_e));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst = 1'b1; ki = 1'b0; s = '0; #1;
    check(sel_e == '0, "embedded reset");
    rst = 1'b0; #1;
    for (int rep = 0; rep < 4; rep++) begin
      for (int k = 0; k < 8; k++) begin
        automatic int last = $urandom_range(2, 0);
        for (int i = 0; i < 3; i++) if (i != last) s[i] = dr_enc(k[i]);
        #1;
        check(sel_c == '0, "no rail before all select bits are DATA");
        s[last] = dr_enc(k[last]); #1;
        check(sel_c == 8'(1 << k), $sformatf("rail %0d after DATA", k));
        check(!ko_c, "ko low for DATA");
        check(sel_e == '0, "embedded waits for ki");
        ki = 1'b1; #1;
        check(sel_e == 8'(1 << k), $sformatf("embedded rail %0d", k));
        check(!ko_e, "embedded ko low");
        last = $urandom_range(2, 0);
        for (int i = 0; i < 3; i++) if (i != last) s[i] = '0;
        #1;
        check(sel_c == 8'(1 << k), "held until last select bit is NULL");
        s[last] = '0; #1;
        check(sel_c == '0 && ko_c, "NULL after all select bits NULL");
        check(sel_e == 8'(1 << k), "embedded holds while ki high");
        ki = 1'b0; #1;
        check(sel_e == '0 && ko_e, "embedded NULL with ki low");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
