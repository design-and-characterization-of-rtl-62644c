// tb_ncl_qr_meag_conv: exhaustive test of the quad-rail select conversion.
//
// For all eight operations: exactly rail k is high once S2 and S(1:0) are
// DATA; no rail is high with either of them NULL; the rail stays high until
// both are NULL.
module tb_ncl_qr_meag_conv;
  import ncl_pkg::*;
  int checks = 0;
  int failures = 0;
  dr_t        s2;
  qr_t        s10;
  logic [7:0] sel;

  logic unused_ko;
  ncl_qr_meag_conv dut (.rst(1'b0), .ki(1'b0), .s2(s2), .s10(s10), .sel(sel), .ko(unused_ko));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    s2 = DR_NULL; s10 = '0; #1;
    for (int n = 0; n < 64; n++) begin
      automatic logic [2:0] k = 3'(n);
      automatic logic s2_first = n[3];
      if (s2_first) s2 = dr_enc(k[2]); else s10 = qr_enc(k[1:0]);
      #1;
      check(sel == '0, "waits for both select signals");
      s2 = dr_enc(k[2]); s10 = qr_enc(k[1:0]); #1;
      check(sel == 8'(1 << k), $sformatf("operation %0d", k));
      if (n[4]) s2 = DR_NULL; else s10 = '0;
      #1;
      check(sel == 8'(1 << k), "held until both are NULL");
      s2 = DR_NULL; s10 = '0; #1;
      check(sel == '0, "NULL");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
