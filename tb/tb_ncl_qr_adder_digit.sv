// tb_ncl_qr_adder_digit: exhaustive test of the quad-rail digit adder.
//
// All 32 combinations of X, Y, Ci: {Co, S} must equal X + Y + Ci; with any one
// input NULL no output may be DATA; the outputs hold while only some inputs
// have returned to NULL and are NULL once all have.
module tb_ncl_qr_adder_digit;
  import ncl_pkg::*;
  int checks = 0;
  int failures = 0;
  qr_t x, y, s;
  dr_t ci, co;

  ncl_qr_adder_digit dut (.x(x), .y(y), .ci(ci), .s(s), .co(co));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    x = '0; y = '0; ci = DR_NULL; #1;
    for (int v = 0; v < 32; v++) begin
      automatic logic [4:0] vec = 5'(v);
      automatic logic [2:0] sum = 3'(vec[1:0]) + 3'(vec[3:2]) + 3'(vec[4]);
      for (int h = 0; h < 3; h++) begin
        x  = (h == 0) ? '0 : qr_enc(vec[1:0]);
        y  = (h == 1) ? '0 : qr_enc(vec[3:2]);
        ci = (h == 2) ? DR_NULL : dr_enc(vec[4]);
        #1;
        check(s == '0 && co == DR_NULL, "no output without all inputs");
        x = '0; y = '0; ci = DR_NULL; #1;
      end
      x = qr_enc(vec[1:0]); y = qr_enc(vec[3:2]); ci = dr_enc(vec[4]); #1;
      check(s == qr_enc(sum[1:0]) && co == dr_enc(sum[2]), $sformatf("sum of %h", vec));
      x = '0; ci = DR_NULL; #1;
      check(s == qr_enc(sum[1:0]) && co == dr_enc(sum[2]), "held while Y is DATA");
      y = '0; #1;
      check(s == '0 && co == DR_NULL, "NULL");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
