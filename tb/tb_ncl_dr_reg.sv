// tb_ncl_dr_reg: self-checking test of the dual-rail NCL register.
//
// Checks reset to NULL, that DATA passes only while ki is high, that DATA is
// held when the input returns to NULL while ki is still high, that NULL passes
// once ki is low, that DATA is not taken while ki is low, and that each ko
// bit is high exactly when its output bit is NULL. Random 6-bit words.
module tb_ncl_dr_reg;
  import ncl_pkg::*;

  localparam int W = 6;
  int checks = 0;
  int failures = 0;

  logic         rst, ki;
  dr_t  [W-1:0] d, q;
  logic [W-1:0] ko;

  ncl_dr_reg #(.W(W)) dut (.rst(rst), .ki(ki), .d(d), .q(q), .ko(ko));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic dr_t [W-1:0] enc(input logic [W-1:0] v);
    dr_t [W-1:0] r;
    for (int i = 0; i < W; i++) r[i] = dr_enc(v[i]);
    return r;
  endfunction

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst = 1'b1; ki = 1'b1; d = enc('1);
    #1;
    check(q == '0, "reset gives NULL");
    check(ko == '1, "ko high after reset");
    d = '0; #1; rst = 1'b0; #1;
    for (int n = 0; n < 200; n++) begin
      automatic logic [W-1:0] v = W'($urandom);
      // DATA not taken while ki low.
      ki = 1'b0; d = enc(v); #1;
      check(q == '0, "DATA blocked while ki low");
      ki = 1'b1; #1;
      check(q == enc(v), "DATA passes with ki high");
      check(ko == '0, "ko low for DATA");
      d = '0; #1;
      check(q == enc(v), "DATA held while ki high");
      ki = 1'b0; #1;
      check(q == '0, "NULL passes with ki low");
      check(ko == '1, "ko high for NULL");
      ki = 1'b1; #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
