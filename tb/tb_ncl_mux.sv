// tb_ncl_mux: self-checking test of the OR-type result multiplexer, 8
// sources (two levels) and 4 sources (one level), plain and as an embedded
// register (EMBED=1).
//
// One source at a time carries random DATA, the others NULL; the output must
// equal it, then return to NULL with the source. The embedded forms must take
// DATA only while ki is high, hold it until ki is low, and report ko.
module tb_ncl_mux;
  import ncl_pkg::*;

  int checks = 0;
  int failures = 0;

  logic       rst, ki;
  dr_t  [3:0] src8 [8];
  dr_t  [3:0] src4 [4];
  dr_t  [3:0] f8, f8e, f4, f4e;
  logic [3:0] ko8, ko8e, ko4, ko4e;

  ncl_mux #(.N(8), .W(4), .EMBED(1'b0)) u8  (.rst(1'b0), .ki(1'b0), .src(src8), .f(f8),  .ko(ko8));
  ncl_mux #(.N(8), .W(4), .EMBED(1'b1)) u8e (.rst(rst),  .ki(ki),   .src(src8), .f(f8e), .ko(ko8e));
  ncl_mux #(.N(4), .W(4), .EMBED(1'b0)) u4  (.rst(1'b0), .ki(1'b0), .src(src4), .f(f4),  .ko(ko4));
  ncl_mux #(.N(4), .W(4), .EMBED(1'b1)) u4e (.rst(rst),  .ki(ki),   .src(src4), .f(f4e), .ko(ko4e));

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
    rst = 1'b1; ki = 1'b0;
    for (int i = 0; i < 8; i++) src8[i] = '0;
    for (int i = 0; i < 4; i++) src4[i] = '0;
    #1;
    check(f8e == '0 && f4e == '0, "embedded reset");
    rst = 1'b0; #1;
    for (int n = 0; n < 400; n++) begin
      automatic int k8 = n % 8;
      automatic int k4 = n % 4;
      automatic logic [3:0] v = 4'($urandom);
      src8[k8] = enc4(v); src4[k4] = enc4(v); #1;
      check(f8 == enc4(v) && ko8 == '0, $sformatf("8-source, source %0d", k8));
      check(f4 == enc4(v) && ko4 == '0, $sformatf("4-source, source %0d", k4));
      check(f8e == '0 && f4e == '0, "embedded waits for ki");
      ki = 1'b1; #1;
      check(f8e == enc4(v) && ko8e == '0, "embedded 8-source DATA");
      check(f4e == enc4(v) && ko4e == '0, "embedded 4-source DATA");
      src8[k8] = '0; src4[k4] = '0; #1;
      check(f8 == '0 && ko8 == '1 && f4 == '0, "NULL passes");
      check(f8e == enc4(v) && f4e == enc4(v), "embedded holds while ki high");
      ki = 1'b0; #1;
      check(f8e == '0 && f4e == '0 && ko8e == '1 && ko4e == '1, "embedded NULL");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
