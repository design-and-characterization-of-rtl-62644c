// tb_ncl_mux_reg: self-checking test of the pipelined ALU's multiplexer
// register.
//
// One select-register output at a time carries DATA. For k < 4 the result
// must appear on F with Cout = DATA0 (made from F0); for k >= 4 Cout must be
// that function's carry. DATA needs ki high; NULL needs ki low.
module tb_ncl_mux_reg;
  import ncl_pkg::*;
  int checks = 0;
  int failures = 0;
  logic       rst, ki;
  dr_t  [3:0] fk [8];
  dr_t        ck [4];
  dr_t  [3:0] f;
  dr_t        cout;
  logic [4:0] ko;

  ncl_mux_reg dut (.rst(rst), .ki(ki), .fk(fk), .ck(ck), .f(f), .cout(cout), .ko(ko));

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
    rst = 1'b1; ki = 1'b1;
    for (int k = 0; k < 8; k++) fk[k] = '0;
    for (int k = 0; k < 4; k++) ck[k] = '0;
    #1;
    check(f == '0 && cout == '0, "reset");
    rst = 1'b0; ki = 1'b0; #1;
    for (int n = 0; n < 240; n++) begin
      automatic int k = n % 8;
      automatic logic [3:0] v = 4'($urandom);
      automatic logic c = 1'($urandom);
      fk[k] = enc4(v);
      if (k >= 4) ck[k-4] = dr_enc(c);
      #1;
      check(f == '0 && cout == '0, "waits for ki");
      ki = 1'b1; #1;
      check(f == enc4(v), $sformatf("F from source %0d", k));
      check(cout == ((k < 4) ? dr_enc(1'b0) : dr_enc(c)), $sformatf("Cout for source %0d", k));
      check(ko == '0, "ko low for DATA");
      fk[k] = '0;
      if (k >= 4) ck[k-4] = '0;
      #1;
      check(f == enc4(v), "held while ki high");
      ki = 1'b0; #1;
      check(f == '0 && cout == '0 && ko == '1, "NULL");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
