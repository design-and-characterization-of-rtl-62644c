// tb_ncl_sel_reg: self-checking test of the MEAG-gated select register.
//
// DATA must need all three of data, MEAG rail and ki; it is held until all
// three have dropped; ko is the per-bit NULL indication.
module tb_ncl_sel_reg;
  import ncl_pkg::*;
  int checks = 0;
  int failures = 0;
  logic       rst, ki, m;
  dr_t  [4:0] d, q;
  logic [4:0] ko;

  ncl_sel_reg #(.W(5)) dut (.rst(rst), .ki(ki), .m(m), .d(d), .q(q), .ko(ko));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic dr_t [4:0] enc5(input logic [4:0] v);
    dr_t [4:0] r;
    for (int i = 0; i < 5; i++) r[i] = dr_enc(v[i]);
    return r;
  endfunction

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst = 1'b1; ki = 1'b1; m = 1'b1; d = enc5('1); #1;
    check(q == '0, "reset");
    rst = 1'b0; ki = 1'b0; m = 1'b0; d = '0; #1;
    for (int n = 0; n < 200; n++) begin
      automatic logic [4:0] v = 5'($urandom);
      d = enc5(v); ki = 1'b1; #1;
      check(q == '0 && ko == '1, "waits for the MEAG rail");
      m = 1'b1; ki = 1'b0; #1;
      check(q == '0, "waits for ki");
      ki = 1'b1; #1;
      check(q == enc5(v) && ko == '0, "DATA passes");
      d = '0; ki = 1'b0; #1;
      check(q == enc5(v), "held while the MEAG rail is up");
      m = 1'b0; #1;
      check(q == '0 && ko == '1, "cleared");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
