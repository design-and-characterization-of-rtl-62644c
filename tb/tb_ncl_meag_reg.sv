// tb_ncl_meag_reg: self-checking test of the 8-rail MEAG register.
//
// Reset to all-low; a one-hot rail passes only with ki high, is held while
// ki stays high after the input drops, clears once ki is low; ko is high
// exactly when all outputs are low.
module tb_ncl_meag_reg;
  int checks = 0;
  int failures = 0;
  logic       rst, ki, ko;
  logic [7:0] m, q;

  ncl_meag_reg #(.N(8)) dut (.rst(rst), .ki(ki), .m(m), .q(q), .ko(ko));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst = 1'b1; ki = 1'b1; m = 8'hff; #1;
    check(q == '0 && ko, "reset");
    m = '0; rst = 1'b0; ki = 1'b0; #1;
    for (int n = 0; n < 160; n++) begin
      automatic int k = $urandom_range(7, 0);
      m = 8'(1 << k); #1;
      check(q == '0, "blocked while ki low");
      ki = 1'b1; #1;
      check(q == 8'(1 << k) && !ko, "rail passes");
      m = '0; #1;
      check(q == 8'(1 << k), "held while ki high");
      ki = 1'b0; #1;
      check(q == '0 && ko, "cleared with ki low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
