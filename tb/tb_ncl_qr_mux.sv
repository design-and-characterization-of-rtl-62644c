// tb_ncl_qr_mux: self-checking test of the quad-rail word multiplexer.
//
// One source at a time carries a random two-digit quad-rail word; F must
// show it, hold it while the source stays DATA, and be NULL once all sources
// are NULL.
module tb_ncl_qr_mux;
  import ncl_pkg::*;
  int checks = 0;
  int failures = 0;
  qr_t [1:0] src [8];
  qr_t [1:0] f;

  logic [1:0] unused_ko;
  ncl_qr_mux #(.N(8)) dut (.rst(1'b0), .ki(1'b0), .src(src), .f(f), .ko(unused_ko));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int k = 0; k < 8; k++) src[k] = '0;
    #1;
    for (int n = 0; n < 400; n++) begin
      automatic int k = $urandom_range(7, 0);
      automatic logic [3:0] v = 4'($urandom);
      src[k] = {qr_enc(v[3:2]), qr_enc(v[1:0])}; #1;
      check(f == src[k], $sformatf("source %0d", k));
      src[k] = '0; #1;
      check(f == '0, "NULL");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
