// tb_ncl_qr_demux: self-checking test of the quad-rail demultiplexer.
//
// For each select rail and random operands: A and B reach the selected
// function (Cin only functions 4-7), every other function sees NULL, and all
// outputs are NULL again once select and operands are NULL.
module tb_ncl_qr_demux;
  import ncl_pkg::*;
  int checks = 0;
  int failures = 0;
  logic [7:0] sel;
  qr_t  [1:0] a, b;
  dr_t        cin;
  qr_t  [1:0] fa [8];
  qr_t  [1:0] fb [8];
  dr_t        fc [8];

  ncl_qr_demux dut (.sel(sel), .a(a), .b(b), .cin(cin), .fa(fa), .fb(fb), .fcin(fc));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    sel = '0; a = '0; b = '0; cin = DR_NULL; #1;
    for (int n = 0; n < 400; n++) begin
      automatic int k = n % 8;
      automatic logic [8:0] v = 9'($urandom);
      a = {qr_enc(v[3:2]), qr_enc(v[1:0])};
      b = {qr_enc(v[7:6]), qr_enc(v[5:4])};
      cin = dr_enc(v[8]); #1;
      for (int j = 0; j < 8; j++) check(fa[j] == '0 && fb[j] == '0 && fc[j] == DR_NULL, "nothing without select");
      sel = 8'(1 << k); #1;
      for (int j = 0; j < 8; j++) begin
        if (j == k) begin
          check(fa[j] == a && fb[j] == b, "A and B to the selected function");
          check(fc[j] == ((j >= 4) ? cin : DR_NULL), "Cin only to functions 4-7");
        end else begin
          check(fa[j] == '0 && fb[j] == '0 && fc[j] == DR_NULL, "other functions NULL");
        end
      end
      sel = '0; a = '0; b = '0; cin = DR_NULL; #1;
      check(fa[k] == '0 && fb[k] == '0 && fc[k] == DR_NULL, "NULL");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
