// tb_ncl_demux_reg: self-checking test of the demultiplexer register.
//
// For every select value: with its request ki[k] low nothing passes; with it
// high, A and B reach function k (and Cin for k >= 4) and all other sets stay
// NULL; ko_set[k] falls only when the set is complete, the other ko_set lines
// stay high; DATA is held until ki[k] is low and then cleared.
module tb_ncl_demux_reg;
  import ncl_pkg::*;
  int checks = 0;
  int failures = 0;
  logic       rst;
  logic [7:0] sel, ki, ko_set;
  dr_t  [3:0] a, b;
  dr_t        cin;
  dr_t  [3:0] fa [8];
  dr_t  [3:0] fb [8];
  dr_t        fc [8];

  ncl_demux_reg dut (.rst(rst), .sel(sel), .a(a), .b(b), .cin(cin), .ki(ki),
                     .fa(fa), .fb(fb), .fcin(fc), .ko_set(ko_set));

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
    rst = 1'b1; sel = '0; ki = '0; a = '0; b = '0; cin = '0; #1;
    rst = 1'b0; #1;
    check(ko_set == 8'hff, "all sets NULL after reset");
    for (int n = 0; n < 240; n++) begin
      automatic int k = n % 8;
      automatic logic [3:0] va = 4'($urandom);
      automatic logic [3:0] vb = 4'($urandom);
      automatic logic vc = 1'($urandom);
      sel = 8'(1 << k); a = enc4(va); b = enc4(vb);
      if (k >= 4) begin
        // Cin arrives last: the set must not be complete before it.
        #1; ki = 8'hff; #1;
        check(ko_set[k], "set not complete without Cin");
        cin = dr_enc(vc);
      end else begin
        cin = dr_enc(vc); #1; ki = 8'hff;
      end
      #1;
      for (int j = 0; j < 8; j++) begin
        if (j == k) begin
          check(fa[j] == enc4(va) && fb[j] == enc4(vb), "A and B to selected function");
          check(fc[j] == ((j >= 4) ? dr_enc(vc) : DR_NULL), "Cin to functions 4-7");
          check(!ko_set[j], "selected set complete");
        end else begin
          check(fa[j] == '0 && fb[j] == '0 && fc[j] == '0 && ko_set[j], "other sets NULL");
        end
      end
      sel = '0; a = '0; b = '0; cin = '0; #1;
      check(fa[k] == enc4(va), "held while ki high");
      ki[k] = 1'b0; #1;
      check(fa[k] == '0 && fb[k] == '0 && fc[k] == '0 && ko_set == 8'hff, "cleared");
      ki = '0; #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
