// tb_ncl_comp_special: self-checking test of the special completion for
// one-hot register stages, without and with an extra ordinary acknowledge.
//
// ko must fall as soon as any one set reports DATA (and, with the extra
// line, once that line is low too), and rise only once all sets and the extra
// line are back to NULL.
module tb_ncl_comp_special;
  int checks = 0;
  int failures = 0;
  logic [7:0] ack;
  logic       extra, ko0, ko1;

  ncl_comp_special #(.K(8), .E(0)) u0 (.ack(ack), .extra(1'b0), .ko(ko0));
  ncl_comp_special #(.K(8), .E(1)) u1 (.ack(ack), .extra(extra), .ko(ko1));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    ack = 8'hff; extra = 1'b1; #1;
    check(ko0 && ko1, "all NULL");
    for (int n = 0; n < 200; n++) begin
      automatic int k = $urandom_range(7, 0);
      automatic logic extra_first = 1'($urandom);
      if (extra_first) begin
        extra = 1'b0; #1;
        check(ko0 && ko1, "extra alone is not completion");
        ack[k] = 1'b0; #1;
      end else begin
        ack[k] = 1'b0; #1;
        check(!ko0 && ko1, "one set complete; still waiting for extra");
        extra = 1'b0; #1;
      end
      check(!ko0 && !ko1, "DATA complete");
      if (extra_first) begin
        ack[k] = 1'b1; #1;
        check(ko0 && !ko1, "waiting for extra NULL");
        extra = 1'b1; #1;
      end else begin
        extra = 1'b1; #1;
        check(!ko0 && !ko1, "waiting for set NULL");
        ack[k] = 1'b1; #1;
      end
      check(ko0 && ko1, "NULL complete");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
