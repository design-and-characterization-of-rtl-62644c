// tb_ncl_alu_ncr: end-to-end test of the NCR dual-rail ALU at its default
// parameters (two embedded-registration ALU copies).
//
// A producer and a consumer run concurrently with random delays. The
// producer sends all 4096 input combinations (S, A, B, Cin), in random order,
// as four-phase
// DATA/NULL cycles on the input channel and queues the expected result from an
// arithmetic model of the function table; the consumer waits for complete
// DATA on F and Cout, compares it with the head of the queue (so results must
// come back in order), lowers ki, waits for NULL and raises ki.
// Mechanisms counted, each must occur at least once: operations taken by
// copy 0 and by copy 1 (alternation), two operations in flight at once (one
// copy working on DATA while the other has not yet delivered, the point of
// NCR), and each of the eight operations.
module tb_ncl_alu_ncr;
  import ncl_pkg::*;

  int checks = 0;
  int failures = 0;

  logic       rst, ki, ko;
  dr_t  [3:0] a, b, f;
  dr_t        cin, cout;
  dr_t  [2:0] s;

  ncl_alu_ncr dut (
    .rst(rst), .a(a), .b(b), .cin(cin), .s(s), .ki(ki), .f(f), .cout(cout), .ko(ko)
  );

  logic [4:0] expq[$];
  int         in_flight = 0;
  int         max_in_flight = 0;
  int         two_in_flight = 0;
  int         copy_taken [2];
  int         op_seen [8];
  int         delivered = 0;
  localparam int NVEC = 4096;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic logic out_all_data();
    logic ok = dr_is_data(cout);
    for (int i = 0; i < 4; i++) ok &= dr_is_data(f[i]);
    return ok;
  endfunction

  function automatic logic out_all_null();
    logic ok = dr_is_null(cout);
    for (int i = 0; i < 4; i++) ok &= dr_is_null(f[i]);
    return ok;
  endfunction

  task automatic drive(input logic [11:0] v, input logic data);
    for (int i = 0; i < 4; i++) begin
      a[i] = data ? dr_enc(v[i]) : '0;
      b[i] = data ? dr_enc(v[4+i]) : '0;
    end
    cin = data ? dr_enc(v[8]) : '0;
    for (int i = 0; i < 3; i++) s[i] = data ? dr_enc(v[9+i]) : '0;
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired after %0d results", delivered);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [11:0] order [NVEC];
  logic [2:0]  opq [$];

  initial begin
    for (int v = 0; v < NVEC; v++) order[v] = 12'(v);
    order.shuffle();
    rst = 1'b1; ki = 1'b1;
    drive('0, 1'b0);
    #5;
    check(out_all_null() && ko, "NULL outputs and ko high after reset");
    rst = 1'b0;
    #5;
    fork
      // Producer.
      for (int v = 0; v < NVEC; v++) begin
        automatic logic [11:0] vec = order[v];
        while (!ko) #1;
        drive(vec, 1'b1);
        expq.push_back(alu_ref(vec[11:9], vec[3:0], vec[7:4], vec[8]));
        opq.push_back(vec[11:9]);
        while (ko) #1;
        copy_taken[dut.u_ctrl.t1]++;
        in_flight++;
        if (in_flight > max_in_flight) max_in_flight = in_flight;
        if (in_flight >= 2) two_in_flight++;
        #($urandom_range(3, 0));
        drive('0, 1'b0);
      end
      // Consumer.
      for (int n = 0; n < NVEC; n++) begin
        automatic logic [4:0] got, exp;
        while (!out_all_data()) #1;
        #1;
        got = {cout.r1, f[3].r1, f[2].r1, f[1].r1, f[0].r1};
        exp = expq.pop_front();
        check(got == exp, $sformatf("result %0d: got %h expected %h", n, got, exp));
        op_seen[opq.pop_front()]++;
        delivered++;
        in_flight--;
        #($urandom_range(12, 0));
        ki = 1'b0;
        while (!out_all_null()) #1;
        #($urandom_range(3, 0));
        ki = 1'b1;
      end
    join
    for (int k = 0; k < 8; k++) check(op_seen[k] == NVEC / 8, $sformatf("operation %0d count", k));
    $display("copy 0 took %0d operations, copy 1 took %0d", copy_taken[0], copy_taken[1]);
    $display("two operations in flight %0d times (max %0d)", two_in_flight, max_in_flight);
    check(copy_taken[0] > 0 && copy_taken[1] > 0, "both copies used");
    check(two_in_flight > 0, "overlap of the two copies happened");
    check(delivered == NVEC, "all results delivered");
    check(expq.size() == 0, "no result missing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
