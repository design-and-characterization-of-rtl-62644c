// tb_ncl_alu_qrp: end-to-end test of the pipelined quad-rail NCL ALU.
//
// A producer and a consumer with random delays run concurrently. The
// producer sends all 4096 combinations of S, A, B and Cin in random order as
// four-phase DATA/NULL cycles; for every other one it first sends all but
// one randomly chosen input signal (a digit of A or B, Cin, S2 or S(1:0)) and
// checks that ko stays high until that signal arrives (input completeness).
// The consumer waits for complete DATA on F and Cout, checks it against the
// function table in order, lowers ki, waits for NULL and raises ki. Counted
// and required: each operation 512 times, held-back inputs, and operands
// accepted while at least two earlier ones were still in flight, including
// a logic or shift operation entering behind an add or subtract (the
// pipeline must keep results in order).
module tb_ncl_alu_qrp;
  import ncl_pkg::*;

  localparam int NVEC = 4096;
  int checks = 0;
  int failures = 0;

  logic      rst;
  logic      ki;
  logic      ko;
  qr_t [1:0] a, b, f;
  qr_t       s10;
  dr_t       cin, s2, cout;

  ncl_alu_qrp dut (
    .rst(rst), .a(a), .b(b), .cin(cin), .s2(s2), .s10(s10), .ki(ki),
    .f(f), .cout(cout), .ko(ko)
  );

  int op_seen [8];
  int held_back, delivered, presented;
  int in_flight2, fast_behind_slow;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic logic out_all_data();
    return qr_is_data(f[0]) && qr_is_data(f[1]) && dr_is_data(cout);
  endfunction

  function automatic logic out_all_null();
    return f[0] == '0 && f[1] == '0 && cout == DR_NULL;
  endfunction

  // Input signal `hold` (0,1: A digits, 2,3: B digits, 4: Cin, 5: S2,
  // 6: S(1:0)) is left NULL; -1 drives all, and data=0 drives NULL.
  task automatic drive(input logic [11:0] v, input int hold, input logic data);
    a[0] = (data && hold != 0) ? qr_enc(v[1:0])  : '0;
    a[1] = (data && hold != 1) ? qr_enc(v[3:2])  : '0;
    b[0] = (data && hold != 2) ? qr_enc(v[5:4])  : '0;
    b[1] = (data && hold != 3) ? qr_enc(v[7:6])  : '0;
    cin  = (data && hold != 4) ? dr_enc(v[8])    : DR_NULL;
    s2   = (data && hold != 5) ? dr_enc(v[11])   : DR_NULL;
    s10  = (data && hold != 6) ? qr_enc(v[10:9]) : '0;
  endtask

  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [11:0] order [NVEC];
    logic [4:0]  expq [$];
    logic [2:0]  opq [$];
    logic [2:0]  last_op;
    rst = 1'b1;
    ki = 1'b1;
    drive('0, -1, 1'b0);
    #5;
    check(out_all_null() && ko, "NULL and ko high after reset");
    rst = 1'b0;
    #5;
    for (int v = 0; v < NVEC; v++) order[v] = 12'(v);
    order.shuffle();
    last_op = '0;
    fork
      for (int v = 0; v < NVEC; v++) begin
        automatic logic [11:0] vec = order[v];
        while (!ko) #1;
        if (v % 2 == 0) begin
          automatic int hold = $urandom_range(6, 0);
          drive(vec, hold, 1'b1);
          #($urandom_range(6, 2));
          check(ko, $sformatf("ko fell with input signal %0d NULL", hold));
          held_back++;
        end
        drive(vec, -1, 1'b1);
        if (presented - delivered >= 2) begin
          in_flight2++;
          if (vec[11:9] < 3'd6 && last_op >= 3'd6) fast_behind_slow++;
        end
        presented++;
        last_op = vec[11:9];
        expq.push_back(alu_ref(vec[11:9], vec[3:0], vec[7:4], vec[8]));
        opq.push_back(vec[11:9]);
        while (ko) #1;
        #($urandom_range(3, 0));
        drive('0, -1, 1'b0);
      end
      for (int n = 0; n < NVEC; n++) begin
        automatic logic [4:0] got, exp;
        automatic logic [2:0] op;
        while (!out_all_data()) #1;
        #1;
        got = {cout.r1, qr_val(f[1]), qr_val(f[0])};
        exp = expq.pop_front();
        op = opq.pop_front();
        check(got == exp, $sformatf("result %0d (op %0d): got %h expected %h", n, op, got, exp));
        op_seen[op]++;
        delivered++;
        // A slow consumer lets operands pile up in the pipeline.
        #($urandom_range(n % 64 < 32 ? 40 : 12, 0));
        ki = 1'b0;
        while (!out_all_null()) #1;
        #($urandom_range(3, 0));
        ki = 1'b1;
      end
    join
    for (int k = 0; k < 8; k++)
      check(op_seen[k] == NVEC / 8, $sformatf("operation %0d count", k));
    $display("%0d results, %0d held-back inputs, %0d entered with >=2 in flight, %0d fast behind slow",
             delivered, held_back, in_flight2, fast_behind_slow);
    check(held_back > 0, "held-back input exercised");
    check(in_flight2 > 0, "pipeline overlap exercised");
    check(fast_behind_slow > 0, "fast operation behind slow one exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
