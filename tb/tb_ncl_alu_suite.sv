// tb_ncl_alu_suite: end-to-end test of all ten ALU architectures (five
// dual-rail, five quad-rail), at their default parameters, driven
// concurrently.
//
// For each architecture an independent producer sends all 4096 combinations
// of S, A, B and Cin (in its own random order) as four-phase DATA/NULL cycles,
// and an independent consumer with random delays waits for complete DATA on
// F and Cout, checks it against an arithmetic model of the function table,
// lowers ki, waits for NULL and raises ki again. Results must arrive in the
// order the operands were sent.
// The quad-rail channels get the same treatment with quad-rail encoded
// operands (A, B, F as two digits; S as S2 and S(1:0)).
// Every fourth operand set is sent with one randomly chosen input bit or
// quad-rail digit held back for a while; ko must stay high until that bit arrives (input
// completeness: no architecture may acknowledge partial DATA).
// Mechanisms counted, each must occur at least once:
//   all:            each of the eight operations (512 times each), held-back
//                   input bits;
//   pipelined (dual- and quad-rail): two and three operations in flight, a
//                   one-stage operation accepted behind a subtract/add still
//                   in flight;
//   all NCR forms (dual- and quad-rail): operations taken by copy 0 and by
//                   copy 1, two operations in flight at once.
module tb_ncl_alu_suite;
  import ncl_pkg::*;

  localparam int NVEC = 4096;
  localparam int NA = NUM_DR_ARCH;
  localparam int NQ = NUM_QR_ARCH;

  int checks = 0;
  int failures = 0;

  logic       rst;
  dr_t  [3:0] a    [NA];
  dr_t  [3:0] b    [NA];
  dr_t        cin  [NA];
  dr_t  [2:0] s    [NA];
  logic       ki   [NA];
  dr_t  [3:0] f    [NA];
  dr_t        cout [NA];
  logic       ko   [NA];

  qr_t  [1:0] q_a    [NQ];
  qr_t  [1:0] q_b    [NQ];
  dr_t        q_cin  [NQ];
  dr_t        q_s2   [NQ];
  qr_t        q_s10  [NQ];
  logic       q_ki   [NQ];
  qr_t  [1:0] q_f    [NQ];
  dr_t        q_cout [NQ];
  logic       q_ko   [NQ];

  ncl_alu_suite dut (
    .rst(rst), .a(a), .b(b), .cin(cin), .s(s), .ki(ki), .f(f), .cout(cout), .ko(ko),
    .q_a(q_a), .q_b(q_b), .q_cin(q_cin), .q_s2(q_s2), .q_s10(q_s10), .q_ki(q_ki),
    .q_f(q_f), .q_cout(q_cout), .q_ko(q_ko)
  );

  int q_delivered  [NQ];
  int q_held_back  [NQ];
  int q_two_in_flight [NQ];
  int q_three_in_flight [NQ];
  int q_behind_slow [NQ];
  int q_op_seen    [NQ][8];
  int q_copy_taken [NQ][2];

  int delivered     [NA];
  int held_back     [NA];
  int max_in_flight [NA];
  int two_in_flight [NA];
  int three_in_flight [NA];
  int behind_slow   [NA];
  int op_seen       [NA][8];
  int copy_taken    [NA][2];

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
      // A broken architecture can stall its handshake; stop early rather
      // than wait for the watchdog.
      if (failures >= 10) begin
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  endtask

  function automatic logic out_all_data(input int k);
    logic ok = dr_is_data(cout[k]);
    for (int i = 0; i < 4; i++) ok &= dr_is_data(f[k][i]);
    return ok;
  endfunction

  function automatic logic out_all_null(input int k);
    logic ok = dr_is_null(cout[k]);
    for (int i = 0; i < 4; i++) ok &= dr_is_null(f[k][i]);
    return ok;
  endfunction

  // Drive the 12 input bits of architecture k; bits whose mask bit is 0 are
  // left NULL.
  task automatic drive(input int k, input logic [11:0] v, input logic [11:0] mask);
    for (int i = 0; i < 4; i++) begin
      a[k][i] = mask[i]   ? dr_enc(v[i])   : DR_NULL;
      b[k][i] = mask[4+i] ? dr_enc(v[4+i]) : DR_NULL;
    end
    cin[k] = mask[8] ? dr_enc(v[8]) : DR_NULL;
    for (int i = 0; i < 3; i++) s[k][i] = mask[9+i] ? dr_enc(v[9+i]) : DR_NULL;
  endtask

  // Which NCR copy holds the input turn (0 for the other architectures).
  function automatic int ncr_turn(input int k);
    if (k == ARCH_NCR)     return int'(dut.u_ncr.u_ctrl.t1);
    if (k == ARCH_NCR_EMB) return int'(dut.u_ncr_emb.u_ctrl.t1);
    return 0;
  endfunction

  task automatic run(input int k);
    logic [11:0] order [NVEC];
    logic [4:0]  expq [$];
    logic [2:0]  opq [$];
    int          in_flight = 0;
    logic [2:0]  last_op = 3'd0;
    for (int v = 0; v < NVEC; v++) order[v] = 12'(v);
    order.shuffle();
    fork
      // Producer.
      for (int v = 0; v < NVEC; v++) begin
        automatic logic [11:0] vec = order[v];
        automatic int turn;
        while (!ko[k]) #1;
        turn = ncr_turn(k);
        if (v % 4 == 0) begin
          automatic int hold = $urandom_range(11, 0);
          drive(k, vec, ~(12'd1 << hold));
          #($urandom_range(6, 2));
          check(ko[k], $sformatf("arch %0d: ko fell with input bit %0d still NULL", k, hold));
          held_back[k]++;
        end
        drive(k, vec, '1);
        expq.push_back(alu_ref(vec[11:9], vec[3:0], vec[7:4], vec[8]));
        opq.push_back(vec[11:9]);
        while (ko[k]) #1;
        copy_taken[k][turn]++;
        in_flight++;
        if (in_flight > max_in_flight[k]) max_in_flight[k] = in_flight;
        if (in_flight >= 2) two_in_flight[k]++;
        if (in_flight >= 3) three_in_flight[k]++;
        if (in_flight >= 2 && last_op >= 3'd6 && vec[11:9] < 3'd6) behind_slow[k]++;
        last_op = vec[11:9];
        #($urandom_range(3, 0));
        drive(k, '0, '0);
      end
      // Consumer.
      for (int n = 0; n < NVEC; n++) begin
        automatic logic [4:0] got, exp;
        automatic logic [2:0] op;
        while (!out_all_data(k)) #1;
        #1;
        got = {cout[k].r1, f[k][3].r1, f[k][2].r1, f[k][1].r1, f[k][0].r1};
        exp = expq.pop_front();
        check(got == exp, $sformatf("arch %0d result %0d: got %h expected %h", k, n, got, exp));
        op = opq.pop_front();
        op_seen[k][op]++;
        delivered[k]++;
        in_flight--;
        #($urandom_range(12, 0));
        ki[k] = 1'b0;
        while (!out_all_null(k)) #1;
        #($urandom_range(3, 0));
        ki[k] = 1'b1;
      end
    join
  endtask

  // ---- Quad-rail channels ----

  function automatic logic q_out_all_data(input int k);
    return qr_is_data(q_f[k][0]) && qr_is_data(q_f[k][1]) && dr_is_data(q_cout[k]);
  endfunction

  function automatic logic q_out_all_null(input int k);
    return q_f[k][0] == '0 && q_f[k][1] == '0 && q_cout[k] == DR_NULL;
  endfunction

  // Signal `hold` (0,1: A digits, 2,3: B digits, 4: Cin, 5: S2, 6: S(1:0))
  // is left NULL; -1 drives all; data=0 drives NULL.
  task automatic q_drive(input int k, input logic [11:0] v, input int hold, input logic data);
    q_a[k][0] = (data && hold != 0) ? qr_enc(v[1:0])  : '0;
    q_a[k][1] = (data && hold != 1) ? qr_enc(v[3:2])  : '0;
    q_b[k][0] = (data && hold != 2) ? qr_enc(v[5:4])  : '0;
    q_b[k][1] = (data && hold != 3) ? qr_enc(v[7:6])  : '0;
    q_cin[k]  = (data && hold != 4) ? dr_enc(v[8])    : DR_NULL;
    q_s2[k]   = (data && hold != 5) ? dr_enc(v[11])   : DR_NULL;
    q_s10[k]  = (data && hold != 6) ? qr_enc(v[10:9]) : '0;
  endtask

  function automatic int q_ncr_turn(input int k);
    if (k == QARCH_NCR)     return int'(dut.u_qr_ncr.u_ctrl.t1);
    if (k == QARCH_NCR_EMB) return int'(dut.u_qr_ncr_emb.u_ctrl.t1);
    return 0;
  endfunction

  task automatic q_run(input int k);
    logic [11:0] order [NVEC];
    logic [4:0]  expq [$];
    logic [2:0]  opq [$];
    int          in_flight = 0;
    logic [2:0]  last_op = '0;
    for (int v = 0; v < NVEC; v++) order[v] = 12'(v);
    order.shuffle();
    fork
      for (int v = 0; v < NVEC; v++) begin
        automatic logic [11:0] vec = order[v];
        automatic int turn;
        while (!q_ko[k]) #1;
        turn = q_ncr_turn(k);
        if (v % 4 == 0) begin
          automatic int hold = $urandom_range(6, 0);
          q_drive(k, vec, hold, 1'b1);
          #($urandom_range(6, 2));
          check(q_ko[k], $sformatf("qr arch %0d: ko fell with input %0d still NULL", k, hold));
          q_held_back[k]++;
        end
        q_drive(k, vec, -1, 1'b1);
        expq.push_back(alu_ref(vec[11:9], vec[3:0], vec[7:4], vec[8]));
        opq.push_back(vec[11:9]);
        while (q_ko[k]) #1;
        q_copy_taken[k][turn]++;
        in_flight++;
        if (in_flight >= 2) q_two_in_flight[k]++;
        if (in_flight >= 3) q_three_in_flight[k]++;
        if (in_flight >= 2 && last_op >= 3'd6 && vec[11:9] < 3'd6) q_behind_slow[k]++;
        last_op = vec[11:9];
        #($urandom_range(3, 0));
        q_drive(k, '0, -1, 1'b0);
      end
      for (int n = 0; n < NVEC; n++) begin
        automatic logic [4:0] got, exp;
        automatic logic [2:0] op;
        while (!q_out_all_data(k)) #1;
        #1;
        got = {q_cout[k].r1, qr_val(q_f[k][1]), qr_val(q_f[k][0])};
        exp = expq.pop_front();
        op = opq.pop_front();
        check(got == exp, $sformatf("qr arch %0d result %0d: got %h expected %h", k, n, got, exp));
        q_op_seen[k][op]++;
        q_delivered[k]++;
        in_flight--;
        #($urandom_range(12, 0));
        q_ki[k] = 1'b0;
        while (!q_out_all_null(k)) #1;
        #($urandom_range(3, 0));
        q_ki[k] = 1'b1;
      end
    join
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1;
    for (int k = 0; k < NA; k++) begin
      ki[k] = 1'b1;
      drive(k, '0, '0);
    end
    for (int k = 0; k < NQ; k++) begin
      q_ki[k] = 1'b1;
      q_drive(k, '0, -1, 1'b0);
    end
    #5;
    for (int k = 0; k < NQ; k++)
      check(q_out_all_null(k) && q_ko[k], $sformatf("qr arch %0d: NULL and ko high after reset", k));
    for (int k = 0; k < NA; k++)
      check(out_all_null(k) && ko[k], $sformatf("arch %0d: NULL and ko high after reset", k));
    rst = 1'b0;
    #5;
    fork
      run(ARCH_NP);
      run(ARCH_NP_EMB);
      run(ARCH_PIPE);
      run(ARCH_NCR);
      run(ARCH_NCR_EMB);
      q_run(QARCH_NP);
      q_run(QARCH_NP_EMB);
      q_run(QARCH_NCR);
      q_run(QARCH_NCR_EMB);
      q_run(QARCH_PIPE);
    join
    for (int k = 0; k < NA; k++) begin
      $display("arch %0d (%s): %0d results, %0d held-back inputs, max %0d in flight",
               k, dr_arch_e'(k), delivered[k], held_back[k], max_in_flight[k]);
      check(delivered[k] == NVEC, $sformatf("arch %0d: all results delivered", k));
      check(held_back[k] > 0, $sformatf("arch %0d: held-back input exercised", k));
      for (int op = 0; op < 8; op++)
        check(op_seen[k][op] == NVEC / 8, $sformatf("arch %0d: operation %0d count", k, op));
    end
    $display("pipelined: >=2 in flight %0d, >=3 in flight %0d, fast behind slow %0d",
             two_in_flight[ARCH_PIPE], three_in_flight[ARCH_PIPE], behind_slow[ARCH_PIPE]);
    check(two_in_flight[ARCH_PIPE] > 0, "pipelined: two operations in flight");
    check(three_in_flight[ARCH_PIPE] > 0, "pipelined: three operations in flight");
    check(behind_slow[ARCH_PIPE] > 0, "pipelined: fast operation behind subtract/add");
    for (int k = ARCH_NCR; k <= ARCH_NCR_EMB; k++) begin
      $display("%s: copy 0 took %0d, copy 1 took %0d, two in flight %0d",
               dr_arch_e'(k), copy_taken[k][0], copy_taken[k][1], two_in_flight[k]);
      check(copy_taken[k][0] > 0 && copy_taken[k][1] > 0, $sformatf("arch %0d: both copies used", k));
      check(two_in_flight[k] > 0, $sformatf("arch %0d: copies overlapped", k));
    end
    for (int k = 0; k < NQ; k++) begin
      $display("qr arch %0d (%s): %0d results, %0d held-back inputs",
               k, qr_arch_e'(k), q_delivered[k], q_held_back[k]);
      check(q_delivered[k] == NVEC, $sformatf("qr arch %0d: all results delivered", k));
      check(q_held_back[k] > 0, $sformatf("qr arch %0d: held-back input exercised", k));
      for (int op = 0; op < 8; op++)
        check(q_op_seen[k][op] == NVEC / 8, $sformatf("qr arch %0d: operation %0d count", k, op));
    end
    for (int k = QARCH_NCR; k <= QARCH_NCR_EMB; k++) begin
      $display("%s: copy 0 took %0d, copy 1 took %0d, two in flight %0d",
               qr_arch_e'(k), q_copy_taken[k][0], q_copy_taken[k][1], q_two_in_flight[k]);
      check(q_copy_taken[k][0] > 0 && q_copy_taken[k][1] > 0, $sformatf("qr arch %0d: both copies used", k));
      check(q_two_in_flight[k] > 0, $sformatf("qr arch %0d: copies overlapped", k));
    end
    $display("qr pipelined: >=2 in flight %0d, >=3 in flight %0d, fast behind slow %0d",
             q_two_in_flight[QARCH_PIPE], q_three_in_flight[QARCH_PIPE], q_behind_slow[QARCH_PIPE]);
    check(q_two_in_flight[QARCH_PIPE] > 0, "qr pipelined: two operations in flight");
    check(q_three_in_flight[QARCH_PIPE] > 0, "qr pipelined: three operations in flight");
    check(q_behind_slow[QARCH_PIPE] > 0, "qr pipelined: fast operation behind subtract/add");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
