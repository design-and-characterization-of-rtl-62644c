// tb_ncl_qr_alu: end-to-end test of the quad-rail NCL ALU, in its plain form
// (EMBED=0) and with embedded registration (EMBED=1), run concurrently.
//
// For each form, a producer and a consumer with random delays run
// concurrently. The producer sends all 4096 combinations of S, A, B and Cin
// in random order as four-phase DATA/NULL cycles; for every other one it
// first sends all but one randomly chosen input signal (a digit of A or B,
// Cin, S2 or S(1:0)) and checks that ko stays high until that signal arrives
// (input completeness). The consumer waits for complete DATA on F and Cout,
// checks it against the function table, lowers ki, waits for NULL and raises
// ki. Counted and required: each operation 512 times, held-back inputs.
module tb_ncl_qr_alu;
  import ncl_pkg::*;

  localparam int NVEC = 4096;
  int checks = 0;
  int failures = 0;

  logic      rst;
  logic      ki   [2];
  logic      ko   [2];
  qr_t [1:0] a    [2];
  qr_t [1:0] b    [2];
  qr_t [1:0] f    [2];
  qr_t       s10  [2];
  dr_t       cin  [2];
  dr_t       s2   [2];
  dr_t       cout [2];

  for (genvar e = 0; e < 2; e++) begin : g_dut
    ncl_qr_alu #(.EMBED(e[0])) dut (
      .rst(rst), .a(a[e]), .b(b[e]), .cin(cin[e]), .s2(s2[e]), .s10(s10[e]), .ki(ki[e]),
      .f(f[e]), .cout(cout[e]), .ko(ko[e])
    );
  end

  int op_seen   [2][8];
  int held_back [2];
  int delivered [2];

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic logic out_all_data(input int e);
    return qr_is_data(f[e][0]) && qr_is_data(f[e][1]) && dr_is_data(cout[e]);
  endfunction

  function automatic logic out_all_null(input int e);
    return f[e][0] == '0 && f[e][1] == '0 && cout[e] == DR_NULL;
  endfunction

  // Input signal `hold` (0,1: A digits, 2,3: B digits, 4: Cin, 5: S2,
  // 6: S(1:0)) is left NULL; -1 drives all, and data=0 drives NULL.
  task automatic drive(input int e, input logic [11:0] v, input int hold, input logic data);
    a[e][0] = (data && hold != 0) ? qr_enc(v[1:0])  : '0;
    a[e][1] = (data && hold != 1) ? qr_enc(v[3:2])  : '0;
    b[e][0] = (data && hold != 2) ? qr_enc(v[5:4])  : '0;
    b[e][1] = (data && hold != 3) ? qr_enc(v[7:6])  : '0;
    cin[e]  = (data && hold != 4) ? dr_enc(v[8])    : DR_NULL;
    s2[e]   = (data && hold != 5) ? dr_enc(v[11])   : DR_NULL;
    s10[e]  = (data && hold != 6) ? qr_enc(v[10:9]) : '0;
  endtask

  task automatic run(input int e);
    logic [11:0] order [NVEC];
    logic [4:0]  expq [$];
    logic [2:0]  opq [$];
    for (int v = 0; v < NVEC; v++) order[v] = 12'(v);
    order.shuffle();
    fork
      for (int v = 0; v < NVEC; v++) begin
        automatic logic [11:0] vec = order[v];
        while (!ko[e]) #1;
        if (v % 2 == 0) begin
          automatic int hold = $urandom_range(6, 0);
          drive(e, vec, hold, 1'b1);
          #($urandom_range(6, 2));
          check(ko[e], $sformatf("EMBED=%0d: ko fell with input signal %0d NULL", e, hold));
          held_back[e]++;
        end
        drive(e, vec, -1, 1'b1);
        expq.push_back(alu_ref(vec[11:9], vec[3:0], vec[7:4], vec[8]));
        opq.push_back(vec[11:9]);
        while (ko[e]) #1;
        #($urandom_range(3, 0));
        drive(e, '0, -1, 1'b0);
      end
      for (int n = 0; n < NVEC; n++) begin
        automatic logic [4:0] got, exp;
        automatic logic [2:0] op;
        while (!out_all_data(e)) #1;
        #1;
        got = {cout[e].r1, qr_val(f[e][1]), qr_val(f[e][0])};
        exp = expq.pop_front();
        op = opq.pop_front();
        check(got == exp, $sformatf("EMBED=%0d result %0d (op %0d): got %h expected %h",
                                    e, n, op, got, exp));
        op_seen[e][op]++;
        delivered[e]++;
        #($urandom_range(12, 0));
        ki[e] = 1'b0;
        while (!out_all_null(e)) #1;
        #($urandom_range(3, 0));
        ki[e] = 1'b1;
      end
    join
  endtask

  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst = 1'b1;
    for (int e = 0; e < 2; e++) begin
      ki[e] = 1'b1;
      drive(e, '0, -1, 1'b0);
    end
    #5;
    for (int e = 0; e < 2; e++) check(out_all_null(e) && ko[e], "NULL and ko high after reset");
    rst = 1'b0;
    #5;
    fork
      run(0);
      run(1);
    join
    for (int e = 0; e < 2; e++) begin
      for (int k = 0; k < 8; k++)
        check(op_seen[e][k] == NVEC / 8, $sformatf("EMBED=%0d operation %0d count", e, k));
      $display("EMBED=%0d: %0d results, %0d held-back inputs", e, delivered[e], held_back[e]);
      check(held_back[e] > 0, "held-back input exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
