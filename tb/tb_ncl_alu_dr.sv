// tb_ncl_alu_dr: end-to-end test of the non-pipelined dual-rail NCL ALU, in
// both its plain form (EMBED=0) and its embedded-registration form (EMBED=1).
//
// A four-phase environment drives every one of the 4096 input combinations
// (S, A, B, Cin: 12 bits) as a DATA wavefront, waits for all five outputs to
// be DATA, compares them with an arithmetic model of the function table,
// lowers ki, returns the inputs to NULL, waits for NULL outputs and raises ki.
// In each cycle one randomly chosen input bit is held back (during DATA) or
// kept at DATA (during NULL) for a while; the outputs must not complete
// meanwhile, which checks input-completeness, including for the inputs an
// operation ignores (B for NOT/shifts, Cin for operations 0-3).
// Counts how often each operation, the held-back Cin and held-back B cases
// occurred, and fails if any never did.
module tb_ncl_alu_dr;
  import ncl_pkg::*;

  int checks = 0;
  int failures = 0;

  logic       rst;
  dr_t  [3:0] a   [2];
  dr_t  [3:0] b   [2];
  dr_t        cin [2];
  dr_t  [2:0] s   [2];
  logic       ki  [2];
  dr_t  [3:0] f   [2];
  dr_t        cout[2];
  logic       ko  [2];

  ncl_alu_dr u_plain (
    .rst(rst), .a(a[0]), .b(b[0]), .cin(cin[0]), .s(s[0]), .ki(ki[0]),
    .f(f[0]), .cout(cout[0]), .ko(ko[0])
  );
  ncl_alu_dr #(.EMBED(1'b1)) u_embedded (
    .rst(rst), .a(a[1]), .b(b[1]), .cin(cin[1]), .s(s[1]), .ki(ki[1]),
    .f(f[1]), .cout(cout[1]), .ko(ko[1])
  );

  int op_seen [8];
  int held_cin_unused = 0;
  int held_b_unused = 0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic logic out_all_data(input int d);
    logic ok = dr_is_data(cout[d]);
    for (int i = 0; i < 4; i++) ok &= dr_is_data(f[d][i]);
    return ok;
  endfunction

  function automatic logic out_all_null(input int d);
    logic ok = dr_is_null(cout[d]);
    for (int i = 0; i < 4; i++) ok &= dr_is_null(f[d][i]);
    return ok;
  endfunction

  function automatic logic [4:0] out_val(input int d);
    return {cout[d].r1, f[d][3].r1, f[d][2].r1, f[d][1].r1, f[d][0].r1};
  endfunction

  // Drive input bit `idx` (0-3 A, 4-7 B, 8 Cin, 9-11 S) of DUT d.
  task automatic drive_bit(input int d, input int idx, input dr_t v);
    if (idx < 4)       a[d][idx] = v;
    else if (idx < 8)  b[d][idx-4] = v;
    else if (idx == 8) cin[d] = v;
    else               s[d][idx-9] = v;
  endtask

  task automatic one_cycle(input int d, input logic [11:0] vec);
    logic [2:0] op;
    logic [3:0] va, vb;
    logic       vc;
    logic [4:0] exp;
    int         hold;
    op = vec[11:9]; vc = vec[8]; vb = vec[7:4]; va = vec[3:0];
    exp = alu_ref(op, va, vb, vc);
    hold = $urandom_range(11, 0);
    // DATA wavefront, one bit held back.
    wait (ko[d] == 1'b1);
    for (int i = 0; i < 12; i++) if (i != hold) drive_bit(d, i, dr_enc(vec[i]));
    #5;
    check(!out_all_data(d), $sformatf("dut%0d op%0d: outputs complete with input %0d missing",
                                      d, op, hold));
    if (hold == 8 && op < 4) held_cin_unused++;
    if (hold >= 4 && hold < 8 && (op == 3 || op == 4 || op == 5)) held_b_unused++;
    drive_bit(d, hold, dr_enc(vec[hold]));
    while (!out_all_data(d)) #1;
    #1;
    check(out_val(d) == exp, $sformatf("dut%0d op%0d A=%h B=%h C=%b: got %h expected %h",
                                       d, op, va, vb, vc, out_val(d), exp));
    op_seen[op]++;
    wait (ko[d] == 1'b0);
    ki[d] = 1'b0;
    // NULL wavefront, one bit left at DATA.
    hold = $urandom_range(11, 0);
    for (int i = 0; i < 12; i++) if (i != hold) drive_bit(d, i, '0);
    #5;
    check(!out_all_null(d), $sformatf("dut%0d op%0d: outputs NULL with input %0d still DATA",
                                      d, op, hold));
    drive_bit(d, hold, '0);
    while (!out_all_null(d)) #1;
    #1;
    ki[d] = 1'b1;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1;
    for (int d = 0; d < 2; d++) begin
      a[d] = '0; b[d] = '0; cin[d] = '0; s[d] = '0; ki[d] = 1'b1;
    end
    #5;
    for (int d = 0; d < 2; d++) begin
      check(out_all_null(d), "outputs NULL after reset");
      check(ko[d] == 1'b1, "ko requests DATA after reset");
    end
    rst = 1'b0;
    #5;
    fork
      for (int v = 0; v < 4096; v++) one_cycle(0, 12'(v));
      for (int v = 0; v < 4096; v++) one_cycle(1, 12'(v));
    join
    for (int k = 0; k < 8; k++) begin
      $display("operation %0d completed %0d times", k, op_seen[k]);
      check(op_seen[k] > 0, $sformatf("operation %0d never ran", k));
    end
    $display("Cin held back in operations 0-3: %0d, B held back in 3-5: %0d",
             held_cin_unused, held_b_unused);
    check(held_cin_unused > 0, "Cin completeness case never exercised");
    check(held_b_unused > 0, "B completeness case never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
