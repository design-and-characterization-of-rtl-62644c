// tb_ncl_pipe_adder: self-checking test of the pipelined 4-bit adder and
// subtractor.
//
// A producer and a consumer with random delays run all 512 operand sets
// through each unit concurrently; results are compared in order with
// A+B+Cin and A+~B+Bin. The test counts how often a new operand set was
// presented while the previous result was still unconsumed inside the unit
// (its internal registers at work); this must happen.
module tb_ncl_pipe_adder;
  import ncl_pkg::*;
  int checks = 0;
  int failures = 0;
  logic      rst;
  dr_t [3:0] a [2];
  dr_t [3:0] b [2];
  dr_t       cin [2];
  logic      ki [2];
  logic      ko [2];
  dr_t [3:0] f [2];
  dr_t       co [2];
  int        overlap [2];

  ncl_pipe_adder #(.SUB(1'b0)) u_add (.rst(rst), .a(a[0]), .b(b[0]), .cin(cin[0]), .ki(ki[0]),
                                      .f(f[0]), .cout(co[0]), .ko(ko[0]));
  ncl_pipe_adder #(.SUB(1'b1)) u_sub (.rst(rst), .a(a[1]), .b(b[1]), .cin(cin[1]), .ki(ki[1]),
                                      .f(f[1]), .cout(co[1]), .ko(ko[1]));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic logic all_data(input int d);
    logic ok = dr_is_data(co[d]);
    for (int i = 0; i < 4; i++) ok &= dr_is_data(f[d][i]);
    return ok;
  endfunction

  function automatic logic all_null(input int d);
    logic ok = dr_is_null(co[d]);
    for (int i = 0; i < 4; i++) ok &= dr_is_null(f[d][i]);
    return ok;
  endfunction

  task automatic run(input int d);
    logic [4:0] expq [$];
    int inflight = 0;
    fork
      for (int v = 0; v < 512; v++) begin
        automatic logic [8:0] vec = 9'(v);
        while (!ko[d]) #1;
        for (int i = 0; i < 4; i++) begin a[d][i] = dr_enc(vec[i]); b[d][i] = dr_enc(vec[4+i]); end
        cin[d] = dr_enc(vec[8]);
        inflight++;
        if (inflight >= 2) overlap[d]++;
        expq.push_back(d == 0 ? 5'(vec[3:0]) + 5'(vec[7:4]) + 5'(vec[8])
                              : 5'(vec[3:0]) + {1'b0, ~vec[7:4]} + 5'(vec[8]));
        while (ko[d]) #1;
        a[d] = '0; b[d] = '0; cin[d] = '0;
      end
      for (int n = 0; n < 512; n++) begin
        automatic logic [4:0] exp;
        while (!all_data(d)) #1;
        exp = expq.pop_front();
        check({co[d].r1, f[d][3].r1, f[d][2].r1, f[d][1].r1, f[d][0].r1} == exp,
              $sformatf("unit %0d result %0d", d, n));
        inflight--;
        #($urandom_range(8, 0));
        ki[d] = 1'b0;
        while (!all_null(d)) #1;
        ki[d] = 1'b1;
      end
    join
  endtask

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst = 1'b1;
    for (int d = 0; d < 2; d++) begin a[d] = '0; b[d] = '0; cin[d] = '0; ki[d] = 1'b1; end
    #2; rst = 1'b0; #2;
    fork
      run(0);
      run(1);
    join
    $display("overlapping operations: adder %0d, subtractor %0d", overlap[0], overlap[1]);
    check(overlap[0] > 0 && overlap[1] > 0, "pipelining exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
