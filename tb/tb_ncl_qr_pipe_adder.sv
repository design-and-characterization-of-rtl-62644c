// tb_ncl_qr_pipe_adder: self-checking test of the pipelined quad-rail adder
// and subtractor, both instantiated and run concurrently.
//
// For each form a producer sends all 512 combinations of A, B and Cin in
// random order as DATA/NULL cycles, waiting for ko, and a consumer with
// random delays waits for complete DATA on F and Cout, checks it in order
// against A + B + Cin (adder) or A - B - 1 + Bin (subtractor, Cout = 1 when
// there is no borrow), then lowers ki, waits for NULL and raises ki. The
// internal register is held by ki, so on its own the adder holds one
// operand; the overlap it allows inside the ALU is checked there. Also
// checked: ko stays low (the operand is held) until ki has fallen.
module tb_ncl_qr_pipe_adder;
  import ncl_pkg::*;
  int checks = 0;
  int failures = 0;

  logic      rst;
  logic      ki  [2];
  logic      ko  [2];
  qr_t [1:0] a   [2];
  qr_t [1:0] b   [2];
  qr_t [1:0] f   [2];
  dr_t       cin [2];
  dr_t       co  [2];

  for (genvar s = 0; s < 2; s++) begin : g_dut
    ncl_qr_pipe_adder #(.SUB(s[0])) dut (
      .rst(rst), .a(a[s]), .b(b[s]), .cin(cin[s]), .ki(ki[s]),
      .f(f[s]), .cout(co[s]), .ko(ko[s])
    );
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic run(input int s);
    logic [8:0] order [512];
    logic [4:0] expq [$];
    for (int v = 0; v < 512; v++) order[v] = 9'(v);
    order.shuffle();
    fork
      for (int v = 0; v < 512; v++) begin
        automatic logic [8:0] vec = order[v];
        automatic logic [3:0] bb = s ? ~vec[7:4] : vec[7:4];
        while (!ko[s]) #1;
        a[s] = {qr_enc(vec[3:2]), qr_enc(vec[1:0])};
        b[s] = {qr_enc(vec[7:6]), qr_enc(vec[5:4])};
        cin[s] = dr_enc(vec[8]);
        expq.push_back(5'(vec[3:0] + bb + vec[8]));
        while (ko[s]) #1;
        #($urandom_range(3, 0));
        a[s] = '0; b[s] = '0; cin[s] = DR_NULL;
      end
      for (int n = 0; n < 512; n++) begin
        automatic logic [4:0] got, exp;
        while (!(qr_is_data(f[s][0]) && qr_is_data(f[s][1]) && dr_is_data(co[s]))) #1;
        #1;
        got = {co[s].r1, qr_val(f[s][1]), qr_val(f[s][0])};
        exp = expq.pop_front();
        check(got == exp, $sformatf("SUB=%0d result %0d: got %h expected %h", s, n, got, exp));
        #($urandom_range(20, 0));
        check(!ko[s], $sformatf("SUB=%0d operand held until ki falls", s));
        ki[s] = 1'b0;
        while (!(f[s] == '0 && co[s] == DR_NULL)) #1;
        #($urandom_range(3, 0));
        ki[s] = 1'b1;
      end
    join
  endtask

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst = 1'b1;
    for (int s = 0; s < 2; s++) begin
      ki[s] = 1'b1; a[s] = '0; b[s] = '0; cin[s] = DR_NULL;
    end
    #5;
    rst = 1'b0;
    #5;
    fork
      run(0);
      run(1);
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
