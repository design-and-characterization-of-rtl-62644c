// ncl_alu_suite: the dual-rail and quad-rail NCL ALU architectures side by
// side.
//
// Every instance computes the same 4-bit, 8-function ALU (OR, AND, XOR,
// NOT A, shift right, shift left, subtract, add; see ncl_pkg) with its own
// independent four-phase DATA/NULL channel, so the architectures can be
// driven together and compared. Five dual-rail ones:
//   ARCH_NP       non-pipelined: input register, function blocks, output
//                 register, one completion loop around all of it;
//   ARCH_NP_EMB   the same with the MEAG conversion, output multiplexer and
//                 carry logic merged into the registers (embedded
//                 registration), removing the separate select and output
//                 registers;
//   ARCH_PIPE     pipelined: select-by-MEAG demultiplexer register, function
//                 stages, select registers and an ordering MEAG pipeline, with
//                 subtract and add split into three register stages;
//   ARCH_NCR      two non-pipelined ALUs with alternating DATA/NULL cycles;
//   ARCH_NCR_EMB  the same built from the embedded-registration ALU. This
//                 is the fastest architecture and the one to use on its own.
// Five quad-rail ones (A, B, F as two quad-rail digits, S as S2 plus a
// quad-rail S(1:0)): QARCH_NP, QARCH_NP_EMB, QARCH_NCR, QARCH_NCR_EMB and
// QARCH_PIPE, organised like their dual-rail namesakes.
// Which architectures exist and how each is organised follows the design's
// description; bringing them together in one module, each with its own ports,
// is this design's own arrangement for testing and comparison.
//
// Interface: per architecture k, operands a[k], b[k], cin[k], select s[k]
// (dual-rail) with acknowledge ko[k] (high: ready for DATA, low: ready for
// NULL), and result f[k], cout[k] with request ki[k] from the consumer. rst
// (active high) returns every instance to NULL and its handshakes to their
// start. The quad-rail channels q_a, q_b, q_cin, q_s2, q_s10, q_ki, q_f,
// q_cout, q_ko work the same way. No clock; latches and combinational loops
// are intended NCL hysteresis and handshake loops (see the gate and ALU
// modules).
module ncl_alu_suite
  import ncl_pkg::*;
(
  input  logic       rst,
  input  dr_t  [3:0] a    [NUM_DR_ARCH],
  input  dr_t  [3:0] b    [NUM_DR_ARCH],
  input  dr_t        cin  [NUM_DR_ARCH],
  input  dr_t  [2:0] s    [NUM_DR_ARCH],
  input  logic       ki   [NUM_DR_ARCH],
  output dr_t  [3:0] f    [NUM_DR_ARCH],
  output dr_t        cout [NUM_DR_ARCH],
  output logic       ko   [NUM_DR_ARCH],
  input  qr_t  [1:0] q_a    [NUM_QR_ARCH],
  input  qr_t  [1:0] q_b    [NUM_QR_ARCH],
  input  dr_t        q_cin  [NUM_QR_ARCH],
  input  dr_t        q_s2   [NUM_QR_ARCH],
  input  qr_t        q_s10  [NUM_QR_ARCH],
  input  logic       q_ki   [NUM_QR_ARCH],
  output qr_t  [1:0] q_f    [NUM_QR_ARCH],
  output dr_t        q_cout [NUM_QR_ARCH],
  output logic       q_ko   [NUM_QR_ARCH]
);

  ncl_alu_dr #(.EMBED(1'b0)) u_np (
    .rst(rst), .a(a[ARCH_NP]), .b(b[ARCH_NP]), .cin(cin[ARCH_NP]), .s(s[ARCH_NP]),
    .ki(ki[ARCH_NP]), .f(f[ARCH_NP]), .cout(cout[ARCH_NP]), .ko(ko[ARCH_NP])
  );

  ncl_alu_dr #(.EMBED(1'b1)) u_np_emb (
    .rst(rst), .a(a[ARCH_NP_EMB]), .b(b[ARCH_NP_EMB]), .cin(cin[ARCH_NP_EMB]),
    .s(s[ARCH_NP_EMB]), .ki(ki[ARCH_NP_EMB]), .f(f[ARCH_NP_EMB]),
    .cout(cout[ARCH_NP_EMB]), .ko(ko[ARCH_NP_EMB])
  );

  ncl_alu_drp u_pipe (
    .rst(rst), .a(a[ARCH_PIPE]), .b(b[ARCH_PIPE]), .cin(cin[ARCH_PIPE]), .s(s[ARCH_PIPE]),
    .ki(ki[ARCH_PIPE]), .f(f[ARCH_PIPE]), .cout(cout[ARCH_PIPE]), .ko(ko[ARCH_PIPE])
  );

  ncl_alu_ncr #(.EMBED(1'b0)) u_ncr (
    .rst(rst), .a(a[ARCH_NCR]), .b(b[ARCH_NCR]), .cin(cin[ARCH_NCR]), .s(s[ARCH_NCR]),
    .ki(ki[ARCH_NCR]), .f(f[ARCH_NCR]), .cout(cout[ARCH_NCR]), .ko(ko[ARCH_NCR])
  );

  ncl_alu_ncr #(.EMBED(1'b1)) u_ncr_emb (
    .rst(rst), .a(a[ARCH_NCR_EMB]), .b(b[ARCH_NCR_EMB]), .cin(cin[ARCH_NCR_EMB]),
    .s(s[ARCH_NCR_EMB]), .ki(ki[ARCH_NCR_EMB]), .f(f[ARCH_NCR_EMB]),
    .cout(cout[ARCH_NCR_EMB]), .ko(ko[ARCH_NCR_EMB])
  );

  ncl_qr_alu #(.EMBED(1'b0)) u_qr_np (
    .rst(rst), .a(q_a[QARCH_NP]), .b(q_b[QARCH_NP]), .cin(q_cin[QARCH_NP]),
    .s2(q_s2[QARCH_NP]), .s10(q_s10[QARCH_NP]), .ki(q_ki[QARCH_NP]),
    .f(q_f[QARCH_NP]), .cout(q_cout[QARCH_NP]), .ko(q_ko[QARCH_NP])
  );

  ncl_qr_alu #(.EMBED(1'b1)) u_qr_np_emb (
    .rst(rst), .a(q_a[QARCH_NP_EMB]), .b(q_b[QARCH_NP_EMB]), .cin(q_cin[QARCH_NP_EMB]),
    .s2(q_s2[QARCH_NP_EMB]), .s10(q_s10[QARCH_NP_EMB]), .ki(q_ki[QARCH_NP_EMB]),
    .f(q_f[QARCH_NP_EMB]), .cout(q_cout[QARCH_NP_EMB]), .ko(q_ko[QARCH_NP_EMB])
  );

  ncl_qr_alu_ncr #(.EMBED(1'b0)) u_qr_ncr (
    .rst(rst), .a(q_a[QARCH_NCR]), .b(q_b[QARCH_NCR]), .cin(q_cin[QARCH_NCR]),
    .s2(q_s2[QARCH_NCR]), .s10(q_s10[QARCH_NCR]), .ki(q_ki[QARCH_NCR]),
    .f(q_f[QARCH_NCR]), .cout(q_cout[QARCH_NCR]), .ko(q_ko[QARCH_NCR])
  );

  ncl_qr_alu_ncr #(.EMBED(1'b1)) u_qr_ncr_emb (
    .rst(rst), .a(q_a[QARCH_NCR_EMB]), .b(q_b[QARCH_NCR_EMB]), .cin(q_cin[QARCH_NCR_EMB]),
    .s2(q_s2[QARCH_NCR_EMB]), .s10(q_s10[QARCH_NCR_EMB]), .ki(q_ki[QARCH_NCR_EMB]),
    .f(q_f[QARCH_NCR_EMB]), .cout(q_cout[QARCH_NCR_EMB]), .ko(q_ko[QARCH_NCR_EMB])
  );

  ncl_alu_qrp u_qr_pipe (
    .rst(rst), .a(q_a[QARCH_PIPE]), .b(q_b[QARCH_PIPE]), .cin(q_cin[QARCH_PIPE]),
    .s2(q_s2[QARCH_PIPE]), .s10(q_s10[QARCH_PIPE]), .ki(q_ki[QARCH_PIPE]),
    .f(q_f[QARCH_PIPE]), .cout(q_cout[QARCH_PIPE]), .ko(q_ko[QARCH_PIPE])
  );

endmodule
