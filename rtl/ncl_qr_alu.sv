// ncl_qr_alu: 4-bit, 8-operation quad-rail NULL Convention Logic ALU
// (non-pipelined).
//
// Same operations as the dual-rail ALU (see ncl_pkg), but A, B and F are two
// quad-rail digits each (digit 0 = bits 1:0, digit 1 = bits 3:2): four wires
// per two bits, exactly one of them high for DATA, so only one wire switches
// per two bits where the dual-rail form switches two. The select is one
// dual-rail signal S2 and one quad-rail signal S(1:0); Cin/Bin and Cout/Bout
// stay dual-rail.
// Structure, as for the dual-rail ALU: input registers (one per quad-rail or
// dual-rail signal, one completion over all seven) feed the select
// conversion to eight one-hot rails (MEAG) and the demultiplexer; the eight
// quad-rail functions feed an F multiplexer (8 sources) and a carry
// multiplexer (shifts, subtract, add); the carry logic makes Cout = 0 for
// operations 0-3 and waits for Cin there; an output register (two quad-rail
// digits and Cout) gives ki to the input registers through its completion.
// Unlike the dual-rail ALU, B goes to all eight functions and NOT and the
// shifts wait for it themselves (quad-rail gates would otherwise exceed four
// inputs in the demultiplexer).
//
// EMBED=1 gives the version with embedded registration: the select
// conversion takes ki and replaces the select input registers, and the F
// multiplexer and the carry logic take ki and replace the output register.
// The carry logic's S2=0 input is then the OR of select rails 0-3.
//
// Handshake: ko high requests DATA, low requests NULL; ki high lets DATA into
// the output register, low lets NULL in; rst puts every register to NULL. No
// clock. Latches and combinational loops are intended (gate hysteresis and
// the handshake loop).
// The structure and interface follow the design's description; the gate-level
// form of the quad-rail functions is this design's own, and the quad-rail
// registers are one-hot registers (one TH22 with ki per rail).
module ncl_qr_alu
  import ncl_pkg::*;
#(
  parameter bit EMBED = 1'b0
) (
  input  logic       rst,
  input  qr_t  [1:0] a,
  input  qr_t  [1:0] b,
  input  dr_t        cin,
  input  dr_t        s2,
  input  qr_t        s10,
  input  logic       ki,
  output qr_t  [1:0] f,
  output dr_t        cout,
  output logic       ko
);

  logic       ki_in;        // request for the input stage (output completion)
  logic [3:0] ab_ko;
  qr_t  [1:0] ra, rb;
  dr_t        rcin;
  logic       rcin_ko;
  logic [7:0] sel;
  logic       s2_0;         // S2 is DATA0 (operations 0-3), for the carry logic

  // Operand registers.
  for (genvar d = 0; d < 2; d++) begin : g_in
    ncl_meag_reg #(.N(4)) u_ra (.rst(rst), .ki(ki_in), .m(a[d]), .q(ra[d]), .ko(ab_ko[d]));
    ncl_meag_reg #(.N(4)) u_rb (.rst(rst), .ki(ki_in), .m(b[d]), .q(rb[d]), .ko(ab_ko[2+d]));
  end
  ncl_dr_reg #(.W(1)) u_rcin (.rst(rst), .ki(ki_in), .d(cin), .q(rcin), .ko(rcin_ko));

  // Select: registers plus conversion, or the conversion as the register.
  if (EMBED) begin : g_sel_embedded
    logic sel_ko;
    ncl_qr_meag_conv #(.EMBED(1'b1)) u_meag (
      .rst(rst), .ki(ki_in), .s2(s2), .s10(s10), .sel(sel), .ko(sel_ko)
    );
    ncl_comp #(.N(6)) u_in_comp (.ko_in({sel_ko, rcin_ko, ab_ko}), .ko(ko));
    ncl_th #(.N(4), .M(1)) u_s2_0 (.rst(1'b0), .in(sel[3:0]), .z(s2_0));
  end else begin : g_sel_reg
    qr_t  rs10;
    dr_t  rs2;
    logic rs10_ko, rs2_ko, unused_sel_ko;
    ncl_meag_reg #(.N(4)) u_rs10 (.rst(rst), .ki(ki_in), .m(s10), .q(rs10), .ko(rs10_ko));
    ncl_dr_reg #(.W(1)) u_rs2 (.rst(rst), .ki(ki_in), .d(s2), .q(rs2), .ko(rs2_ko));
    ncl_qr_meag_conv #(.EMBED(1'b0)) u_meag (
      .rst(rst), .ki(ki_in), .s2(rs2), .s10(rs10), .sel(sel), .ko(unused_sel_ko)
    );
    ncl_comp #(.N(7)) u_in_comp (.ko_in({rs2_ko, rs10_ko, rcin_ko, ab_ko}), .ko(ko));
    assign s2_0 = rs2.r0;
  end

  // Demultiplexer.
  qr_t  [1:0] fa [8];
  qr_t  [1:0] fb [8];
  dr_t        fcin [8];
  ncl_qr_demux u_demux (.sel(sel), .a(ra), .b(rb), .cin(rcin), .fa(fa), .fb(fb), .fcin(fcin));

  // Functions.
  qr_t [1:0] res  [8];
  dr_t       cres [8];
  ncl_qr_func #(.OP(OP_OR))  u_or  (.a(fa[0]), .b(fb[0]), .cin(fcin[0]), .f(res[0]), .cout(cres[0]));
  ncl_qr_func #(.OP(OP_AND)) u_and (.a(fa[1]), .b(fb[1]), .cin(fcin[1]), .f(res[1]), .cout(cres[1]));
  ncl_qr_func #(.OP(OP_XOR)) u_xor (.a(fa[2]), .b(fb[2]), .cin(fcin[2]), .f(res[2]), .cout(cres[2]));
  ncl_qr_func #(.OP(OP_NOT)) u_not (.a(fa[3]), .b(fb[3]), .cin(fcin[3]), .f(res[3]), .cout(cres[3]));
  ncl_qr_func #(.OP(OP_SHR)) u_shr (.a(fa[4]), .b(fb[4]), .cin(fcin[4]), .f(res[4]), .cout(cres[4]));
  ncl_qr_func #(.OP(OP_SHL)) u_shl (.a(fa[5]), .b(fb[5]), .cin(fcin[5]), .f(res[5]), .cout(cres[5]));
  ncl_qr_func #(.OP(OP_SUB)) u_sub (.a(fa[6]), .b(fb[6]), .cin(fcin[6]), .f(res[6]), .cout(cres[6]));
  ncl_qr_func #(.OP(OP_ADD)) u_add (.a(fa[7]), .b(fb[7]), .cin(fcin[7]), .f(res[7]), .cout(cres[7]));

  // Functions 0-3 have no carry output (always NULL).
  dr_t unused_c;
  assign unused_c = cres[0] | cres[1] | cres[2] | cres[3];

  // Carry multiplexer (shifts, subtract, add).
  dr_t  [0:0] cm;
  dr_t  [0:0] csrc [4];
  logic       unused_cmux_ko;
  for (genvar n = 0; n < 4; n++) begin : g_csrc
    assign csrc[n][0] = cres[4+n];
  end
  ncl_mux #(.N(4), .W(1), .EMBED(1'b0)) u_cmux (
    .rst(rst), .ki(1'b0), .src(csrc), .f(cm), .ko(unused_cmux_ko)
  );

  // F multiplexer, carry logic and output register.
  if (EMBED) begin : g_out_embedded
    logic [1:0] f_ko;
    logic       c_ko;
    ncl_qr_mux #(.N(8), .EMBED(1'b1)) u_fmux (.rst(rst), .ki(ki), .src(res), .f(f), .ko(f_ko));
    ncl_carry_logic #(.EMBED(1'b1)) u_carry (
      .rst(rst), .ki(ki), .ci(cm[0]), .cin(rcin), .s2_0(s2_0), .co(cout), .ko(c_ko)
    );
    ncl_comp #(.N(3)) u_out_comp (.ko_in({c_ko, f_ko}), .ko(ki_in));
  end else begin : g_out_reg
    qr_t  [1:0] fm;
    dr_t        co;
    logic [1:0] unused_fmux_ko;
    logic       unused_carry_ko;
    logic [2:0] out_ko;
    ncl_qr_mux #(.N(8), .EMBED(1'b0)) u_fmux (
      .rst(rst), .ki(1'b0), .src(res), .f(fm), .ko(unused_fmux_ko)
    );
    ncl_carry_logic #(.EMBED(1'b0)) u_carry (
      .rst(rst), .ki(1'b0), .ci(cm[0]), .cin(rcin), .s2_0(s2_0), .co(co), .ko(unused_carry_ko)
    );
    for (genvar d = 0; d < 2; d++) begin : g_out
      ncl_meag_reg #(.N(4)) u_rf (.rst(rst), .ki(ki), .m(fm[d]), .q(f[d]), .ko(out_ko[d]));
    end
    ncl_dr_reg #(.W(1)) u_rc (.rst(rst), .ki(ki), .d(co), .q(cout), .ko(out_ko[2]));
    ncl_comp #(.N(3)) u_out_comp (.ko_in(out_ko), .ko(ki_in));
  end

endmodule
