// ncl_alu_qrp: pipelined 4-bit, 8-operation quad-rail NCL ALU.
//
// Same interface and function table as ncl_qr_alu, built stage by stage like
// the pipelined dual-rail ALU (ncl_alu_drp):
//   stage 1  registers for the A and B digits and Cin, and the select
//            conversion as an embedded register; ko is their completion.
//   stage 2  demultiplexer register (TH33 per wire, one request per function)
//            passing A and B to all functions and Cin to 4-7; alongside, the
//            Carry MEAG register, which waits for Cin on rails 0-3.
//   stage 3  the quad-rail functions (NOT and the shifts wait for B), and a
//            subtractor and adder with one internal register between their
//            two digit adders; the select MEAG passes two MEAG registers.
//   stage 4  select registers (8 wires for 0-3, 10 with the carry for 4-7),
//            each entered only when its function's MEAG rail is up, which
//            keeps results in order.
//   stage 5  multiplexer register for F (ncl_qr_mux with ki) and Cout (Cout =
//            0 for operations 0-3 formed from their F digit 0).
// The stages fed by one-hot sets use special completion (ncl_comp_special).
// Handshake, reset and the lack of a clock are as for ncl_qr_alu. Latches and
// combinational loops are intended (NCL hysteresis, handshake loops).
// That the quad-rail ALU was pipelined like the dual-rail one follows the
// design's description; the details carried over, and the single register
// inside the adders, are this design's own.
module ncl_alu_qrp
  import ncl_pkg::*;
(
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

  // Stage 1.
  logic       ki_s1;
  qr_t  [1:0] ra, rb;
  dr_t        rcin;
  logic [5:0] in_ko;
  logic [7:0] sel;

  for (genvar d = 0; d < 2; d++) begin : g_in
    ncl_meag_reg #(.N(4)) u_ra (.rst(rst), .ki(ki_s1), .m(a[d]), .q(ra[d]), .ko(in_ko[d]));
    ncl_meag_reg #(.N(4)) u_rb (.rst(rst), .ki(ki_s1), .m(b[d]), .q(rb[d]), .ko(in_ko[2+d]));
  end
  ncl_dr_reg #(.W(1)) u_rcin (.rst(rst), .ki(ki_s1), .d(cin), .q(rcin), .ko(in_ko[4]));
  ncl_qr_meag_conv #(.EMBED(1'b1)) u_meag (
    .rst(rst), .ki(ki_s1), .s2(s2), .s10(s10), .sel(sel), .ko(in_ko[5])
  );
  ncl_comp #(.N(6)) u_in_comp (.ko_in(in_ko), .ko(ko));

  // Stage 2.
  qr_t  [1:0] fa   [8];
  qr_t  [1:0] fb   [8];
  dr_t        fcin [8];
  logic [7:0] ki_fn;
  logic [7:0] dmx_ko_set;
  logic [7:0] m1, m2, m3;
  logic       cm_ko, m1_ko, m2_ko;

  ncl_qr_demux_reg u_demux (
    .rst(rst), .sel(sel), .a(ra), .b(rb), .cin(rcin), .ki(ki_fn),
    .fa(fa), .fb(fb), .fcin(fcin), .ko_set(dmx_ko_set)
  );
  ncl_carry_meag_reg u_cmeag (.rst(rst), .ki(m1_ko), .sel(sel), .cin(rcin), .m(m1), .ko(cm_ko));
  ncl_comp_special #(.K(8), .E(1)) u_s1_comp (.ack(dmx_ko_set), .extra(cm_ko), .ko(ki_s1));

  // Stage 3: functions and the MEAG pipeline.
  qr_t [1:0] res  [8];
  dr_t       cres [8];
  logic       sel_ack_all;
  logic [7:0] sel_ack;

  for (genvar k = 0; k < 6; k++) begin : g_fn
    ncl_qr_func #(.OP(alu_op_e'(k))) u_fn (
      .a(fa[k]), .b(fb[k]), .cin(fcin[k]), .f(res[k]), .cout(cres[k])
    );
  end
  ncl_qr_pipe_adder #(.SUB(1'b1)) u_sub (
    .rst(rst), .a(fa[OP_SUB]), .b(fb[OP_SUB]), .cin(fcin[OP_SUB]), .ki(sel_ack[OP_SUB]),
    .f(res[OP_SUB]), .cout(cres[OP_SUB]), .ko(ki_fn[OP_SUB])
  );
  ncl_qr_pipe_adder #(.SUB(1'b0)) u_add (
    .rst(rst), .a(fa[OP_ADD]), .b(fb[OP_ADD]), .cin(fcin[OP_ADD]), .ki(sel_ack[OP_ADD]),
    .f(res[OP_ADD]), .cout(cres[OP_ADD]), .ko(ki_fn[OP_ADD])
  );

  ncl_meag_reg #(.N(8)) u_m2 (.rst(rst), .ki(m2_ko), .m(m1), .q(m2), .ko(m1_ko));
  ncl_meag_reg #(.N(8)) u_m3 (.rst(rst), .ki(sel_ack_all), .m(m2), .q(m3), .ko(m2_ko));

  // Functions 0-3 have no carry output (always NULL).
  dr_t unused_c;
  assign unused_c = cres[0] | cres[1] | cres[2] | cres[3];

  // Stage 4: select registers.
  logic       ki_s4;
  qr_t  [1:0] sq  [8];
  dr_t        scq [4];

  for (genvar k = 0; k < 8; k++) begin : g_sel
    if (k < 4) begin : g_w8
      ncl_wire_sel_reg #(.W(8)) u_sr (.rst(rst), .ki(ki_s4), .m(m3[k]), .d(res[k]), .q(sq[k]));
      ncl_comp #(.N(2)) u_cp (.ko_in({sq[k][1] == '0, sq[k][0] == '0}), .ko(sel_ack[k]));
    end else begin : g_w10
      logic [9:0] q10;
      ncl_wire_sel_reg #(.W(10)) u_sr (
        .rst(rst), .ki(ki_s4), .m(m3[k]), .d({cres[k], res[k]}), .q(q10)
      );
      assign sq[k]    = q10[7:0];
      assign scq[k-4] = q10[9:8];
      ncl_comp #(.N(3)) u_cp (
        .ko_in({scq[k-4] == DR_NULL, sq[k][1] == '0, sq[k][0] == '0}), .ko(sel_ack[k])
      );
    end
    if (k < 6) begin : g_req
      assign ki_fn[k] = sel_ack[k];
    end
  end

  ncl_comp_special #(.K(8), .E(0)) u_s4_comp (.ack(sel_ack), .extra(1'b0), .ko(sel_ack_all));

  // Stage 5: multiplexer register.
  logic [1:0] f_ko;
  dr_t  [0:0] csrc [8];
  dr_t  [0:0] cq;
  logic [0:0] c_ko;
  for (genvar k = 0; k < 4; k++) begin : g_c_low
    logic f0_valid;
    ncl_th #(.N(4), .M(1)) u_f0v (.rst(1'b0), .in(sq[k][0]), .z(f0_valid));
    assign csrc[k][0]   = dr_t'{r1: 1'b0, r0: f0_valid};
    assign csrc[k+4][0] = scq[k];
  end
  ncl_qr_mux #(.N(8), .EMBED(1'b1)) u_fmux (.rst(rst), .ki(ki), .src(sq), .f(f), .ko(f_ko));
  ncl_mux #(.N(8), .W(1), .EMBED(1'b1)) u_cmux (.rst(rst), .ki(ki), .src(csrc), .f(cq), .ko(c_ko));
  assign cout = cq[0];
  ncl_comp #(.N(3)) u_out_comp (.ko_in({c_ko[0], f_ko}), .ko(ki_s4));

endmodule
