// ncl_ncr_ctrl: turn keeping for NULL Cycle Reduction (NCR).
//
// Two copies of an NCL circuit take successive DATA/NULL cycles in turn. This
// module decides whose turn it is on the input side and on the output side,
// and turns the two copies' handshakes into one ordinary four-phase
// handshake towards the producer and the consumer.
// Input side: turn bit t1 (0: copy 0). The wrapper lets operands reach copy k
// only while t[k] is high. d_k = C(t_k, !alu_ko_k) records that copy k took
// DATA in its turn; when copy k has also taken the following NULL (alu_ko_k
// high again while d_k is set) the turn passes to the other copy.
// ko = (t0 & alu_ko0 & !d0) | (t1 & alu_ko1 & !d1): the producer is asked for
// DATA only by the copy whose turn it is and that has not taken its DATA yet.
// Output side: turn bit o1. Copy k gets the request
// ki_k = o_k & ki & !(v_k & !done_k), where done_k (from the wrapper) is high
// when all of copy k's outputs are DATA and low when all are NULL, and
// v_k = C(o_k, done_k) records that copy k delivered DATA in its turn; once
// that DATA has returned to NULL the output turn passes on. The copy without
// the output turn sees a low request and cannot overtake, so results leave
// in the order the operands arrived.
// Interface: rst, ki (consumer request), alu_ko[2], done[2] in; t[2]
// (input turn, for the steering gates), alu_ki[2], ko out. rst gives both
// turns to copy 0. No clock; the turn bits are set/reset latches and the C-
// elements are resettable TH22 gates, so latches and combinational loops are
// intended. Only the principle of alternating cycles between two copies
// comes from the NCR description; this control is this design's own.
module ncl_ncr_ctrl (
  input  logic       rst,
  input  logic       ki,
  input  logic [1:0] alu_ko,
  input  logic [1:0] done,
  output logic [1:0] t,
  output logic [1:0] alu_ki,
  output logic       ko
);

  logic       t1, o1;
  logic [1:0] o, d, v;

  assign t = {t1, !t1};
  assign o = {o1, !o1};

  for (genvar k = 0; k < 2; k++) begin : g_copy
    ncl_th #(.N(2), .M(2), .RESETTABLE(1'b1), .RESET_VAL(1'b0)) u_d (
      .rst(rst), .in({t[k], !alu_ko[k]}), .z(d[k])
    );
    ncl_th #(.N(2), .M(2), .RESETTABLE(1'b1), .RESET_VAL(1'b0)) u_v (
      .rst(rst), .in({o[k], done[k]}), .z(v[k])
    );
    assign alu_ki[k] = o[k] && ki && !(v[k] && !done[k]);
  end

  logic t_set, t_clr, o_set, o_clr;
  assign t_set = d[0] && alu_ko[0];
  assign t_clr = d[1] && alu_ko[1];
  assign o_set = v[0] && !done[0];
  assign o_clr = v[1] && !done[1];

  always_latch begin
    if (rst)        t1 = 1'b0;
    else if (t_set) t1 = 1'b1;
    else if (t_clr) t1 = 1'b0;
  end

  always_latch begin
    if (rst)        o1 = 1'b0;
    else if (o_set) o1 = 1'b1;
    else if (o_clr) o1 = 1'b0;
  end

  assign ko = (t[0] && alu_ko[0] && !d[0]) || (t[1] && alu_ko[1] && !d[1]);

  // The two copies must never deliver DATA at the same time.
  always_comb begin
    if (!rst) begin
      assert (!(done[0] && done[1])) else $error("ncl_ncr_ctrl: both copies deliver DATA");
    end
  end

endmodule
