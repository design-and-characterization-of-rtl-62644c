// ncl_qr_alu_ncr: quad-rail NCL ALU with NULL Cycle Reduction (NCR).
//
// Two copies of the non-pipelined quad-rail ALU (by default in their
// embedded-registration form) take successive DATA/NULL cycles in turn, so
// that one copy's NULL phase overlaps the other copy's DATA phase. The
// input turn steers the operands with AND gates to one copy, the output turn
// keeps the results in order, and the two output sets are merged with OR
// gates (TH12 per wire); the turn keeping is ncl_ncr_ctrl, shared with the
// dual-rail NCR ALU. done_k, the completion of copy k's three output signals
// (two quad-rail digits and Cout, TH33), tells the control when a copy has
// delivered DATA and when it has returned to NULL.
// Interface as for ncl_qr_alu: A, B (two quad-rail digits each), Cin (dual-
// rail), S2 (dual-rail) and S(1:0) (quad-rail) with acknowledge ko; F and
// Cout with request ki. rst sets everything to NULL and both turns to copy 0.
// No clock; latches and combinational loops are intended (gate hysteresis,
// turn latches, handshake loops). Applying NCR to the quad-rail ALU, with and
// without embedded registration, follows the design's description; the
// steering and turn logic are this design's own.
module ncl_qr_alu_ncr
  import ncl_pkg::*;
#(
  parameter bit EMBED = 1'b1
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

  // All 24 input wires as one vector: A(8) B(8) Cin(2) S2(2) S(1:0)(4).
  localparam int unsigned IN_W = 24;

  logic [IN_W-1:0] x;
  logic [IN_W-1:0] xk [2];
  qr_t  [1:0]      fk [2];
  dr_t             ck [2];
  logic [1:0]      kok, kik, t_k, done_k;

  assign x = {s10, s2, cin, b, a};

  ncl_ncr_ctrl u_ctrl (
    .rst(rst), .ki(ki), .alu_ko(kok), .done(done_k), .t(t_k), .alu_ki(kik), .ko(ko)
  );

  for (genvar k = 0; k < 2; k++) begin : g_copy
    // Input steering: operands reach copy k only during its turn.
    assign xk[k] = x & {IN_W{t_k[k]}};

    ncl_qr_alu #(.EMBED(EMBED)) u_alu (
      .rst(rst), .a(xk[k][7:0]), .b(xk[k][15:8]), .cin(xk[k][17:16]), .s2(xk[k][19:18]),
      .s10(xk[k][23:20]), .ki(kik[k]), .f(fk[k]), .cout(ck[k]), .ko(kok[k])
    );

    logic [2:0] sig_valid;
    assign sig_valid[0] = |fk[k][0];
    assign sig_valid[1] = |fk[k][1];
    assign sig_valid[2] = ck[k].r0 || ck[k].r1;
    ncl_th #(.N(3), .M(3), .RESETTABLE(1'b1), .RESET_VAL(1'b0)) u_done (
      .rst(rst), .in(sig_valid), .z(done_k[k])
    );
  end

  // Output merge: at most one copy drives DATA at a time.
  for (genvar w = 0; w < 8; w++) begin : g_fout
    ncl_th #(.N(2), .M(1)) u_f (.rst(1'b0), .in({fk[1][w/4][w%4], fk[0][w/4][w%4]}), .z(f[w/4][w%4]));
  end
  ncl_th #(.N(2), .M(1)) u_c0 (.rst(1'b0), .in({ck[1].r0, ck[0].r0}), .z(cout.r0));
  ncl_th #(.N(2), .M(1)) u_c1 (.rst(1'b0), .in({ck[1].r1, ck[0].r1}), .z(cout.r1));

endmodule
