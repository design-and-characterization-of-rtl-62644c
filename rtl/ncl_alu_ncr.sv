// ncl_alu_ncr: dual-rail NCL ALU with NULL Cycle Reduction (NCR).
//
// Two copies of the non-pipelined ALU (by default in their embedded-
// registration form) share one input and one output channel. Successive
// DATA/NULL cycles alternate between the copies: while one copy is still
// clearing itself with a NULL wavefront, the other already takes the next
// DATA wavefront, so the NULL phase of one copy hides behind the DATA phase
// of the other. Results leave in the order the operands arrived.
//
// The input turn (from ncl_ncr_ctrl) steers the operands with AND gates, so
// only the copy whose turn it is sees DATA; the output turn holds the other
// copy's request low so results cannot overtake (see ncl_ncr_ctrl). done_k,
// the completion of copy k's five outputs (TH55), tells the control when a
// copy has delivered DATA and when that DATA has returned to NULL. The two
// output sets are merged with OR gates (TH12 per rail).
// The steering and turn logic is this design's own construction; only the
// principle of alternating wavefronts between two copies is given for NCR.
//
// Interface as for ncl_alu_dr: four-phase DATA/NULL on a, b, cin, s with
// acknowledge ko; f, cout with request ki; rst sets everything to NULL and
// both turns to copy 0. No clock. Latches and combinational loops are
// intended (NCL hysteresis, turn latches and the handshake loops).
module ncl_alu_ncr
  import ncl_pkg::*;
#(
  parameter bit EMBED = 1'b1
) (
  input  logic       rst,
  input  dr_t  [3:0] a,
  input  dr_t  [3:0] b,
  input  dr_t        cin,
  input  dr_t  [2:0] s,
  input  logic       ki,
  output dr_t  [3:0] f,
  output dr_t        cout,
  output logic       ko
);

  localparam int unsigned IN_W = 12;   // A(4) B(4) Cin(1) S(3)

  dr_t  [IN_W-1:0] x;
  dr_t  [IN_W-1:0] xk    [2];
  dr_t  [3:0]      fk    [2];
  dr_t             ck    [2];
  logic [1:0]      kok, kik, t_k, done_k;

  assign x = {s, cin, b, a};

  ncl_ncr_ctrl u_ctrl (
    .rst(rst), .ki(ki), .alu_ko(kok), .done(done_k), .t(t_k), .alu_ki(kik), .ko(ko)
  );

  for (genvar k = 0; k < 2; k++) begin : g_copy
    // Input steering: operands reach copy k only during its turn.
    for (genvar i = 0; i < IN_W; i++) begin : g_steer
      assign xk[k][i].r0 = x[i].r0 && t_k[k];
      assign xk[k][i].r1 = x[i].r1 && t_k[k];
    end

    ncl_alu_dr #(.EMBED(EMBED)) u_alu (
      .rst(rst), .a(xk[k][3:0]), .b(xk[k][7:4]), .cin(xk[k][8]), .s(xk[k][11:9]),
      .ki(kik[k]), .f(fk[k]), .cout(ck[k]), .ko(kok[k])
    );

    // Output completion of copy k: high when all five bits are DATA, low when
    // all are NULL.
    logic [4:0] bit_valid;
    for (genvar i = 0; i < 4; i++) begin : g_valid
      assign bit_valid[i] = fk[k][i].r0 || fk[k][i].r1;
    end
    assign bit_valid[4] = ck[k].r0 || ck[k].r1;
    ncl_th #(.N(5), .M(5), .RESETTABLE(1'b1), .RESET_VAL(1'b0)) u_done (
      .rst(rst), .in(bit_valid), .z(done_k[k])
    );
  end

  // Output merge: at most one copy drives DATA at a time.
  for (genvar i = 0; i < 4; i++) begin : g_fout
    ncl_th #(.N(2), .M(1)) u_f0 (.rst(1'b0), .in({fk[1][i].r0, fk[0][i].r0}), .z(f[i].r0));
    ncl_th #(.N(2), .M(1)) u_f1 (.rst(1'b0), .in({fk[1][i].r1, fk[0][i].r1}), .z(f[i].r1));
  end
  ncl_th #(.N(2), .M(1)) u_c0 (.rst(1'b0), .in({ck[1].r0, ck[0].r0}), .z(cout.r0));
  ncl_th #(.N(2), .M(1)) u_c1 (.rst(1'b0), .in({ck[1].r1, ck[0].r1}), .z(cout.r1));

endmodule
