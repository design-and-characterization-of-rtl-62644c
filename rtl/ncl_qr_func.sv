// ncl_qr_func: one of the eight functions of the quad-rail ALU.
//
// Operands are 4-bit values held as two quad-rail digits (digit 0 = bits 1:0,
// digit 1 = bits 3:2); Cin/Bin and Cout/Bout are dual-rail. OP selects:
//   OR, AND, XOR  digit-wise: output digit d from A digit d and B digit d;
//   NOT           F = ~A, each digit also waits for B digit d;
//   SHR           F = {Cin, A3, A2, A1}, Cout = A0: F digit 0 = {A2, A1}
//                 mixes both A digits, F digit 1 = {Cin, A3};
//   SHL           F = {A2, A1, A0, Cin}, Cout = A3;
//   SUB, ADD      two quad-rail digit adders in a ripple chain; SUB adds the
//                 complement of B (each B digit's rails reversed) and Bin.
// NOT and the shifts do not use B's value, but the demultiplexer sends B to
// them anyway, so each of their F digits also waits for a B digit: that makes
// the ALU input-complete with respect to B. Except for the adders, every
// output rail is one NCL gate whose set function is the OR of the input rail
// combinations producing it; it resets to NULL only once all the function's
// inputs are NULL.
// Interface: a, b (two quad-rail digits), cin in; f (two quad-rail digits),
// cout out (NULL for OR, AND, XOR and NOT, which have no carry). One gate
// delay (two for the adders); combinational NCL with hysteresis.
// The function table and the B-completeness in functions 3-5 follow the
// design's description; the gate-level form of each function is not given
// there and is this design's own.
module ncl_qr_func
  import ncl_pkg::*;
#(
  parameter alu_op_e OP = OP_OR
) (
  input  qr_t  [1:0] a,
  input  qr_t  [1:0] b,
  input  dr_t        cin,
  output qr_t  [1:0] f,
  output dr_t        cout
);

  if (OP == OP_ADD || OP == OP_SUB) begin : g_adder
    qr_t [1:0] y;
    dr_t       c1;
    for (genvar d = 0; d < 2; d++) begin : g_inv
      for (genvar r = 0; r < 4; r++) begin : g_rail
        assign y[d][r] = (OP == OP_SUB) ? b[d][3-r] : b[d][r];
      end
    end
    ncl_qr_adder_digit u_d0 (.x(a[0]), .y(y[0]), .ci(cin), .s(f[0]), .co(c1));
    ncl_qr_adder_digit u_d1 (.x(a[1]), .y(y[1]), .ci(c1), .s(f[1]), .co(cout));
  end else begin : g_table
    logic [1:0] cin_rail;
    logic [3:0] set_f [2];
    logic [1:0] set_c;
    assign cin_rail = {cin.r1, cin.r0};

    always_comb begin
      set_f[0] = '0;
      set_f[1] = '0;
      set_c    = '0;
      for (int i = 0; i < 4; i++) begin
        for (int j = 0; j < 4; j++) begin
          case (OP)
            OP_OR: begin
              set_f[0][i | j] |= a[0][i] & b[0][j];
              set_f[1][i | j] |= a[1][i] & b[1][j];
            end
            OP_AND: begin
              set_f[0][i & j] |= a[0][i] & b[0][j];
              set_f[1][i & j] |= a[1][i] & b[1][j];
            end
            OP_XOR: begin
              set_f[0][i ^ j] |= a[0][i] & b[0][j];
              set_f[1][i ^ j] |= a[1][i] & b[1][j];
            end
            OP_SHR: begin
              // i: rail of A digit 0 (A1 A0), j: rail of A digit 1 (A3 A2).
              set_f[0][{j[0], i[1]}] |= a[0][i] & a[1][j] & (|b[0]);
            end
            OP_SHL: begin
              set_f[1][{j[0], i[1]}] |= a[0][i] & a[1][j] & (|b[1]);
            end
            default: ;
          endcase
        end
        for (int c = 0; c < 2; c++) begin
          case (OP)
            OP_SHR: set_f[1][{c[0], i[1]}] |= a[1][i] & cin_rail[c] & (|b[1]);
            OP_SHL: set_f[0][{i[0], c[0]}] |= a[0][i] & cin_rail[c] & (|b[0]);
            default: ;
          endcase
        end
        case (OP)
          OP_NOT: begin
            set_f[0][3-i] |= a[0][i] & (|b[0]);
            set_f[1][3-i] |= a[1][i] & (|b[1]);
          end
          OP_SHR:  set_c[i % 2] |= a[0][i];
          OP_SHL:  set_c[i / 2] |= a[1][i];
          default: ;
        endcase
      end
    end

    for (genvar d = 0; d < 2; d++) begin : g_digit
      for (genvar r = 0; r < 4; r++) begin : g_rail
        ncl_gate #(.N(18)) u_f (.rst(1'b0), .in({a, b, cin}), .set(set_f[d][r]), .z(f[d][r]));
      end
    end
    if (OP == OP_SHR || OP == OP_SHL) begin : g_carry
      ncl_gate #(.N(18)) u_c0 (.rst(1'b0), .in({a, b, cin}), .set(set_c[0]), .z(cout.r0));
      ncl_gate #(.N(18)) u_c1 (.rst(1'b0), .in({a, b, cin}), .set(set_c[1]), .z(cout.r1));
    end else begin : g_no_carry
      assign cout = DR_NULL;
    end
  end

endmodule
