// ncl_qr_adder_digit: quad-rail full adder for one 2-bit digit.
//
// Adds two quad-rail digits X and Y and a dual-rail carry Ci, giving a
// quad-rail sum digit S and a dual-rail carry Co: {Co, S} = X + Y + Ci. Each
// output rail is one NCL gate whose set function is the OR of the input rail
// combinations (one rail of X, one of Y, one of Ci) that produce it; the gate
// holds until all inputs are NULL. Every output needs all three inputs, so
// the digit adder is input-complete, and the carry ripples through one gate
// per digit.
// Interface: x, y (quad-rail), ci (dual-rail) in; s (quad-rail), co
// (dual-rail) out. One gate delay; combinational NCL with hysteresis.
// The digit format (two quad-rail signals plus a dual-rail carry in, quad-rail
// sum and dual-rail carry out) follows the design's description; the gates
// are described only by their function, and the set functions here are this
// design's own (they are not limited to four inputs).
module ncl_qr_adder_digit
  import ncl_pkg::*;
(
  input  qr_t x,
  input  qr_t y,
  input  dr_t ci,
  output qr_t s,
  output dr_t co
);

  logic [1:0] ci_rail;
  logic [3:0] set_s;
  logic [1:0] set_c;
  assign ci_rail = {ci.r1, ci.r0};

  always_comb begin
    set_s = '0;
    set_c = '0;
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        for (int c = 0; c < 2; c++) begin
          set_s[(i + j + c) % 4] |= x[i] & y[j] & ci_rail[c];
          set_c[(i + j + c) / 4] |= x[i] & y[j] & ci_rail[c];
        end
      end
    end
  end

  for (genvar r = 0; r < 4; r++) begin : g_s
    ncl_gate #(.N(10)) u_s (.rst(1'b0), .in({x, y, ci}), .set(set_s[r]), .z(s[r]));
  end
  ncl_gate #(.N(10)) u_c0 (.rst(1'b0), .in({x, y, ci}), .set(set_c[0]), .z(co.r0));
  ncl_gate #(.N(10)) u_c1 (.rst(1'b0), .in({x, y, ci}), .set(set_c[1]), .z(co.r1));

endmodule
