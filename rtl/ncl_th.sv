// ncl_th: THmn threshold gate with optional input weights (NCL primitive).
//
// The output asserts when the weighted count of asserted inputs reaches the
// threshold M, and de-asserts only when all N inputs are low again
// (hysteresis). THnn is therefore an n-input C-element and TH1n an n-input OR.
// Inputs 0 and 1 may carry weights W0 and W1 (the "w" gates of NCL, such as
// TH34w2); all other inputs weigh 1. RESETTABLE/RESET_VAL give the resettable
// N (reset to 0) and D (reset to 1) variants. Purely level-sensitive, no clock.
module ncl_th #(
  parameter int unsigned N          = 2,
  parameter int unsigned M          = 2,
  parameter int unsigned W0         = 1,
  parameter int unsigned W1         = 1,
  parameter bit          RESETTABLE = 1'b0,
  parameter bit          RESET_VAL  = 1'b0
) (
  input  logic         rst,
  input  logic [N-1:0] in,
  output logic         z
);

  logic [7:0] weight_sum;
  logic       set;

  always_comb begin
    weight_sum = '0;
    for (int unsigned i = 0; i < N; i++) begin
      if (in[i]) begin
        if (i == 0)      weight_sum = weight_sum + 8'(W0);
        else if (i == 1) weight_sum = weight_sum + 8'(W1);
        else             weight_sum = weight_sum + 8'd1;
      end
    end
  end

  assign set = (weight_sum >= 8'(M));

  ncl_gate #(.N(N), .RESETTABLE(RESETTABLE), .RESET_VAL(RESET_VAL)) u_gate (
    .rst(rst), .in(in), .set(set), .z(z)
  );

endmodule
