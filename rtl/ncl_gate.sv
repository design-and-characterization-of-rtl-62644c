// ncl_gate: the state-holding core shared by every NCL gate.
//
// An NCL gate asserts its output once its set function is true and, because of
// hysteresis, keeps it asserted until every one of its inputs is de-asserted.
// The caller computes the set function (a threshold, a weighted threshold or
// any other positive function of the inputs) and passes it on `set`; the raw
// inputs come in on `in` so that the gate can see when all of them are low.
// With RESETTABLE=1 the gate is forced to RESET_VAL while rst is high, which
// gives the N-type (reset to 0) and D-type (reset to 1) gates of NCL.
//
// Hysteresis makes this a level-sensitive storage element, so synthesis
// infers a latch here on purpose; it is the only storage in the NCL designs.
// There is no clock: outputs follow inputs after zero delay in simulation.
module ncl_gate #(
  parameter int unsigned N          = 2,
  parameter bit          RESETTABLE = 1'b0,
  parameter bit          RESET_VAL  = 1'b0
) (
  input  logic         rst,
  input  logic [N-1:0] in,
  input  logic         set,
  output logic         z
);

  logic rst_en;
  assign rst_en = RESETTABLE && rst;

  always_latch begin
    if (rst_en)          z = RESET_VAL;
    else if (set)        z = 1'b1;
    else if (in == '0)   z = 1'b0;
  end

endmodule
