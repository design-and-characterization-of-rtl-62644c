// ncl_carry_meag_reg: first select-MEAG register of the pipelined ALU; it also
// makes the ALU input-complete with respect to Cin/Bin.
//
// Operations 0-3 do not use Cin/Bin, so their select rails are registered
// with resettable TH34 gates over (select rail, ki, Cin0, Cin1): the rail
// rises only once Cin is DATA (either value) and falls only once Cin is NULL.
// Rails 4-7 (functions that consume Cin themselves) use resettable TH22 gates
// with ki. ko is high when all eight output rails are low.
module ncl_carry_meag_reg
  import ncl_pkg::*;
(
  input  logic       rst,
  input  logic       ki,
  input  logic [7:0] sel,
  input  dr_t        cin,
  output logic [7:0] m,
  output logic       ko
);

  for (genvar k = 0; k < 8; k++) begin : g_rail
    if (k < 4) begin : g_cin
      ncl_th #(.N(4), .M(3), .RESETTABLE(1'b1), .RESET_VAL(1'b0)) u_r (
        .rst(rst), .in({cin.r1, cin.r0, ki, sel[k]}), .z(m[k])
      );
    end else begin : g_plain
      ncl_th #(.N(2), .M(2), .RESETTABLE(1'b1), .RESET_VAL(1'b0)) u_r (
        .rst(rst), .in({ki, sel[k]}), .z(m[k])
      );
    end
  end

  assign ko = (m == '0);

endmodule
