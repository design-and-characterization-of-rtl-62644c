// ncl_mux: merges N demultiplexed W-bit dual-rail results into one result.
//
// Since at most one source carries DATA at a time (the demultiplexer only
// feeds the selected function), merging is an OR of each rail over all
// sources. It is built from TH1n gates of at most four inputs: sources are
// grouped by four into TH1n gates, and the group outputs are merged by one
// more TH1n gate (N = 8 gives two TH14 and one TH12 per rail, N = 4 a single
// TH14). N may be at most 16.
// With EMBED=1 the last gate also takes the request ki and a reset, making
// the multiplexer an embedded register: a rail asserts only while ki is high
// and, like a register, holds until ki and its inputs have dropped. ko_o is
// then the per-bit acknowledge (high when the output bit is NULL).
module ncl_mux
  import ncl_pkg::*;
#(
  parameter int unsigned N     = 8,
  parameter int unsigned W     = 4,
  parameter bit          EMBED = 1'b0
) (
  input  logic          rst,
  input  logic          ki,
  input  dr_t  [W-1:0]  src [N],
  output dr_t  [W-1:0]  f,
  output logic [W-1:0]  ko
);

  localparam int unsigned G = (N + 3) / 4;

  for (genvar i = 0; i < W; i++) begin : g_bit
    for (genvar r = 0; r < 2; r++) begin : g_rail
      logic [N-1:0] rail_in;
      logic [G-1:0] grp;
      logic         z;
      for (genvar n = 0; n < N; n++) begin : g_src
        assign rail_in[n] = r ? src[n][i].r1 : src[n][i].r0;
      end
      for (genvar g = 0; g < G; g++) begin : g_grp
        localparam int unsigned GW = ((N - 4 * g) >= 4) ? 4 : (N - 4 * g);
        if (G == 1 && EMBED) begin : g_reg
          // Single level: the group gate itself is the register stage.
          ncl_gate #(.N(GW + 1), .RESETTABLE(1'b1), .RESET_VAL(1'b0)) u_g (
            .rst(rst), .in({ki, rail_in[4*g +: GW]}), .set(ki && |rail_in[4*g +: GW]),
            .z(grp[g])
          );
        end else begin : g_or
          ncl_th #(.N(GW), .M(1)) u_g (.rst(1'b0), .in(rail_in[4*g +: GW]), .z(grp[g]));
        end
      end
      if (G == 1) begin : g_one
        assign z = grp[0];
      end else if (EMBED) begin : g_reg
        ncl_gate #(.N(G + 1), .RESETTABLE(1'b1), .RESET_VAL(1'b0)) u_m (
          .rst(rst), .in({ki, grp}), .set(ki && |grp), .z(z)
        );
      end else begin : g_or
        ncl_th #(.N(G), .M(1)) u_m (.rst(1'b0), .in(grp), .z(z));
      end
      if (r == 0) begin : g_r0
        assign f[i].r0 = z;
      end else begin : g_r1
        assign f[i].r1 = z;
      end
    end
    assign ko[i] = !(f[i].r0 || f[i].r1);
  end

  initial assert (N >= 1 && N <= 16) else $error("ncl_mux: N must be 1..16");

endmodule
