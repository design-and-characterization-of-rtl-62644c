// ncl_comp_special: completion for a register stage whose DATA reaches only
// one of K output sets (the demultiplexer register and the select registers
// of the pipelined ALU).
//
// ack[k] is the completion of set k (high: set k is NULL, low: set k is all
// DATA). An ordinary C-element over the ack lines would wait for every set to
// go DATA, which never happens; instead the stage has seen DATA as soon as any
// one set has (the AND of the ack lines falls), and has seen NULL once all
// sets are NULL again (the AND rises). The AND is built as the complement of
// TH1n OR gates over the inverted ack lines. The optional E extra acknowledge
// lines are ordinary ones and join through a C-element (THnn).
module ncl_comp_special #(
  parameter int unsigned K = 8,
  parameter int unsigned E = 0
) (
  input  logic [K-1:0]           ack,
  input  logic [(E > 0 ? E : 1)-1:0] extra,
  output logic                   ko
);

  localparam int unsigned G = (K + 3) / 4;

  logic [G-1:0] any_data;
  logic         set_ack;

  for (genvar g = 0; g < G; g++) begin : g_grp
    localparam int unsigned GW = ((K - 4 * g) >= 4) ? 4 : (K - 4 * g);
    ncl_th #(.N(GW), .M(1)) u_or (.rst(1'b0), .in(~ack[4*g +: GW]), .z(any_data[g]));
  end

  assign set_ack = !(|any_data);

  if (E > 0) begin : g_extra
    ncl_comp #(.N(E + 1)) u_c (.ko_in({extra, set_ack}), .ko(ko));
  end else begin : g_none
    logic unused_extra;
    assign unused_extra = ^extra;
    assign ko = set_ack;
  end

endmodule
