// crossbar_core: the switch fabric, N_IN inputs by N_OUT outputs.
//
// Each output port is an AND-OR multiplexer: the word of every input is
// gated by that input's bit in the output's one-hot grant vector and the
// gated words are ORed together. With a one-hot grant the output carries
// exactly the granted input's word; with no grant it carries zero and
// out_valid is low. Several outputs can be connected at once, each to a
// different input, which is what makes the crossbar non-blocking.
//
// Purely combinational: the connection lasts as long as the grant vector
// (one clock cycle per scheduler grant). The AND-OR form of the fabric is
// this design's choice; the crossbar itself only has to connect each output
// to the input its scheduler selected.
module crossbar_core
  import xbar_pkg::*;
#(
  parameter int unsigned NI = N_IN,
  parameter int unsigned NO = N_OUT,
  parameter int unsigned DW = DATA_W
) (
  input  logic [NI-1:0][DW-1:0] in_data,
  input  logic [NO-1:0][NI-1:0] out_grant,
  output logic [NO-1:0][DW-1:0] out_data,
  output logic [NO-1:0]         out_valid
);

  always_comb begin
    for (int j = 0; j < NO; j++) begin
      out_data[j] = '0;
      for (int i = 0; i < NI; i++) begin
        out_data[j] |= in_data[i] & {DW{out_grant[j][i]}};
      end
      out_valid[j] = |out_grant[j];
    end
  end

endmodule
