// crossbar_switch: a 4-input by 3-output on-chip crossbar switch with a
// round-robin scheduler per output port.
//
// An input port that has a word for some output raises req_valid[i] and
// puts the output's number on req_dest[i]. At the next rising clock edge
// the scheduler (xbar_scheduler, one rr_arbiter per output) picks for each
// output one of the inputs that asked for it, in rotating priority order,
// and registers the grants. During the following cycle the crossbar core
// connects each granted input to its output: the input sees in_grant[i] and
// drives its word on in_data[i], which appears on out_data[j] with
// out_valid[j] high and out_src[j] naming the input. Inputs that lost keep
// requesting and are served in later cycles; an input that has been served
// drops its request in its grant cycle if it has no more to send.
//
// Timing: request sampled at edge t, connection during cycle t..t+1, one
// word per output per cycle; different outputs transfer in parallel. Reset
// (rst_n, synchronous, active low) clears all connections and gives input 0
// the highest priority at every output. Port counts and the round-robin
// policy follow the switch's description; the request encoding, the data
// width and the same-cycle data path are this design's choices.
module crossbar_switch
  import xbar_pkg::*;
#(
  parameter int unsigned NI = N_IN,
  parameter int unsigned NO = N_OUT,
  parameter int unsigned DW = DATA_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // input ports
  input  logic [NI-1:0]         req_valid,
  input  dest_t [NI-1:0]        req_dest,
  input  logic [NI-1:0][DW-1:0] in_data,
  output logic [NI-1:0]         in_grant,
  // output ports
  output logic [NO-1:0]         out_valid,
  output src_t  [NO-1:0]        out_src,
  output logic [NO-1:0][DW-1:0] out_data
);

  logic [NO-1:0][NI-1:0] out_grant;
  logic [NO-1:0]         sched_valid;
  logic [NO-1:0]         core_valid;

  xbar_scheduler #(.NI(NI), .NO(NO)) u_sched (
    .clk       (clk),
    .rst_n     (rst_n),
    .req_valid (req_valid),
    .req_dest  (req_dest),
    .out_grant (out_grant),
    .out_valid (sched_valid),
    .out_src   (out_src),
    .in_grant  (in_grant)
  );

  crossbar_core #(.NI(NI), .NO(NO), .DW(DW)) u_core (
    .in_data   (in_data),
    .out_grant (out_grant),
    .out_data  (out_data),
    .out_valid (core_valid)
  );

  assign out_valid = core_valid;

  // The fabric and the scheduler agree on which outputs are connected.
  a_valid_agree: assert property (@(posedge clk) disable iff (!rst_n)
    sched_valid == core_valid);

endmodule
