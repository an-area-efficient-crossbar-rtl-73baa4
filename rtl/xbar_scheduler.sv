// xbar_scheduler: crossbar switch scheduler, one round-robin arbiter per
// output port.
//
// Every input port i may request one output port at a time: req_valid[i]
// with req_dest[i] naming the output. The scheduler turns these into one
// request vector per output (bit i set when input i wants that output) and
// hands each vector to its own rr_arbiter. Each output therefore picks,
// independently and every cycle, the requesting input that holds its highest
// priority, and rotates that priority so the inputs are served fairly.
// Because an input names a single destination it can never be granted by
// two outputs at once, so the grants of all outputs together form a valid
// set of crossbar connections without any further matching step.
//
// Outputs: out_grant[j] is output j's registered one-hot grant vector,
// out_valid[j] says output j has a connection this cycle and out_src[j]
// names the connected input; in_grant[i] tells input i it was granted (by
// the output it asked for). All outputs change on the rising clock edge
// after the requests were sampled and hold for one cycle (the arbiters'
// timing). The one-request-per-input encoding is this design's choice; the
// per-output round-robin selection follows the switch's description.
module xbar_scheduler
  import xbar_pkg::*;
#(
  parameter int unsigned NI = N_IN,
  parameter int unsigned NO = N_OUT
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [NI-1:0]           req_valid,
  input  dest_t [NI-1:0]          req_dest,
  output logic [NO-1:0][NI-1:0]   out_grant,
  output logic [NO-1:0]           out_valid,
  output src_t  [NO-1:0]          out_src,
  output logic [NI-1:0]           in_grant
);

  logic [NO-1:0][NI-1:0] out_req;

  // Destination decode: output j sees the inputs that ask for it.
  always_comb begin
    for (int j = 0; j < NO; j++) begin
      for (int i = 0; i < NI; i++) begin
        out_req[j][i] = req_valid[i] && (req_dest[i] == dest_t'(j));
      end
    end
  end

  for (genvar j = 0; j < NO; j++) begin : g_out
    rr_arbiter #(.N(NI)) u_arb (
      .clk   (clk),
      .rst_n (rst_n),
      .req   (out_req[j]),
      .grant (out_grant[j])
    );
  end

  // Connection summary per output, and the grant seen by each input.
  always_comb begin
    in_grant = '0;
    for (int j = 0; j < NO; j++) begin
      out_valid[j] = |out_grant[j];
      out_src[j]   = '0;
      for (int i = 0; i < NI; i++) begin
        if (out_grant[j][i]) out_src[j] = src_t'(i);
      end
      in_grant |= out_grant[j];
    end
  end

  // No input is connected to two outputs at the same time.
  for (genvar i = 0; i < NI; i++) begin : g_chk
    logic [NO-1:0] col;
    for (genvar j = 0; j < NO; j++) begin : g_col
      assign col[j] = out_grant[j][i];
    end
    a_one_output: assert property (@(posedge clk) disable iff (!rst_n)
      $onehot0(col));
  end

endmodule
