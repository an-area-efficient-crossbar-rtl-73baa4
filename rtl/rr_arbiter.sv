// rr_arbiter: round-robin scheduler with a rotating priority.
//
// Each clock edge the arbiter looks at the N request lines and grants exactly
// one of the requesters (or none when nobody requests). The search starts at
// the input that currently holds the highest priority and wraps around, so
// the grant goes to the first requester at or after that position. After a
// grant the priority moves to the input just after the one served: the
// winner drops to the lowest priority and every other requester is served
// before it again. With no request the priority stays where it is. After
// reset input 0 has the highest priority, so when r0 and r1 request together
// the first grant is g0 and, with r1 still requesting, the next one is g1.
//
// The priority is kept as a one-hot vector `prio`. The search is a chain of
// 2N stages over the requests masked to positions >= the priority, then over
// all requests; every AND and OR in that chain is a three-input majority gate
// (maj3) with a constant third input, the way the logic is built in QCA.
//
// Interface: req[i] is sampled at the rising edge of clk; grant is a
// registered one-hot (or zero) vector that appears one cycle after the
// request is sampled and lasts one cycle. A requester that wants a single
// transfer should drop its request in the cycle it sees its grant. rst_n is
// a synchronous active-low reset that clears the grant and gives input 0
// the highest priority. The grant timing and the sense of the priority
// update follow the scheduler's description; the reset, the hold of the
// priority when idle and the one-hot priority register are this design's
// choices.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  output logic [N-1:0] grant
);

  logic [N-1:0] prio;        // one-hot: position of the highest priority
  logic [N-1:0] mask;        // thermometer: positions >= the highest priority
  logic [N-1:0] grant_next;
  logic         any_grant;

  // mask[i] = OR of prio[0..i], built as a chain of OR-configured majorities.
  for (genvar i = 0; i < N; i++) begin : g_mask
    if (i == 0) begin : g_first
      assign mask[0] = prio[0];
    end else begin : g_rest
      maj3 u_or (.a(mask[i-1]), .b(prio[i]), .c(1'b1), .y(mask[i]));
    end
  end

  // Priority search over 2N stages. Stage k looks at input k mod N; in the
  // first pass only inputs at or after the priority position take part.
  for (genvar k = 0; k < 2*N; k++) begin : g_chain
    logic elig;     // this stage has an eligible request
    logic seen_in;  // an earlier stage already found a requester
    logic seen_out;
    logic hit;      // this stage wins

    if (k < N) begin : g_pass1
      maj3 u_and_mask (.a(req[k]), .b(mask[k]), .c(1'b0), .y(elig));
    end else begin : g_pass2
      assign elig = req[k-N];
    end

    if (k == 0) begin : g_head
      assign seen_in = 1'b0;
    end else begin : g_link
      assign seen_in = g_chain[k-1].seen_out;
    end

    maj3 u_and_hit (.a(elig),    .b(~seen_in), .c(1'b0), .y(hit));
    maj3 u_or_seen (.a(seen_in), .b(elig),     .c(1'b1), .y(seen_out));
  end

  // Each input can win in either pass; at most one stage of the chain hits.
  for (genvar i = 0; i < N; i++) begin : g_merge
    maj3 u_or_pass (.a(g_chain[i].hit), .b(g_chain[i+N].hit), .c(1'b1),
                    .y(grant_next[i]));
  end

  assign any_grant = g_chain[2*N-1].seen_out;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      grant <= '0;
      prio  <= N'(1);
    end else begin
      grant <= grant_next;
      if (any_grant) begin
        // The input after the winner gets the highest priority next.
        prio <= {grant_next[N-2:0], grant_next[N-1]};
      end
    end
  end

  // The grant is one-hot or zero and only goes to an input that requested.
  a_grant_onehot: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(grant));
  a_grant_requested: assert property (@(posedge clk) disable iff (!rst_n)
    (grant & ~$past(req)) == '0);
  a_prio_onehot: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot(prio));

endmodule
