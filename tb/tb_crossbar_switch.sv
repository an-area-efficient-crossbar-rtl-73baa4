// tb_crossbar_switch: end-to-end test of the 4 x 3 crossbar switch at its
// default sizes.
//
// Each input port owns a list of words, each bound for a random output port
// (inputs 0 and 1 favour output 0 so that the outputs see heavy contention).
// An input requests the output of its head word; in the cycle it sees
// in_grant it drives that word, the test checks that the word arrives on
// the right output with out_src naming the input, and the input moves on to
// its next word. The test checks that every word is delivered exactly once
// and in order per input, that an input that keeps requesting is granted within
// N_IN clock edges (round-robin bound), and that every switch mechanism happened:
// contention at an output, priority wrap-around, parallel connections on
// all three outputs, an idle output beside a busy one, and a lost
// arbitration followed by a later grant. It starts with the two-request
// sequence of the scheduler's truth table (r0 and r1 at output 0: g0, then
// g1) and checks the one-edge grant latency.
module tb_crossbar_switch;
  import xbar_pkg::*;
  localparam int WORDS = 400;   // words per input

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N_IN-1:0]              req_valid = '0;
  dest_t [N_IN-1:0]             req_dest = '0;
  logic [N_IN-1:0][DATA_W-1:0]  in_data = '0;
  logic [N_IN-1:0]              in_grant;
  logic [N_OUT-1:0]             out_valid;
  src_t [N_OUT-1:0]             out_src;
  logic [N_OUT-1:0][DATA_W-1:0] out_data;

  int checks = 0, failures = 0;

  crossbar_switch dut (.clk(clk), .rst_n(rst_n), .req_valid(req_valid),
                       .req_dest(req_dest), .in_data(in_data),
                       .in_grant(in_grant), .out_valid(out_valid),
                       .out_src(out_src), .out_data(out_data));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // traffic
  int unsigned dst  [N_IN][WORDS];
  logic [DATA_W-1:0] word [N_IN][WORDS];
  int head [N_IN];
  int wait_edges [N_IN];
  int delivered = 0;
  // mechanism counters
  int n_contention = 0, n_wrap = 0, n_all_outputs = 0, n_idle_beside = 0;
  int n_lost_then_won = 0, max_wait = 0;
  int last_src [N_OUT];

  initial begin
    // --- the truth-table sequence on output 0 ---
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    req_valid = 4'b0011;
    req_dest  = '0;
    in_data[0] = 8'hA0;
    in_data[1] = 8'hA1;
    @(posedge clk);
    #1;
    check(in_grant == 4'b0001 && out_valid == 3'b001 && out_data[0] == 8'hA0,
          "table row 1: r0 r1 -> g0");
    @(negedge clk);
    req_valid = 4'b0010;
    @(posedge clk);
    #1;
    check(in_grant == 4'b0010 && out_valid == 3'b001 && out_data[0] == 8'hA1,
          "table row 2: r1 -> g1");
    @(negedge clk);
    req_valid = '0;
    @(posedge clk);
    #1;
    check(out_valid == '0 && in_grant == '0, "grant lasts one cycle");

    // --- random traffic on all ports ---
    for (int i = 0; i < N_IN; i++) begin
      for (int w = 0; w < WORDS; w++) begin
        if (i < 2 && $urandom_range(0, 1) == 0) dst[i][w] = 0;
        else dst[i][w] = $urandom_range(0, N_OUT - 1);
        word[i][w] = DATA_W'($urandom);
      end
      head[i] = 0;
      wait_edges[i] = 0;
    end
    foreach (last_src[j]) last_src[j] = 1;   // output 0 last served input 1

    while (delivered < N_IN * WORDS) begin
      int per_out [N_OUT];
      @(negedge clk);
      // present head words; some inputs pause now and then
      foreach (per_out[j]) per_out[j] = 0;
      for (int i = 0; i < N_IN; i++) begin
        if (head[i] < WORDS && $urandom_range(0, 7) != 0) begin
          req_valid[i] = 1'b1;
          req_dest[i]  = dest_t'(dst[i][head[i]]);
          in_data[i]   = word[i][head[i]];
          per_out[dst[i][head[i]]]++;
        end else begin
          req_valid[i] = 1'b0;
          in_data[i]   = '0;
          wait_edges[i] = 0;   // the bound holds for unbroken requests
        end
      end
      foreach (per_out[j]) if (per_out[j] > 1) n_contention++;
      @(posedge clk);
      #1;
      // check what the switch connected
      for (int i = 0; i < N_IN; i++) begin
        if (req_valid[i] && !in_grant[i]) begin
          wait_edges[i]++;
          if (wait_edges[i] > max_wait) max_wait = wait_edges[i];
        end
        check(!(in_grant[i] && !req_valid[i]), "grant without request");
        if (in_grant[i] && req_valid[i]) begin
          int j;
          j = int'(req_dest[i]);
          check(out_valid[j] && int'(out_src[j]) == i && out_data[j] == word[i][head[i]],
                $sformatf("input %0d word %0d to output %0d", i, head[i], j));
          if (wait_edges[i] > 0) n_lost_then_won++;
          if (i < last_src[j]) n_wrap++;
          last_src[j] = i;
          wait_edges[i] = 0;
          head[i]++;
          delivered++;
        end
      end
      if (out_valid == '1) n_all_outputs++;
      if (out_valid != '0 && out_valid != '1) n_idle_beside++;
      // an output with requesters is never left idle
      for (int j = 0; j < N_OUT; j++) begin
        if (per_out[j] > 0) check(out_valid[j], "requested output left idle");
        else check(!out_valid[j], "output valid without request");
      end
    end

    check(max_wait <= N_IN - 1, $sformatf("round-robin wait bound, max %0d", max_wait));
    check(delivered == N_IN * WORDS, "all words delivered");
    check(n_contention > 0, "contention happened");
    check(n_wrap > 0, "priority wrap-around happened");
    check(n_all_outputs > 0, "all outputs connected at once");
    check(n_idle_beside > 0, "idle output beside busy one");
    check(n_lost_then_won > 0, "lost arbitration then granted");
    $display("words=%0d contention=%0d wrap=%0d all_outputs=%0d idle_beside=%0d lost_then_won=%0d max_wait=%0d",
             delivered, n_contention, n_wrap, n_all_outputs, n_idle_beside,
             n_lost_then_won, max_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
