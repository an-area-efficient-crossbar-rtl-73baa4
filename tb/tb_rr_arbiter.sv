// tb_rr_arbiter: self-checking test of the round-robin arbiter (N = 4).
//
// 1. The two-cycle sequence of the scheduler's truth table: r0 and r1 at the
//    first edge give g0 only (input 0 has the highest priority after reset);
//    r1 alone at the second edge gives g1. Each grant must appear exactly one
//    clock edge after its request is sampled.
// 2. All four inputs requesting continuously: grants must rotate 0,1,2,3,0...
// 3. Random requests checked against a behavioural round-robin model that
//    keeps an integer pointer and searches upward from it.
module tb_rr_arbiter;
  localparam int N = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] req = '0, grant;
  int checks = 0, failures = 0;
  int ptr = 0;   // model: index of the highest-priority input

  rr_arbiter dut (.clk(clk), .rst_n(rst_n), .req(req), .grant(grant));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] model_grant(input logic [N-1:0] r, input int p);
    for (int k = 0; k < N; k++) begin
      int idx = (p + k) % N;
      if (r[idx]) return N'(1) << idx;
    end
    return '0;
  endfunction

  // Apply r for one clock edge and check the grant that follows it.
  task automatic step(input logic [N-1:0] r);
    logic [N-1:0] exp;
    @(negedge clk);
    req = r;
    exp = model_grant(r, ptr);
    @(posedge clk);
    #1;
    for (int i = 0; i < N; i++) if (exp[i]) ptr = (i + 1) % N;
    checks++;
    if (grant !== exp) begin
      failures++;
      $display("FAIL req=%b grant=%b expected=%b", r, grant, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    // truth table: edge 1 r0 r1 -> g0, edge 2 r1 -> g1
    step(4'b0011);
    checks++;
    if (grant !== 4'b0001) begin failures++; $display("FAIL table row 1"); end
    step(4'b0010);
    checks++;
    if (grant !== 4'b0010) begin failures++; $display("FAIL table row 2"); end

    // grant is one cycle wide: with no request the next cycle has none
    step(4'b0000);
    checks++;
    if (grant !== 4'b0000) begin failures++; $display("FAIL idle"); end

    // full load: strict rotation, starting after the last winner (input 1)
    for (int c = 0; c < 12; c++) begin
      step(4'b1111);
      checks++;
      if (grant !== (N'(1) << ((c + 2) % N))) begin
        failures++;
        $display("FAIL rotation cycle %0d grant=%b", c, grant);
      end
    end

    // random traffic
    for (int c = 0; c < 3000; c++) begin
      step(N'($urandom));
    end

    // reset restores input 0 as the highest priority
    @(negedge clk);
    req = '0;
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    ptr = 0;
    step(4'b1111);
    checks++;
    if (grant !== 4'b0001) begin failures++; $display("FAIL after reset"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
