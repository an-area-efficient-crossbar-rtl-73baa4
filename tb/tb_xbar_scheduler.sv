// tb_xbar_scheduler: random test of the 4 x 3 crossbar scheduler against a
// behavioural model that keeps one round-robin pointer per output port.
// Every clock edge the model decides each output's winner from the sampled
// requests; the test checks out_grant, out_valid, out_src and in_grant one
// edge later.
module tb_xbar_scheduler;
  import xbar_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N_IN-1:0]            req_valid = '0;
  dest_t [N_IN-1:0]           req_dest = '0;
  logic [N_OUT-1:0][N_IN-1:0] out_grant;
  logic [N_OUT-1:0]           out_valid;
  src_t [N_OUT-1:0]           out_src;
  logic [N_IN-1:0]            in_grant;
  int checks = 0, failures = 0;
  int ptr [N_OUT];
  int contended = 0;

  xbar_scheduler dut (.clk(clk), .rst_n(rst_n), .req_valid(req_valid),
                      .req_dest(req_dest), .out_grant(out_grant),
                      .out_valid(out_valid), .out_src(out_src),
                      .in_grant(in_grant));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (ptr[j]) ptr[j] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 4000; t++) begin
      int win [N_OUT];
      logic [N_IN-1:0] exp_in;
      @(negedge clk);
      for (int i = 0; i < N_IN; i++) begin
        req_valid[i] = ($urandom_range(0, 3) != 0);
        req_dest[i]  = dest_t'($urandom_range(0, N_OUT - 1));
      end
      // model
      exp_in = '0;
      for (int j = 0; j < N_OUT; j++) begin
        int n, idx;
        n = 0;
        win[j] = -1;
        for (int k = 0; k < N_IN; k++) begin
          idx = (ptr[j] + k) % N_IN;
          if (req_valid[idx] && int'(req_dest[idx]) == j) begin
            n++;
            if (win[j] < 0) win[j] = idx;
          end
        end
        if (n > 1) contended++;
        if (win[j] >= 0) begin
          ptr[j] = (win[j] + 1) % N_IN;
          exp_in[win[j]] = 1'b1;
        end
      end
      @(posedge clk);
      #1;
      for (int j = 0; j < N_OUT; j++) begin
        logic [N_IN-1:0] exp_g;
        exp_g = (win[j] >= 0) ? (N_IN'(1) << win[j]) : '0;
        checks++;
        if (out_grant[j] !== exp_g || out_valid[j] !== (win[j] >= 0) ||
            (win[j] >= 0 && int'(out_src[j]) != win[j])) begin
          failures++;
          $display("FAIL t=%0d out %0d grant %b exp %b src %0d", t, j,
                   out_grant[j], exp_g, out_src[j]);
        end
      end
      checks++;
      if (in_grant !== exp_in) begin
        failures++;
        $display("FAIL t=%0d in_grant %b exp %b", t, in_grant, exp_in);
      end
    end
    checks++;
    if (contended == 0) begin failures++; $display("FAIL no contention"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
