// tb_crossbar_core: random test of the 4 x 3 crossbar fabric. Each output
// gets a one-hot grant (or none); the expected word is picked from the
// input array by index, independently of the AND-OR structure.
module tb_crossbar_core;
  import xbar_pkg::*;
  logic [N_IN-1:0][DATA_W-1:0]  in_data;
  logic [N_OUT-1:0][N_IN-1:0]   out_grant;
  logic [N_OUT-1:0][DATA_W-1:0] out_data;
  logic [N_OUT-1:0]             out_valid;
  int checks = 0, failures = 0;

  crossbar_core dut (.in_data(in_data), .out_grant(out_grant),
                     .out_data(out_data), .out_valid(out_valid));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sel [N_OUT];
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < N_IN; i++) in_data[i] = DATA_W'($urandom);
      for (int j = 0; j < N_OUT; j++) begin
        sel[j] = int'($urandom_range(0, N_IN));   // N_IN means no grant
        out_grant[j] = (sel[j] < N_IN) ? (N_IN'(1) << sel[j]) : '0;
      end
      #1;
      for (int j = 0; j < N_OUT; j++) begin
        logic [DATA_W-1:0] exp_d;
        exp_d = (sel[j] < N_IN) ? in_data[sel[j]] : '0;
        checks++;
        if (out_data[j] !== exp_d || out_valid[j] !== (sel[j] < N_IN)) begin
          failures++;
          $display("FAIL out %0d sel %0d data %h exp %h valid %b",
                   j, sel[j], out_data[j], exp_d, out_valid[j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
