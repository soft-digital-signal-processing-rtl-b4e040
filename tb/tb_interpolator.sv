// Self-checking test of interpolator (9-bit words): random words and random
// miss indications; at a miss y_est must be the rounded-down average of the
// previous and the new word, est_valid must follow miss, y the new word.
module tb_interpolator;
  timeunit 1ps; timeprecision 1ps;

  localparam int W = 9;
  logic         rst = 0, done = 0, miss = 0, est_valid;
  logic [W-1:0] y_in, y, y_est;
  int           checks = 0, failures = 0;

  interpolator #(.W(W)) dut (.rst(rst), .done(done), .miss(miss), .y_in(y_in), .y(y),
                             .y_est(y_est), .est_valid(est_valid));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int prev, cur, exp_est;
    #1 rst = 1; done = 0; miss = 0; y_in = '0;
    #5 rst = 0;
    prev = 0; exp_est = 0;
    for (int e = 0; e < 500; e++) begin
      cur  = int'(W'($urandom));
      if (e < 4) cur = (e % 2 == 0) ? 0 : (1 << W) - 1;  // extremes
      miss = (e > 0) && ($urandom % 2 == 0);
      y_in = W'(cur);
      #2 done = 1;
      #2;
      if (miss) exp_est = (prev + cur) / 2;
      checks++;
      if (y !== W'(cur) || est_valid !== miss || y_est !== W'(exp_est)) begin
        failures++;
        $display("FAIL event %0d: y=%0d est=%0d/%b expected %0d %0d/%b", e, y, y_est,
                 est_valid, cur, exp_est, miss);
      end
      done = 0;
      prev = cur;
      #2;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
