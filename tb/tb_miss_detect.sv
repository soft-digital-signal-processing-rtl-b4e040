// Self-checking test of miss_detect. Output events are generated from a
// random stream of samples in which single samples are dropped at random
// (never two in a row); each event carries the flag of its sample (sample
// index modulo 2). 'miss' must be high exactly at the events that follow a
// dropped sample, and the counters must match.
module tb_miss_detect;
  timeunit 1ps; timeprecision 1ps;

  logic        rst = 0, done = 0, flag = 0;
  logic        miss, miss_q;
  logic [31:0] miss_count, out_count;
  int          checks = 0, failures = 0;

  miss_detect dut (.rst(rst), .done(done), .flag(flag), .miss(miss), .miss_q(miss_q),
                   .miss_count(miss_count), .out_count(out_count));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int  k, n_out, n_miss;
    logic dropped, exp_miss;
    #1 rst = 1; done = 0; flag = 0;
    #5 rst = 0;
    k = 0; n_out = 0; n_miss = 0; dropped = 0;
    for (int e = 0; e < 500; e++) begin
      // Drop the next sample with probability 1/3, never twice in a row.
      if (e > 0 && !dropped && ($urandom % 3 == 0)) begin
        k++;
        dropped = 1;
      end else begin
        dropped = 0;
      end
      exp_miss = dropped;
      flag = k[0];
      #2;
      checks++;
      if (miss !== exp_miss) begin
        failures++;
        $display("FAIL event %0d: miss=%b expected %b", e, miss, exp_miss);
      end
      done = 1;
      #2;
      n_out++;
      if (exp_miss) n_miss++;
      checks++;
      if (miss_q !== exp_miss || out_count != n_out || miss_count != n_miss) begin
        failures++;
        $display("FAIL event %0d: miss_q=%b counts %0d/%0d expected %0d/%0d", e, miss_q,
                 out_count, miss_count, n_out, n_miss);
      end
      done = 0;
      #2;
      k++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
