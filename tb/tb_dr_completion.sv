// Self-checking test of dr_completion (5 bits): bits turn from SPACER to
// DATA one by one in random order and back; done must change only on the
// last bit of each wave and hold in between.
module tb_dr_completion;
  import dr_pkg::*;
  timeunit 1ps; timeprecision 1ps;

  localparam int W = 5;
  logic            rst = 0;
  dr_bit_t [W-1:0] bus;
  logic            done;
  int              checks = 0, failures = 0;

  dr_completion #(.W(W)) dut (.rst(rst), .bus(bus), .done(done));

  task automatic expect_done(input logic v, input string what);
    checks++;
    if (done !== v) begin
      failures++;
      $display("FAIL %s: done=%b expected %b", what, done, v);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int order[W];
    #1 rst = 1; bus = '0;
    #1 expect_done(0, "reset");
    rst = 0;
    for (int round = 0; round < 60; round++) begin
      foreach (order[i]) order[i] = i;
      order.shuffle();
      for (int j = 0; j < W; j++) begin
        bus[order[j]] = dr_encode(1'($urandom));
        #1 expect_done(j == W-1, "data wave");
      end
      order.shuffle();
      for (int j = 0; j < W; j++) begin
        bus[order[j]] = '0;
        #1 expect_done(j != W-1, "spacer wave");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
