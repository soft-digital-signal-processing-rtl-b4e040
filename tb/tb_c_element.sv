// Self-checking test of c_element (3 inputs): random input changes, one
// bit at a time or several at once, against a reference state machine.
// Also checks that reset clears the state.
module tb_c_element;
  timeunit 1ps; timeprecision 1ps;

  logic       rst = 0;
  logic [2:0] in;
  logic       q;
  logic       ref_q;
  int         checks = 0, failures = 0;

  c_element #(.N(3)) dut (.rst(rst), .in(in), .q(q));

  task automatic check(input string what);
    checks++;
    if (q !== ref_q) begin
      failures++;
      $display("FAIL %s: in=%b q=%b expected %b", what, in, q, ref_q);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst = 1; in = 3'b111; ref_q = 0;
    #1 check("reset");
    rst = 0; in = 3'b000;
    #1 check("after reset");
    for (int i = 0; i < 400; i++) begin
      in = 3'($urandom);
      if (in == 3'b111) ref_q = 1;
      else if (in == 3'b000) ref_q = 0;
      #1 check("random");
    end
    // Walk up one input at a time, then down.
    in = 3'b000; ref_q = 0; #1;
    in = 3'b001; #1 check("up 1");
    in = 3'b011; #1 check("up 2");
    in = 3'b111; ref_q = 1; #1 check("up 3");
    in = 3'b110; #1 check("down 1");
    in = 3'b100; #1 check("down 2");
    in = 3'b000; ref_q = 0; #1 check("down 3");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
