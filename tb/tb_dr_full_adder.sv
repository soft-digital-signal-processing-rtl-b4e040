// Self-checking test of dr_full_adder with DELAY = 50 ps. For every input
// combination the three operands arrive one by one in random order: the
// outputs must stay SPACER until the last one has arrived, be correct exactly
// DELAY later and not before, and stay valid until all three inputs are back
// to SPACER, then return to SPACER DELAY later.
module tb_dr_full_adder;
  import dr_pkg::*;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned DLY = 50;
  logic    rst = 0;
  dr_bit_t a, b, ci, s, co;
  int      checks = 0, failures = 0;

  dr_full_adder #(.DELAY(DLY)) dut (.rst(rst), .a(a), .b(b), .ci(ci), .s(s), .co(co));

  task automatic expect_out(input dr_bit_t es, input dr_bit_t ec, input string what);
    checks++;
    if (s !== es || co !== ec) begin
      failures++;
      $display("FAIL %s: s=%b co=%b expected %b %b", what, s, co, es, ec);
    end
  endtask

  task automatic set_in(input int which, input dr_bit_t v);
    case (which)
      0: a = v;
      1: b = v;
      default: ci = v;
    endcase
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int order[3];
    logic [2:0] v;
    logic [1:0] sum;
    #1 rst = 1; a = '0; b = '0; ci = '0;
    #(DLY + 10) rst = 0;
    #(DLY + 10);
    for (int r = 0; r < 64; r++) begin
      v = 3'(r);
      sum = 2'(v[2]) + 2'(v[1]) + 2'(v[0]);
      order = '{0, 1, 2};
      order.shuffle();
      for (int j = 0; j < 2; j++) begin
        set_in(order[j], dr_encode(v[2-order[j]]));
        #(DLY + 5) expect_out('0, '0, "partial data");
      end
      set_in(order[2], dr_encode(v[2-order[2]]));
      #(DLY - 1) expect_out('0, '0, "before delay");
      #1 expect_out(dr_encode(sum[0]), dr_encode(sum[1]), "after delay");
      order.shuffle();
      for (int j = 0; j < 2; j++) begin
        set_in(order[j], '0);
        #(DLY + 5) expect_out(dr_encode(sum[0]), dr_encode(sum[1]), "partial spacer");
      end
      set_in(order[2], '0);
      #(DLY - 1) expect_out(dr_encode(sum[0]), dr_encode(sum[1]), "spacer before delay");
      #1 expect_out('0, '0, "spacer after delay");
      #5;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
