// Self-checking test of dr_register (4 bits). The testbench plays both the
// previous stage and the next one:
//  - req high: a DATA word passes, ack falls;
//  - req low with DATA still at the input: the word is held;
//  - input SPACER with req low: SPACER passes, ack rises;
//  - req low and a new DATA word at the input: it must not pass;
//  - raising req then lets it through.
// A second instance with GUARD = 1 must in addition hold a DATA word while
// req is high even if the input changes to another word, and hold it while
// req is low until the whole input word is SPACER.
module tb_dr_register;
  import dr_pkg::*;
  timeunit 1ps; timeprecision 1ps;

  localparam int W = 4;
  logic            rst = 0, req = 1, ack;
  dr_bit_t [W-1:0] d_in, d_out;
  int              checks = 0, failures = 0;

  dr_register #(.W(W)) dut (.rst(rst), .req(req), .d_in(d_in), .d_out(d_out), .ack(ack));

  logic            g_req = 1, g_ack;
  dr_bit_t [W-1:0] g_in, g_out;
  dr_register #(.W(W), .GUARD(1'b1)) dut_g (.rst(rst), .req(g_req), .d_in(g_in),
                                            .d_out(g_out), .ack(g_ack));

  task automatic expect_g(input dr_bit_t [W-1:0] o, input logic a, input string what);
    checks++;
    if (g_out !== o || g_ack !== a) begin
      failures++;
      $display("FAIL guarded %s: d_out=%h ack=%b expected %h %b", what, g_out, g_ack, o, a);
    end
  endtask

  function automatic dr_bit_t [W-1:0] enc(input logic [W-1:0] v);
    dr_bit_t [W-1:0] r;
    for (int i = 0; i < W; i++) r[i] = dr_encode(v[i]);
    return r;
  endfunction

  task automatic expect_state(input dr_bit_t [W-1:0] o, input logic a, input string what);
    checks++;
    if (d_out !== o || ack !== a) begin
      failures++;
      $display("FAIL %s: d_out=%h ack=%b expected %h %b", what, d_out, ack, o, a);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] v, v2;
    #1 rst = 1; req = 1; d_in = '0; g_in = '0;
    #1 rst = 0;
    #1 expect_state('0, 1, "reset");
    for (int r = 0; r < 100; r++) begin
      v  = W'($urandom);
      v2 = ~v;
      // DATA arrives while the next stage requests DATA.
      d_in = enc(v);
      #1 expect_state(enc(v), 0, "data passes");
      // Next stage asks for SPACER, input still DATA: hold.
      req = 0;
      #1 expect_state(enc(v), 0, "data held");
      // Input returns to SPACER: it passes.
      d_in = '0;
      #1 expect_state('0, 1, "spacer passes");
      // A new word arrives before the next stage asks for it: blocked.
      d_in = enc(v2);
      #1 expect_state('0, 1, "data blocked");
      // Next stage asks for DATA: it passes.
      req = 1;
      #1 expect_state(enc(v2), 0, "data released");
      // Input to SPACER while req is still high: output holds DATA.
      d_in = '0;
      #1 expect_state(enc(v2), 0, "data held on req high");
      req = 0;
      #1 expect_state('0, 1, "spacer after req low");
      req = 1;
      #1;
      // Guarded register.
      g_in = enc(v);
      #1 expect_g(enc(v), 0, "data passes");
      g_in = '0;
      #1 expect_g(enc(v), 0, "held, req high, input spacer");
      g_in = enc(v2);
      #1 expect_g(enc(v), 0, "held, req high, new word");
      g_req = 0;
      #1 expect_g(enc(v), 0, "held, req low, new word");
      g_in = '0;
      #1 expect_g('0, 1, "spacer passes");
      g_in = enc(v2);
      #1 expect_g('0, 1, "blocked, req low");
      g_in = '0;
      g_req = 1;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
