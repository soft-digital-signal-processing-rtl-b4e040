// Self-checking test of st_computation: 8-bit dual-rail adder with 10 ps per
// full adder. Random operands are applied as one DATA wave; the sum must be
// complete and correct exactly N * FA_DELAY = 80 ps later, not one ps
// earlier, and the SPACER wave must take the same time.
module tb_st_computation;
  import dr_pkg::*;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned N = 8, FD = 10, D = N * FD;
  logic            rst = 0;
  dr_bit_t [N-1:0] a, b;
  dr_bit_t         ci;
  dr_bit_t [N:0]   s;
  int              checks = 0, failures = 0;

  st_computation #(.N(N), .FA_DELAY(FD)) dut (.rst(rst), .a(a), .b(b), .ci(ci), .s(s));

  function automatic dr_bit_t [N:0] enc(input logic [N:0] v);
    dr_bit_t [N:0] r;
    for (int i = 0; i <= N; i++) r[i] = dr_encode(v[i]);
    return r;
  endfunction

  function automatic logic complete(input dr_bit_t [N:0] x);
    for (int i = 0; i <= N; i++) if (!dr_is_data(x[i])) return 1'b0;
    return 1'b1;
  endfunction

  function automatic logic empty(input dr_bit_t [N:0] x);
    return x == '0;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] va, vb;
    logic         vc;
    logic [N:0]   sum;
    #1 rst = 1; a = '0; b = '0; ci = '0;
    #(D + 10) rst = 0;
    #10;
    for (int r = 0; r < 300; r++) begin
      va = N'($urandom); vb = N'($urandom); vc = 1'($urandom);
      if (r == 0) begin va = '1; vb = '0; vc = 1'b1; end  // full carry ripple
      sum = {1'b0, va} + {1'b0, vb} + (N+1)'(vc);
      for (int i = 0; i < N; i++) begin
        a[i] = dr_encode(va[i]);
        b[i] = dr_encode(vb[i]);
      end
      ci = dr_encode(vc);
      #(D - 1);
      checks++;
      if (complete(s)) begin
        failures++;
        $display("FAIL sum complete before %0d ps", D);
      end
      #1;
      checks++;
      if (s !== enc(sum)) begin
        failures++;
        $display("FAIL %h + %h + %b: got %h expected %h", va, vb, vc, s, enc(sum));
      end
      a = '0; b = '0; ci = '0;
      #(D - 1);
      checks++;
      if (empty(s)) begin
        failures++;
        $display("FAIL spacer arrived before %0d ps", D);
      end
      #1;
      checks++;
      if (!empty(s)) begin
        failures++;
        $display("FAIL spacer not complete after %0d ps", D);
      end
      #7;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
