// Self-checking test of dr_encoder (5-bit samples). Every clock the bus must
// alternate between a DATA word (the sample captured on that edge plus the
// flag) and an all-SPACER word; the flag must alternate DATA0, DATA1 from
// one sample to the next, starting with DATA0 after reset.
module tb_dr_encoder;
  import dr_pkg::*;
  timeunit 1ps; timeprecision 1ps;

  localparam int W = 5;
  logic          clk = 0, rst = 0;
  logic [W-1:0]  sample;
  logic          take, data_phase;
  dr_bit_t [W:0] bus;
  int            checks = 0, failures = 0;

  dr_encoder #(.W(W)) dut (.clk(clk), .rst(rst), .sample(sample), .take(take),
                           .data_phase(data_phase), .bus(bus));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic         exp_flag;
    logic [W-1:0] v;
    logic         was_take;
    dr_bit_t [W:0] exp_bus;
    #1 rst = 1; sample = '0;
    #6 rst = 0;
    checks++;
    if (bus !== '0 || data_phase !== 0) begin
      failures++; $display("FAIL reset state");
    end
    exp_flag = 0;
    for (int cyc = 0; cyc < 200; cyc++) begin
      @(negedge clk);
      v = W'($urandom);
      sample = v;
      was_take = take;
      @(posedge clk); #1;
      if (was_take) begin
        for (int i = 0; i < W; i++) exp_bus[i] = dr_encode(v[i]);
        exp_bus[W] = dr_encode(exp_flag);
        exp_flag = ~exp_flag;
      end else begin
        exp_bus = '0;
      end
      checks++;
      if (bus !== exp_bus || data_phase !== was_take) begin
        failures++;
        $display("FAIL cycle %0d: bus=%h expected %h", cyc, bus, exp_bus);
      end
      checks++;
      if (take === was_take) begin
        failures++;
        $display("FAIL cycle %0d: phase did not alternate", cyc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
