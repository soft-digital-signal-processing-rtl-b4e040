// soft_dsp_top at its default parameters (8-bit adder chain, 191 ps per full
// adder, so D = 1528 ps) driven at a 400 MHz sample rate (1250 ps DATA,
// 1250 ps SPACER): D exceeds half the period, n = floor(1250 / 278) = 4, and
// about 2 pairs in 7 are lost and interpolated. 2000 samples, every output
// checked against the timing model (see st_checker).
module tb_soft_dsp_full;
  timeunit 1ps; timeprecision 1ps;

  localparam int     N = 8;
  localparam longint H = 1250;
  localparam longint D = 8 * 191;
  localparam int     K = 2000;

  logic         clk, rst, ci, take, data_phase, out_req, out_ack, out_event;
  logic         est_valid, miss, miss_q;
  logic [N-1:0] a, b;
  logic [N:0]   y, y_est;
  logic [31:0]  miss_count, out_count;
  int           checks, failures;
  logic         finished;

  soft_dsp_top u_dut (
    .clk(clk), .rst(rst), .a(a), .b(b), .ci(ci), .take(take), .data_phase(data_phase),
    .in_ack(), .out_req(out_req), .out_ack(out_ack), .out_event(out_event), .out_bus(), .y(y),
    .y_est(y_est), .est_valid(est_valid), .miss(miss), .miss_q(miss_q),
    .miss_count(miss_count), .out_count(out_count)
  );

  st_checker #(.N(N), .H(H), .D(D), .K(K), .EXPECT_MISS(1'b1)) u_chk (
    .clk(clk), .rst(rst), .a(a), .b(b), .ci(ci), .out_req(out_req), .take(take),
    .data_phase(data_phase), .out_ack(out_ack), .out_event(out_event), .y(y),
    .y_est(y_est), .est_valid(est_valid), .miss_q(miss_q), .miss_count(miss_count),
    .out_count(out_count), .checks(checks), .failures(failures), .finished(finished)
  );

  initial begin
    #(2 * H * (K + 20));
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    #10;
    wait (finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
