// End-to-end test of soft_dsp_top at four operating points, all with the
// 8-bit adder chain and 1000 ps DATA/SPACER phases (500 MHz
// sample rate). The full-adder delay stands for the supply voltage:
//   100 ps: D = 800 ps  < T/2  - above the critical voltage, nothing lost;
//   157 ps: D = 1256 ps > T/2  - n = 3, one pair in three lost;
//   140 ps: D = 1120 ps > T/2  - n = 8, on average 2 pairs in 11 lost;
//   237 ps: D = 1896 ps < T    - n = 1, every other pair lost.
// Every output is checked against a timing model; see st_checker.
module tb_soft_dsp_top;
  timeunit 1ps; timeprecision 1ps;

  localparam int     N  = 8;
  localparam longint H  = 1000;
  localparam int     K  = 400;
  localparam int     NC = 4;
  localparam int     FA[NC] = '{100, 157, 140, 237};

  int   checks[NC], failures[NC];
  logic finished[NC];

  for (genvar c = 0; c < NC; c++) begin : g_cfg
    logic         clk, rst, ci, take, data_phase, out_req, out_ack, out_event;
    logic         est_valid, miss, miss_q;
    logic [N-1:0] a, b;
    logic [N:0]   y, y_est;
    logic [31:0]  miss_count, out_count;

    soft_dsp_top #(.N(N), .FA_DELAY(FA[c])) u_dut (
      .clk(clk), .rst(rst), .a(a), .b(b), .ci(ci), .take(take), .data_phase(data_phase),
      .in_ack(), .out_req(out_req), .out_ack(out_ack), .out_event(out_event), .out_bus(), .y(y),
      .y_est(y_est), .est_valid(est_valid), .miss(miss), .miss_q(miss_q),
      .miss_count(miss_count), .out_count(out_count)
    );

    st_checker #(.N(N), .H(H), .D(longint'(N * FA[c])), .K(K), .EXPECT_MISS(FA[c] * N > H),
                 .EXPECT_LATE(FA[c] * N > H && FA[c] * N < H + H / 2)) u_chk (
      .clk(clk), .rst(rst), .a(a), .b(b), .ci(ci), .out_req(out_req), .take(take),
      .data_phase(data_phase), .out_ack(out_ack), .out_event(out_event), .y(y),
      .y_est(y_est), .est_valid(est_valid), .miss_q(miss_q), .miss_count(miss_count),
      .out_count(out_count), .checks(checks[c]), .failures(failures[c]),
      .finished(finished[c])
    );
  end

  int total_checks, total_failures;

  task automatic report(input int extra_fail);
    total_checks = 0; total_failures = extra_fail;
    for (int c = 0; c < NC; c++) begin
      total_checks   += checks[c];
      total_failures += failures[c];
    end
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_failures);
    $finish;
  endtask

  initial begin
    #(2 * H * (K + 20));
    $display("watchdog expired");
    report(1);
  end

  initial begin
    #10;
    wait (finished[0] && finished[1] && finished[2] && finished[3]);
    report(0);
  end
endmodule
