// Stimulus and checker for one soft_dsp_top instance.
//
// Generates the clock (one DATA or SPACER phase per clock, H ps each), the
// reset and a speech-like sample stream (a slow sine on 'a', noise on 'b',
// random carry in), acts as a consumer that takes every output at once, and
// checks every output event against the reference timing model: the sample
// index, the exact completion time, the sum, the miss flag, the interpolated
// estimate and both counters. It also compares the steady-state miss rate
// with the closed-form rate R_m = 2/(n+3), n = floor((T/2)/(D - T/2)), and
// reports the interpolation error M_error = 20 lg(sigma_e / sigma_y) over the
// reconstructed sequence (and checks it is below 0 dB when samples are
// lost), and counts how often each mechanism happened: late acceptance (the source had
// to wait for the request), a lost sample pair, and an interpolated value.
module st_checker #(
  parameter int     N           = 8,
  parameter longint H           = 1000,   // DATA (= SPACER) duration in ps
  parameter longint D           = 1256,   // datapath delay, N * FA_DELAY
  parameter int     K           = 300,    // samples checked
  parameter bit     EXPECT_MISS = 1'b1,
  parameter bit     EXPECT_LATE = EXPECT_MISS  // at n = 1 every wait ends in a loss
) (
  output logic        clk,
  output logic        rst,
  output logic [N-1:0] a,
  output logic [N-1:0] b,
  output logic        ci,
  output logic        out_req,
  input  logic        take,
  input  logic        data_phase,
  input  logic        out_ack,
  input  logic        out_event,
  input  logic [N:0]  y,
  input  logic [N:0]  y_est,
  input  logic        est_valid,
  input  logic        miss_q,
  input  logic [31:0] miss_count,
  input  logic [31:0] out_count,
  output int          checks,
  output int          failures,
  output logic        finished
);
  timeunit 1ps; timeprecision 1ps;
  import tb_st_pkg::*;

  localparam longint T = 2 * H;

  logic [N-1:0] a_arr[K+8], b_arr[K+8];
  logic         ci_arr[K+8];
  int           ksent = 0;
  bit           deliv[], late[];
  longint       tout[];
  longint       t0;
  bit           ready = 0;
  int           last_k = -1, n_deliv = 0, n_miss = 0, n_est = 0, n_late = 0;
  int           first_miss = -1, last_miss = -1;
  int           prev_sum = 0;
  real          err_sq = 0.0;  // sum of squared interpolation errors

  initial begin
    clk = 0; rst = 0; checks = 0; failures = 0; finished = 0;
    for (int k = 0; k < K + 8; k++) begin
      a_arr[k]  = N'(int'((2.0 ** (N-1)) - 0.5 + (2.0 ** (N-1) - 8.0) * $sin(6.2831853 * k / 37.0)));
      b_arr[k]  = N'($urandom % 16);
      ci_arr[k] = 1'($urandom);
    end
  end

  always #(H / 2) clk = ~clk;

  // The consumer drops its request just after taking the word (1 ps).
  assign #1 out_req = out_ack;
  assign a  = a_arr[ksent < K + 8 ? ksent : K + 7];
  assign b  = b_arr[ksent < K + 8 ? ksent : K + 7];
  assign ci = ci_arr[ksent < K + 8 ? ksent : K + 7];

  always @(posedge clk) if (!rst && take) ksent <= ksent + 1;

  function automatic int sum_of(input int k);
    return int'(a_arr[k]) + int'(b_arr[k]) + int'(ci_arr[k]);
  endfunction

  task automatic fail(input string msg);
    failures++;
    $display("FAIL [H=%0d D=%0d] %s", H, D, msg);
  endtask

  // Reset, then build the model once the first DATA phase is seen.
  initial begin
    #1 rst = 1;
    #(H / 4) rst = 0;
    @(posedge data_phase);
    t0 = $time;
    predict(K, t0, T, D, deliv, tout, late);
    ready = 1;
    #(T * K + 2 * D + 1);
    // End of run: totals.
    begin
      int exp_deliv = 0, exp_miss = 0, n, lastd = -1;
      for (int k = 0; k < K; k++) if (deliv[k]) begin
        if (lastd >= 0 && k - lastd == 2) exp_miss++;
        exp_deliv++;
        lastd = k;
      end
      checks++;
      if (n_deliv != exp_deliv || n_miss != exp_miss)
        fail($sformatf("totals: %0d outputs, %0d misses; model %0d, %0d",
                       n_deliv, n_miss, exp_deliv, exp_miss));
      // Mechanisms.
      checks++;
      if (EXPECT_MISS) begin
        if (n_miss == 0 || n_est == 0 || (EXPECT_LATE && n_late == 0))
          fail($sformatf("mechanism never seen: misses %0d estimates %0d late %0d",
                         n_miss, n_est, n_late));
      end else if (n_miss != 0 || n_late != 0) begin
        fail("miss or late acceptance below the critical delay");
      end
      // Steady-state miss rate against the closed form.
      if (D > H && n_miss >= 3) begin
        n = int'(H / (D - H));
        checks++;
        // Runs of delivered pairs alternate around (n+1)/2; allow one run of
        // slack at the ends of the window.
        if ((last_miss - first_miss) * 2 > (n_miss - 1) * (n + 3) + (n + 3) ||
            (last_miss - first_miss) * 2 < (n_miss - 1) * (n + 3) - (n + 3))
          fail($sformatf("miss rate %0d/%0d, expected 2/%0d", n_miss - 1,
                         last_miss - first_miss, n + 3));
        $display("[H=%0d D=%0d] n=%0d measured R_m=%0d/%0d closed form 2/%0d",
                 H, D, n, n_miss - 1, last_miss - first_miss, n + 3);
      end
      // Interpolation error against the ideal output sequence.
      if (n_miss > 0) begin
        real mean = 0.0, var_y = 0.0, m_err;
        for (int k = 0; k < K; k++) mean += real'(sum_of(k));
        mean /= K;
        for (int k = 0; k < K; k++) var_y += (real'(sum_of(k)) - mean) ** 2;
        m_err = 10.0 * $log10(err_sq / var_y);
        $display("[H=%0d D=%0d] M_error = %0.1f dB", H, D, m_err);
        checks++;
        if (!(m_err < 0.0)) fail("interpolation error not below the signal");
      end
      $display("[H=%0d D=%0d] outputs %0d, lost pairs %0d, estimates %0d, late accepts %0d",
               H, D, n_deliv, n_miss, n_est, n_late);
      finished = 1;
    end
  end

  // Check every output event.
  always @(posedge out_event) begin
    if (ready) begin
      automatic int     k = last_k + 1;
      automatic longint t = $time;
      automatic bit     exp_miss;
      while (k < K && !deliv[k]) k++;
      if (k < K) begin
        exp_miss = (last_k >= 0) && (k - last_k == 2);
        checks++;
        if (t != tout[k]) fail($sformatf("sample %0d completed at %0d, model %0d", k, t, tout[k]));
        if (late[k]) n_late++;
        n_deliv++;
        if (exp_miss) begin
          n_miss++;
          if (first_miss < 0) first_miss = k - 1;
          last_miss = k - 1;
        end
        #1;
        checks++;
        if (int'(y) != sum_of(k)) fail($sformatf("sample %0d: y=%0d expected %0d", k, y, sum_of(k)));
        checks++;
        if (miss_q != exp_miss) fail($sformatf("sample %0d: miss=%b expected %b", k, miss_q, exp_miss));
        checks++;
        if (est_valid != exp_miss) fail($sformatf("sample %0d: est_valid=%b", k, est_valid));
        if (exp_miss) begin
          n_est++;
          checks++;
          err_sq += (real'(y_est) - real'(sum_of(k - 1))) ** 2;
          if (int'(y_est) != (prev_sum + sum_of(k)) / 2)
            fail($sformatf("sample %0d: estimate %0d expected %0d", k, y_est,
                           (prev_sum + sum_of(k)) / 2));
        end
        checks++;
        if (out_count != 32'(n_deliv) || miss_count != 32'(n_miss))
          fail($sformatf("counters %0d/%0d expected %0d/%0d", out_count, miss_count, n_deliv, n_miss));
        prev_sum = sum_of(k);
        last_k = k;
      end
    end
  end
endmodule
