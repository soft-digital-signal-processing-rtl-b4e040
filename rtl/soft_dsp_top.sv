// Soft digital signal processing with a self-timed datapath.
//
// A synchronous source delivers samples at a fixed rate. dr_encoder turns each
// sample into a dual-rail DATA word followed by a SPACER, with a flag bit that
// alternates between consecutive samples. Register 1 lets a word in only when
// register 2 asks for it (request = register 2's acknowledge); the word runs
// through the self-timed computation (an N-bit dual-rail ripple-carry adder,
// s = a + b + ci) into register 2; the flag bypasses the computation. If the
// datapath delay D exceeds half the sample period, the handshake falls behind
// the fixed-rate source and now and then a whole (DATA, SPACER) pair is never
// let in. Every word that does come out is correct. miss_detect sees a lost
// word as two outputs with the same flag, and interpolator estimates it as
// the average of its neighbours.
// Interface: clk runs at twice the sample rate; {ci, b, a} is captured on the
// clock edge after 'take'. out_req is the request of whatever reads register
// 2: a consumer that takes every word at once follows out_ack, but must hold
// out_req high until it has taken the word, i.e. drop it a little after
// out_event rises (a wire with no delay races the flag). On each rising
// out_event, y, y_est/est_valid and miss are valid. out_bus is register 2's
// dual-rail word {flag, sum}: with out_req/out_ack it lets a further
// self-timed stage follow, making a pipeline.
// Register 1 is the guarded variant of dr_register (this design's addition,
// see there). Lint reports the handshake loops (C-element -> completion ->
// acknowledge -> C-element) as circular combinational logic: they are the
// asynchronous circuit itself, not a mistake.
// FA_DELAY (ps per full adder) stands for the supply voltage: 191 ps gives
// D = 8 * 191 ps, about the 1.53 ns the delay model gives at 1.8 V.
module soft_dsp_top
  import dr_pkg::*;
#(
  parameter int unsigned N        = 8,
  parameter int unsigned FA_DELAY = 191
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [N-1:0]  a,
  input  logic [N-1:0]  b,
  input  logic          ci,
  output logic          take,
  output logic          data_phase,
  output logic          in_ack,
  input  logic          out_req,
  output logic          out_ack,
  output logic          out_event,
  output dr_bit_t [N+1:0] out_bus,
  output logic [N:0]    y,
  output logic [N:0]    y_est,
  output logic          est_valid,
  output logic          miss,
  output logic          miss_q,
  output logic [31:0]   miss_count,
  output logic [31:0]   out_count
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned WI = 2*N + 2;  // {flag, ci, b, a}
  localparam int unsigned WO = N + 2;    // {flag, s}

  dr_bit_t [WI-1:0] src_bus, r1_bus;
  dr_bit_t [N:0]    sum_bus;
  dr_bit_t [WO-1:0] r2_in, r2_bus;
  logic             req1;
  logic [N:0]       y_word;

  dr_encoder #(.W(2*N+1)) u_src (
    .clk        (clk),
    .rst        (rst),
    .sample     ({ci, b, a}),
    .take       (take),
    .data_phase (data_phase),
    .bus        (src_bus)
  );

  dr_register #(.W(WI), .GUARD(1'b1)) u_reg1 (
    .rst   (rst),
    .req   (req1),
    .d_in  (src_bus),
    .d_out (r1_bus),
    .ack   (in_ack)
  );

  st_computation #(.N(N), .FA_DELAY(FA_DELAY)) u_comp (
    .rst (rst),
    .a   (r1_bus[N-1:0]),
    .b   (r1_bus[2*N-1:N]),
    .ci  (r1_bus[2*N]),
    .s   (sum_bus)
  );

  // The flag passes from register 1 to register 2 without processing.
  assign r2_in = {r1_bus[WI-1], sum_bus};

  dr_register #(.W(WO)) u_reg2 (
    .rst   (rst),
    .req   (out_req),
    .d_in  (r2_in),
    .d_out (r2_bus),
    .ack   (out_ack)
  );

  // Register 2's acknowledge is the request of register 1.
  assign req1      = out_ack;
  assign out_event = ~out_ack;

  // Register 2's dual-rail word {flag, sum}, for a further self-timed stage.
  assign out_bus = r2_bus;

  for (genvar i = 0; i <= N; i++) begin : g_dec
    assign y_word[i] = r2_bus[i].d1;
  end

  miss_detect u_miss (
    .rst        (rst),
    .done       (out_event),
    .flag       (r2_bus[WO-1].d1),
    .miss       (miss),
    .miss_q     (miss_q),
    .miss_count (miss_count),
    .out_count  (out_count)
  );

  interpolator #(.W(N+1)) u_interp (
    .rst       (rst),
    .done      (out_event),
    .miss      (miss),
    .y_in      (y_word),
    .y         (y),
    .y_est     (y_est),
    .est_valid (est_valid)
  );
endmodule
