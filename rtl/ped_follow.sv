// ped_follow: pedestal following for one channel.
//
// Keeps the pedestal sum P, a running average of the raw ADC value scaled by
// N = 2**LOG2N, and outputs the pedestal p = P / N (truncated, i.e. P >> LOG2N).
// In every training event (valid && train) the correction
//     delta = adc - p
// is limited to +/-CLAMP and added to the sum:  P <= P + delta.
// In pedestal units this is p <= p + delta / N, an exponential running average
// with weight 1/N, which settles exactly on a constant input.
// The sum starts at INIT * N after reset.
//
// Follows the SALT algorithm: the running average, N = 1024, the limit of
// 15 counts and the start value of INIT * N. This design's reading: the
// correction is taken against the normalised pedestal P/N (the sum is kept
// N times larger, as the start value implies), and a correction beyond the
// limit keeps its sign (+15 or -15).
//
// Interface: adc is the raw sample of this event; pedestal is valid at all
// times and is the value before this event's update. The sum updates at the
// clock edge that ends a training event.
module ped_follow
#(
  parameter int unsigned ADC_W = salt_pkg::SALT_ADC_W,
  parameter int unsigned LOG2N = salt_pkg::SALT_LOG2N,
  parameter int unsigned CLAMP = salt_pkg::SALT_PED_CLAMP,
  parameter int unsigned INIT  = salt_pkg::SALT_PED_INIT
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             valid,     // an event is present this cycle
  input  logic             train,     // the event is a training event
  input  logic [ADC_W-1:0] adc,       // raw ADC value
  output logic [ADC_W-1:0] pedestal,  // p = P / N
  output logic             clamped    // this training event's correction was limited
);

  localparam int unsigned SUM_W = ADC_W + LOG2N;
  localparam int unsigned D_W   = ADC_W + 1;   // signed correction width

  logic [SUM_W-1:0]      psum;
  logic signed [D_W-1:0] delta, delta_lim;

  assign pedestal = psum[SUM_W-1:LOG2N];

  always_comb begin
    delta   = $signed({1'b0, adc}) - $signed({1'b0, pedestal});
    clamped = 1'b0;
    delta_lim = delta;
    if (delta > $signed(D_W'(CLAMP))) begin
      delta_lim = $signed(D_W'(CLAMP));
      clamped   = valid & train;
    end else if (delta < -$signed(D_W'(CLAMP))) begin
      delta_lim = -$signed(D_W'(CLAMP));
      clamped   = valid & train;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      psum <= SUM_W'(INIT) << LOG2N;
    else if (valid && train)
      // The sum cannot leave its range: p + delta stays within 0..2**ADC_W-1
      // and the fraction bits only move by the whole correction.
      psum <= psum + SUM_W'(signed'(delta_lim));
  end

  // The applied correction never exceeds the limit.
  a_clamp: assert property (@(posedge clk) disable iff (!rst_n)
    (delta_lim <= $signed(D_W'(CLAMP))) && (delta_lim >= -$signed(D_W'(CLAMP))));

endmodule
