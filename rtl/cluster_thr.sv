// cluster_thr: per-channel noise measurement giving the cluster thresholds.
//
// The cluster threshold of a channel is its RMS noise. Each channel keeps a
// running mean of the squared common-mode-subtracted sample, scaled by
// N = 2**LOG2N like the pedestal sums:
//     S <= S + x*x - S/N        (S/N truncated, S ~ N * mean(x*x))
// updated only in noise-training events and only for channels that took part
// in the common-mode mean (not masked, not above the hit-rejection value), so
// that signals do not inflate the noise. The output ms is S itself: the noise
// squared times N. Zero suppression compares squared samples against it, so no
// square root is needed: x > k * rms  <=>  x*x*N > k*k*S for x > 0.
//
// That the thresholds are per-channel RMS noise values measured alongside the
// common-mode subtraction follows the SALT algorithm; how they are measured
// (this running mean square, its weight N, the training flag, the reset value
// of INIT_MS counts squared) is this design's choice.
//
// Interface: cs/included/valid/train belong to one event; ms is the state
// before that event's update, which takes effect at the clock edge.
module cluster_thr
#(
  parameter int unsigned NCH     = salt_pkg::SALT_NCH,
  parameter int unsigned ADC_W   = salt_pkg::SALT_ADC_W,
  parameter int unsigned LOG2N   = salt_pkg::SALT_LOG2N,
  parameter int unsigned INIT_MS = 1,
  // Width of S: a squared sample plus LOG2N bits.
  parameter int unsigned MS_W    = 2 * (ADC_W + 1) + LOG2N
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              valid,
  input  logic                              train,     // noise-training event
  input  logic signed [NCH-1:0][ADC_W+1:0]  cs,        // common-mode-subtracted values
  input  logic [NCH-1:0]                    included,  // channel is noise, not signal
  output logic [NCH-1:0][MS_W-1:0]          ms         // N * mean square noise
);

  localparam int unsigned X_W  = ADC_W + 2;
  localparam int unsigned SQ_W = 2 * (ADC_W + 1);   // |x| <= 2**(ADC_W+1)-1

  for (genvar i = 0; i < NCH; i++) begin : g_ch
    logic signed [X_W-1:0] x;
    logic [X_W-1:0]        xa;
    logic [SQ_W-1:0]       sq;

    always_comb begin
      x  = $signed(cs[i]);
      xa = (x < 0) ? X_W'(-x) : X_W'(x);
      sq = SQ_W'(xa * xa);
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)
        ms[i] <= MS_W'(INIT_MS) << LOG2N;
      else if (valid && train && included[i])
        // S - S/N + x*x never exceeds N * (2**(ADC_W+1)-1)**2, so S keeps its width.
        ms[i] <= ms[i] - (ms[i] >> LOG2N) + MS_W'(sq);
    end
  end

endmodule
