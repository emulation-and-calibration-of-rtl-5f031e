// salt_dsp_top: digital processing chain of the SALT front-end chip.
//
// Each bunch crossing (one clock at 40 MHz) brings one event: a 6-bit ADC
// sample from each of the 128 channels. The chain cleans it in three
// registered stages and keeps only the strips that carry signal:
//
//   stage 1  pedestal_sub   adc - pedestal per channel; masked channels -> 0;
//                           pedestal followers learn in pedestal-training events
//   stage 2  cm_sub         mean of the channels not above hit_rej, subtracted
//                           from all channels (the common mode)
//            cluster_thr    per-channel running mean square of stage-2 noise
//                           samples, learnt in noise-training events
//   stage 3  zero_suppress  hits above k * RMS noise, grouped into clusters;
//                           all other channels set to 0
//
// train_ctrl runs the optional training: after train_start, TRAIN_EVENTS
// pedestal-training events, then NOISE_EVENTS noise-training events. The
// training flags travel with the event through the pipeline so that each stage
// learns from the event it is processing.
//
// The processing order, the algorithms, the 128 channels, the 6-bit ADC, the
// weight N = 1024 and the 4096 training events follow the SALT design. The
// analogue front end and the ADCs are outside this module: adc is their output.
// The stage registers, the training sequence and the run-time settings
// (mask, hit_rej, thr_k2, thr_min) as plain inputs are this design's choices.
//
// Timing: one event per clock with no stalls; results appear 3 clocks after
// the event (out_valid). cm is the common mode of the same output event, so it
// lines up with zs, hit, cl_start and n_clusters.
module salt_dsp_top
  import salt_pkg::*;
#(
  parameter int unsigned NCH          = salt_pkg::SALT_NCH,
  parameter int unsigned ADC_W        = salt_pkg::SALT_ADC_W,
  parameter int unsigned LOG2N        = salt_pkg::SALT_LOG2N,
  parameter int unsigned PED_CLAMP    = salt_pkg::SALT_PED_CLAMP,
  parameter int unsigned PED_INIT     = salt_pkg::SALT_PED_INIT,
  parameter int unsigned TRAIN_EVENTS = salt_pkg::SALT_TRAIN_EVENTS,
  parameter int unsigned NOISE_EVENTS = salt_pkg::SALT_NOISE_EVENTS,
  parameter int unsigned MS_W         = 2 * (ADC_W + 1) + LOG2N
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // event input (from the ADCs)
  input  logic                              valid,
  input  logic [NCH-1:0][ADC_W-1:0]         adc,
  // configuration
  input  logic [NCH-1:0]                    mask,        // 1 = broken channel, output 0
  input  logic signed [ADC_W:0]             hit_rej,     // common-mode hit rejection
  input  logic [7:0]                        thr_k2,      // cluster threshold factor squared
  input  logic [ADC_W:0]                    thr_min,     // hit floor in ADC counts
  input  logic                              train_start, // begin the training sequence
  // training status
  output train_phase_e                      train_phase,
  output logic                              train_done,
  output logic [15:0]                       train_count, // events done in this phase
  // monitoring
  output logic [NCH-1:0][ADC_W-1:0]         pedestal,
  output logic [NCH-1:0][MS_W-1:0]          noise_ms,    // N * mean square noise per channel
  output logic [NCH-1:0]                    ped_clamped, // pedestal correction limited
  // zero-suppressed output, 3 clocks after the event
  output logic                              out_valid,
  output logic signed [ADC_W:0]             cm,
  output logic signed [NCH-1:0][ADC_W+1:0]  zs,
  output logic [NCH-1:0]                    hit,
  output logic [NCH-1:0]                    cl_start,
  output logic [$clog2(NCH+1)-1:0]          n_clusters
);

  logic ped_train, noise_train;

  logic                            s1_valid, s2_valid;
  logic                            s1_noise_train;
  logic signed [NCH-1:0][ADC_W:0]   s1_ps;
  logic signed [NCH-1:0][ADC_W+1:0] s2_cs;
  logic signed [ADC_W:0]            s2_cm;
  logic [NCH-1:0]                  s2_included;
  logic                            s2_noise_train;

  train_ctrl #(
    .PED_EVENTS(TRAIN_EVENTS), .NOISE_EVENTS(NOISE_EVENTS), .CNT_W(16)
  ) u_train (
    .clk, .rst_n,
    .start      (train_start),
    .valid      (valid),
    .ped_train  (ped_train),
    .noise_train(noise_train),
    .phase      (train_phase),
    .count      (train_count),
    .done       (train_done)
  );

  pedestal_sub #(
    .NCH(NCH), .ADC_W(ADC_W), .LOG2N(LOG2N), .CLAMP(PED_CLAMP), .INIT(PED_INIT)
  ) u_ped (
    .clk, .rst_n,
    .valid      (valid),
    .train      (ped_train),
    .adc        (adc),
    .mask       (mask),
    .out_valid  (s1_valid),
    .ps         (s1_ps),
    .pedestal   (pedestal),
    .ped_clamped(ped_clamped)
  );

  cm_sub #(.NCH(NCH), .ADC_W(ADC_W)) u_cm (
    .clk, .rst_n,
    .valid    (s1_valid),
    .ps       (s1_ps),
    .mask     (mask),
    .hit_rej  (hit_rej),
    .out_valid(s2_valid),
    .cs       (s2_cs),
    .cm       (s2_cm),
    .included (s2_included)
  );

  cluster_thr #(.NCH(NCH), .ADC_W(ADC_W), .LOG2N(LOG2N), .MS_W(MS_W)) u_thr (
    .clk, .rst_n,
    .valid   (s2_valid),
    .train   (s2_noise_train),
    .cs      (s2_cs),
    .included(s2_included),
    .ms      (noise_ms)
  );

  zero_suppress #(.NCH(NCH), .ADC_W(ADC_W), .LOG2N(LOG2N), .MS_W(MS_W)) u_zs (
    .clk, .rst_n,
    .valid     (s2_valid),
    .cs        (s2_cs),
    .ms        (noise_ms),
    .mask      (mask),
    .thr_k2    (thr_k2),
    .thr_min   (thr_min),
    .out_valid (out_valid),
    .zs        (zs),
    .hit       (hit),
    .cl_start  (cl_start),
    .n_clusters(n_clusters)
  );

  // The noise-training flag follows its event to stage 2; the common mode
  // follows its event to the output.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_noise_train <= 1'b0;
      s2_noise_train <= 1'b0;
      cm             <= '0;
    end else begin
      s1_noise_train <= valid && noise_train;
      s2_noise_train <= s1_valid && s1_noise_train;
      if (s2_valid)
        cm <= s2_cm;
    end
  end

endmodule
