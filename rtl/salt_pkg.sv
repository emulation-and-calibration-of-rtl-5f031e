// salt_pkg: constants shared by the SALT digital processing chain.
//
// The chain takes one event per clock: 128 channel samples from 6-bit
// successive-approximation ADCs, clocked at the 40 MHz bunch-crossing rate.
// The numbers below are the defaults of every module's parameters. NCH, ADC_W,
// the averaging weight N = 2**LOG2N = 1024, the correction limit of 15 counts and
// the 4096 training events are the values of the SALT algorithms. PED_INIT, the
// noise-training length and the threshold factor are this design's choices (see
// the modules that use them).
package salt_pkg;

  // Channels per chip.
  localparam int unsigned SALT_NCH          = 128;
  // ADC resolution in bits.
  localparam int unsigned SALT_ADC_W        = 6;
  // Weighting factor of the running averages, N = 2**LOG2N.
  localparam int unsigned SALT_LOG2N        = 10;
  // Largest pedestal correction applied in one training event (ADC counts).
  localparam int unsigned SALT_PED_CLAMP    = 15;
  // Initial pedestal in ADC counts (the pedestal sum starts at SALT_PED_INIT * N).
  // Mid-scale of the 6-bit ADC.
  localparam int unsigned SALT_PED_INIT     = 32;
  // Number of pedestal training events.
  localparam int unsigned SALT_TRAIN_EVENTS = 4096;
  // Number of noise (cluster threshold) training events.
  localparam int unsigned SALT_NOISE_EVENTS = 4096;

  // Phase of the optional training sequence.
  typedef enum logic [1:0] {
    PH_IDLE  = 2'd0,   // normal data taking, no training
    PH_PED   = 2'd1,   // pedestal training events
    PH_NOISE = 2'd2    // noise (cluster threshold) training events
  } train_phase_e;

endpackage
