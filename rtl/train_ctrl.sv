// train_ctrl: sequencer of the optional training phase.
//
// A pulse on start begins training. The next PED_EVENTS events (cycles with
// valid) are pedestal training events (ped_train = 1), the NOISE_EVENTS events
// after them are noise training events (noise_train = 1), after which the
// sequencer returns to idle and pulses done. A new start pulse restarts the
// sequence from the beginning at any time; the event that carries it is
// already the first training event. Outside training no event is flagged, so
// pedestals and thresholds stay frozen.
//
// That pedestal training is an optional phase run for 4096 events follows the
// SALT algorithm. The start pulse, the noise-training phase after it and its
// length are this design's choices.
//
// Timing: ped_train/noise_train are combinational and describe the event
// presented in the same cycle (valid); the counter advances at the clock edge.
module train_ctrl
  import salt_pkg::*;
#(
  parameter int unsigned PED_EVENTS   = salt_pkg::SALT_TRAIN_EVENTS,
  parameter int unsigned NOISE_EVENTS = salt_pkg::SALT_NOISE_EVENTS,
  parameter int unsigned CNT_W        = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,        // begin (or restart) training
  input  logic               valid,        // an event is present this cycle
  output logic               ped_train,    // this event is a pedestal training event
  output logic               noise_train,  // this event is a noise training event
  output train_phase_e       phase,        // phase of the event in this cycle
  output logic [CNT_W-1:0]   count,        // events already done in the current phase
  output logic               done          // one-cycle pulse when training ends
);

  train_phase_e     ph_q;
  logic [CNT_W-1:0] cnt_q;

  // The start pulse takes effect in the cycle it arrives.
  always_comb begin
    if (start) begin
      phase = (PED_EVENTS > 0) ? PH_PED : ((NOISE_EVENTS > 0) ? PH_NOISE : PH_IDLE);
      count = '0;
    end else begin
      phase = ph_q;
      count = cnt_q;
    end
    ped_train   = valid && (phase == PH_PED);
    noise_train = valid && (phase == PH_NOISE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph_q  <= PH_IDLE;
      cnt_q <= '0;
      done  <= 1'b0;
    end else begin
      ph_q  <= phase;
      cnt_q <= count;
      done  <= 1'b0;
      if (valid && phase != PH_IDLE) begin
        if (phase == PH_PED && count == CNT_W'(PED_EVENTS - 1)) begin
          cnt_q <= '0;
          if (NOISE_EVENTS > 0) begin
            ph_q <= PH_NOISE;
          end else begin
            ph_q <= PH_IDLE;
            done <= 1'b1;
          end
        end else if (phase == PH_NOISE && count == CNT_W'(NOISE_EVENTS - 1)) begin
          cnt_q <= '0;
          ph_q  <= PH_IDLE;
          done  <= 1'b1;
        end else begin
          cnt_q <= count + 1'b1;
        end
      end
    end
  end

  a_count_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    (ph_q != PH_PED || cnt_q < CNT_W'(PED_EVENTS)) &&
    (ph_q != PH_NOISE || cnt_q < CNT_W'(NOISE_EVENTS)));

endmodule
