// cm_sub: mean common-mode subtraction.
//
// Takes the pedestal-subtracted samples of one event. The common mode is the
// mean of all channels that are neither masked nor above the hit-rejection
// value (ps[i] > hit_rej excludes a channel, since it probably carries a
// signal). That one number per event is subtracted from every channel:
//     cs[i] = ps[i] - cm,   cm = sum(included ps) / count(included).
// Masked channels stay 0. If no channel is included the common mode is 0.
// The division truncates toward zero.
//
// The mean, the hit-rejection rule and the one correction per event follow the
// SALT algorithm; the hit-rejection value is a run-time setting because it is
// tuned by hand. Leaving masked channels out of the mean, the result width
// (two bits wider than the ADC, no saturation), the truncating division and
// the single register stage are this design's choices.
//
// Element selects of the packed sample arrays are unsigned in SystemVerilog,
// so each sample is read through $signed().
//
// Timing: one event per clock; cs/cm/out_valid appear one clock after
// ps/valid. included marks the channels that entered the mean (registered
// with the result).
module cm_sub
#(
  parameter int unsigned NCH   = salt_pkg::SALT_NCH,
  parameter int unsigned ADC_W = salt_pkg::SALT_ADC_W
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            valid,
  input  logic signed [NCH-1:0][ADC_W:0]  ps,         // pedestal-subtracted values
  input  logic [NCH-1:0]                  mask,       // 1 = channel masked
  input  logic signed [ADC_W:0]           hit_rej,    // hit-rejection value
  output logic                            out_valid,
  output logic signed [NCH-1:0][ADC_W+1:0] cs,        // common-mode-subtracted values
  output logic signed [ADC_W:0]           cm,         // this event's common mode
  output logic [NCH-1:0]                  included    // channel entered the mean
);

  localparam int unsigned PS_W  = ADC_W + 1;
  localparam int unsigned CNT_W = $clog2(NCH + 1);
  localparam int unsigned SUM_W = PS_W + $clog2(NCH) + 1;

  logic [NCH-1:0]            incl;
  logic signed [SUM_W-1:0]   sum;
  logic [CNT_W-1:0]          cnt;
  logic signed [PS_W-1:0]    cm_next;

  always_comb begin
    sum = '0;
    cnt = '0;
    for (int i = 0; i < NCH; i++) begin
      incl[i] = !mask[i] && !($signed(ps[i]) > hit_rej);
      if (incl[i]) begin
        sum = sum + SUM_W'($signed(ps[i]));
        cnt = cnt + 1'b1;
      end
    end
    // The mean of PS_W-bit values fits in PS_W bits.
    if (cnt == '0)
      cm_next = '0;
    else
      cm_next = PS_W'(sum / $signed(SUM_W'(cnt)));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      cs        <= '0;
      cm        <= '0;
      included  <= '0;
    end else begin
      out_valid <= valid;
      if (valid) begin
        cm       <= cm_next;
        included <= incl;
        for (int i = 0; i < NCH; i++)
          cs[i] <= mask[i] ? '0 : (ADC_W+2)'($signed(ps[i])) - (ADC_W+2)'(cm_next);
      end
    end
  end

endmodule
