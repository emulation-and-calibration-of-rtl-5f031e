// pedestal_sub: pedestal subtraction for all channels of the chip.
//
// Each channel has its own pedestal follower (ped_follow). For every event the
// channel's current pedestal is subtracted from its raw ADC value,
//     ps[i] = adc[i] - p[i],
// giving a signed result one bit wider than the ADC. A masked channel (broken
// strip) gives 0. In training events the followers also update their pedestal
// sums; the subtraction always uses the pedestal from before that update.
//
// The subtraction, the per-channel pedestals and the masking follow the SALT
// algorithm. The one-cycle register stage and the mask being a static
// configuration input are this design's choices.
//
// Timing: one event per clock. ps/out_valid appear one clock after adc/valid.
// pedestal and ped_clamped show the followers' state combinationally for
// monitoring.
module pedestal_sub
#(
  parameter int unsigned NCH   = salt_pkg::SALT_NCH,
  parameter int unsigned ADC_W = salt_pkg::SALT_ADC_W,
  parameter int unsigned LOG2N = salt_pkg::SALT_LOG2N,
  parameter int unsigned CLAMP = salt_pkg::SALT_PED_CLAMP,
  parameter int unsigned INIT  = salt_pkg::SALT_PED_INIT
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             valid,
  input  logic                             train,        // pedestal training event
  input  logic [NCH-1:0][ADC_W-1:0]        adc,          // raw ADC values
  input  logic [NCH-1:0]                   mask,         // 1 = channel masked
  output logic                             out_valid,
  output logic signed [NCH-1:0][ADC_W:0]   ps,           // pedestal-subtracted values
  output logic [NCH-1:0][ADC_W-1:0]        pedestal,     // current pedestals
  output logic [NCH-1:0]                   ped_clamped   // correction limited this event
);

  logic [NCH-1:0][ADC_W:0] ps_next;

  for (genvar i = 0; i < NCH; i++) begin : g_ch
    ped_follow #(
      .ADC_W(ADC_W), .LOG2N(LOG2N), .CLAMP(CLAMP), .INIT(INIT)
    ) u_follow (
      .clk     (clk),
      .rst_n   (rst_n),
      .valid   (valid),
      .train   (train),
      .adc     (adc[i]),
      .pedestal(pedestal[i]),
      .clamped (ped_clamped[i])
    );

    always_comb begin
      if (mask[i])
        ps_next[i] = '0;
      else
        ps_next[i] = {1'b0, adc[i]} - {1'b0, pedestal[i]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      ps        <= '0;
    end else begin
      out_valid <= valid;
      if (valid)
        ps <= ps_next;
    end
  end

endmodule
