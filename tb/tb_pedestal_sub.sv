// tb_pedestal_sub: self-checking test of the pedestal subtraction bank.
//
// Eight channels with random raw values, random training flags and a random
// channel mask. A reference model keeps each channel's pedestal sum and
// predicts the registered output one clock later: adc - pedestal, or 0 for a
// masked channel, and out_valid following valid.
module tb_pedestal_sub;
  localparam int NCH = 8, ADC_W = 6, LOG2N = 10, CLAMP = 15, INIT = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  logic valid, train, out_valid;
  logic [NCH-1:0][ADC_W-1:0] adc, pedestal;
  logic [NCH-1:0] mask, ped_clamped;
  logic signed [NCH-1:0][ADC_W:0] ps;

  int checks = 0, failures = 0, n_masked = 0;
  int psum [NCH];
  int exp_ps [NCH];
  bit exp_valid;

  pedestal_sub #(.NCH(NCH), .ADC_W(ADC_W), .LOG2N(LOG2N), .CLAMP(CLAMP), .INIT(INIT)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    valid = 0; train = 0; adc = '0; mask = '0;
    foreach (psum[i]) begin psum[i] = INIT << LOG2N; exp_ps[i] = 0; end
    exp_valid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    for (int n = 0; n < 8000; n++) begin
      valid = ($urandom % 5) != 0;
      train = ($urandom % 2) != 0;
      if (n % 500 == 0) mask = NCH'($urandom) & NCH'($urandom);
      for (int i = 0; i < NCH; i++) adc[i] = ADC_W'($urandom);
      @(posedge clk);
      // reference model at the clock edge
      exp_valid = valid;
      for (int i = 0; i < NCH; i++) begin
        int p, d;
        p = psum[i] >>> LOG2N;
        if (valid) begin
          exp_ps[i] = mask[i] ? 0 : int'(adc[i]) - p;
          if (mask[i]) n_masked++;
        end
        if (valid && train) begin
          d = int'(adc[i]) - p;
          d = (d > CLAMP) ? CLAMP : (d < -CLAMP) ? -CLAMP : d;
          psum[i] += d;
        end
      end
      #1;
      checks++;
      if (out_valid !== exp_valid) failures++;
      for (int i = 0; i < NCH; i++) begin
        checks += 2;
        if ($signed(ps[i]) != exp_ps[i]) begin
          failures++;
          if (failures < 10) $display("ch %0d ps=%0d exp=%0d", i, $signed(ps[i]), exp_ps[i]);
        end
        if (int'(pedestal[i]) != (psum[i] >>> LOG2N)) failures++;
      end
    end
    checks++;
    if (n_masked == 0) begin failures++; $display("mask never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
