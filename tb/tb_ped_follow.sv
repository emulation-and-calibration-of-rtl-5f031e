// tb_ped_follow: self-checking test of the single-channel pedestal follower.
//
// Phase 1 drives random events (valid, train, adc) and compares the pedestal
// and the clamp flag every cycle with a reference model of the running sum
// (P += clamp(adc - P/N, +/-15), P starting at 32 * N). Phase 2 holds the
// input at a constant level for 4096 training events and checks that the
// pedestal has settled on it exactly, as the 4096-event training is meant to.
module tb_ped_follow;
  localparam int ADC_W = 6, LOG2N = 10, CLAMP = 15, INIT = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  logic valid, train, clamped;
  logic [ADC_W-1:0] adc, pedestal;

  int checks = 0, failures = 0, n_clamp = 0;
  int psum;

  ped_follow #(.ADC_W(ADC_W), .LOG2N(LOG2N), .CLAMP(CLAMP), .INIT(INIT)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step_and_check();
    int d, dl, exp_p;
    bit exp_c;
    #1;
    exp_p = psum >>> LOG2N;
    d = int'(adc) - exp_p;
    dl = (d > CLAMP) ? CLAMP : (d < -CLAMP) ? -CLAMP : d;
    exp_c = valid && train && (d != dl);
    checks++;
    if (pedestal !== ADC_W'(exp_p) || clamped !== exp_c) begin
      failures++;
      if (failures < 10)
        $display("mismatch t=%0t ped=%0d exp=%0d clamped=%0b exp=%0b", $time, pedestal, exp_p, clamped, exp_c);
    end
    if (exp_c) n_clamp++;
    @(posedge clk);
    if (valid && train) psum += dl;
    #1;
  endtask

  initial begin
    valid = 0; train = 0; adc = 0;
    psum = INIT << LOG2N;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    #1;
    // Phase 1: random stimulus.
    for (int n = 0; n < 6000; n++) begin
      valid = ($urandom % 4) != 0;
      train = ($urandom % 3) != 0;
      adc   = ADC_W'($urandom);
      step_and_check();
    end
    // Phase 2: constant input over 4096 training events settles exactly.
    valid = 1; train = 1; adc = 6'd55;
    for (int n = 0; n < 4096; n++) step_and_check();
    checks++;
    if (pedestal !== 6'd55) begin
      failures++;
      $display("pedestal did not settle: %0d", pedestal);
    end
    checks++;
    if (n_clamp == 0) begin
      failures++;
      $display("clamp never exercised");
    end
    $display("clamped corrections: %0d", n_clamp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
