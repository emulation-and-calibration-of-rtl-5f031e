// tb_cluster_thr: self-checking test of the per-channel noise measurement.
//
// Four channels with LOG2N = 4 (N = 16) so that the running mean square moves
// quickly. Random samples, training flags and inclusion flags; a reference
// model applies S <= S - S/N + x*x only in training events for included
// channels. A final phase feeds a known noise pattern (+/-3 alternating) and
// checks that S/N settles near 9.
module tb_cluster_thr;
  localparam int NCH = 4, ADC_W = 6, LOG2N = 4, MS_W = 2 * (ADC_W + 1) + LOG2N;

  logic clk = 1'b0, rst_n = 1'b0;
  logic valid, train;
  logic signed [NCH-1:0][ADC_W+1:0] cs;
  logic [NCH-1:0] included;
  logic [NCH-1:0][MS_W-1:0] ms;

  int checks = 0, failures = 0, n_upd = 0, n_skip = 0;
  longint s [NCH];

  cluster_thr #(.NCH(NCH), .ADC_W(ADC_W), .LOG2N(LOG2N), .INIT_MS(1), .MS_W(MS_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cycle(input int x [NCH]);
    for (int i = 0; i < NCH; i++) cs[i] = 8'(x[i]);
    @(posedge clk);
    for (int i = 0; i < NCH; i++)
      if (valid && train && included[i]) begin
        s[i] = s[i] - (s[i] >> LOG2N) + x[i] * x[i];
        n_upd++;
      end else if (valid && !train) n_skip++;
    #1;
    for (int i = 0; i < NCH; i++) begin
      checks++;
      if (longint'(ms[i]) != s[i]) begin
        failures++;
        if (failures < 10) $display("ch %0d ms=%0d exp=%0d", i, ms[i], s[i]);
      end
    end
  endtask

  initial begin
    int x [NCH];
    valid = 0; train = 0; cs = '0; included = '0;
    foreach (s[i]) s[i] = 1 << LOG2N;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    for (int n = 0; n < 5000; n++) begin
      valid = ($urandom % 4) != 0;
      train = ($urandom % 3) != 0;
      included = NCH'($urandom);
      for (int i = 0; i < NCH; i++) x[i] = int'($urandom_range(0, 254)) - 127;
      cycle(x);
    end
    valid = 1; train = 1; included = '1;
    for (int n = 0; n < 400; n++) begin
      for (int i = 0; i < NCH; i++) x[i] = (n % 2) ? 3 : -3;
      cycle(x);
    end
    for (int i = 0; i < NCH; i++) begin
      checks++;
      if ((ms[i] >> LOG2N) < 8 || (ms[i] >> LOG2N) > 9) begin
        failures++;
        $display("ch %0d mean square %0d, expected about 9", i, ms[i] >> LOG2N);
      end
    end
    checks++;
    if (n_upd == 0 || n_skip == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
