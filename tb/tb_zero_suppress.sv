// tb_zero_suppress: self-checking test of hit finding and cluster forming.
//
// Sixteen channels with random samples, random per-channel noise levels S,
// random masks and random threshold settings. A reference model decides each
// hit as x > thr_min and x > k * rms (written x*x*N > k2*S), finds the cluster
// starts as hits whose lower neighbour is not a hit, counts the clusters and
// zeroes the non-hit channels; outputs are checked one clock later. It also
// counts clusters of more than one channel and hits removed by the mask.
module tb_zero_suppress;
  localparam int NCH = 16, ADC_W = 6, LOG2N = 10, MS_W = 2 * (ADC_W + 1) + LOG2N;

  logic clk = 1'b0, rst_n = 1'b0;
  logic valid, out_valid;
  logic signed [NCH-1:0][ADC_W+1:0] cs, zs;
  logic [NCH-1:0][MS_W-1:0] ms;
  logic [NCH-1:0] mask, hit, cl_start;
  logic [7:0] thr_k2;
  logic [ADC_W:0] thr_min;
  logic [$clog2(NCH+1)-1:0] n_clusters;

  int checks = 0, failures = 0, n_wide = 0, n_masked_hit = 0, n_single = 0;
  bit eh [NCH], es [NCH];
  int ez [NCH];
  int en;

  zero_suppress #(.NCH(NCH), .ADC_W(ADC_W), .LOG2N(LOG2N), .MS_W(MS_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x [NCH];
    longint rms2 [NCH];
    valid = 0; cs = '0; ms = '0; mask = '0; thr_k2 = 8'd9; thr_min = '0;
    en = 0;
    foreach (eh[i]) begin eh[i] = 0; es[i] = 0; ez[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    for (int n = 0; n < 8000; n++) begin
      valid = ($urandom % 5) != 0;
      if (n % 100 == 0) begin
        thr_k2 = 8'($urandom_range(1, 25));
        thr_min = 7'($urandom_range(0, 4));
        mask = NCH'($urandom) & NCH'($urandom) & NCH'($urandom);
      end
      for (int i = 0; i < NCH; i++) begin
        rms2[i] = $urandom_range(0, 40);                 // noise squared, counts^2
        ms[i] = MS_W'((rms2[i] << LOG2N) + $urandom_range(0, (1 << LOG2N) - 1));
        x[i] = int'($urandom_range(0, 60)) - 20;
        cs[i] = 8'(x[i]);
      end
      @(posedge clk);
      if (valid) begin
        en = 0;
        for (int i = 0; i < NCH; i++) begin
          bit above;
          above = x[i] > int'(thr_min) &&
                  (longint'(x[i]) * x[i] * (1 << LOG2N) > longint'(thr_k2) * longint'(ms[i]));
          eh[i] = !mask[i] && above;
          if (mask[i] && above) n_masked_hit++;
          ez[i] = eh[i] ? x[i] : 0;
        end
        for (int i = 0; i < NCH; i++) begin
          es[i] = eh[i] && (i == 0 || !eh[i-1]);
          if (es[i]) begin
            en++;
            if (i < NCH - 1 && eh[i+1]) n_wide++; else n_single++;
          end
        end
      end
      #1;
      checks += 2;
      if (out_valid !== valid) failures++;
      if (int'(n_clusters) != en) begin
        failures++;
        if (failures < 10) $display("n=%0d clusters=%0d exp=%0d", n, n_clusters, en);
      end
      for (int i = 0; i < NCH; i++) begin
        checks += 3;
        if (hit[i] !== eh[i]) failures++;
        if (cl_start[i] !== es[i]) failures++;
        if ($signed(zs[i]) != ez[i]) failures++;
      end
    end
    checks++;
    if (n_wide == 0 || n_single == 0 || n_masked_hit == 0) begin
      failures++;
      $display("not every case exercised: wide %0d single %0d masked %0d", n_wide, n_single, n_masked_hit);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
