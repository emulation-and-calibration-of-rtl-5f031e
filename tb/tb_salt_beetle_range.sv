// tb_salt_beetle_range: pedestal calibration on 10-bit data with pedestals
// near 512 counts.
//
// The SALT pedestal algorithm was first tuned on data from the earlier Beetle
// front end. That data has a 10-bit range and pedestals around 512 counts,
// which is why the pedestal sums start at 512 * N. This bench runs the whole
// chain with ADC_W = 10 and PED_INIT = 512 (128 channels, N = 1024, 4096
// training events). Strips have true pedestals of 470..555 counts, noise of a
// few counts, a common offset per event and occasional signals.
//
// It follows the two studies of the training: after every 256 training events
// it records the mean distance between the learnt and the true pedestals. That
// is the calibration curve used to choose the training length. It checks that
// the curve never rises by more than noise and ends below 1 count after 4096
// events. During the data events that follow, it checks that the
// pedestal-subtracted values and the common mode are centred on zero. It also
// checks that no channel is a hit in noise-only events. Its reference for the
// pedestals is a model of the follower kept in this bench.
module tb_salt_beetle_range;
  import salt_pkg::*;
  localparam int NCH = 128, ADC_W = 10, LOG2N = 10, CLAMP = 15, INIT = 512;
  localparam int TRAIN = 4096, NTRAIN = 4096;
  localparam int MS_W = 2 * (ADC_W + 1) + LOG2N;

  logic clk = 1'b0, rst_n = 1'b0;
  logic valid;
  logic [NCH-1:0][ADC_W-1:0] adc, pedestal;
  logic [NCH-1:0] mask, ped_clamped, hit, cl_start;
  logic signed [ADC_W:0] hit_rej, cm;
  logic [7:0] thr_k2;
  logic [ADC_W:0] thr_min;
  logic train_start, train_done, out_valid;
  train_phase_e train_phase;
  logic [15:0] train_count;
  logic [NCH-1:0][MS_W-1:0] noise_ms;
  logic signed [NCH-1:0][ADC_W+1:0] zs;
  logic [$clog2(NCH+1)-1:0] n_clusters;

  salt_dsp_top #(
    .NCH(NCH), .ADC_W(ADC_W), .LOG2N(LOG2N), .PED_CLAMP(CLAMP), .PED_INIT(INIT),
    .TRAIN_EVENTS(TRAIN), .NOISE_EVENTS(NTRAIN)
  ) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int     ped_true [NCH];
  longint psum [NCH];
  real    curve [$];
  bit     signal_event;
  int     noise_hits = 0, noise_events_out = 0;
  longint cm_sum = 0, cm_n = 0;
  real    ps_sum = 0.0;
  longint ps_n = 0;
  bit     sig_pipe [3];

  // Noise-only output events must be empty.
  always @(posedge clk) begin
    #2;
    if (rst_n && out_valid && train_phase == PH_IDLE && !sig_pipe[2]) begin
      noise_events_out++;
      noise_hits += int'(n_clusters);
    end
  end

  task automatic drive(input bit start, input bit with_signal);
    int off;
    off = int'($urandom_range(0, 8)) - 4;
    for (int i = 0; i < NCH; i++) begin
      int v, nz, p;
      nz = int'($urandom % 4) + int'($urandom % 4) + int'($urandom % 4) - 4;
      v = ped_true[i] + off + nz;
      if (with_signal && i % 37 == 5) v += 60;
      adc[i] = ADC_W'(v);
      // reference follower, updated only in pedestal-training events
      p = int'(psum[i] >>> LOG2N);
      if ((start || train_phase == PH_PED) && !(v - p > CLAMP || v - p < -CLAMP))
        psum[i] += v - p;
      else if (start || train_phase == PH_PED)
        psum[i] += (v - p > 0) ? CLAMP : -CLAMP;
    end
    valid = 1'b1;
    train_start = start;
    @(posedge clk); #1;
    sig_pipe[2] = sig_pipe[1]; sig_pipe[1] = sig_pipe[0]; sig_pipe[0] = with_signal;
    train_start = 1'b0;
  endtask

  function automatic real mean_ped_error();
    real e = 0.0;
    for (int i = 0; i < NCH; i++) e += (int'(pedestal[i]) > ped_true[i]) ?
                                       real'(int'(pedestal[i]) - ped_true[i]) :
                                       real'(ped_true[i] - int'(pedestal[i]));
    return e / NCH;
  endfunction

  initial begin
    valid = 0; train_start = 0; adc = '0; mask = '0;
    hit_rej = 11'sd8; thr_k2 = 8'd25; thr_min = 11'd3;
    sig_pipe = '{default: 1'b0};
    for (int i = 0; i < NCH; i++) begin
      ped_true[i] = int'($urandom_range(470, 555));
      psum[i] = longint'(INIT) << LOG2N;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;

    // pedestal training with the calibration curve
    drive(1'b1, 1'b0);
    for (int n = 1; n < TRAIN; n++) begin
      drive(1'b0, 1'b0);
      if ((n + 1) % 256 == 0) curve.push_back(mean_ped_error());
    end
    $display("mean |pedestal - true| every 256 training events:");
    foreach (curve[k]) $display("  %5d events: %6.2f counts", (k + 1) * 256, curve[k]);
    for (int k = 1; k < curve.size(); k++) begin
      checks++;
      if (curve[k] > curve[k-1] + 0.5) begin
        failures++;
        $display("calibration curve rises at %0d events", (k + 1) * 256);
      end
    end
    checks++;
    if (curve[curve.size()-1] >= 1.0) begin
      failures++;
      $display("pedestals not settled after %0d events", TRAIN);
    end
    for (int i = 0; i < NCH; i++) begin
      checks++;
      if (int'(pedestal[i]) != int'(psum[i] >>> LOG2N)) begin
        failures++;
        if (failures < 10) $display("ch %0d pedestal %0d model %0d", i, pedestal[i], psum[i] >>> LOG2N);
      end
    end

    // noise training, then data taking
    for (int n = 0; n < NTRAIN; n++) drive(1'b0, 1'b0);
    checks++;
    if (train_phase != PH_IDLE) begin failures++; $display("training did not end"); end
    for (int n = 0; n < 2000; n++) begin
      signal_event = (n % 4 == 0);
      drive(1'b0, signal_event);
      if (out_valid && !sig_pipe[2]) begin
        cm_sum += longint'(cm);
        cm_n++;
      end
      if (!signal_event)
        // pedestal-subtracted values of the event just sent
        for (int i = 0; i < NCH; i++) begin
          ps_sum += real'(int'(adc[i]) - int'(pedestal[i]));
          ps_n++;
        end
    end
    valid = 1'b0;
    repeat (5) @(posedge clk);

    // After pedestal subtraction the data, and the common mode (the shared
    // offset), are centred on zero.
    checks += 2;
    if (ps_n == 0 || ps_sum / ps_n > 1.0 || ps_sum / ps_n < -1.0) begin
      failures++;
      $display("pedestal-subtracted data not centred: mean %0.2f", ps_sum / ps_n);
    end
    if (cm_n == 0 || (real'(cm_sum) / cm_n) > 1.0 || (real'(cm_sum) / cm_n) < -1.0) begin
      failures++;
      $display("common mode not centred: mean %0.2f", real'(cm_sum) / cm_n);
    end
    checks++;
    if (noise_events_out == 0 || noise_hits > noise_events_out / 100) begin
      failures++;
      $display("noise events %0d produced %0d clusters", noise_events_out, noise_hits);
    end
    $display("mean pedestal-subtracted value %0.3f, mean common mode %0.3f over %0d noise events; %0d clusters in them",
             ps_sum / ps_n, real'(cm_sum) / cm_n, cm_n, noise_hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
