// tb_salt_dsp_top: end-to-end test of the SALT processing chain at its default
// size (128 channels, 6-bit ADC, N = 1024, 4096 pedestal and 4096 noise
// training events).
//
// A strip detector is simulated: every channel has its own true pedestal
// (12..50 counts), every event adds a common offset shared by all channels,
// small per-channel noise, and a few clusters of 1..3 adjacent strips with
// signals of 12..20 counts. A few events shift every channel far up, so that
// the common-mode mean has no channel left to average. Two channels are
// masked, and the mask changes once during data taking.
//
// A reference model, written independently of the RTL, runs the same chain
// event by event: pedestal followers with clamped corrections, pedestal and
// mask, mean common mode with hit rejection, running mean square noise, hits
// against k * rms and the cluster starts. Every output event is compared with
// it, together with the 3-clock latency; the training flags, the clamp flags,
// and at the end all pedestals and noise sums are compared too. The test also
// counts how often each mechanism happened and fails if one never did: clamped
// corrections, masked channels, hit rejection, an empty common-mode mean, noise
// updates, single- and multi-strip clusters, bubbles in the event stream and
// the end of training.
module tb_salt_dsp_top;
  import salt_pkg::*;
  localparam int NCH = SALT_NCH, ADC_W = SALT_ADC_W, LOG2N = SALT_LOG2N;
  localparam int CLAMP = SALT_PED_CLAMP, INIT = SALT_PED_INIT;
  localparam int TRAIN = SALT_TRAIN_EVENTS, NTRAIN = SALT_NOISE_EVENTS;
  localparam int MS_W = 2 * (ADC_W + 1) + LOG2N;
  localparam int DATA_EVENTS = 3000;
  localparam int HIT_REJ = 8, K2 = 16, TMIN = 2;

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

  salt_dsp_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  int     ped_true [NCH];
  longint psum [NCH];
  longint msum [NCH];
  int     m_phase, m_count;            // 0 idle, 1 pedestal, 2 noise

  typedef struct {
    longint in_cycle;
    int     cm;
    int     zs [NCH];
    bit     hit [NCH];
    bit     st [NCH];
    int     ncl;
  } exp_t;
  exp_t expq [$];

  // mechanism counters
  int n_ped_train = 0, n_noise_train = 0, n_clamp = 0, n_masked = 0, n_rejected = 0;
  int n_empty_cm = 0, n_noise_upd = 0, n_single = 0, n_multi = 0, n_bubble = 0;
  int n_done = 0, n_events_out = 0;

  function automatic int clip(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  // Runs one event through the model; returns the clamp flags it predicts.
  function automatic void model_event(input int raw [NCH], input bit start,
                                      input bit [NCH-1:0] msk, output bit clamp_exp [NCH]);
    int ps [NCH], cs [NCH];
    int ph, sum, cnt, cmv;
    exp_t e;
    ph = start ? 1 : m_phase;
    if (start) m_count = 0;
    // stage 1: pedestal subtraction and following
    for (int i = 0; i < NCH; i++) begin
      int p, d, dl;
      p = int'(psum[i] >>> LOG2N);
      ps[i] = msk[i] ? 0 : raw[i] - p;
      if (msk[i]) n_masked++;
      d = raw[i] - p;
      dl = clip(d, -CLAMP, CLAMP);
      clamp_exp[i] = (ph == 1) && (d != dl);
      if (ph == 1) begin
        psum[i] += dl;
        if (d != dl) n_clamp++;
      end
    end
    // stage 2: common mode
    sum = 0; cnt = 0;
    for (int i = 0; i < NCH; i++)
      if (!msk[i]) begin
        if (ps[i] > HIT_REJ) n_rejected++;
        else begin sum += ps[i]; cnt++; end
      end
    if (cnt == 0) n_empty_cm++;
    cmv = (cnt == 0) ? 0 : sum / cnt;
    for (int i = 0; i < NCH; i++) cs[i] = msk[i] ? 0 : ps[i] - cmv;
    // stage 3: hits against the thresholds held before this event's update
    e.in_cycle = cycle;
    e.cm = cmv;
    e.ncl = 0;
    for (int i = 0; i < NCH; i++) begin
      e.hit[i] = !msk[i] && cs[i] > TMIN &&
                 (longint'(cs[i]) * cs[i] * (longint'(1) << LOG2N) > longint'(K2) * msum[i]);
      e.zs[i] = e.hit[i] ? cs[i] : 0;
    end
    for (int i = 0; i < NCH; i++) begin
      e.st[i] = e.hit[i] && (i == 0 || !e.hit[i-1]);
      if (e.st[i]) begin
        e.ncl++;
        if (i < NCH - 1 && e.hit[i+1]) n_multi++; else n_single++;
      end
    end
    expq.push_back(e);
    // noise update for channels that entered the mean
    if (ph == 2)
      for (int i = 0; i < NCH; i++)
        if (!msk[i] && !(ps[i] > HIT_REJ)) begin
          msum[i] = msum[i] - (msum[i] >> LOG2N) + longint'(cs[i]) * cs[i];
          n_noise_upd++;
        end
    // training sequence
    if (ph == 1) begin
      n_ped_train++;
      if (m_count == TRAIN - 1) begin m_phase = 2; m_count = 0; end
      else begin m_phase = 1; m_count++; end
    end else if (ph == 2) begin
      n_noise_train++;
      if (m_count == NTRAIN - 1) begin m_phase = 0; m_count = 0; end
      else begin m_phase = 2; m_count++; end
    end
  endfunction

  // ---------------- output checker ----------------
  always @(posedge clk) begin
    #2;
    if (rst_n && out_valid) begin
      exp_t e;
      n_events_out++;
      if (expq.size() == 0) begin
        failures++;
        $display("unexpected output event");
      end else begin
        int bad;
        e = expq.pop_front();
        bad = 0;
        checks += 3;
        if (cycle - e.in_cycle != 3) begin
          bad++;
          $display("latency %0d, expected 3", cycle - e.in_cycle);
        end
        if (int'(cm) != e.cm) bad++;
        if (int'(n_clusters) != e.ncl) bad++;
        for (int i = 0; i < NCH; i++) begin
          checks += 3;
          if ($signed(zs[i]) != e.zs[i]) bad++;
          if (hit[i] !== e.hit[i]) bad++;
          if (cl_start[i] !== e.st[i]) bad++;
        end
        if (bad != 0 && failures < 20)
          $display("event out at cycle %0d: %0d mismatches (cm %0d exp %0d, clusters %0d exp %0d)",
                   cycle, bad, cm, e.cm, n_clusters, e.ncl);
        failures += bad;
      end
    end
    if (rst_n && train_done) n_done++;
  end

  // ---------------- stimulus ----------------
  task automatic drive_event(input bit start, input bit shift_all);
    int raw [NCH];
    int sig [NCH];
    int off, ph_exp, cnt_exp;
    bit clamp_exp [NCH];
    off = int'($urandom_range(0, 6)) - 3;
    foreach (sig[i]) sig[i] = 0;
    for (int c = int'($urandom_range(0, 3)); c > 0; c--) begin
      int s, w;
      s = int'($urandom_range(0, NCH - 1));
      w = int'($urandom_range(1, 3));
      for (int k = 0; k < w && s + k < NCH; k++) sig[s + k] = int'($urandom_range(12, 20));
    end
    for (int i = 0; i < NCH; i++) begin
      int nz;
      nz = int'($urandom % 3) + int'($urandom % 3) - 2;
      raw[i] = clip(ped_true[i] + off + nz + sig[i] + (shift_all ? 20 : 0), 0, (1 << ADC_W) - 1);
      adc[i] = ADC_W'(raw[i]);
    end
    valid = 1'b1;
    train_start = start;
    ph_exp = start ? 1 : m_phase;
    cnt_exp = start ? 0 : m_count;
    model_event(raw, start, mask, clamp_exp);
    #1;
    checks += 2;
    if (int'(train_phase) != ph_exp || int'(train_count) != cnt_exp) begin
      failures++;
      if (failures < 20) $display("phase %0d count %0d, expected %0d %0d", train_phase, train_count, ph_exp, cnt_exp);
    end
    begin
      int bad = 0;
      for (int i = 0; i < NCH; i++) if (ped_clamped[i] !== clamp_exp[i]) bad++;
      if (bad != 0) failures++;
    end
    @(posedge clk); #1;
    valid = 1'b0;
    train_start = 1'b0;
  endtask

  task automatic bubble();
    valid = 1'b0;
    n_bubble++;
    @(posedge clk); #1;
  endtask

  initial begin
    valid = 0; train_start = 0; adc = '0;
    mask = '0; mask[5] = 1'b1; mask[77] = 1'b1;
    hit_rej = 7'(HIT_REJ); thr_k2 = 8'(K2); thr_min = 7'(TMIN);
    for (int i = 0; i < NCH; i++) begin
      ped_true[i] = int'($urandom_range(12, 50));
      psum[i] = longint'(INIT) << LOG2N;
      msum[i] = longint'(1) << LOG2N;
    end
    m_phase = 0; m_count = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;

    // training: pedestal then noise events, with a few bubbles
    drive_event(1'b1, 1'b0);
    for (int n = 1; n < TRAIN + NTRAIN + 10; n++) begin
      if ($urandom % 50 == 0) bubble();
      drive_event(1'b0, 1'b0);
    end
    checks++;
    if (int'(train_phase) != 0) begin failures++; $display("training did not end"); end
    // pedestals settled within one count of the truth
    for (int i = 0; i < NCH; i++) begin
      checks += 3;
      if (int'(pedestal[i]) != int'(psum[i] >>> LOG2N)) failures++;
      if (longint'(noise_ms[i]) != msum[i]) failures++;
      if (int'(pedestal[i]) < ped_true[i] - 1 || int'(pedestal[i]) > ped_true[i] + 1) begin
        failures++;
        $display("ch %0d pedestal %0d, true %0d", i, pedestal[i], ped_true[i]);
      end
    end

    // data taking
    for (int n = 0; n < DATA_EVENTS; n++) begin
      if (n == DATA_EVENTS / 2) begin
        // change the mask with the pipeline empty
        repeat (4) bubble();
        mask[77] = 1'b0; mask[100] = 1'b1;
      end
      if ($urandom % 20 == 0) bubble();
      drive_event(1'b0, n % 500 == 250);
    end
    repeat (6) bubble();

    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d events never came out", expq.size()); end
    checks++;
    if (n_ped_train != TRAIN || n_noise_train != NTRAIN || n_done != 1) begin
      failures++;
      $display("training events %0d/%0d, done pulses %0d", n_ped_train, n_noise_train, n_done);
    end
    $display("events out %0d; pedestal training %0d, noise training %0d, done %0d",
             n_events_out, n_ped_train, n_noise_train, n_done);
    $display("clamped corrections %0d, masked channel-events %0d, hit-rejected %0d, empty CM %0d",
             n_clamp, n_masked, n_rejected, n_empty_cm);
    $display("noise updates %0d, single-strip clusters %0d, multi-strip clusters %0d, bubbles %0d",
             n_noise_upd, n_single, n_multi, n_bubble);
    checks++;
    if (n_clamp == 0 || n_masked == 0 || n_rejected == 0 || n_empty_cm == 0 || n_noise_upd == 0 ||
        n_single == 0 || n_multi == 0 || n_bubble == 0 || n_done == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
