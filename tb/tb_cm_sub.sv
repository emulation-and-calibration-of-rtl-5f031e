// tb_cm_sub: self-checking test of the mean common-mode subtraction.
//
// Sixteen channels. Each event has a random common offset, random noise, a few
// random signal channels and a random mask; the hit-rejection value changes
// from time to time, and some events have every channel above it. A reference
// model forms the mean of the channels that are unmasked and not above the
// hit-rejection value (0 when there are none, truncation toward zero) and
// predicts the registered outputs one clock later.
module tb_cm_sub;
  localparam int NCH = 16, ADC_W = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  logic valid, out_valid;
  logic signed [NCH-1:0][ADC_W:0] ps;
  logic [NCH-1:0] mask, included;
  logic signed [ADC_W:0] hit_rej, cm;
  logic signed [NCH-1:0][ADC_W+1:0] cs;

  int checks = 0, failures = 0, n_rejected = 0, n_empty = 0;
  int exp_cs [NCH];
  int exp_cm;
  bit exp_incl [NCH];

  cm_sub #(.NCH(NCH), .ADC_W(ADC_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clip7(int v);
    return (v > 63) ? 63 : (v < -64) ? -64 : v;
  endfunction

  initial begin
    valid = 0; ps = '0; mask = '0; hit_rej = 7'sd10;
    exp_cm = 0;
    foreach (exp_cs[i]) begin exp_cs[i] = 0; exp_incl[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    for (int n = 0; n < 6000; n++) begin
      int off, v [NCH];
      valid = ($urandom % 6) != 0;
      if (n % 200 == 0) begin
        hit_rej = 7'($urandom_range(4, 20));
        mask = NCH'($urandom) & NCH'($urandom) & NCH'($urandom);
      end
      off = int'($urandom_range(0, 16)) - 8;
      for (int i = 0; i < NCH; i++) begin
        v[i] = off + int'($urandom_range(0, 6)) - 3;
        if ($urandom % 8 == 0) v[i] += int'($urandom_range(10, 40));
        if (n % 97 == 0) v[i] = 40;          // every channel above hit_rej
        v[i] = clip7(v[i]);
        ps[i] = 7'(v[i]);
      end
      @(posedge clk);
      if (valid) begin
        int sum, cnt;
        sum = 0; cnt = 0;
        for (int i = 0; i < NCH; i++) begin
          exp_incl[i] = !mask[i] && !(v[i] > int'(hit_rej));
          if (!mask[i] && v[i] > int'(hit_rej)) n_rejected++;
          if (exp_incl[i]) begin sum += v[i]; cnt++; end
        end
        if (cnt == 0) n_empty++;
        exp_cm = (cnt == 0) ? 0 : sum / cnt;
        for (int i = 0; i < NCH; i++) exp_cs[i] = mask[i] ? 0 : v[i] - exp_cm;
      end
      #1;
      checks += 2;
      if (out_valid !== valid) failures++;
      if (int'(cm) != exp_cm) begin
        failures++;
        if (failures < 10) $display("n=%0d cm=%0d exp=%0d", n, cm, exp_cm);
      end
      for (int i = 0; i < NCH; i++) begin
        checks += 2;
        if ($signed(cs[i]) != exp_cs[i]) failures++;
        if (included[i] !== exp_incl[i]) failures++;
      end
    end
    checks += 2;
    if (n_rejected == 0) begin failures++; $display("hit rejection never exercised"); end
    if (n_empty == 0) begin failures++; $display("empty mean never exercised"); end
    $display("rejected channels %0d, events with no channel in the mean %0d", n_rejected, n_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
