// tb_train_ctrl: self-checking test of the training sequencer.
//
// Short phases (5 pedestal and 3 noise events) with random gaps between
// events. A reference model of the phase and count checks ped_train,
// noise_train, phase, count and the done pulse every cycle, including a
// restart in the middle of a sequence.
module tb_train_ctrl;
  import salt_pkg::*;
  localparam int PED = 5, NOISE = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start, valid, ped_train, noise_train, done;
  train_phase_e phase;
  logic [15:0] count;

  int checks = 0, failures = 0, n_done = 0, n_restart = 0;
  int mph, mcnt;    // model: 0 idle, 1 ped, 2 noise
  bit mdone;

  train_ctrl #(.PED_EVENTS(PED), .NOISE_EVENTS(NOISE), .CNT_W(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ph, c;
    start = 0; valid = 0;
    mph = 0; mcnt = 0; mdone = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    for (int n = 0; n < 5000; n++) begin
      valid = ($urandom % 3) != 0;
      start = (mph == 0) ? ($urandom % 20 == 0) : ($urandom % 60 == 0);
      if (start && mph != 0) n_restart++;
      ph = start ? 1 : mph;
      c  = start ? 0 : mcnt;
      #1;
      checks += 5;
      if (int'(phase) != ph) failures++;
      if (int'(count) != c) failures++;
      if (ped_train !== (valid && ph == 1)) failures++;
      if (noise_train !== (valid && ph == 2)) failures++;
      if (done !== mdone) begin
        failures++;
        if (failures < 10) $display("n=%0d done=%0b exp=%0b", n, done, mdone);
      end
      @(posedge clk);
      mdone = 0;
      mph = ph; mcnt = c;
      if (valid && ph == 1) begin
        if (c == PED - 1) begin mph = 2; mcnt = 0; end else mcnt = c + 1;
      end else if (valid && ph == 2) begin
        if (c == NOISE - 1) begin mph = 0; mcnt = 0; mdone = 1; n_done++; end else mcnt = c + 1;
      end
      #1;
    end
    checks++;
    if (n_done == 0 || n_restart == 0) begin
      failures++;
      $display("done %0d restarts %0d", n_done, n_restart);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
