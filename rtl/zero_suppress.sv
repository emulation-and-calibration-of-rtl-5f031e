// zero_suppress: hit finding against the cluster thresholds and cluster forming.
//
// A channel is a hit when it is not masked and its common-mode-subtracted value
// x is above its cluster threshold, k times the channel's RMS noise, and above
// a floor thr_min:
//     hit[i] = !mask[i] && x > thr_min && x*x*N > k2 * S[i]
// where S[i] is N times the channel's mean square noise (from cluster_thr) and
// k2 = k*k is a run-time setting. Adjacent hit channels form one cluster: a
// cluster starts at every hit whose lower neighbour is not a hit. The outputs
// are the hit map, the cluster-start map, the number of clusters and the data
// with every non-hit channel set to 0 (the zero-suppressed event).
//
// Separating hits from noise with per-channel thresholds derived from the noise
// and grouping the hits into clusters follow the SALT algorithm. The squared
// comparison, the factor k2, the floor, positive-only hits, clusters as runs of
// adjacent hits with no size limit, and the output form are this design's
// choices.
//
// Timing: one event per clock, outputs registered one clock after the inputs.
module zero_suppress
#(
  parameter int unsigned NCH   = salt_pkg::SALT_NCH,
  parameter int unsigned ADC_W = salt_pkg::SALT_ADC_W,
  parameter int unsigned LOG2N = salt_pkg::SALT_LOG2N,
  parameter int unsigned MS_W  = 2 * (ADC_W + 1) + LOG2N
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              valid,
  input  logic signed [NCH-1:0][ADC_W+1:0]  cs,          // common-mode-subtracted values
  input  logic [NCH-1:0][MS_W-1:0]          ms,          // N * mean square noise
  input  logic [NCH-1:0]                    mask,
  input  logic [7:0]                        thr_k2,      // threshold factor squared
  input  logic [ADC_W:0]                    thr_min,     // smallest value that is never a hit
  output logic                              out_valid,
  output logic signed [NCH-1:0][ADC_W+1:0]  zs,          // suppressed data
  output logic [NCH-1:0]                    hit,
  output logic [NCH-1:0]                    cl_start,    // first channel of a cluster
  output logic [$clog2(NCH+1)-1:0]          n_clusters
);

  localparam int unsigned X_W   = ADC_W + 2;
  localparam int unsigned CMP_W = MS_W + 8;
  localparam int unsigned CNT_W = $clog2(NCH + 1);

  logic [NCH-1:0] hit_c, start_c;
  logic [CNT_W-1:0] n_c;

  for (genvar i = 0; i < NCH; i++) begin : g_ch
    logic signed [X_W-1:0] x;
    logic [X_W-1:0]        xu;
    logic [CMP_W-1:0]      lhs, rhs;
    always_comb begin
      x   = $signed(cs[i]);
      xu  = cs[i];                                  // read as unsigned: used only when x > 0
      lhs = (CMP_W'(xu) * CMP_W'(xu)) << LOG2N;
      rhs = CMP_W'(thr_k2) * CMP_W'(ms[i]);
      hit_c[i] = !mask[i] && (x > $signed({1'b0, thr_min})) && (lhs > rhs);
    end
  end

  always_comb begin
    start_c[0] = hit_c[0];
    for (int i = 1; i < NCH; i++)
      start_c[i] = hit_c[i] && !hit_c[i-1];
    n_c = '0;
    for (int i = 0; i < NCH; i++)
      n_c = n_c + CNT_W'(start_c[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      zs         <= '0;
      hit        <= '0;
      cl_start   <= '0;
      n_clusters <= '0;
    end else begin
      out_valid <= valid;
      if (valid) begin
        hit        <= hit_c;
        cl_start   <= start_c;
        n_clusters <= n_c;
        for (int i = 0; i < NCH; i++)
          zs[i] <= hit_c[i] ? cs[i] : '0;
      end
    end
  end

endmodule
