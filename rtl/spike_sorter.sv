// spike_sorter: single-channel on-line spike sorter by template matching.
//
// One filtered, digitised electrode sample x_in arrives per clock. It feeds
// both the NEO detector and the aligner's master buffer. A detection makes
// the aligner capture the detection window, find the spike maximum and hand
// an NSS-sample spike with its maximum at sample AP to the template matcher,
// which computes the squared Euclidean distance to each of the NT programmed
// templates in parallel and pulses one bit of the NT-bit spike train when the
// closest template is within the maximum distance threshold. This chain of
// detector, aligner and matcher is the published top level.
//
// Programming: hold rst high for at least M clocks (zeros are shifted through
// every data shift register), then raise prog with the detection threshold on
// neo_thr_in and the squared match threshold on match_thr_in, and shift each
// template in (sample 0 first, NSS samples) on tmpl_data with its tmpl_prog
// bit set. The thresholds are loaded on every clock that prog is high.
//
// Output: the system can run in two modes. In sorting mode (mode =
// MODE_SORT) tx_valid pulses only when a spike is sorted and tx_data carries
// the spike train in its low NT bits. In pass-through mode every input sample
// is forwarded on tx_data, one clock later, for off-line parameter
// estimation. The spike train output is produced in both modes. The two
// modes come from the published system configuration; the shared tx port
// and its timing are this implementation's own. Status outputs show
// detection, alignment and the spikes that were lost because the aligner or
// the matcher was busy.
//
// Latency: a spike whose detection sample is x[n] reaches the matcher
// NEO_LAT + SP_DELAY + 18 clocks after x[n] was sampled (74 clocks with the
// defaults) and is sorted 68 clocks later.
module spike_sorter
  import spike_pkg::*;
#(
  parameter int unsigned WL  = WL_DEF,
  parameter int unsigned NSS = NSS_DEF,
  parameter int unsigned M   = M_DEF,
  parameter int unsigned AP  = AP_DEF,
  parameter int unsigned NT  = NT_DEF,
  localparam int unsigned PSI_W = 2 * WL + 1,
  localparam int unsigned DW    = dist_w(WL, NSS),
  localparam int unsigned TW    = (NT > 1) ? $clog2(NT) : 1
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [WL-1:0]    x_in,
  // configuration
  input  logic                    prog,
  input  logic signed [PSI_W-1:0] neo_thr_in,
  input  logic [DW-1:0]           match_thr_in,
  input  logic [NT-1:0]           tmpl_prog,
  input  logic signed [WL-1:0]    tmpl_data,
  input  out_mode_e               mode,
  // results
  output logic [NT-1:0]           train,
  output logic                    tx_valid,
  output logic [WL-1:0]           tx_data,
  // status
  output logic signed [PSI_W-1:0] psi,          // NEO energy of the sample
  output logic                    spike_present,
  output logic [$clog2(M)-1:0]    max_idx,      // window index of the spike maximum
  output logic                    aligned_valid,
  output logic                    sort_done,
  output logic [DW-1:0]           min_dist,
  output logic [TW-1:0]           min_idx,
  output logic                    align_busy,
  output logic                    match_busy,
  output logic                    spike_lost   // detection or aligned spike dropped
);

  logic [NSS-1:0][WL-1:0]  aligned_spike;
  logic                    sp_ignored, dropped;

  neo_detector #(.WL(WL)) u_det (
    .clk           (clk),
    .rst           (rst),
    .x_in          (x_in),
    .prog          (prog),
    .thr_in        (neo_thr_in),
    .psi           (psi),
    .spike_present (spike_present)
  );

  spike_aligner #(
    .WL(WL), .NSS(NSS), .M(M), .AP(AP), .SP_DELAY(sp_delay(M, AP))
  ) u_align (
    .clk           (clk),
    .rst           (rst),
    .x_in          (x_in),
    .spike_present (spike_present),
    .aligned_valid (aligned_valid),
    .aligned_spike (aligned_spike),
    .max_idx       (max_idx),
    .busy          (align_busy),
    .sp_ignored    (sp_ignored)
  );

  template_matcher #(.WL(WL), .NSS(NSS), .NT(NT)) u_match (
    .clk           (clk),
    .rst           (rst),
    .aligned_valid (aligned_valid),
    .aligned_spike (aligned_spike),
    .prog          (prog),
    .tmpl_prog     (tmpl_prog),
    .tmpl_data     (tmpl_data),
    .match_thr_in  (match_thr_in),
    .train         (train),
    .done          (sort_done),
    .min_dist      (min_dist),
    .min_idx       (min_idx),
    .busy          (match_busy),
    .dropped       (dropped)
  );

  assign spike_lost = sp_ignored || dropped;

  // Output port: spike train or raw samples
  always_ff @(posedge clk) begin
    if (rst) begin
      tx_valid <= 1'b0;
      tx_data  <= '0;
    end else if (mode == MODE_PASSTHROUGH) begin
      tx_valid <= 1'b1;
      tx_data  <= x_in;
    end else begin
      tx_valid <= |train;
      tx_data  <= WL'(train);
    end
  end

endmodule
