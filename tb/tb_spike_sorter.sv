// tb_spike_sorter: end-to-end test of the spike sorter at its default size.
//
// Builds a synthetic single-electrode recording: uniform background noise of
// +-40 LSB with spikes from three "neurons" (A, B, C) and from an unknown
// fourth cell (U) inserted every 300 samples, plus pairs of spikes only 60
// samples apart. The three neuron waveforms are sums of Gaussians with their
// maximum at sample 23 of 64. The test then does what the off-line software
// and the implant would do:
//   * reset for M clocks and program the NEO threshold as C = 8 times the
//     mean NEO energy of a training stretch, the squared match
//     threshold (64 * 40^2 plus margin, i.e. the worst-case noise distance),
//     and the three noise-free templates;
//   * stream the recording, one sample per clock, first in sorting mode, then
//     in pass-through mode, then in sorting mode again.
// Checks: every A/B/C spike not lost to a busy matcher produces exactly one
// train pulse on its own bit; U spikes and the second spike of a close pair
// produce none; train follows aligned_valid by exactly 68 clocks; tx carries
// the train in sorting mode and every raw sample in pass-through mode.
// It also counts detections, alignments, matches, rejections, spikes lost to
// a busy matcher, mode switches and programming writes, and fails if any of
// them never happened.
module tb_spike_sorter;
  import spike_pkg::*;

  localparam int unsigned WL    = WL_DEF;
  localparam int unsigned NSS   = NSS_DEF;
  localparam int unsigned M     = M_DEF;
  localparam int unsigned NT    = NT_DEF;
  localparam int unsigned PSI_W = 2 * WL + 1;
  localparam int unsigned DW    = dist_w(WL, NSS);
  localparam int unsigned TW    = $clog2(NT);
  localparam int          PERIOD = 300;          // samples between spikes
  localparam int          NSPK   = 48;           // spike slots
  localparam int          N      = PERIOD * (NSPK + 2);
  localparam int          NOISE  = 40;
  localparam int          LAT    = 68;

  logic clk = 1'b0;
  logic rst;
  logic signed [WL-1:0]    x_in;
  logic                    prog;
  logic signed [PSI_W-1:0] neo_thr_in;
  logic [DW-1:0]           match_thr_in;
  logic [NT-1:0]           tmpl_prog;
  logic signed [WL-1:0]    tmpl_data;
  out_mode_e               mode;
  logic [NT-1:0]           train;
  logic                    tx_valid;
  logic [WL-1:0]           tx_data;
  logic signed [PSI_W-1:0] psi;
  logic                    spike_present;
  logic [$clog2(M)-1:0]    max_idx;
  logic                    aligned_valid, sort_done;
  logic [DW-1:0]           min_dist;
  logic [TW-1:0]           min_idx;
  logic                    align_busy, match_busy, spike_lost;

  spike_sorter dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_prog = 0, n_det = 0, n_align = 0, n_match = 0, n_reject = 0;
  int n_drop = 0, n_pass = 0, n_mode_sw = 0;

  longint sig [N];
  int     ev_t0 [NSPK + 8];
  int     ev_lab [NSPK + 8];    // 0..2 neuron, 3 unknown
  bit     ev_second [NSPK + 8]; // second of a close pair
  int     ev_hits [NSPK + 8];
  int     nev = 0;

  // ---- waveform shapes (maximum at sample 23)
  function automatic real gauss(real k, real mu, real sd);
    return $exp(-((k - mu) * (k - mu)) / (2.0 * sd * sd));
  endfunction

  function automatic longint shape(int lab, int k);
    real v;
    unique case (lab)
      0:       v = 3000.0 * gauss(k, 23, 1.5) - 1200.0 * gauss(k, 30, 3.0);
      1:       v = 2000.0 * gauss(k, 23, 2.5);
      2:       v = 3500.0 * gauss(k, 23, 1.0) - 2500.0 * gauss(k, 17, 2.0);
      default: v = 2800.0 * gauss(k, 23, 4.0) - 900.0 * gauss(k, 36, 3.0);
    endcase
    return longint'($rtoi(v + ((v >= 0.0) ? 0.5 : -0.5)));
  endfunction

  function automatic void add_spike(int t0, int lab, bit second);
    for (int k = 0; k < int'(NSS); k++) sig[t0 + k] += shape(lab, k);
    ev_t0[nev] = t0; ev_lab[nev] = lab; ev_second[nev] = second; ev_hits[nev] = 0;
    nev++;
  endfunction

  // ---- watchdog
  initial begin
    repeat (N + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- monitors
  int           cyc = 0;
  int           sidx = -1000;   // index of the sample on x_in
  int           av_q [$];      // clocks of aligned_valid
  logic [NT-1:0] train_q;
  out_mode_e    mode_q;
  logic signed [WL-1:0] x_q;
  bit           started = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && started) begin
      if (spike_present) n_det++;
      if (aligned_valid && !match_busy) av_q.push_back(cyc);
      if (aligned_valid) n_align++;
      if (dut.u_match.dropped) n_drop++;
      if (sort_done && train == '0) n_reject++;
      if (sort_done) begin
        checks++;
        if (av_q.size() == 0 || cyc - av_q[0] != LAT + 1) begin
          failures++;
          $display("sort_done at %0d without an aligned spike %0d clocks before", cyc, LAT);
        end
        if (av_q.size() != 0) void'(av_q.pop_front());
      end
      if (|train) begin
        automatic int hit = -1;
        n_match++;
        for (int e = 0; e < nev; e++)
          if (sidx - ev_t0[e] >= 140 && sidx - ev_t0[e] < 180) hit = e;
        checks++;
        if (hit < 0) begin
          failures++;
          $display("train %b at %0d matches no inserted spike", train, cyc);
        end else begin
          ev_hits[hit]++;
          if (train != NT'(1 << ev_lab[hit]) || ev_second[hit]) begin
            failures++;
            $display("train %b at %0d for spike %0d (label %0d, second %0b)",
                     train, cyc, hit, ev_lab[hit], ev_second[hit]);
          end
        end
      end
      // output port, one clock behind its sources
      checks++;
      if (mode_q == MODE_PASSTHROUGH) begin
        n_pass++;
        if (!tx_valid || tx_data != WL'(x_q)) begin
          failures++;
          $display("pass-through tx mismatch at %0d", cyc);
        end
      end else if (tx_valid != (|train_q) || (tx_valid && tx_data != WL'(train_q))) begin
        failures++;
        $display("sorting-mode tx mismatch at %0d", cyc);
      end
    end
    train_q <= train;
    mode_q  <= mode;
    x_q     <= x_in;
  end

  // ---- stimulus
  initial begin
    longint sum_psi, neo_thr;
    int lab, t0;
    // build the recording
    for (int i = 0; i < N; i++)
      sig[i] = longint'($signed($urandom_range(0, 2 * NOISE))) - NOISE;
    for (int s = 0; s < NSPK; s++) begin
      t0 = PERIOD * (s + 1) + $urandom_range(0, 20);
      lab = (s % 8 == 7) ? 3 : (s % 3);
      add_spike(t0, lab, 1'b0);
      if (s % 6 == 2) add_spike(t0 + 60, (lab + 1) % 3, 1'b1);
    end
    // off-line estimate of the detection threshold: Thr = C * mean(psi), C = 8
    sum_psi = 0;
    for (int i = 1; i < 3001; i++) sum_psi += sig[i] * sig[i] - sig[i+1] * sig[i-1];
    neo_thr = 8 * sum_psi / 3000;
    $display("NEO threshold %0d", neo_thr);

    rst = 1'b1; prog = 1'b0; tmpl_prog = '0; tmpl_data = '0; x_in = '0;
    neo_thr_in = '0; match_thr_in = '0; mode = MODE_SORT;
    repeat (M + 10) @(negedge clk);
    rst = 1'b0;
    // program thresholds and templates
    prog = 1'b1;
    neo_thr_in   = PSI_W'(neo_thr);
    match_thr_in = DW'(NSS * NOISE * NOISE + 20000);
    for (int t = 0; t < int'(NT); t++) begin
      for (int k = 0; k < int'(NSS); k++) begin
        tmpl_prog = NT'(1 << t);
        tmpl_data = WL'(shape(t, k));
        n_prog++;
        @(negedge clk);
      end
    end
    prog = 1'b0; tmpl_prog = '0;
    @(negedge clk);
    started = 1'b1;
    // stream the recording; cyc counts from the first sample
    for (int i = 0; i < N; i++) begin
      x_in = WL'(sig[i]);
      sidx = i;
      if (i == N / 3)     begin mode = MODE_PASSTHROUGH; n_mode_sw++; end
      if (i == N / 3 + 2000) begin mode = MODE_SORT;     n_mode_sw++; end
      @(negedge clk);
    end
    x_in = '0;
    repeat (300) @(negedge clk);

    // every neuron spike that was not the second of a close pair: one hit
    for (int e = 0; e < nev; e++) begin
      checks++;
      if (ev_lab[e] < 3 && !ev_second[e]) begin
        if (ev_hits[e] != 1) begin
          failures++;
          $display("spike %0d (label %0d at %0d) sorted %0d times", e, ev_lab[e], ev_t0[e], ev_hits[e]);
        end
      end else if (ev_hits[e] != 0) begin
        failures++;
        $display("spike %0d (label %0d, second %0b) should not be sorted", e, ev_lab[e], ev_second[e]);
      end
    end
    $display("programming writes %0d, detection clocks %0d, aligned %0d, matched %0d, rejected %0d",
             n_prog, n_det, n_align, n_match, n_reject);
    $display("dropped by busy matcher %0d, pass-through clocks %0d, mode switches %0d",
             n_drop, n_pass, n_mode_sw);
    checks++;
    if (n_prog == 0 || n_det == 0 || n_align == 0 || n_match == 0 || n_reject == 0 ||
        n_drop == 0 || n_pass == 0 || n_mode_sw < 2) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

