// sorter_workload: one end-to-end run of the spike sorter in a given
// configuration, used by tb_sorter_configs.
//
// Instantiates spike_sorter with word length WL and NT templates, builds a
// synthetic recording (uniform noise of +-NOISE, spikes every 300 samples,
// every eighth one from a cell that matches no template, some close pairs
// that the busy matcher must drop), programs the detection threshold as
// 8 x mean NEO energy, the squared match threshold as 1.25 x NSS x NOISE^2 and
// the noise-free templates, streams the recording and checks that every
// template spike is sorted exactly once to its own train bit, that nothing
// else is sorted, and that train follows aligned_valid by 68 clocks.
// Waveforms are scaled by SCALE so they use the same fraction of the word as
// 16-bit data does. With NT <= 3 the three neuron shapes of tb_spike_sorter
// are used; with more templates a family of NT shapes (a sharp peak at
// sample 23 of 2500..3300 LSB plus a trough at samples 30..48).
// Reports its counts on the output ports and raises finished at the end.
module sorter_workload
  import spike_pkg::*;
#(
  parameter int unsigned WL    = 16,
  parameter int unsigned NT    = 3,
  parameter real         SCALE = 1.0,
  parameter int          NOISE = 40,
  parameter int          NSPK  = 48
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output int   n_match,
  output int   n_drop,
  output bit   finished
);

  localparam int unsigned NSS   = NSS_DEF;
  localparam int unsigned M     = M_DEF;
  localparam int unsigned PSI_W = 2 * WL + 1;
  localparam int unsigned DW    = dist_w(WL, NSS);
  localparam int unsigned TW    = (NT > 1) ? $clog2(NT) : 1;
  localparam int          PERIOD = 300;
  localparam int          N      = PERIOD * (NSPK + 2);
  localparam int          LAT    = 68;
  localparam int          UNKNOWN = 1000;

  logic                    rst;
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

  spike_sorter #(.WL(WL), .NT(NT)) dut (.*);

  longint sig [N];
  int     ev_t0 [2 * NSPK];
  int     ev_lab [2 * NSPK];
  bit     ev_second [2 * NSPK];
  int     ev_hits [2 * NSPK];
  int     nev = 0;
  int     labels_hit [NT];

  function automatic real gauss(real k, real mu, real sd);
    return $exp(-((k - mu) * (k - mu)) / (2.0 * sd * sd));
  endfunction

  function automatic longint shape(int lab, int k);
    real v;
    if (lab == UNKNOWN)  v = 2800.0 * gauss(k, 23, 4.0) - 900.0 * gauss(k, 36, 3.0);
    else if (NT <= 3) begin
      unique case (lab)
        0:       v = 3000.0 * gauss(k, 23, 1.5) - 1200.0 * gauss(k, 30, 3.0);
        1:       v = 2000.0 * gauss(k, 23, 2.5);
        default: v = 3500.0 * gauss(k, 23, 1.0) - 2500.0 * gauss(k, 17, 2.0);
      endcase
    end else
      v = (2500.0 + 400.0 * real'(lab / 10)) * gauss(k, 23, 1.5)
          - 1500.0 * gauss(k, 30.0 + 2.0 * real'(lab % 10), 2.0);
    v = v * SCALE;
    return longint'($rtoi(v + ((v >= 0.0) ? 0.5 : -0.5)));
  endfunction

  function automatic void add_spike(int t0, int lab, bit second);
    for (int k = 0; k < int'(NSS); k++) sig[t0 + k] += shape(lab, k);
    ev_t0[nev] = t0; ev_lab[nev] = lab; ev_second[nev] = second; ev_hits[nev] = 0;
    nev++;
  endfunction

  int sidx = -1000;
  int cyc = 0;
  int av_q [$];
  bit started = 0;

  initial begin
    checks = 0; failures = 0; n_match = 0; n_drop = 0; finished = 0;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && started) begin
      if (aligned_valid && !match_busy) av_q.push_back(cyc);
      if (dut.u_match.dropped) n_drop++;
      if (sort_done) begin
        checks++;
        if (av_q.size() == 0 || cyc - av_q[0] != LAT + 1) begin
          failures++;
          $display("[WL=%0d NT=%0d] sort_done at %0d not %0d clocks after its spike", WL, NT, cyc, LAT);
        end
        if (av_q.size() != 0) void'(av_q.pop_front());
      end
      if (|train) begin
        automatic int hit = -1;
        n_match++;
        for (int e = 0; e < nev; e++)
          if (sidx - ev_t0[e] >= 140 && sidx - ev_t0[e] < 180) hit = e;
        checks++;
        if (hit < 0 || ev_second[hit] || ev_lab[hit] == UNKNOWN ||
            train != NT'(1) << ev_lab[hit]) begin
          failures++;
          $display("[WL=%0d NT=%0d] unexpected train %b at sample %0d", WL, NT, train, sidx);
        end else begin
          ev_hits[hit]++;
          labels_hit[ev_lab[hit]]++;
        end
      end
    end
  end

  initial begin
    longint sum_psi, neo_thr, match_thr;
    int lab, t0, nlab;
    for (int t = 0; t < int'(NT); t++) labels_hit[t] = 0;
    for (int i = 0; i < N; i++)
      sig[i] = longint'($signed($urandom_range(0, 2 * NOISE))) - NOISE;
    nlab = 0;
    for (int s = 0; s < NSPK; s++) begin
      t0 = PERIOD * (s + 1) + $urandom_range(0, 20);
      if (s % 8 == 7) lab = UNKNOWN;
      else begin lab = nlab % int'(NT); nlab++; end
      add_spike(t0, lab, 1'b0);
      if (s % 6 == 2) add_spike(t0 + 60, (lab == UNKNOWN) ? 0 : (lab + 1) % int'(NT), 1'b1);
    end
    sum_psi = 0;
    for (int i = 1; i < 3001; i++) sum_psi += sig[i] * sig[i] - sig[i+1] * sig[i-1];
    neo_thr   = 8 * sum_psi / 3000;
    match_thr = longint'(NSS) * NOISE * NOISE * 5 / 4;

    rst = 1'b1; prog = 1'b0; tmpl_prog = '0; tmpl_data = '0; x_in = '0;
    neo_thr_in = '0; match_thr_in = '0; mode = MODE_SORT;
    repeat (M + 10) @(negedge clk);
    rst = 1'b0;
    prog = 1'b1;
    neo_thr_in   = PSI_W'(neo_thr);
    match_thr_in = DW'(match_thr);
    for (int t = 0; t < int'(NT); t++) begin
      for (int k = 0; k < int'(NSS); k++) begin
        tmpl_prog = NT'(1) << t;
        tmpl_data = WL'(shape(t, k));
        @(negedge clk);
      end
    end
    prog = 1'b0; tmpl_prog = '0;
    @(negedge clk);
    started = 1'b1;
    for (int i = 0; i < N; i++) begin
      x_in = WL'(sig[i]);
      sidx = i;
      @(negedge clk);
    end
    x_in = '0;
    repeat (300) @(negedge clk);

    for (int e = 0; e < nev; e++) begin
      checks++;
      if (ev_lab[e] != UNKNOWN && !ev_second[e]) begin
        if (ev_hits[e] != 1) begin
          failures++;
          $display("[WL=%0d NT=%0d] spike %0d (template %0d) sorted %0d times",
                   WL, NT, e, ev_lab[e], ev_hits[e]);
        end
      end else if (ev_hits[e] != 0) failures++;
    end
    // every template must have been recognised at least once
    for (int t = 0; t < int'(NT); t++) begin
      checks++;
      if (labels_hit[t] == 0) begin
        failures++;
        $display("[WL=%0d NT=%0d] template %0d never matched", WL, NT, t);
      end
    end
    checks++;
    if (n_drop == 0) begin
      failures++;
      $display("[WL=%0d NT=%0d] no spike was dropped by the busy matcher", WL, NT);
    end
    $display("[WL=%0d NT=%0d] matched %0d, dropped %0d, checks %0d, failures %0d",
             WL, NT, n_match, n_drop, checks, failures);
    finished = 1'b1;
  end
endmodule
