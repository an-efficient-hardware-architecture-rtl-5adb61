// tb_template_matcher: self-checking test of the template matching unit.
//
// Programs three random templates and a distance threshold, then presents
// aligned spikes that are noisy copies of a template or unrelated waveforms.
// A reference model computes the squared Euclidean distances, the minimum
// (lowest template number on a tie) and the threshold decision, and checks
// min_dist, min_idx, the spike train bit and that train comes exactly 68
// clocks after aligned_valid. It also presents spikes while the unit is busy
// (they must be dropped), a spike exactly at the threshold (must match,
// "less than or equal"), and reprograms the templates between runs.
module tb_template_matcher;
  import spike_pkg::*;

  localparam int unsigned WL  = 16;
  localparam int unsigned NSS = 64;
  localparam int unsigned NT  = 3;
  localparam int unsigned DW  = dist_w(WL, NSS);
  localparam int unsigned TW  = $clog2(NT);
  localparam int          LAT = 68;

  logic clk = 1'b0;
  logic rst;
  logic aligned_valid;
  logic [NSS-1:0][WL-1:0] aligned_spike;
  logic prog;
  logic [NT-1:0] tmpl_prog;
  logic signed [WL-1:0] tmpl_data;
  logic [DW-1:0] match_thr_in;
  logic [NT-1:0] train;
  logic done;
  logic [DW-1:0] min_dist;
  logic [TW-1:0] min_idx;
  logic busy, dropped;

  int checks = 0, failures = 0;
  int n_match = 0, n_nomatch = 0, n_drop = 0, n_edge = 0;
  longint tmpl [NT][NSS];
  longint thr;

  always #5 clk = ~clk;

  template_matcher #(.WL(WL), .NSS(NSS), .NT(NT)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic program_templates();
    for (int t = 0; t < int'(NT); t++) begin
      for (int k = 0; k < int'(NSS); k++) begin
        tmpl[t][k] = longint'($signed($urandom_range(0, 8000))) - 4000;
        prog = 1'b1; tmpl_prog = NT'(1 << t); tmpl_data = WL'(tmpl[t][k]);
        @(negedge clk);
      end
    end
    prog = 1'b0; tmpl_prog = '0;
    @(negedge clk);
  endtask

  task automatic program_thr(longint v);
    thr = v;
    prog = 1'b1; tmpl_prog = '0; match_thr_in = DW'(v);
    @(negedge clk);
    prog = 1'b0;
    @(negedge clk);
  endtask

  function automatic longint distance(longint x [NSS], int t);
    longint s = 0;
    for (int k = 0; k < int'(NSS); k++) s += (x[k] - tmpl[t][k]) * (x[k] - tmpl[t][k]);
    return s;
  endfunction

  // Present one spike and check the result. kind: 0 noisy copy, 1 random,
  // 2 noisy copy with the threshold set exactly to its distance.
  task automatic run_spike(int kind, bit inject_busy);
    longint x [NSS];
    longint d [NT];
    longint best;
    int bi, tsel, tr_at;
    bit exp_match, seen;
    tsel = $urandom_range(0, NT - 1);
    for (int k = 0; k < int'(NSS); k++) begin
      if (kind == 1) x[k] = longint'($signed($urandom_range(0, 20000))) - 10000;
      else           x[k] = tmpl[tsel][k] + longint'($signed($urandom_range(0, 60))) - 30;
      aligned_spike[k] = WL'(x[k]);
    end
    for (int t = 0; t < int'(NT); t++) d[t] = distance(x, t);
    best = d[0]; bi = 0;
    for (int t = 1; t < int'(NT); t++) if (d[t] < best) begin best = d[t]; bi = t; end
    if (kind == 2) begin program_thr(best); n_edge++; end
    exp_match = (best <= thr);
    aligned_valid = 1'b1;
    @(posedge clk);
    @(negedge clk);
    aligned_valid = 1'b0;
    seen = 1'b0;
    tr_at = -1;
    for (int c = 1; c <= LAT + 2; c++) begin
      if (inject_busy && (c == 5 || c == LAT)) begin
        // a second spike while busy: it must be refused
        for (int k = 0; k < int'(NSS); k++) aligned_spike[k] = WL'($urandom);
        aligned_valid = 1'b1;
        #1;
        checks++;
        if (!dropped) failures++;
        else n_drop++;
      end
      @(posedge clk);
      #1 aligned_valid = 1'b0;
      if (|train) begin
        tr_at = c;
        checks++;
        if (train != NT'(1 << bi) || !exp_match) begin
          failures++;
          $display("train %b, expected bit %0d match %0b", train, bi, exp_match);
        end
        seen = 1'b1;
      end
      if (done) begin
        checks += 2;
        if (longint'(min_dist) != best) begin
          failures++;
          $display("min_dist %0d exp %0d", min_dist, best);
        end
        if (int'(min_idx) != bi) begin
          failures++;
          $display("min_idx %0d exp %0d", min_idx, bi);
        end
        checks++;
        if (c != LAT) begin
          failures++;
          $display("done after %0d clocks, expected %0d", c, LAT);
        end
      end
      @(negedge clk);
    end
    checks++;
    if (seen != exp_match) begin
      failures++;
      $display("train seen %0b expected %0b (best %0d thr %0d)", seen, exp_match, best, thr);
    end
    if (seen) begin
      n_match++;
      checks++;
      if (tr_at != LAT) begin
        failures++;
        $display("train after %0d clocks, expected %0d", tr_at, LAT);
      end
    end else n_nomatch++;
    checks++;
    if (busy) failures++;
  endtask

  initial begin
    rst = 1'b1; aligned_valid = 1'b0; prog = 1'b0; tmpl_prog = '0;
    tmpl_data = '0; match_thr_in = '0; aligned_spike = '0;
    repeat (5) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    for (int r = 0; r < 3; r++) begin
      program_templates();
      program_thr(longint'(NSS) * 40 * 40);
      for (int n = 0; n < 40; n++) begin
        automatic int kind = (n % 5 == 4) ? 2 : ((n % 3 == 0) ? 1 : 0);
        run_spike(kind, n % 4 == 1);
        if (kind == 2) program_thr(longint'(NSS) * 40 * 40);
        repeat ($urandom_range(0, 3)) @(negedge clk);
      end
    end
    checks++;
    if (n_match == 0 || n_nomatch == 0 || n_drop == 0 || n_edge == 0) begin
      failures++;
      $display("missing case: match %0d nomatch %0d drop %0d edge %0d",
               n_match, n_nomatch, n_drop, n_edge);
    end
    $display("matched %0d, rejected %0d, dropped %0d, threshold-edge %0d",
             n_match, n_nomatch, n_drop, n_edge);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
