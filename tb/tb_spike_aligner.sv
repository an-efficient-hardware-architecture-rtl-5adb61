// tb_spike_aligner: self-checking test of the spike alignment unit.
//
// Drives random samples and Spike Present pulses of random length. A
// reference model keeps the sample history, works out which samples the MBA
// copy holds, searches indices AP..M-(NSS-AP) for the first maximum and
// checks the aligned window, the max index, and that aligned_valid comes
// exactly SP_DELAY+18 clocks after the pulse (17 of them for the search).
// Pulses that arrive while the unit is busy must be ignored and reported.
module tb_spike_aligner;
  import spike_pkg::*;

  localparam int unsigned WL  = 16;
  localparam int unsigned NSS = 64;
  localparam int unsigned M   = 80;
  localparam int unsigned AP  = 23;
  localparam int unsigned D   = sp_delay(M, AP);
  localparam int unsigned IW  = $clog2(M);
  localparam int unsigned MAX_ADDR = M - (NSS - AP);
  localparam int          N   = 12000;
  localparam int          RST_CYC = 100;

  logic clk = 1'b0;
  logic rst;
  logic signed [WL-1:0] x_in;
  logic spike_present;
  logic aligned_valid;
  logic [NSS-1:0][WL-1:0] aligned_spike;
  logic [IW-1:0] max_idx;
  logic busy, sp_ignored;

  int checks = 0, failures = 0;
  int n_aligned = 0, n_ignored = 0, n_tie = 0;
  longint hist [0:N-1];
  bit     sp_h [0:N-1];
  int     exp_valid_at [int];   // clock of aligned_valid -> load clock
  int     exp_ign_at   [int];

  always #5 clk = ~clk;

  spike_aligner #(.WL(WL), .NSS(NSS), .M(M), .AP(AP), .SP_DELAY(D)) dut (.*);

  initial begin
    repeat (N + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int  busy_until;   // first clock edge at which a new load is accepted
    int  next_pulse;
    int  pulse_left;
    longint mba [M];
    longint best;
    int  bi, start;
    busy_until = 0;
    next_pulse = RST_CYC + 60;
    pulse_left = 0;
    rst = 1'b1; x_in = '0; spike_present = 1'b0;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      // ---- check outputs of clock edge i-1
      if (i >= 1 && !rst) begin
        automatic int t = i - 1;
        automatic bit exp_v = exp_valid_at.exists(t);
        checks++;
        if (aligned_valid != exp_v) begin
          failures++;
          if (failures < 10) $display("t=%0d aligned_valid %0b exp %0b", t, aligned_valid, exp_v);
        end
        if (exp_v && aligned_valid) begin
          automatic int e = exp_valid_at[t];    // load clock
          for (int k = 0; k < int'(M); k++) mba[k] = hist[e - 1 - (int'(M) - 1 - k)];
          best = mba[AP]; bi = AP;
          for (int k = AP + 1; k <= int'(MAX_ADDR); k++) begin
            if (mba[k] == best) n_tie++;
            if (mba[k] > best) begin best = mba[k]; bi = k; end
          end
          start = bi - int'(AP);
          checks++;
          if (int'(max_idx) != bi) begin
            failures++;
            if (failures < 10) $display("t=%0d max_idx %0d exp %0d", t, max_idx, bi);
          end
          for (int k = 0; k < int'(NSS); k++) begin
            checks++;
            if (longint'($signed(aligned_spike[k])) != mba[start + k]) begin
              failures++;
              if (failures < 10) $display("t=%0d sample %0d: %0d exp %0d", t,
                                          k, $signed(aligned_spike[k]), mba[start + k]);
            end
          end
          n_aligned++;
        end
        checks++;
        if (sp_ignored != exp_ign_at.exists(t)) begin
          failures++;
          if (failures < 10) $display("t=%0d sp_ignored %0b", t, sp_ignored);
        end
        if (sp_ignored) n_ignored++;
      end
      // ---- inputs for clock edge i
      rst = (i < RST_CYC);
      if (rst) x_in = '0;
      else if ((i / 1000) % 2 == 0) x_in = WL'($urandom);
      else x_in = WL'($signed($urandom_range(0, 6)) - 3);   // many ties
      if (!rst && i == next_pulse) begin
        pulse_left = $urandom_range(1, 5);
        // mostly well spaced, sometimes inside the busy window
        next_pulse = i + (($urandom_range(0, 3) == 0) ? $urandom_range(8, 16)
                                                       : $urandom_range(30, 90));
      end
      spike_present = (pulse_left > 0);
      if (pulse_left > 0) pulse_left--;
      hist[i] = longint'(x_in);
      sp_h[i] = spike_present;
      // rising edge of the input at edge i reaches the control unit at edge i+D
      if (spike_present && (i == 0 || !sp_h[i-1])) begin
        if (i + int'(D) >= busy_until) begin
          exp_valid_at[i + int'(D) + 17] = i + int'(D);
          busy_until = i + int'(D) + 19;
        end else begin
          exp_ign_at[i + int'(D) - 1] = 1;
        end
      end
    end
    checks++;
    if (n_aligned < 50 || n_ignored == 0) begin
      failures++;
      $display("too few events: aligned %0d ignored %0d", n_aligned, n_ignored);
    end
    $display("aligned %0d, ignored %0d, ties seen %0d", n_aligned, n_ignored, n_tie);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
