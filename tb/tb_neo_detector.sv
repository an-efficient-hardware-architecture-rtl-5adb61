// tb_neo_detector: self-checking test of the NEO spike detector.
//
// Drives random samples (small and full-scale) and reprograms the threshold
// now and then. A reference model keeps the sample history and checks, every
// clock, psi[n] = x[n]^2 - x[n+1]x[n-1] and spike_present = (psi >= threshold)
// with the detector's two-clock latency.
module tb_neo_detector;
  import spike_pkg::*;

  localparam int unsigned WL    = 16;
  localparam int unsigned PSI_W = 2 * WL + 1;
  localparam int          N     = 4000;
  localparam int          RST_CYC = 4;

  logic clk = 1'b0;
  logic rst;
  logic signed [WL-1:0]    x_in;
  logic                    prog;
  logic signed [PSI_W-1:0] thr_in;
  logic signed [PSI_W-1:0] psi;
  logic                    spike_present;

  int checks = 0, failures = 0, n_det = 0;
  longint s   [0:N-1];
  longint thr [0:N-1];   // threshold register contents after each clock

  always #5 clk = ~clk;

  neo_detector #(.WL(WL)) dut (.*);

  initial begin
    repeat (N + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint exp_psi, cur_thr;
    bit     exp_sp;
    rst = 1'b1; prog = 1'b0; x_in = '0; thr_in = '0;
    cur_thr = (64'sd1 <<< (PSI_W - 1)) - 1;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      // outputs now reflect clock edge i-1
      if (i - 1 >= RST_CYC + 3) begin
        exp_psi = s[i-3] * s[i-3] - s[i-2] * s[i-4];
        exp_sp  = exp_psi >= thr[i-2];
        checks++;
        if (longint'(psi) != exp_psi || spike_present != exp_sp) begin
          failures++;
          if (failures < 10)
            $display("mismatch at %0d: psi %0d exp %0d sp %0b exp %0b",
                     i, psi, exp_psi, spike_present, exp_sp);
        end
        if (spike_present) n_det++;
      end
      // inputs for clock edge i
      rst = (i < RST_CYC);
      if (rst) x_in = '0;
      else if ($urandom_range(0, 3) == 0) x_in = WL'($urandom);
      else x_in = WL'($signed($urandom_range(0, 4000)) - 2000);
      prog = !rst && (i % 500 == 10);
      if (prog) begin
        unique case ((i / 500) % 3)
          0: thr_in = PSI_W'(longint'($urandom_range(0, 4000000)));
          1: thr_in = PSI_W'(longint'($urandom) * 8);
          default: thr_in = -PSI_W'(longint'($urandom_range(0, 1000000)));
        endcase
        cur_thr = longint'(thr_in);
      end
      s[i]   = rst ? 0 : longint'(x_in);
      thr[i] = cur_thr;
    end
    checks++;
    if (n_det == 0 || n_det == checks - 1) begin
      failures++;
      $display("detector output never toggled (%0d detections)", n_det);
    end
    $display("detections: %0d", n_det);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
