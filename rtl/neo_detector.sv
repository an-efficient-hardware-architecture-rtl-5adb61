// neo_detector: non-linear energy operator (NEO) spike detector.
//
// Every clock one signed WL-bit sample enters a three-stage NEO shift
// register holding x[n+1], x[n] and x[n-1]. The energy
//     psi[n] = x[n]^2 - x[n+1] * x[n-1]
// is formed with two multipliers and compared with the energy threshold; if
// psi[n] is greater than or equal to the threshold, spike_present goes high,
// telling the aligner that a spike is in its buffer. The threshold (C times
// the mean energy, estimated off-line) is loaded from thr_in while prog is
// high. This structure follows the published
// architecture.
//
// Own choices: the compare result and psi are registered, so spike_present
// for sample n is visible NEO_LAT = 2 clocks after x[n] was sampled
// (one clock to receive x[n+1], one for the register). Reset does not clear
// the NEO shift register directly: while rst is high zeros are shifted in,
// as for all data shift registers of the sorter, and rst must be held for at
// least the master-buffer length. The threshold resets to the largest
// positive value, so nothing is detected before it is programmed.
module neo_detector
  import spike_pkg::*;
#(
  parameter int unsigned WL    = WL_DEF,
  localparam int unsigned PSI_W = 2 * WL + 1
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [WL-1:0]    x_in,
  input  logic                    prog,
  input  logic signed [PSI_W-1:0] thr_in,
  output logic signed [PSI_W-1:0] psi,           // energy of the sample
  output logic                    spike_present  // psi >= threshold
);

  logic signed [WL-1:0]    x_next, x_cur, x_prev;  // x[n+1], x[n], x[n-1]
  logic signed [PSI_W-1:0] thr_q;
  logic signed [PSI_W-1:0] psi_c;
  logic signed [2*WL-1:0]  sq, xprod;

  // NEO shift register
  always_ff @(posedge clk) begin
    x_next <= rst ? '0 : x_in;
    x_cur  <= x_next;
    x_prev <= x_cur;
  end

  // Energy threshold register
  always_ff @(posedge clk) begin
    if (rst)       thr_q <= {1'b0, {(PSI_W-1){1'b1}}};
    else if (prog) thr_q <= thr_in;
  end

  always_comb begin
    sq    = x_cur * x_cur;
    xprod = x_next * x_prev;
    psi_c = PSI_W'(sq) - PSI_W'(xprod);
  end

  // Comparator
  always_ff @(posedge clk) begin
    psi           <= psi_c;
    spike_present <= !rst && (psi_c >= thr_q);
  end

endmodule
