// spike_aligner: aligns a detected spike to its maximum amplitude.
//
// Every clock the input sample is shifted into the Master Buffer, an M-entry
// shift register (index M-1 newest, index 0 oldest). The detector's Spike
// Present bit passes through an SP_DELAY-stage delay line so that more of the
// spike is in the buffer when it is captured. On a rising edge of the delayed
// bit the control unit raises LOAD and the whole Master Buffer is copied in
// parallel into the MBA register. It then walks the select IDX over MBA
// entries AP .. M-(NSS-AP): the first value read is stored in the max value
// register MR (enable MVU), every later value replaces MR if it is larger,
// and the index of the maximum is kept. With M = 80, NSS = 64 and AP = 23 this
// is 17 reads in 17 clocks. The NSS-sample window MBA[imax-AP +: NSS], which
// puts the maximum at sample AP, is then offered on aligned_spike with
// aligned_valid high for one clock. This follows the published architecture.
//
// Own choices: SP_DELAY defaults to M-1-AP-NEO_LAT, which places the sample
// that crossed the detection threshold at MBA index AP, so the 17-sample
// search covers the 0.7 ms after the crossing. A Spike Present edge that
// arrives while the control unit is busy is ignored and reported on
// sp_ignored. The maximum is the largest signed value; on a tie the earliest
// sample wins. Samples are signed and aligned_spike[k] is waveform sample k
// (k = 0 earliest).
//
// Timing: a spike_present edge sampled at clock e gives LOAD at clock
// e+SP_DELAY, the search at clocks e+SP_DELAY+1 .. e+SP_DELAY+17, and
// aligned_valid high in the following cycle (sampled at clock e+SP_DELAY+18).
// The next Spike Present edge is accepted from clock e+SP_DELAY+19 on.
module spike_aligner
  import spike_pkg::*;
#(
  parameter int unsigned WL       = WL_DEF,
  parameter int unsigned NSS      = NSS_DEF,
  parameter int unsigned M        = M_DEF,
  parameter int unsigned AP       = AP_DEF,
  parameter int unsigned SP_DELAY = sp_delay(M_DEF, AP_DEF),
  localparam int unsigned IW      = $clog2(M)
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic signed [WL-1:0]          x_in,
  input  logic                          spike_present,
  output logic                          aligned_valid,
  output logic [NSS-1:0][WL-1:0]        aligned_spike,
  output logic [IW-1:0]                 max_idx,     // MBA index of the maximum
  output logic                          busy,        // capture/search in progress
  output logic                          sp_ignored   // spike edge lost while busy
);

  localparam int unsigned MAX_ADDR = M - (NSS - AP);  // last index searched

  typedef enum logic [1:0] {A_IDLE, A_SEARCH, A_DONE} astate_e;

  logic [M-1:0][WL-1:0] master_buf;
  logic [M-1:0][WL-1:0] mba;
  logic [SP_DELAY-1:0]  sp_dly;
  logic                 sp_dly_prev;
  logic                 sp_rise;
  astate_e              state;
  logic [IW-1:0]        idx;
  logic signed [WL-1:0] mr;
  logic signed [WL-1:0] mba_rd;
  logic                 load;

  // Master Buffer: serial-in, parallel-out shift register
  always_ff @(posedge clk) begin
    master_buf[M-1] <= rst ? '0 : x_in;
    for (int i = 0; i < M - 1; i++) master_buf[i] <= master_buf[i+1];
  end

  // Spike Present delay line
  always_ff @(posedge clk) begin
    sp_dly[0] <= rst ? 1'b0 : spike_present;
    for (int i = 1; i < SP_DELAY; i++) sp_dly[i] <= sp_dly[i-1];
    sp_dly_prev <= rst ? 1'b0 : sp_dly[SP_DELAY-1];
  end

  assign sp_rise    = sp_dly[SP_DELAY-1] && !sp_dly_prev;
  assign load       = (state == A_IDLE) && sp_rise;
  assign sp_ignored = (state != A_IDLE) && sp_rise;
  assign busy       = (state != A_IDLE);

  // MBA: parallel-in, parallel-out copy of the Master Buffer
  always_ff @(posedge clk) begin
    if (load) mba <= master_buf;
  end

  assign mba_rd = mba[idx];

  // Control unit with the max value register MR
  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= A_IDLE;
      idx     <= '0;
      mr      <= '0;
      max_idx <= IW'(AP);
    end else begin
      unique case (state)
        A_IDLE: begin
          if (load) begin
            idx   <= IW'(AP);
            state <= A_SEARCH;
          end
        end
        A_SEARCH: begin
          if (idx == IW'(AP) || mba_rd > mr) begin  // MVU
            mr      <= mba_rd;
            max_idx <= idx;
          end
          if (idx == IW'(MAX_ADDR)) state <= A_DONE;
          else                      idx   <= idx + 1'b1;
        end
        A_DONE:  state <= A_IDLE;
        default: state <= A_IDLE;
      endcase
    end
  end

  // Part select placing the maximum at the alignment point
  always_comb begin
    for (int k = 0; k < NSS; k++)
      aligned_spike[k] = mba[IW'(32'(max_idx) - AP + k)];
  end

  assign aligned_valid = (state == A_DONE);

  // The maximum always lies in the searched range, so the window fits the MBA.
  a_max_in_range: assert property (@(posedge clk) disable iff (rst)
    aligned_valid |-> (32'(max_idx) >= AP && 32'(max_idx) <= MAX_ADDR));

endmodule
