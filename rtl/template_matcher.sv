// template_matcher: classifies an aligned spike by Euclidean distance.
//
// When aligned_valid is high and the unit is idle, the aligned spike is
// loaded in parallel into the ASR (aligned spike register), which is then
// shifted out serially, sample 0 first, while each of the NT template shift
// registers presents the same sample index of its template. One SDA unit per
// template accumulates the squared differences, so after NSS clocks SDA t
// holds sum_k (x_k - y_t,k)^2, the squared Euclidean distance, which avoids a
// square root. The MIN unit picks the smallest distance and its template
// number; the comparator raises Min Valid if that distance is less than or
// equal to the programmed maximum distance threshold T_M^2, and the control
// unit then pulses bit min_idx of the spike train. A spike that arrives while
// the unit is busy is not queued: it is dropped and reported on dropped.
// Templates are programmed by shifting samples in on tmpl_data while prog and
// the template's bit of tmpl_prog are high; the threshold register loads
// match_thr_in while prog is high. This structure follows the
// published architecture.
//
// Own choices: templates are rotated during matching so they are reused;
// programming is ignored while a spike is being matched; match_thr resets to
// zero. Timing: aligned_valid sampled at clock 0 loads the ASR, the SDA
// inputs are fed at clocks 1..NSS, the last square is accumulated at NSS+1,
// the MIN result is registered at NSS+2, Min Valid at NSS+3 and train at
// NSS+4, which is 68 clocks for 64-sample spikes. busy is high from clock 1
// to clock NSS+4; done pulses with train whether or not a template matched.
module template_matcher
  import spike_pkg::*;
#(
  parameter int unsigned WL  = WL_DEF,
  parameter int unsigned NSS = NSS_DEF,
  parameter int unsigned NT  = NT_DEF,
  localparam int unsigned DW = dist_w(WL, NSS),
  localparam int unsigned TW = (NT > 1) ? $clog2(NT) : 1,
  localparam int unsigned CW = $clog2(NSS)
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   aligned_valid,
  input  logic [NSS-1:0][WL-1:0] aligned_spike,
  input  logic                   prog,
  input  logic [NT-1:0]          tmpl_prog,
  input  logic signed [WL-1:0]   tmpl_data,
  input  logic [DW-1:0]          match_thr_in,
  output logic [NT-1:0]          train,     // one-clock pulse on the matched template
  output logic                   done,      // classification finished
  output logic [DW-1:0]          min_dist,  // smallest squared distance
  output logic [TW-1:0]          min_idx,   // its template
  output logic                   busy,
  output logic                   dropped    // aligned spike refused, unit busy
);

  typedef enum logic [2:0] {T_IDLE, T_COMP, T_DRAIN, T_MIN, T_CMP, T_OUT} tstate_e;

  tstate_e                 state;
  logic [CW-1:0]           cnt;
  logic [NSS-1:0][WL-1:0]  asr;
  logic [DW-1:0]           thr_q;
  logic [NT-1:0][WL-1:0]   tmpl_out;
  logic [NT-1:0][DW-1:0]   dists;
  logic [DW-1:0]           min_val_c;
  logic [TW-1:0]           min_idx_c;
  logic                    min_valid;
  logic                    start, computing;

  assign busy      = (state != T_IDLE);
  assign start     = (state == T_IDLE) && aligned_valid;
  assign dropped   = busy && aligned_valid;
  assign computing = (state == T_COMP);

  // ASR: parallel-in, serial-out
  always_ff @(posedge clk) begin
    if (start) asr <= aligned_spike;
    else if (computing) begin
      for (int k = 0; k < NSS - 1; k++) asr[k] <= asr[k+1];
      asr[NSS-1] <= '0;
    end
  end

  // Maximum distance threshold register
  always_ff @(posedge clk) begin
    if (rst)       thr_q <= '0;
    else if (prog) thr_q <= match_thr_in;
  end

  for (genvar t = 0; t < NT; t++) begin : g_tmpl
    template_sr #(.WL(WL), .NSS(NSS)) u_tsr (
      .clk      (clk),
      .load     (prog && tmpl_prog[t] && !busy),
      .rotate   (computing),
      .data_in  (tmpl_data),
      .data_out (tmpl_out[t])
    );

    sda #(.WL(WL), .NSS(NSS)) u_sda (
      .clk (clk),
      .clr (start),
      .en  (computing),
      .x   (asr[0]),
      .y   (tmpl_out[t]),
      .acc (dists[t])
    );
  end

  min_unit #(.NT(NT), .DW(DW)) u_min (
    .dists    (dists),
    .min_val (min_val_c),
    .min_idx (min_idx_c)
  );

  // Control unit, MIN register and comparator
  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= T_IDLE;
      cnt       <= '0;
      min_dist  <= '0;
      min_idx   <= '0;
      min_valid <= 1'b0;
      train     <= '0;
      done      <= 1'b0;
    end else begin
      train <= '0;
      done  <= 1'b0;
      unique case (state)
        T_IDLE: if (start) begin
          cnt   <= '0;
          state <= T_COMP;
        end
        T_COMP: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(NSS - 1)) state <= T_DRAIN;
        end
        T_DRAIN: state <= T_MIN;
        T_MIN: begin
          min_dist <= min_val_c;
          min_idx  <= min_idx_c;
          state    <= T_CMP;
        end
        T_CMP: begin
          min_valid <= (min_dist <= thr_q);
          state     <= T_OUT;
        end
        T_OUT: begin
          if (min_valid) train[min_idx] <= 1'b1;
          done  <= 1'b1;
          state <= T_IDLE;
        end
        default: state <= T_IDLE;
      endcase
    end
  end

  // The spike train names at most one template, and only when a
  // classification ends.
  a_train_onehot: assert property (@(posedge clk) disable iff (rst) $onehot0(train));
  a_train_done:   assert property (@(posedge clk) disable iff (rst) (|train) |-> done);

endmodule
