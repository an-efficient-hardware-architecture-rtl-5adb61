// min_unit: minimum of the template distances.
//
// Combinational. Compares the NT accumulated distances and returns the
// smallest one and the number of its template. The published architecture
// gives only the job of the unit; this implementation scans the inputs in
// order, so on a tie the lower template number wins.
module min_unit
  import spike_pkg::*;
#(
  parameter int unsigned NT = NT_DEF,
  parameter int unsigned DW = dist_w(WL_DEF, NSS_DEF),
  localparam int unsigned TW = (NT > 1) ? $clog2(NT) : 1
) (
  input  logic [NT-1:0][DW-1:0] dists,
  output logic [DW-1:0]         min_val,
  output logic [TW-1:0]         min_idx
);

  always_comb begin
    min_val = dists[0];
    min_idx = '0;
    for (int t = 1; t < NT; t++) begin
      if (dists[t] < min_val) begin
        min_val = dists[t];
        min_idx = TW'(t);
      end
    end
  end

endmodule
