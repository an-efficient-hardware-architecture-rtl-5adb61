// sda: squared-difference accumulator of the template matching unit.
//
// Each clock with en high it takes one sample x of the aligned spike and the
// matching sample y of a template and adds (x - y)^2 to its accumulator, so
// after NSS samples acc holds the squared Euclidean distance between
// the spike and the template.
// The published architecture names the unit and its job; the insides are this
// implementation's: the difference and square are registered in a first
// stage (a pipelined multiplier) and added to the accumulator in a second,
// so acc includes a sample two clocks after it is presented. clr empties the
// accumulator and the pipeline stage; it has priority over en.
module sda
  import spike_pkg::*;
#(
  parameter int unsigned WL     = WL_DEF,
  parameter int unsigned NSS    = NSS_DEF,
  localparam int unsigned DW    = dist_w(WL, NSS)
) (
  input  logic                 clk,
  input  logic                 clr,
  input  logic                 en,
  input  logic signed [WL-1:0] x,
  input  logic signed [WL-1:0] y,
  output logic [DW-1:0]        acc
);

  logic signed [WL:0]     diff;
  logic signed [2*WL+1:0] sq;
  logic [2*WL-1:0]        sq_q;
  logic                   sq_v;

  always_comb begin
    diff = (WL+1)'(x) - (WL+1)'(y);
    sq   = diff * diff;
  end

  always_ff @(posedge clk) begin
    if (clr) begin
      sq_v <= 1'b0;
      sq_q <= '0;
      acc  <= '0;
    end else begin
      sq_v <= en;
      sq_q <= sq[2*WL-1:0];
      if (sq_v) acc <= acc + DW'(sq_q);
    end
  end

endmodule
