// template_sr: serial-in, serial-out shift register holding one template.
//
// The template's NSS samples are shifted in on data_in, sample 0 first,
// while load is high; after NSS loads sample 0 sits at the output. During
// matching, rotate shifts the register with its output fed back to its input,
// so the template is presented on data_out one sample per clock (sample 0
// first) and is back in place after NSS rotations, ready for the next spike.
// Templates held in shift registers follow the published architecture; the
// feedback path for reuse is this implementation's reading of it. load has priority over
// rotate. The register is not reset: it is written by programming.
module template_sr
  import spike_pkg::*;
#(
  parameter int unsigned WL  = WL_DEF,
  parameter int unsigned NSS = NSS_DEF
) (
  input  logic                 clk,
  input  logic                 load,
  input  logic                 rotate,
  input  logic signed [WL-1:0] data_in,
  output logic signed [WL-1:0] data_out
);

  logic [NSS-1:0][WL-1:0] sr;

  always_ff @(posedge clk) begin
    if (load || rotate) begin
      sr[NSS-1] <= load ? data_in : sr[0];
      for (int i = 0; i < NSS - 1; i++) sr[i] <= sr[i+1];
    end
  end

  assign data_out = sr[0];

endmodule
