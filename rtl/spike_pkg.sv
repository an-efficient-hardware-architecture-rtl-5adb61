// spike_pkg: sizes shared by the template-matching spike sorter.
//
// The defaults are the main published configuration: 16-bit samples
// (a 16.11 fixed-point format; the fraction position does not matter to the
// hardware, which only adds, multiplies and compares), 64-sample spike
// waveforms, an 80-sample detection window with the spike maximum placed at
// sample 23, and three templates. NEO_LAT is this implementation's own
// latency of the NEO detector and sets the length of the Spike Present
// delay line in the aligner.
package spike_pkg;

  localparam int unsigned WL_DEF  = 16;  // sample word length
  localparam int unsigned NSS_DEF = 64;  // samples per spike waveform
  localparam int unsigned M_DEF   = 80;  // master buffer / MBA size
  localparam int unsigned AP_DEF  = 23;  // alignment point
  localparam int unsigned NT_DEF  = 3;   // number of templates
  localparam int unsigned NEO_LAT = 2;   // clocks from a sample entering the
                                         // detector to its Spike Present bit

  // Spike Present delay that puts the detected sample at index AP of the MBA
  // when the copy is taken (see spike_aligner).
  function automatic int unsigned sp_delay(int unsigned m, int unsigned ap);
    return m - 1 - ap - NEO_LAT;
  endfunction

  // Width of a sum of NSS squared differences of two WL-bit signed samples:
  // |x - y| <= 2^WL - 1, so each square is below 2^(2*WL).
  function automatic int unsigned dist_w(int unsigned wl, int unsigned nss);
    return 2 * wl + $clog2(nss);
  endfunction

  // Sorter output mode (system configuration of the implant).
  typedef enum logic {
    MODE_SORT        = 1'b0,  // transmit only the spike train
    MODE_PASSTHROUGH = 1'b1   // transmit every raw sample
  } out_mode_e;

endpackage
