// spd_comparator: threshold comparator ("Comp") of the slot period detector.
//
// Produces e = 1 while the received sample is below the threshold and e = 0
// otherwise (light on). A low sample means the receiver is inside the empty
// slot of an I-PPM symbol, which is where the high frequency pulses are
// counted. The comparison is unsigned and purely combinational, like an
// "a less than b" compare; a register stage, if wanted, belongs to the
// counter that uses e.
//
// Interface: sample (ADC code, ADC_W bits), th (threshold, same width),
// e (comparator output). No clock; the output follows the inputs.
// The rule e = (sample < th) and the 7-bit sample width follow the reference
// receiver; the threshold is an input so that it can be set to half the
// received "on" level.
module spd_comparator #(
  parameter int unsigned ADC_W = ippm_pkg::ADC_W_DEF
) (
  input  logic [ADC_W-1:0] sample,
  input  logic [ADC_W-1:0] th,
  output logic             e
);

  always_comb e = (sample < th);

endmodule
