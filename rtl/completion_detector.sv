// Precharge/evaluation detector for a word of dual-rail signals.
//
// The detector tells the single-rail side when the dual-rail side has finished
// a phase of the four-phase protocol. done rises once every one of the W
// dual-rail inputs carries a valid code word (evaluation complete) and falls
// once every one has returned to null (precharge complete). Between the two,
// while some inputs are valid and others null, done keeps its last value.
// This hysteresis is the behaviour of a Muller C-element over the per-bit
// "valid" signals, and it is written here as a level-sensitive latch: the
// latch reported for this module is that C-element and is intended.
// The existence and role of the detector come from the design; its internal
// form (per-bit OR, AND/NOR reduction, C-element) is this design's choice.
//
// Interface: d[W] (hyb_pkg::dr_t) in; done out; all_valid and all_null give
// the two raw conditions. An immediate assertion flags the illegal code {1,1}. Asynchronous: no clock; done changes as soon as
// the whole word has changed phase.
module completion_detector
  import hyb_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  dr_t  d [W],
  output logic all_valid,
  output logic all_null,
  output logic done
);

  logic [W-1:0] bit_valid;
  logic [W-1:0] bit_null;

  always_comb begin
    for (int i = 0; i < W; i++) begin
      bit_valid[i] = dr_is_valid(d[i]);
      bit_null[i]  = dr_is_null(d[i]);
    end
    all_valid = &bit_valid;
    all_null  = &bit_null;
  end

  // The illegal code word {1,1} must never reach the detector.
  always_comb begin
    for (int i = 0; i < W; i++)
      assert (!(d[i].t && d[i].f))
        else $error("completion_detector: illegal dual-rail code on bit %0d", i);
  end

  // C-element: set on all valid, reset on all null, hold otherwise.
  always_latch begin
    if (all_valid || all_null) done = all_valid;
  end

endmodule
