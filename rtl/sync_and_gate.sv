// Synchronizing logic gate: a dual-rail domino AND gate.
//
// Each gate forms one partial product a AND b of the array multiplier in
// dual-rail domino logic. While pre (precharge) is high both output rails are
// held at 0: the output is the null spacer. While pre is low the gate
// evaluates. Every pull-down stack holds one transistor per input, so each
// output rail needs both inputs before it can fire:
//   out.t = a.t & b.t
//   out.f = (a.t & b.f) | (a.f & b.t) | (a.f & b.f)
// With equal-height stacks the evaluation time does not depend on the data
// values, and an output that is valid also proves both inputs have arrived;
// this is what lets a completion detector on the outputs stand for the inputs
// too. The dual-rail AND function with precharge, and the equal number of
// transistors in every stack, follow the gate's description; the sum-of-
// products form of the false rail is this design's choice for those stacks.
// A real domino gate keeps its discharged node until the next precharge; here
// the inputs are held valid through the whole evaluate phase by the
// four-phase protocol, so a combinational model gives the same outputs.
//
// Interface: pre (1 = precharge, 0 = evaluate), a, b (hyb_pkg::dr_t) in;
// out (hyb_pkg::dr_t). Combinational, no clock.
module sync_and_gate
  import hyb_pkg::*;
(
  input  logic pre,
  input  dr_t  a,
  input  dr_t  b,
  output dr_t  out
);

  always_comb begin
    if (pre) begin
      out = DR_NULL;
    end else begin
      out.t = a.t & b.t;
      out.f = (a.t & b.f) | (a.f & b.t) | (a.f & b.f);
    end
  end

endmodule
