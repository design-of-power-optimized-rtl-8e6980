// Synchronizer: encoder from a single-rail bit to a dual-rail pair.
//
// It takes one single-rail signal from the SR side and drives both rails of a
// DR signal: the true rail is the input itself and the false rail its
// complement (the structure of the synchronizer is exactly this: the input
// wire and an inverter giving "outbar"). The output is therefore always a valid
// code word; the null spacer of the four-phase protocol is produced downstream,
// by the precharge of the domino gates the synchronizer feeds.
//
// The true rail is the input wire itself, so a synthesis report shows that
// output as wired straight to an input; that is the intended structure.
//
// Interface: in (single rail) -> out (hyb_pkg::dr_t, out.t = in, out.f = outbar).
// Combinational, no clock.
module synchronizer
  import hyb_pkg::*;
(
  input  logic in,
  output dr_t  out
);

  always_comb begin
    out.t = in;
    out.f = ~in;   // outbar
  end

endmodule
