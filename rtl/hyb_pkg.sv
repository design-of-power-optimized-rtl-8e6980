// Shared types for the hybrid array multiplier.
//
// The multiplier mixes two signalling styles. Single-rail (SR) blocks carry a
// bit on one wire. Dual-rail (DR) blocks carry a bit on a pair of wires
// {t, f} using the four-phase dual-rail code:
//   {t,f} = 00  null (spacer), the state every domino gate returns to in precharge
//   {t,f} = 10  valid logic 1
//   {t,f} = 01  valid logic 0
//   {t,f} = 11  illegal, never produced by a correct circuit
// The code and the null spacer follow the four-phase dual-rail protocol the
// design is built on; the field order inside the struct is this design's choice.
package hyb_pkg;

  typedef struct packed {
    logic t;  // true rail
    logic f;  // false rail
  } dr_t;

  localparam dr_t DR_NULL = '{t: 1'b0, f: 1'b0};

  // Encode a single-rail bit as a valid dual-rail code word.
  function automatic dr_t dr_encode(input logic b);
    return '{t: b, f: ~b};
  endfunction

  // A code word carries data (is not the null spacer).
  function automatic logic dr_is_valid(input dr_t d);
    return d.t ^ d.f;
  endfunction

  function automatic logic dr_is_null(input dr_t d);
    return ~(d.t | d.f);
  endfunction

endpackage
