// Modified single bit adder: a single-rail hybrid full adder.
//
// The cell adds three single-rail bits. It is built around an XNOR of the two
// operands, as the hybrid CMOS / transmission-gate adder is:
//   x    = a XNOR b
//   sum  = x XNOR cin          (equals a ^ b ^ cin)
//   cout = x ? a : cin         (a transmission-gate multiplexer: when a == b
//                               the carry is a, otherwise it propagates cin)
// The XNOR-based structure, single-rail signalling and full-adder function come
// from the adder's description; the exact decomposition into an XNOR stage and a
// carry multiplexer is this design's choice, since the transistor netlist of the
// 16-transistor cell is not reproduced here.
//
// Interface: a, b, cin in; sum, cout out. Purely combinational, no clock.
module hybrid_full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic x;  // a XNOR b

  always_comb begin
    x    = a ~^ b;
    sum  = x ~^ cin;
    cout = x ? a : cin;
  end

endmodule
