// Hybrid array multiplier: an N x N self-timed array multiplier that mixes
// dual-rail domino logic and single-rail logic (N = 4 by default).
//
// Data path. Every operand bit enters through a synchronizer, which turns the
// single-rail bit into a dual-rail pair. N*N synchronizing (dual-rail domino)
// AND gates form the partial products pp[i][j] = a[j] & b[i]. A precharge/
// evaluation detector watches all N*N partial products. The true rail of each
// partial product feeds an array of single-rail hybrid full adders, N-1 rows
// of N adders (12 adders for N = 4), in which row i adds partial-product row i
// to the running sum shifted right by one bit, rippling its carry from the
// least significant adder; the least significant sum bit of each row is one
// product bit and the last row gives the upper half of the product. There
// are no storage elements on the data path.
//
// Handshake. The multiplier is the passive side of a four-phase
// request/acknowledge channel, and req is the precharge control of the domino
// gates (precharge while req is low):
//   1. with req low, the AND gates are precharged, all partial products are
//      null, and ack is low;
//   2. the sender sets a and b and raises req: the gates evaluate;
//   3. when every partial product is valid the detector raises ack, and
//      product is valid for as long as ack stays high;
//   4. the sender drops req: the gates precharge, and once every partial
//      product is null the detector drops ack, ready for the next operation.
// a and b must stay stable from req rising until ack falls.
//
// What comes from the design: the SR/DR split (domino AND gates in dual rail,
// hybrid adders in single rail), synchronizers as the SR-to-DR encoders, the
// precharge/evaluation detector between the two domains, the 4 x 4 size, and
// the absence of pipeline registers. This design's own choices: the shape of
// the adder array (row-by-row ripple), driving the precharge straight from req,
// taking the true rail as the single-rail value of a partial product, and
// acknowledging on the detector alone. The adder array settles after ack
// rises; in silicon a delay matched to the adder array would be inserted before
// ack (bundled data). Such a delay has no logic function and is not modelled.
//
// Interface: req, a[N-1:0], b[N-1:0] in; ack, product[2N-1:0] out; pp_valid
// and pp_null expose the detector's two raw conditions. Assertions check the
// four-phase ordering of ack against req. No clock, no reset:
// with req low the circuit returns to its precharged state by itself.
module hybrid_array_mult
  import hyb_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic           req,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic           ack,
  output logic [2*N-1:0] product,
  output logic           pp_valid,
  output logic           pp_null
);

  dr_t  a_dr [N];
  dr_t  b_dr [N];
  dr_t  pp_dr [N*N];        // pp_dr[i*N + j] = a[j] & b[i]
  logic pre;

  assign pre = ~req;

  // SR -> DR encoders on the operand bits.
  for (genvar k = 0; k < N; k++) begin : g_sync
    synchronizer u_sync_a (.in(a[k]), .out(a_dr[k]));
    synchronizer u_sync_b (.in(b[k]), .out(b_dr[k]));
  end

  // Dual-rail domino partial-product generators.
  for (genvar i = 0; i < N; i++) begin : g_pp_row
    for (genvar j = 0; j < N; j++) begin : g_pp_col
      sync_and_gate u_and (
        .pre (pre),
        .a   (a_dr[j]),
        .b   (b_dr[i]),
        .out (pp_dr[i*N + j])
      );
    end
  end

  // DR -> SR: completion of the whole partial-product word.
  completion_detector #(.W(N*N)) u_detect (
    .d         (pp_dr),
    .all_valid (pp_valid),
    .all_null  (pp_null),
    .done      (ack)
  );

  // Single-rail partial products (true rail; 0 during precharge).
  logic [N-1:0] pp [N];
  always_comb begin
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        pp[i][j] = pp_dr[i*N + j].t;
  end

  // Adder array. acc[i] is the running sum after row i, N+1 bits wide.
  logic [N:0] acc [N];
  assign acc[0] = {1'b0, pp[0]};
  assign product[0] = pp[0][0];

  for (genvar i = 1; i < N; i++) begin : g_row
    logic [N:0]   carry;
    logic [N-1:0] sum;
    assign carry[0] = 1'b0;
    for (genvar j = 0; j < N; j++) begin : g_fa
      hybrid_full_adder u_fa (
        .a    (pp[i][j]),
        .b    (acc[i-1][j+1]),
        .cin  (carry[j]),
        .sum  (sum[j]),
        .cout (carry[j+1])
      );
    end
    assign acc[i]     = {carry[N], sum};
    assign product[i] = sum[0];
  end

  assign product[2*N-1:N] = acc[N-1][N:1];

  // Four-phase rules on the passive side: ack rises only while req is high
  // and falls only while req is low.
  always @(posedge ack) begin
    assert (req) else $error("hybrid_array_mult: ack rose while req was low");
  end
  always @(negedge ack) begin
    assert (!req) else $error("hybrid_array_mult: ack fell while req was high");
  end

endmodule
