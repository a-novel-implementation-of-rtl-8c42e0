// bk_csla_mult: N x N unsigned multiplier (8x8) whose partial products are
// summed by Brent-Kung carry select adders.
//
// Each operand is split into halves of H = N/2 bits (a = aH:aL, b = bH:bL).
// Four H x H sub-multipliers form the N-bit products
//   LL = aL*bL (weight 1), HL = aH*bL and LH = aL*bH (weight 2^H),
//   HH = aH*bH (weight 2^N),
// and three N-bit Brent-Kung carry select adders add them:
//   1. M  = HL + LH                      -> sum m,  carry ca1 (weight 2^(N+H))
//   2. S2 = m + LL[N-1:H]                -> sum s2, carry ca2 (weight 2^(N+H))
//      s2[H-1:0] is product bits N-1..H.
//   3. S3 = HH + {ca, s2[N-1:H]}         -> product bits 2N-1..N, carry ca3
//      where ca sits at bit H of the second operand and the bits above it
//      are zero.
// LL[H-1:0] is product bits H-1..0 directly.
// ca1 and ca2 carry the same weight. They can never both be 1: if ca1 = 1
// then m = HL+LH-2^N <= 2^N - 2^(H+2) + 2, and adding LL[N-1:H] <= 2^H - 2
// stays below 2^N. So one OR gate forms their sum, ca = ca1 | ca2. The
// document's block diagram shows ca2 only as an output; without it some
// products (for example 0x2F * 0xFB) come out 2^(N+H) too small, so this
// design adds it in. ca3 is always 0 for a valid product and is kept as an
// output, as in the document's simulation.
// The split into four sub-multipliers, the three adder positions and the
// zero padding follow the document; the carry-in of every adder is tied to 0
// (not shown in the document) and the sub-multiplier insides are this
// design's own (see array_mult).
//
// Interface: a, b (N bits) -> s (2N bits) = a*b, ca3.
// Timing: purely combinational, no clock; one multiply per input change.
module bk_csla_mult #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] s,
  output logic           ca3
);

  localparam int unsigned H = N / 2;

  logic [N-1:0] pp_ll, pp_hl, pp_lh, pp_hh;  // sub-multiplier products
  logic [N-1:0] m, s2, s3;                   // adder sums
  logic         ca1, ca2, ca;                // adder carries
  logic [N-1:0] op2_b, op3_b;                // zero-padded adder operands

  if (N % 2 != 0 || N < 8) begin : g_bad_n
    $error("bk_csla_mult: N must be even and at least 8");
  end

  // Partial product generation: four H x H sub-multipliers
  array_mult #(.N(H)) u_mul_hh (.a(a[N-1:H]), .b(b[N-1:H]), .p(pp_hh));
  array_mult #(.N(H)) u_mul_hl (.a(a[N-1:H]), .b(b[H-1:0]), .p(pp_hl));
  array_mult #(.N(H)) u_mul_lh (.a(a[H-1:0]), .b(b[N-1:H]), .p(pp_lh));
  array_mult #(.N(H)) u_mul_ll (.a(a[H-1:0]), .b(b[H-1:0]), .p(pp_ll));

  // Adder 1: the two middle products
  bk_csla #(.WIDTH(N)) u_csla1 (
    .a(pp_hl), .b(pp_lh), .cin(1'b0), .sum(m), .cout(ca1)
  );

  // Adder 2: middle sum plus the upper half of the low product
  assign op2_b = {{(N-H){1'b0}}, pp_ll[N-1:H]};
  bk_csla #(.WIDTH(N)) u_csla2 (
    .a(m), .b(op2_b), .cin(1'b0), .sum(s2), .cout(ca2)
  );

  // Adder 3: high product plus everything that reaches weight 2^N
  assign ca    = ca1 | ca2;
  assign op3_b = {{(N-H-1){1'b0}}, ca, s2[N-1:H]};
  bk_csla #(.WIDTH(N)) u_csla3 (
    .a(pp_hh), .b(op3_b), .cin(1'b0), .sum(s3), .cout(ca3)
  );

  assign s = {s3, s2[H-1:0], pp_ll[H-1:0]};

  // ca1 and ca2 are exclusive (see above), so the OR is an exact sum.
  always_comb assert (!(ca1 && ca2)) else $error("bk_csla_mult: ca1 and ca2 both set");

endmodule
