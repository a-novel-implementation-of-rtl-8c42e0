// bk_prefix_cell: the operator of the Brent-Kung carry network.
//
// It merges the (P,G) pair of a more significant span i with the pair of the
// adjacent less significant span j into the pair of the joined span:
//   P = Pi & Pj
//   G = Gi | (Pi & Gj)
// i.e. the joined span generates a carry if the upper part generates one, or
// if the upper part propagates a carry generated by the lower part. These are
// the two carry-network equations of the design. Purely combinational.
//
// Interface: hi (span i), lo (span j), out (joined span).
module bk_prefix_cell
  import bk_pkg::*;
(
  input  pg_t hi,
  input  pg_t lo,
  output pg_t out
);

  always_comb begin
    out.p = hi.p & lo.p;
    out.g = hi.g | (hi.p & lo.g);
  end

endmodule
