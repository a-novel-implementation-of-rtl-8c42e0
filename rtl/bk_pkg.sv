// bk_pkg: types shared by the Brent-Kung adder and its prefix cells.
//
// A parallel prefix adder carries a (propagate, generate) pair per bit and,
// after the carry network, per group of bits. pg_t bundles that pair so that
// the prefix cells and the adder pass it as one value. Purely combinational;
// no timing of its own.
package bk_pkg;

  // Propagate / generate pair of one bit or of a group of bits.
  typedef struct packed {
    logic p;  // propagate: a carry entering the group leaves it
    logic g;  // generate: the group produces a carry by itself
  } pg_t;

  // Number of up-sweep levels of a Brent-Kung tree over w bits (ceil(log2 w)).
  function automatic int unsigned bk_levels(input int unsigned w);
    int unsigned l = 0;
    while ((1 << l) < w) l++;
    return l;
  endfunction

endpackage
