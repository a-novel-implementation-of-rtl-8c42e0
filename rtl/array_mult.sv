// array_mult: N x N unsigned array multiplier (the 4x4 sub-multiplier).
//
// Partial product generation: row k is the multiplicand ANDed with
// multiplier bit b[k]. Partial product accumulation: each row is added to
// the running sum, shifted right by one position, with a row of N ripple
// full adders; the bit shifted out at each row is one final product bit.
// After the last row the running sum and its carry form the upper N product
// bits. The document uses 4x4 multipliers as sub-blocks but does not give
// their insides; this classic ripple array structure is the simplest one that
// does the job and is this design's own choice.
//
// Interface: a, b (N bits) -> p (2N bits), p = a * b.
// Timing: purely combinational; about 2N full-adder delays.
module array_mult #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  always_comb begin
    logic [N-1:0] acc;   // running sum, aligned with the next row
    logic [N-1:0] pp;    // current partial product row
    logic [N-1:0] s;     // row sum
    logic         c;     // ripple carry

    p   = '0;
    // Row 0 needs no adder.
    pp   = a & {N{b[0]}};
    p[0] = pp[0];
    acc  = {1'b0, pp[N-1:1]};

    for (int k = 1; k < N; k++) begin
      pp = a & {N{b[k]}};
      c  = 1'b0;
      for (int j = 0; j < N; j++) begin
        s[j] = pp[j] ^ acc[j] ^ c;
        c    = (pp[j] & acc[j]) | (c & (pp[j] ^ acc[j]));
      end
      p[k] = s[0];
      acc  = {c, s[N-1:1]};
    end

    p[2*N-1:N] = acc;
  end

endmodule
