// bk_adder: Brent-Kung parallel prefix adder, WIDTH bits (4 in the design).
//
// Three stages:
//  1. Pre-processing: per bit, P = A xor B and G = A and B.
//  2. Carry network: a Brent-Kung tree of bk_prefix_cell operators. The
//     up-sweep combines neighbouring spans at distance 1, 2, 4, ... so that
//     bit 2^k-1 holds the group pair of bits 2^k-1..0; the down-sweep then
//     fills in the remaining bits with one cell each. For 4 bits this is
//     (3:2), (1:0), then (3:0) = (3:2)o(1:0) and (2:0) = (2)o(1:0): four cells,
//     three levels deep.
//  3. Post-processing: the carry into bit i+1 is G(i:0) | (P(i:0) & cin) and
//     the sum bit is S(i) = P(i) xor carry into bit i.
// The carry-in enters only in the post-processing, so the same network
// serves a carry-in of 0 and of 1. The tree shape follows the document's
// 4-bit Brent-Kung figure; the generalisation to other widths is this
// design's own.
//
// Interface: a, b (WIDTH bits), cin -> sum (WIDTH bits), cout.
// Timing: purely combinational, about 2*log2(WIDTH) cell levels.
module bk_adder
  import bk_pkg::*;
#(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned L    = bk_levels(WIDTH);          // up-sweep levels
  localparam int unsigned ROWS = (L > 0) ? 2 * L - 1 : 0;   // network levels

  // row[r][i]: (P,G) of the span ending at bit i after r network levels.
  pg_t [WIDTH-1:0] row [ROWS+1];
  logic [WIDTH:0]  carry;

  // 1. Pre-processing
  for (genvar i = 0; i < WIDTH; i++) begin : g_pre
    assign row[0][i].p = a[i] ^ b[i];
    assign row[0][i].g = a[i] & b[i];
  end

  // 2a. Up-sweep: level l joins bit i with bit i-2^l when (i+1) is a
  //     multiple of 2^(l+1).
  for (genvar l = 0; l < L; l++) begin : g_up
    for (genvar i = 0; i < WIDTH; i++) begin : g_bit
      if (((i + 1) % (1 << (l + 1))) == 0) begin : g_cell
        bk_prefix_cell u_cell (
          .hi (row[l][i]),
          .lo (row[l][i-(1<<l)]),
          .out(row[l+1][i])
        );
      end else begin : g_wire
        assign row[l+1][i] = row[l][i];
      end
    end
  end

  // 2b. Down-sweep: distance 2^d for d = L-2 down to 0, written as row
  //     L+1+k with d = L-2-k. Bit i is joined with bit i-2^d when
  //     (i+1) mod 2^(d+1) = 2^d and i >= 2^(d+1).
  for (genvar k = 0; k + 1 < L; k++) begin : g_down
    localparam int unsigned D = L - 2 - k;
    for (genvar i = 0; i < WIDTH; i++) begin : g_bit
      if ((((i + 1) % (1 << (D + 1))) == (1 << D)) && (i >= (1 << (D + 1)))) begin : g_cell
        bk_prefix_cell u_cell (
          .hi (row[L+k][i]),
          .lo (row[L+k][i-(1<<D)]),
          .out(row[L+k+1][i])
        );
      end else begin : g_wire
        assign row[L+k+1][i] = row[L+k][i];
      end
    end
  end

  // 3. Post-processing
  assign carry[0] = cin;
  for (genvar i = 0; i < WIDTH; i++) begin : g_post
    assign carry[i+1] = row[ROWS][i].g | (row[ROWS][i].p & cin);
    assign sum[i]     = row[0][i].p ^ carry[i];
  end
  assign cout = carry[WIDTH];

endmodule
