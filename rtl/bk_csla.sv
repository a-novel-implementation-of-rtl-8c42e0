// bk_csla: carry select adder built from Brent-Kung adders, WIDTH bits (8).
//
// The operands are split into a low and a high half. The low half is added
// by one Brent-Kung adder with the adder's carry-in. The high half is added
// twice at the same time, by one Brent-Kung adder with carry-in 0 and one
// with carry-in 1, so neither waits for the low half. When the low half's
// carry-out c_lo is known it only selects, through a 2:1 multiplexer, which
// precomputed high half becomes the upper sum bits.
// The carry-out is formed with one OR and one AND:
//   cout = c_hi1 & (c_lo | c_hi0)
// which equals c_hi0 | (c_lo & c_hi1), because a high half that carries
// out with carry-in 0 also carries out with carry-in 1. Three adders, one
// multiplexer, one OR and one AND per adder follow the document's
// structure and its unit count; the width parameter is this design's own
// generalisation (WIDTH must be even and WIDTH/2 a valid bk_adder width).
//
// Interface: a, b (WIDTH bits), cin -> sum (WIDTH bits), cout.
// Timing: purely combinational; the critical path is one half-width
// Brent-Kung adder plus the multiplexer.
module bk_csla #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned H = WIDTH / 2;

  logic         c_lo;            // carry out of the low half (select)
  logic         c_hi0, c_hi1;    // high-half carry outs for carry-in 0 / 1
  logic [H-1:0] s_lo;            // low-half sum
  logic [H-1:0] s_hi0, s_hi1;    // high-half sums for carry-in 0 / 1

  if (WIDTH % 2 != 0) begin : g_bad_width
    $error("bk_csla: WIDTH must be even");
  end

  bk_adder #(.WIDTH(H)) u_lo (
    .a   (a[H-1:0]),
    .b   (b[H-1:0]),
    .cin (cin),
    .sum (s_lo),
    .cout(c_lo)
  );

  bk_adder #(.WIDTH(H)) u_hi0 (
    .a   (a[WIDTH-1:H]),
    .b   (b[WIDTH-1:H]),
    .cin (1'b0),
    .sum (s_hi0),
    .cout(c_hi0)
  );

  bk_adder #(.WIDTH(H)) u_hi1 (
    .a   (a[WIDTH-1:H]),
    .b   (b[WIDTH-1:H]),
    .cin (1'b1),
    .sum (s_hi1),
    .cout(c_hi1)
  );

  // Select stage
  always_comb begin
    sum  = {(c_lo ? s_hi1 : s_hi0), s_lo};
    cout = c_hi1 & (c_lo | c_hi0);
  end

endmodule
