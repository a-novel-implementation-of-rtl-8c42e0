// tb_bk_prefix_cell: exhaustive self-check of the carry-network operator.
// All 16 combinations of the two (P,G) input pairs are applied; the
// expected group pair is derived from carry behaviour rather than from the
// cell's equations: the joined span is simulated for a carry-in of 0 and
// of 1 and P/G read off as "carry out with carry-in 0" (G) and
// "carry out with carry-in 1 but not 0" (P, for non-killing spans).
module tb_bk_prefix_cell;
  import bk_pkg::*;

  pg_t hi, lo, out;
  int  checks = 0, failures = 0;

  bk_prefix_cell dut (.hi(hi), .lo(lo), .out(out));

  // Carry out of a span described by (p,g) for a given carry-in; a span
  // with p=g=1 does not occur in an adder but is treated as generating.
  function automatic logic span_carry(pg_t x, logic c);
    return x.g | (x.p & c);
  endfunction

  initial begin : watchdog
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic exp_g, exp_p;
      {hi.p, hi.g, lo.p, lo.g} = 4'(v);
      #1;
      // carry out of the joined span with carry-in 0 and 1
      exp_g = span_carry(hi, span_carry(lo, 1'b0));
      exp_p = hi.p & lo.p;  // a carry passes both spans untouched
      checks++;
      if (out.g !== exp_g || out.p !== exp_p) begin
        failures++;
        $display("FAIL hi=%b%b lo=%b%b out=%b%b exp=%b%b", hi.p, hi.g, lo.p, lo.g,
                 out.p, out.g, exp_p, exp_g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
