// tb_bk_csla_mult: end-to-end self-check of the 8x8 multiplier at its
// default size. It first applies the example 8 x 8 = 64, then all 65536
// operand pairs, comparing s with the built-in '*' and checking that ca3
// stays 0. It counts how often each mechanism of the adder tree fires:
// the carry out of the first and of the second adder (ca1, ca2), and the
// carry-select multiplexer of each of the three adders picking its
// carry-in-1 upper half, and checks each of these internal carries against
// a value predicted from the operand halves. A mechanism that never fires
// is a failure.
module tb_bk_csla_mult;

  logic [7:0]  a, b;
  logic [15:0] s;
  logic        ca3;
  int          checks = 0, failures = 0;
  int          n_ca1 = 0, n_ca2 = 0;
  int          n_sel [3] = '{0, 0, 0};

  bk_csla_mult dut (.a(a), .b(b), .s(s), .ca3(ca3));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [7:0] x, input logic [7:0] y);
    a = x; b = y;
    #1;
    checks++;
    if (s !== 16'(x) * 16'(y) || ca3 !== 1'b0) begin
      failures++;
      if (failures < 10) $display("FAIL %0d*%0d = %0d (ca3=%b)", x, y, s, ca3);
    end
    // Mechanism counters: the carries are predicted from the operand halves
    // and then observed in the design.
    begin
      int ll, hl, lh, m, s2;
      ll = int'(x[3:0]) * int'(y[3:0]);
      hl = int'(x[7:4]) * int'(y[3:0]);
      lh = int'(x[3:0]) * int'(y[7:4]);
      m  = hl + lh;
      s2 = (m % 256) + ll / 16;
      // The expected events must also appear inside the design.
      checks++;
      if (dut.ca1 !== (m >= 256) || dut.ca2 !== (s2 >= 256) ||
          dut.u_csla1.c_lo !== ((hl % 16) + (lh % 16) >= 16) ||
          dut.u_csla2.c_lo !== ((m % 16) + (ll / 16) >= 16) ||
          dut.u_csla3.c_lo !== (int'(x[7:4]) * int'(y[7:4]) % 16 + (s2 / 16) % 16 >= 16)) begin
        failures++;
        if (failures < 10) $display("FAIL internal carries for %0d*%0d", x, y);
      end
      if (dut.ca1) n_ca1++;
      if (dut.ca2) n_ca2++;
      if (dut.u_csla1.c_lo) n_sel[0]++;
      if (dut.u_csla2.c_lo) n_sel[1]++;
      if (dut.u_csla3.c_lo) n_sel[2]++;
    end
  endtask

  initial begin
    check(8'd8, 8'd8);  // the example product 8 x 8 = 64
    check(8'h2F, 8'hFB);  // needs the second adder's carry
    for (int v = 0; v < 65536; v++) check(8'(v >> 8), 8'(v));
    $display("ca1=%0d ca2=%0d select1: adder1=%0d adder2=%0d adder3=%0d",
             n_ca1, n_ca2, n_sel[0], n_sel[1], n_sel[2]);
    checks++;
    if (n_ca1 == 0 || n_ca2 == 0 || n_sel[0] == 0 || n_sel[1] == 0 || n_sel[2] == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
