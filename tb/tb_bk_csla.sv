// tb_bk_csla: exhaustive self-check of the 8-bit Brent-Kung carry select
// adder: all 2^17 combinations of the two operands and the carry-in,
// compared with the built-in '+'. It also counts how often the low half's
// carry selects the carry-in-1 upper half, and fails if that never happens.
module tb_bk_csla;

  logic [7:0] a, b, s;
  logic       ci, co;
  int         checks = 0, failures = 0, sel1 = 0;

  bk_csla dut (.a(a), .b(b), .cin(ci), .sum(s), .cout(co));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 17); v++) begin
      {ci, a, b} = 17'(v);
      #1;
      checks++;
      if (9'(a[3:0]) + 9'(b[3:0]) + 9'(ci) > 15) sel1++;
      if ({co, s} !== 9'(a) + 9'(b) + 9'(ci)) begin
        failures++;
        if (failures < 10) $display("FAIL %h+%h+%b = %b_%h", a, b, ci, co, s);
      end
    end
    checks++;
    if (sel1 == 0) begin
      failures++;
      $display("FAIL the carry-in-1 upper half was never selected");
    end
    $display("carry-select events: %0d", sel1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
