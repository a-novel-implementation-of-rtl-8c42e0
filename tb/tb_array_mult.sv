// tb_array_mult: exhaustive self-check of the 4x4 array multiplier (256
// operand pairs) and a random check of a 6x6 instance, against the
// built-in '*'.
module tb_array_mult;

  logic [3:0]  a, b;
  logic [7:0]  p;
  logic [5:0]  a6, b6;
  logic [11:0] p6;
  int          checks = 0, failures = 0;

  array_mult             dut  (.a(a),  .b(b),  .p(p));
  array_mult #(.N(6))    dut6 (.a(a6), .b(b6), .p(p6));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a6 = '0; b6 = '0;
    for (int v = 0; v < 256; v++) begin
      {a, b} = 8'(v);
      #1;
      checks++;
      if (p !== 8'(a) * 8'(b)) begin
        failures++;
        $display("FAIL %0d*%0d = %0d", a, b, p);
      end
    end
    for (int v = 0; v < 1000; v++) begin
      a6 = 6'($urandom); b6 = 6'($urandom);
      #1;
      checks++;
      if (p6 !== 12'(a6) * 12'(b6)) begin
        failures++;
        $display("FAIL %0d*%0d = %0d (6x6)", a6, b6, p6);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
