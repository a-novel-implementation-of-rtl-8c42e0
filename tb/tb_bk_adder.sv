// tb_bk_adder: self-check of the Brent-Kung adder.
// The default 4-bit adder is checked exhaustively (both carry-ins), and an
// 8-bit and a 16-bit instance with random operands check the tree
// generation at other widths. Expected values come from the built-in '+'.
module tb_bk_adder;

  logic [3:0]  a4, b4, s4;
  logic [7:0]  a8, b8, s8;
  logic [15:0] a16, b16, s16;
  logic        ci, co4, co8, co16;
  int          checks = 0, failures = 0;

  bk_adder                dut4  (.a(a4),  .b(b4),  .cin(ci), .sum(s4),  .cout(co4));
  bk_adder #(.WIDTH(8))   dut8  (.a(a8),  .b(b8),  .cin(ci), .sum(s8),  .cout(co8));
  bk_adder #(.WIDTH(16))  dut16 (.a(a16), .b(b16), .cin(ci), .sum(s16), .cout(co16));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a8 = '0; b8 = '0; a16 = '0; b16 = '0;
    for (int v = 0; v < 512; v++) begin
      {ci, a4, b4} = 9'(v);
      #1;
      checks++;
      if ({co4, s4} !== 5'(a4) + 5'(b4) + 5'(ci)) begin
        failures++;
        $display("FAIL w4 %h+%h+%b = %b_%h", a4, b4, ci, co4, s4);
      end
    end
    for (int v = 0; v < 4000; v++) begin
      a8 = 8'($urandom); b8 = 8'($urandom);
      a16 = 16'($urandom); b16 = 16'($urandom); ci = 1'($urandom);
      if (v < 4) begin  // corner cases: all-ones propagate chains
        a8 = '1; a16 = '1; b8 = 8'(v % 2); b16 = 16'(v % 2); ci = 1'(v / 2);
      end
      #1;
      checks += 2;
      if ({co8, s8} !== 9'(a8) + 9'(b8) + 9'(ci)) begin
        failures++;
        $display("FAIL w8 %h+%h+%b = %b_%h", a8, b8, ci, co8, s8);
      end
      if ({co16, s16} !== 17'(a16) + 17'(b16) + 17'(ci)) begin
        failures++;
        $display("FAIL w16 %h+%h+%b = %b_%h", a16, b16, ci, co16, s16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
