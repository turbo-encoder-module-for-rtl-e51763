// tb_rca4: exhaustive test of the 4-bit ripple carry adder. All 512
// combinations of a, b and cin are applied and {cout, s} is compared with
// a + b + cin.
module tb_rca4;
  logic [3:0] a, b, s;
  logic       cin, cout;
  int checks = 0, failures = 0;

  rca4 dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      {cin, b, a} = 9'(i);
      #1;
      checks++;
      if ({cout, s} !== 5'(a) + 5'(b) + 5'(cin)) begin
        failures++;
        $display("FAIL a=%0d b=%0d cin=%0d -> %0d", a, b, cin, {cout, s});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
