// tb_carry_increment_adder: exhaustive test of the 8-bit carry increment
// adder (all a, b, cin) and a random test of a 12-bit instance, comparing
// {cout, sum} with the integer sum a + b + cin.
module tb_carry_increment_adder;
  logic [7:0]  a8, b8, s8;
  logic [11:0] a12, b12, s12;
  logic        cin, c8, c12;
  int checks = 0, failures = 0;

  carry_increment_adder dut8 (.a(a8), .b(b8), .cin(cin), .sum(s8), .cout(c8));
  carry_increment_adder #(.WIDTH(12)) dut12 (.a(a12), .b(b12), .cin(cin), .sum(s12), .cout(c12));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a12 = '0; b12 = '0;
    for (int i = 0; i < (1 << 17); i++) begin
      {cin, b8, a8} = 17'(i);
      #1;
      checks++;
      if ({c8, s8} !== 9'(a8) + 9'(b8) + 9'(cin)) begin
        failures++;
        if (failures < 10) $display("FAIL 8b a=%0d b=%0d cin=%0d -> %0d", a8, b8, cin, {c8, s8});
      end
    end
    for (int i = 0; i < 20000; i++) begin
      a12 = 12'($urandom); b12 = 12'($urandom); cin = 1'($urandom);
      if (i < 4) begin a12 = 12'hFFF; b12 = 12'(i); end
      #1;
      checks++;
      if ({c12, s12} !== 13'(a12) + 13'(b12) + 13'(cin)) begin
        failures++;
        if (failures < 10) $display("FAIL 12b a=%0d b=%0d cin=%0d -> %0d", a12, b12, cin, {c12, s12});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
