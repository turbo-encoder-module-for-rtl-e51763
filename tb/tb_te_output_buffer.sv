// tb_te_output_buffer: loads random 3456-bit blocks and checks that dout
// presents bit 0, 1, 2, ... on successive clocks while shift is high, that
// the output holds while shift is low, and that load takes priority.
module tb_te_output_buffer;
  localparam int N = 3456;
  logic clk = 0, rst = 1, load = 0, shift = 0, dout;
  logic [N-1:0] data;
  int checks = 0, failures = 0;

  te_output_buffer dut (.clk(clk), .rst(rst), .load(load), .data(data), .shift(shift), .dout(dout));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] blk;
    @(negedge clk);
    rst = 0;
    for (int t = 0; t < 4; t++) begin
      for (int i = 0; i < N; i++) blk[i] = 1'($urandom);
      data = blk; load = 1; shift = (t == 1);   // load wins over shift
      @(negedge clk);
      load = 0; data = '0;
      for (int i = 0; i < N; i++) begin
        shift = 1;
        check(dout === blk[i], $sformatf("block %0d bit %0d", t, i));
        if (i == 100) begin
          shift = 0;
          repeat (3) @(negedge clk);
          check(dout === blk[i], "hold while shift low");
          shift = 1;
        end
        @(negedge clk);
      end
      shift = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
