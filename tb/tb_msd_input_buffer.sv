// tb_msd_input_buffer: shifts random 1148-bit blocks in serially and checks
// that msd[k] holds the k-th bit received, that the block holds while shift
// is low, and that reset clears it.
module tb_msd_input_buffer;
  localparam int K = 1148;
  logic clk = 0, rst = 1, shift = 0, din = 0;
  logic [K-1:0] msd, sent;
  int checks = 0, failures = 0;

  msd_input_buffer dut (.clk(clk), .rst(rst), .shift(shift), .din(din), .msd(msd));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    checks++;
    if (msd !== '0) failures++;
    rst = 0;
    for (int t = 0; t < 5; t++) begin
      for (int k = 0; k < K; k++) begin
        sent[k] = 1'($urandom);
        shift = 1; din = sent[k];
        @(negedge clk);
      end
      shift = 0; din = 1'($urandom);
      repeat (5) @(negedge clk);
      for (int k = 0; k < K; k++) begin
        checks++;
        if (msd[k] !== sent[k]) begin
          failures++;
          if (failures < 10) $display("FAIL block %0d bit %0d", t, k);
        end
      end
    end
    rst = 1;
    #1;
    checks++;
    if (msd !== '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
