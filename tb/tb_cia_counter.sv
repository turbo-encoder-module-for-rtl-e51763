// tb_cia_counter: runs the 12-bit counter built on the carry increment
// adder through a full wrap (4096 counts), with random stalls (en = 0) and
// random synchronous clears, comparing the count with an integer model.
// Also runs an 8-bit instance through its wrap.
module tb_cia_counter;
  logic clk = 0, rst = 1, clr = 0, en = 0;
  logic [11:0] count;
  logic [7:0]  count8;
  int model = 0, model8 = 0;
  int checks = 0, failures = 0;
  int stalls = 0, clears = 0, wraps = 0;

  cia_counter dut (.clk(clk), .rst(rst), .clr(clr), .en(en), .count(count));
  cia_counter #(.WIDTH(8)) dut8 (.clk(clk), .rst(rst), .clr(1'b0), .en(1'b1), .count(count8));

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
    if (count !== 12'd0) failures++;
    rst = 0;
    for (int t = 0; t < 12000; t++) begin
      en  = ($urandom % 8) != 0;
      clr = (t > 9000) && (($urandom % 500) == 0);
      @(posedge clk);
      if (clr) begin model = 0; clears++; end
      else if (en) begin
        if (model == 4095) wraps++;
        model = (model + 1) % 4096;
      end else stalls++;
      model8 = (model8 + 1) % 256;
      @(negedge clk);
      checks++;
      if (count !== 12'(model)) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d count=%0d model=%0d", t, count, model);
      end
      checks++;
      if (count8 !== 8'(model8)) failures++;
    end
    checks++;
    if (!(stalls > 0 && clears > 0 && wraps > 0)) failures++;
    $display("stalls=%0d clears=%0d wraps=%0d", stalls, clears, wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
