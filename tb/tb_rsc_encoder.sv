// tb_rsc_encoder: drives the clocked constituent encoder with random blocks
// of random length, then three termination steps, and compares x_out, z_out
// of every step with the reference recursion of tb_turbo_ref_pkg. Also
// checks that the state is zero after termination and after init.
module tb_rsc_encoder;
  import tb_turbo_ref_pkg::*;
  logic clk = 0, rst = 1, init = 0, en = 0, term = 0, x_in = 0;
  logic x_out, z_out;
  logic [2:0] state;
  int checks = 0, failures = 0;

  rsc_encoder dut (.clk(clk), .rst(rst), .init(init), .en(en), .term(term),
                   .x_in(x_in), .x_out(x_out), .z_out(z_out), .state(state));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit_da_t x, ref_o;
    int K;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int blk = 0; blk < 40; blk++) begin
      K = 1 + ($urandom % 60);
      x = new[K];
      foreach (x[i]) x[i] = 1'($urandom);
      ref_o = rsc(x);
      // dirty the state, then init
      @(negedge clk); en = 1; term = 0; x_in = 1;
      @(negedge clk); en = 0; init = 1;
      @(negedge clk); init = 0;
      check(state === 3'b000, "state after init");
      for (int k = 0; k < K; k++) begin
        en = 1; term = 0; x_in = x[k];
        #1;
        check(x_out === x[k], $sformatf("blk %0d x[%0d]", blk, k));
        check(z_out === ref_o[k], $sformatf("blk %0d z[%0d]", blk, k));
        @(negedge clk);
      end
      for (int t = 0; t < 3; t++) begin
        en = 1; term = 1; x_in = 1'($urandom);
        #1;
        check(x_out === ref_o[K + t], $sformatf("blk %0d tail[%0d]", blk, t));
        check(z_out === ref_o[K + 3 + t], $sformatf("blk %0d ptail[%0d]", blk, t));
        @(negedge clk);
      end
      en = 0; term = 0;
      check(state === 3'b000, "state after termination");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
