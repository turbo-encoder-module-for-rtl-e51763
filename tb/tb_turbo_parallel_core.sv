// tb_turbo_parallel_core: encodes full 1148-bit blocks with the parallel
// computation core and compares every one of the 3456 coded bits with the
// reference encoder of tb_turbo_ref_pkg. The core works the whole block in one clock; done must come 1 clock after the start edge.
// The first block is the LFSR block with seed 0xACE1, whose coded block is
// also checked against words computed separately; a 40-bit instance is
// tested too.
module tb_turbo_parallel_core;
  import tb_turbo_ref_pkg::*;
  localparam int K = 1148;
  localparam int N = 3 * K + 12;
  localparam int K2 = 40;
  localparam int N2 = 3 * K2 + 12;

  logic clk = 0, rst = 1, start = 0, start2 = 0;
  logic [K-1:0]  msd;
  logic [N-1:0]  cw;
  logic          done, done2;
  logic [K2-1:0] msd2;
  logic [N2-1:0] cw2;
  

  int checks = 0, failures = 0;

  turbo_parallel_core dut (
    .clk  (clk),
    .rst  (rst),
    .start(start),
    .msd  (msd),
    .cw   (cw),
    .done (done)
  );

  turbo_parallel_core #(.K(K2)) dut2 (
    .clk  (clk),
    .rst  (rst),
    .start(start2),
    .msd  (msd2),
    .cw   (cw2),
    .done (done2)
  );

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

  task automatic run_block(bit_da_t b, bit is_small, output int lat);
    int n;
    lat = 0;
    @(negedge clk);
    if (is_small) begin
      foreach (b[i]) msd2[i] = b[i];
      start2 = 1;
    end else begin
      foreach (b[i]) msd[i] = b[i];
      start = 1;
    end
    @(negedge clk);
    start = 0; start2 = 0;
    n = 1;
    while (!(is_small ? done2 : done)) begin
      @(negedge clk);
      n++;
    end
    lat = n;
  endtask

  initial begin
    bit_da_t b, r;
    int lat;

    msd = '0; msd2 = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 4; t++) begin
      b = (t == 0) ? lfsr_bits(K, 16'hACE1) : lfsr_bits(K, 16'($urandom) | 16'h1);
      r = encode(b);
      run_block(b, 0, lat);
      check(lat === 1, $sformatf("latency %0d clocks, expected %0d", lat, 1));
      for (int i = 0; i < N; i++) check(cw[i] === r[i], $sformatf("block %0d bit %0d", t, i));
      if (t == 0) begin
        check(cw[K +: 12] === 12'hBC9, $sformatf("known tail word %h", cw[K +: 12]));
        check(cw[K + 6 +: 32] === 32'hF7CA46EF, "known parity1 word");
        check(cw[2*K + 9 +: 32] === 32'h3A157016, $sformatf("known parity2 word %h", cw[2*K + 9 +: 32]));
        check(cw[N - 32 +: 32] === 32'h2E493072, "known last word");
        check($countones(cw) === 1733, "known number of ones");
      end
      repeat (3) @(negedge clk);
      check(done === 0, "done is a single pulse");
    end
    for (int t = 0; t < 20; t++) begin
      b = (t == 0) ? lfsr_bits(K2, 16'hACE1) : lfsr_bits(K2, 16'($urandom) | 16'h1);
      r = encode(b);
      run_block(b, 1, lat);
      check(lat === 1, "latency K=40");
      for (int i = 0; i < N2; i++) check(cw2[i] === r[i], $sformatf("K=40 block %0d bit %0d", t, i));
      if (t === 0) check(cw2[N2 - 32 +: 32] === 32'h264654E1, "known K=40 last word");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
