// tb_turbo_encoder_using_cia: end-to-end test of the turbo encoder module at
// its default size (K = 1148, 3456 coded bits), through its serial ports.
//
// Each block is started with an ack pulse, its 1148 bits are driven on
// in_MSD_CRC one per clock, and the 3456 bits that follow on out_TE_data
// while out_valid is high are compared with the reference encoder. The
// sequence covers, and counts:
//   serial     blocks encoded with mode = 0 (latency 3K+9 clocks)
//   parallel   blocks encoded with mode = 1 (latency 3 clocks)
//   switch     a change of mode between consecutive blocks
//   ignored    an ack (and mode change) while busy, which must have no effect
//   reset      a reset in the middle of a block, after which the next block
//              must still be correct
// Latency is the number of rising edges, counting the one that samples the
// last input bit, after which out_valid is high.
module tb_turbo_encoder_using_cia;
  import tb_turbo_ref_pkg::*;
  localparam int K = 1148;
  localparam int N = 3 * K + 12;
  localparam int LAT_SERIAL   = 3 * K + 9;
  localparam int LAT_PARALLEL = 3;

  logic clk = 0, rst = 1, ack = 0, mode = 0, in_MSD_CRC = 0;
  logic out_TE_data, out_valid, busy;
  int checks = 0, failures = 0;
  int n_serial = 0, n_parallel = 0, n_switch = 0, n_ignored = 0, n_reset = 0;
  int last_mode = -1;

  turbo_encoder_using_cia dut (
    .clk        (clk),
    .rst        (rst),
    .ack        (ack),
    .mode       (mode),
    .in_MSD_CRC (in_MSD_CRC),
    .out_TE_data(out_TE_data),
    .out_valid  (out_valid),
    .busy       (busy)
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
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Send one block and check its coded output. With poke_ack, an ack with
  // the other mode is given in the middle of the encoding.
  task automatic run_block(bit m, bit [15:0] seed, bit poke_ack);
    bit_da_t b, r;
    int lat, errs;
    b = lfsr_bits(K, seed);
    r = encode(b);
    @(negedge clk);
    check(!busy, "idle before ack");
    ack = 1; mode = m;
    @(negedge clk);
    ack = 0; mode = 1'($urandom);
    for (int k = 0; k < K; k++) begin
      in_MSD_CRC = b[k];
      check(busy && !out_valid, "loading");
      @(negedge clk);
    end
    in_MSD_CRC = 1'($urandom);
    lat = 1;
    while (!out_valid) begin
      if (poke_ack && lat == 1) begin
        ack = 1; mode = ~m;
      end else begin
        ack = 0;
      end
      @(negedge clk);
      lat++;
      if (lat > 2 * LAT_SERIAL) break;
    end
    ack = 0;
    check(lat === (m ? LAT_PARALLEL : LAT_SERIAL),
          $sformatf("mode %0d latency %0d", m, lat));
    errs = 0;
    for (int i = 0; i < N; i++) begin
      if (i == 1000 && poke_ack) begin
        ack = 1; mode = ~m;
      end else ack = 0;
      check(out_valid, $sformatf("out_valid at bit %0d", i));
      if (out_TE_data !== r[i]) errs++;
      check(out_TE_data === r[i], $sformatf("mode %0d bit %0d", m, i));
      @(negedge clk);
    end
    ack = 0;
    check(!out_valid, "out_valid falls after 3456 bits");
    check(!busy, "idle after the block");
    if (errs == 0) begin
      if (m) n_parallel++; else n_serial++;
      if (last_mode != -1 && last_mode != int'(m)) n_switch++;
      if (poke_ack) n_ignored++;
    end
    last_mode = int'(m);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    run_block(1'b0, 16'hACE1, 1'b0);   // serial
    run_block(1'b1, 16'hACE1, 1'b0);   // parallel, same block
    run_block(1'b1, 16'h1234, 1'b1);   // parallel, ack while busy
    run_block(1'b0, 16'h0F0F, 1'b1);   // serial, ack while busy
    // reset in the middle of loading a block
    @(negedge clk);
    ack = 1; mode = 0;
    @(negedge clk);
    ack = 0;
    repeat (300) begin in_MSD_CRC = 1'($urandom); @(negedge clk); end
    rst = 1;
    @(negedge clk);
    check(!busy && !out_valid, "reset returns to idle");
    rst = 0;
    last_mode = -1;
    run_block(1'b1, 16'hBEEF, 1'b0);
    if (!busy) n_reset++;
    run_block(1'b0, 16'h5A5A, 1'b0);

    $display("mechanisms: serial=%0d parallel=%0d switch=%0d ignored_ack=%0d reset=%0d",
             n_serial, n_parallel, n_switch, n_ignored, n_reset);
    check(n_serial > 0,   "serial mode exercised");
    check(n_parallel > 0, "parallel mode exercised");
    check(n_switch > 0,   "mode switch exercised");
    check(n_ignored > 0,  "ack while busy exercised");
    check(n_reset > 0,    "reset in mid-block exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
