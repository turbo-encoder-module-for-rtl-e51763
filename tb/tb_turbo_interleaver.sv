// tb_turbo_interleaver: checks the 3GPP internal interleaver for K = 1148
// (default) and K = 40.
//  - the table is a permutation of 0..K-1;
//  - every entry equals an independently written reference (explicit
//    matrix construction in tb_turbo_ref_pkg);
//  - spot values of pi(k) for K = 1148 computed separately from the 3GPP
//    rules (R = 20, C = 58, p = 59, v = 2);
//  - the full-block permutation dout[k] = din[pi(k)] for random blocks.
module tb_turbo_interleaver;
  import tb_turbo_ref_pkg::*;
  localparam int K1 = 1148;
  localparam int K2 = 40;

  logic [10:0]   idx1, addr1;
  logic [K1-1:0] din1, dout1;
  logic [5:0]    idx2, addr2;
  logic [K2-1:0] din2, dout2;
  int checks = 0, failures = 0;

  turbo_interleaver dut1 (.rd_idx(idx1), .rd_addr(addr1), .din(din1), .dout(dout1));
  turbo_interleaver #(.K(K2)) dut2 (.rd_idx(idx2), .rd_addr(addr2), .din(din2), .dout(dout2));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int_da_t ref1, ref2;
    bit seen[];
    int spot_k[12] = '{0, 97, 194, 291, 388, 485, 582, 679, 776, 873, 970, 1067};
    int spot_v[12] = '{1102, 641, 217, 1011, 1054, 1058, 463, 426, 333, 234, 545, 505};
    ref1 = interleaver(K1);
    ref2 = interleaver(K2);
    din1 = '0; din2 = '0; idx2 = '0;
    seen = new[K1];
    for (int k = 0; k < K1; k++) begin
      idx1 = 11'(k);
      #1;
      check(int'(addr1) === ref1[k], $sformatf("K=1148 pi(%0d)=%0d ref %0d", k, addr1, ref1[k]));
      if (int'(addr1) < K1) seen[addr1] = 1;
    end
    begin
      int nseen;
      nseen = 0;
      foreach (seen[i]) nseen += seen[i];
      check(nseen === K1, $sformatf("K=1148 table covers %0d of %0d indices", nseen, K1));
    end
    for (int i = 0; i < 12; i++) begin
      idx1 = 11'(spot_k[i]);
      #1;
      check(int'(addr1) === spot_v[i], $sformatf("spot pi(%0d)=%0d expected %0d", spot_k[i], addr1, spot_v[i]));
    end
    for (int k = 0; k < K2; k++) begin
      idx2 = 6'(k);
      #1;
      check(int'(addr2) === ref2[k], $sformatf("K=40 pi(%0d)=%0d ref %0d", k, addr2, ref2[k]));
    end
    for (int t = 0; t < 20; t++) begin
      for (int i = 0; i < K1; i++) din1[i] = 1'($urandom);
      for (int i = 0; i < K2; i++) din2[i] = 1'($urandom);
      #1;
      for (int k = 0; k < K1; k++) check(dout1[k] === din1[ref1[k]], $sformatf("K=1148 dout[%0d]", k));
      for (int k = 0; k < K2; k++) check(dout2[k] === din2[ref2[k]], $sformatf("K=40 dout[%0d]", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
