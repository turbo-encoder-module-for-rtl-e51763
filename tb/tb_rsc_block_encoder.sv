// tb_rsc_block_encoder: applies random 1148-bit blocks (and a 40-bit
// instance) to the unrolled constituent encoder and compares all parity,
// tail and parity-tail bits with the reference recursion. One known
// LFSR block is also checked against parity words computed separately.
module tb_rsc_block_encoder;
  import tb_turbo_ref_pkg::*;
  localparam int K = 1148;
  logic [K-1:0]  x;
  logic [K-1:0]  par;
  logic [2:0]    tail, ptail;
  logic [39:0]   xs, pars;
  logic [2:0]    tails, ptails;
  int checks = 0, failures = 0;

  rsc_block_encoder dut (.x(x), .par(par), .tail(tail), .ptail(ptail));
  rsc_block_encoder #(.K(40)) dut40 (.x(xs), .par(pars), .tail(tails), .ptail(ptails));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit_da_t b, r, b40, r40;
    for (int t = 0; t < 30; t++) begin
      b   = (t == 0) ? lfsr_bits(K, 16'hACE1) : lfsr_bits(K, 16'($urandom));
      b40 = lfsr_bits(40, 16'($urandom) | 16'h1);
      foreach (b[i]) x[i] = b[i];
      foreach (b40[i]) xs[i] = b40[i];
      r   = rsc(b);
      r40 = rsc(b40);
      #1;
      for (int k = 0; k < K; k++) check(par[k] === r[k], $sformatf("t%0d par[%0d]", t, k));
      for (int j = 0; j < 3; j++) begin
        check(tail[j]  === r[K + j],     $sformatf("t%0d tail[%0d]", t, j));
        check(ptail[j] === r[K + 3 + j], $sformatf("t%0d ptail[%0d]", t, j));
        check(tails[j]  === r40[40 + j], $sformatf("t%0d K40 tail[%0d]", t, j));
        check(ptails[j] === r40[43 + j], $sformatf("t%0d K40 ptail[%0d]", t, j));
      end
      for (int k = 0; k < 40; k++) check(pars[k] === r40[k], $sformatf("t%0d K40 par[%0d]", t, k));
      if (t === 0) check(par[31:0] === 32'hF7CA46EF, $sformatf("known parity word %h", par[31:0]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
