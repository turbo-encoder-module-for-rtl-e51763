// turbo_serial_core: serial computation method of the turbo encoder, one bit
// per clock.
//
// After a start pulse the core walks through the phases of the serial
// method, each counted by a cia_counter:
//   BUILD  K clocks  copy MSD+CRC bit k into the output register and clear
//                    the parity 1 and parity 2 positions of bit k
//   PAR1   K clocks  constituent encoder 1 takes bit k, writes parity 1
//   TAIL1  3 clocks  encoder 1 terminates, writes tail1 and ptail1
//   PAR2   K clocks  encoder 2 takes interleaved bit pi(k), writes parity 2
//   TAIL2  3 clocks  encoder 2 terminates, writes tail2 and ptail2
// 3K+6 = 3450 steps for K = 1148. The rising edge that samples start only
// leaves idle, so done is high after 3K+7 rising edges counting that one
// (the parallel core needs 1). done is high for one clock and cw then holds
// the coded block in the output buffer order (turbo_pkg). Both encoders are cleared at start. start is
// ignored while busy; msd must stay stable until done.
// rst is asynchronous, active high. The phase sequence follows the described
// serial method; what BUILD writes and the start/done interface are this
// design's reading.
module turbo_serial_core
  import turbo_pkg::*;
#(
  parameter int unsigned K = 1148,
  localparam int unsigned N = 3 * K + 12
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [K-1:0] msd,
  output logic [N-1:0] cw,
  output logic         done,
  output logic         busy
);

  localparam int unsigned AW = $clog2(K);
  // counter width: enough for K-1, rounded up to whole 4-bit adder blocks
  localparam int unsigned CW = 4 * (($clog2(K) + 3) / 4);

  typedef enum logic [2:0] {
    S_IDLE, S_BUILD, S_PAR1, S_TAIL1, S_PAR2, S_TAIL2
  } phase_e;

  phase_e         phase;
  logic [CW-1:0]  k;
  logic           k_clr;
  logic           last;
  logic [AW-1:0]  kidx;
  logic [AW-1:0]  pi_k;
  logic [K-1:0]   unused_perm;

  logic enc1_en, enc1_term, x1, z1;
  logic enc2_en, enc2_term, x2, z2;
  rsc_state_t st1, st2;

  assign kidx = AW'(k);

  cia_counter #(.WIDTH(CW)) u_cnt (
    .clk  (clk),
    .rst  (rst),
    .clr  (k_clr),
    .en   (phase != S_IDLE),
    .count(k)
  );

  turbo_interleaver #(.K(K)) u_il (
    .rd_idx (kidx),
    .rd_addr(pi_k),
    .din    (msd),
    .dout   (unused_perm)
  );

  rsc_encoder u_enc1 (
    .clk  (clk),
    .rst  (rst),
    .init (start && phase == S_IDLE),
    .en   (enc1_en),
    .term (enc1_term),
    .x_in (msd[kidx]),
    .x_out(x1),
    .z_out(z1),
    .state(st1)
  );

  rsc_encoder u_enc2 (
    .clk  (clk),
    .rst  (rst),
    .init (start && phase == S_IDLE),
    .en   (enc2_en),
    .term (enc2_term),
    .x_in (msd[pi_k]),
    .x_out(x2),
    .z_out(z2),
    .state(st2)
  );

  assign enc1_en   = (phase == S_PAR1) || (phase == S_TAIL1);
  assign enc1_term = (phase == S_TAIL1);
  assign enc2_en   = (phase == S_PAR2) || (phase == S_TAIL2);
  assign enc2_term = (phase == S_TAIL2);

  // Last step of the current phase.
  always_comb begin
    unique case (phase)
      S_BUILD, S_PAR1, S_PAR2: last = (k == CW'(K - 1));
      S_TAIL1, S_TAIL2:        last = (k == CW'(2));
      default:                 last = 1'b0;
    endcase
  end

  assign k_clr = last || (phase == S_IDLE);
  assign busy  = (phase != S_IDLE);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      phase <= S_IDLE;
      cw    <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (phase)
        S_IDLE: if (start) phase <= S_BUILD;
        S_BUILD: begin
          cw[32'(kidx)] <= msd[kidx];
          cw[off_par1(K) + 32'(kidx)] <= 1'b0;
          cw[off_par2(K) + 32'(kidx)] <= 1'b0;
          if (last) phase <= S_PAR1;
        end
        S_PAR1: begin
          cw[off_par1(K) + 32'(kidx)] <= z1;
          if (last) phase <= S_TAIL1;
        end
        S_TAIL1: begin
          cw[off_tail1(K)  + 32'(k[1:0])] <= x1;
          cw[off_ptail1(K) + 32'(k[1:0])] <= z1;
          if (last) phase <= S_PAR2;
        end
        S_PAR2: begin
          cw[off_par2(K) + 32'(kidx)] <= z2;
          if (last) phase <= S_TAIL2;
        end
        S_TAIL2: begin
          cw[off_tail2(K)  + 32'(k[1:0])] <= x2;
          cw[off_ptail2(K) + 32'(k[1:0])] <= z2;
          if (last) begin
            phase <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: phase <= S_IDLE;
      endcase
    end
  end

  // Encoder state must be zero after termination.
  assert property (@(posedge clk) disable iff (rst)
                   (phase == S_TAIL1 && last) |=> (st1 == '0))
    else $error("turbo_serial_core: encoder 1 not terminated");
  assert property (@(posedge clk) disable iff (rst)
                   (phase == S_TAIL2 && last) |=> (st2 == '0))
    else $error("turbo_serial_core: encoder 2 not terminated");

endmodule
