// turbo_encoder_using_cia: rate-1/3 turbo encoder module of an eCall
// in-vehicle system modem, with serial and parallel computation methods and
// carry-increment-adder counters.
//
// Operation: an ack pulse (the ACK/START indication from the feedback path of
// the modem) starts a block and latches mode. The K = 1148 MSD+CRC bits are
// then sampled from in_MSD_CRC on the next K rising clock edges (first bit
// first) into msd_input_buffer. The latched mode selects the encoder:
//   mode = 0  turbo_serial_core,   one bit per clock, 3K+6 = 3450 clocks
//   mode = 1  turbo_parallel_core, whole block in one clock
// The coded block of 3K+12 = 3456 bits is loaded into te_output_buffer and
// sent on out_TE_data, one bit per clock, while out_valid is high, in the
// order MSD+CRC, tail1, tail2, parity1, ptail1, parity2, ptail2. busy is high
// from the ack until the last coded bit; ack is ignored while busy.
//
// Timing: counting the rising edge that samples the last input bit as the
// first, out_valid (with the first coded bit) is high after 3K+9 = 3453
// edges in serial mode and after 3 edges in parallel mode. Counting the edge
// that samples ack, a block occupies K + latency + 3456 clocks: 8057 in
// serial mode, 4607 in parallel mode.
// rst is asynchronous and active high.
//
// The port names ack, clk, in_MSD_CRC, mode, rst and out_TE_data are those
// of the encoder's schematic; out_valid and busy, the use of ack as a start
// pulse, and the mode encoding beyond "mode = 1 is parallel" are this
// design's choices.
module turbo_encoder_using_cia
  import turbo_pkg::*;
#(
  parameter int unsigned K = K_MSD,
  localparam int unsigned N = 3 * K + 12
) (
  input  logic clk,
  input  logic rst,
  input  logic ack,
  input  logic mode,
  input  logic in_MSD_CRC,
  output logic out_TE_data,
  output logic out_valid,
  output logic busy
);

  // counter width: enough for N-1, rounded up to whole 4-bit adder blocks
  localparam int unsigned CW = 4 * (($clog2(N) + 3) / 4);

  typedef enum logic [1:0] {T_IDLE, T_LOAD, T_ENC, T_SEND} top_state_e;

  top_state_e    state;
  te_mode_e      mode_q;
  logic [CW-1:0] cnt;
  logic          cnt_clr;
  logic          load_last, send_last;
  logic [K-1:0]  msd;
  logic          ser_start, par_start;
  logic          ser_done, par_done, ser_busy;
  logic [N-1:0]  ser_cw, par_cw;
  logic          enc_done;
  logic          obuf_load;

  // Bit counter of the load and send phases.
  cia_counter #(.WIDTH(CW)) u_cnt (
    .clk  (clk),
    .rst  (rst),
    .clr  (cnt_clr),
    .en   (state == T_LOAD || state == T_SEND),
    .count(cnt)
  );

  assign load_last = (state == T_LOAD) && (cnt == CW'(K - 1));
  assign send_last = (state == T_SEND) && (cnt == CW'(N - 1));
  assign cnt_clr   = (state == T_IDLE) || load_last || send_last;

  msd_input_buffer #(.K(K)) u_ibuf (
    .clk  (clk),
    .rst  (rst),
    .shift(state == T_LOAD),
    .din  (in_MSD_CRC),
    .msd  (msd)
  );

  turbo_serial_core #(.K(K)) u_serial (
    .clk  (clk),
    .rst  (rst),
    .start(ser_start),
    .msd  (msd),
    .cw   (ser_cw),
    .done (ser_done),
    .busy (ser_busy)
  );

  turbo_parallel_core #(.K(K)) u_parallel (
    .clk  (clk),
    .rst  (rst),
    .start(par_start),
    .msd  (msd),
    .cw   (par_cw),
    .done (par_done)
  );

  assign enc_done  = (mode_q == MODE_PARALLEL) ? par_done : ser_done;
  assign obuf_load = (state == T_ENC) && enc_done;

  te_output_buffer #(.N(N)) u_obuf (
    .clk  (clk),
    .rst  (rst),
    .load (obuf_load),
    .data ((mode_q == MODE_PARALLEL) ? par_cw : ser_cw),
    .shift(state == T_SEND),
    .dout (out_TE_data)
  );

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state     <= T_IDLE;
      mode_q    <= MODE_SERIAL;
      ser_start <= 1'b0;
      par_start <= 1'b0;
    end else begin
      ser_start <= 1'b0;
      par_start <= 1'b0;
      unique case (state)
        T_IDLE: if (ack) begin
          mode_q <= te_mode_e'(mode);
          state  <= T_LOAD;
        end
        T_LOAD: if (load_last) begin
          state <= T_ENC;
          if (mode_q == MODE_PARALLEL) par_start <= 1'b1;
          else                         ser_start <= 1'b1;
        end
        T_ENC:  if (enc_done)  state <= T_SEND;
        T_SEND: if (send_last) state <= T_IDLE;
        default: state <= T_IDLE;
      endcase
    end
  end

  assign out_valid = (state == T_SEND);
  assign busy      = (state != T_IDLE);

  // The serial core is never started while it is still working.
  assert property (@(posedge clk) disable iff (rst) ser_start |-> !ser_busy)
    else $error("turbo_encoder_using_cia: serial core restarted while busy");

endmodule
