# Turbo encoder module for an eCall in-vehicle modem

After a crash, an eCall in-vehicle system (IVS) sends a Minimum Set of Data
(MSD) to the emergency centre through an in-band modem. In the modem the MSD
plus its CRC is protected by a rate-1/3 turbo code. This RTL is that turbo
encoder module. It takes one block of **K = 1148** MSD+CRC bits serially and
returns **3456** coded bits serially: 3 × 1148 data and parity bits plus
12 trellis-termination bits.

The module can encode a block in two ways, selected by the `mode` input:

* **serial computation** (`mode = 0`): one bit per clock. The work takes
  3K+6 = 3450 clocks and needs very little logic.
* **parallel computation** (`mode = 1`): the whole coded block is one
  combinational function of the input block and is registered in a single
  clock. This costs about 6,900 cells in generic synthesis, mostly 1-bit XORs.

All counters of the module step with a **carry increment adder** (CIA): two
4-bit ripple carry adders plus a half-adder increment stage.

```
                 ack, mode
                     |
                     v
 in_MSD_CRC -> msd_input_buffer --msd[1147:0]--+--> turbo_serial_core ---cw--+
 (1 bit/clk)   (1148-bit shift reg)            |    (rsc_encoder x2,         |
                                               |     interleaver lookup)     |
                                               |                             v mode
                                               +--> turbo_parallel_core --> mux
                                                    (interleaver wiring,     |
                                                     rsc_block_encoder x2)   |
                                                                             v
 out_TE_data <----------------------------- te_output_buffer <---cw[3455:0]--+
 out_valid                                 (3456-bit shift reg)

 cia_counter (carry_increment_adder -> rca4) sequences the load, the
 serial encoding phases and the send phase.
```

## The code

This is the parallel concatenated convolutional code (PCCC) of 3GPP TS
25.212. It uses two identical 8-state recursive systematic convolutional
(RSC) encoders. The first encoder reads the block in order. The second reads
it through the 3GPP internal interleaver.

**Constituent encoder** (`turbo_pkg::rsc_step`, `rsc_encoder`,
`rsc_block_encoder`): G(D) = [1, g1(D)/g0(D)]

* feedback polynomial: g0 = 1 + D² + D³
* forward polynomial: g1 = 1 + D + D³

The state is {s1, s2, s3}, with s1 the first delay. For an input bit x:

    fb = s2 ^ s3,   w = x ^ fb,   z = w ^ s1 ^ s3,   next = {w, s1, s2}

The register starts at zero for every block.

**Termination.** After the last data bit, each encoder runs three more
steps. In these steps its input switch selects the feedback, so w = 0 and
the register empties. The switch value of each step is a *tail* bit. The
parity of each step is a *parity-tail* bit. Both encoders terminate, which
gives 2 × (3 + 3) = 12 tail bits.

**Coded block layout.** Bit 0 is sent first.

| bits        | field   | content                                     |
|-------------|---------|---------------------------------------------|
| 0 – 1147    | MSD+CRC | systematic bits x0 … x1147                  |
| 1148 – 1150 | tail1   | tail bits of encoder 1                      |
| 1151 – 1153 | tail2   | tail bits of encoder 2                      |
| 1154 – 2301 | parity1 | parity of encoder 1                         |
| 2302 – 2304 | ptail1  | parity-tail bits of encoder 1               |
| 2305 – 3452 | parity2 | parity of encoder 2 (on interleaved input)  |
| 3453 – 3455 | ptail2  | parity-tail bits of encoder 2               |

Each group of three tail bits is in time order. This field order is not the
3GPP bit multiplexing: 3GPP sends three interleaved output streams. Here the
fields are sent one after another.

## The internal interleaver

`turbo_interleaver` holds the table pi(k): interleaved bit k is input bit
pi(k). The table is built at elaboration by a constant function that applies
the 3GPP rules. It works for any K in 40…5114. For K = 1148 the rules give
these values:

1. **Matrix size.** R = 20 rows. p is the smallest prime with
   K ≤ R·(p+1), which is p = 59. Since K ≤ R·(p−1), C = p − 1 = 58 columns.
   The 20 × 58 = 1160 positions are filled row by row with the input.
   The last 12 positions are padding.
2. **Base sequence.** The primitive root of 59 is v = 2.
   s(0) = 1 and s(j) = 2·s(j−1) mod 59.
3. **Row primes.** q0 = 1. Each further q_i is the next prime above 6 that
   is coprime with 58: 7, 11, 13, 17, 19, 23, 31, 37, …, 83. The prime
   29 is skipped.
4. **Inter-row pattern.** For this K it is
   T = ⟨19, 9, 14, 4, 0, 2, 5, 7, 12, 18, 16, 13, 17, 15, 3, 1, 6, 11, 8, 10⟩.
   Row T(i) uses the prime r_T(i) = q_i.
5. **Intra-row permutation.** U_i(j) = s((j·r_i) mod 58) − 1.
6. **Read-out.** The matrix is read column by column, taking the rows in
   the order T(0), T(1), … . Padding positions are skipped.

The first entries are pi = 1102, 522, 812, 232, 0, 116, …. The first column
read is column 0 of every row, because U(0) = s(0) − 1 = 0. So pi(0) is the
start of row 19, which is input bit 1102.

The module has two ports for this table:

* `rd_idx → rd_addr` is a lookup. The serial core uses it to fetch input
  bit pi(k) on each clock. In synthesis it is a ROM of 1148 11-bit entries.
* `din → dout` is the whole permutation. Because the table is a constant,
  it is only wiring. The parallel core uses it.

Synthesis therefore reports `dout` as idle outputs wired to inputs. This is
intended.

## Serial and parallel computation

`turbo_serial_core` makes one write into the coded-block register per
clock. It runs through five phases. A `cia_counter` counts each phase.

| phase | clocks | work                                                          |
|-------|--------|---------------------------------------------------------------|
| BUILD | 1148   | copy bit k into the systematic field, clear both parity slots |
| PAR1  | 1148   | encoder 1 takes bit k, writes parity1[k]                      |
| TAIL1 | 3      | encoder 1 terminates, writes tail1 and ptail1                 |
| PAR2  | 1148   | encoder 2 takes bit pi(k), writes parity2[k]                  |
| TAIL2 | 3      | encoder 2 terminates, writes tail2 and ptail2                 |

`turbo_parallel_core` unrolls both encoders over the whole block in
`rsc_block_encoder`. It then puts the seven fields together and registers
them one clock after `start`. The recursion forms a chain of 1148 steps, so
this path is long. Retiming or pipelining it is left to the implementation
flow.

Sizes after generic synthesis (word-level cells, flip-flop bits):

| module                    | cells | FF bits | memory bits |
|---------------------------|-------|---------|-------------|
| turbo_serial_core         | 129   | 3,478   | 22,528 (pi ROM) |
| turbo_parallel_core       | 6,880 | 3,457   | 0           |
| turbo_encoder_using_cia   | 7,076 | 11,556  | 22,528      |

## Carry increment adder

The default `carry_increment_adder` has 8 bits and works in three steps:

1. The low `rca4` adds bits 3:0 together with the carry in.
2. The high `rca4` adds bits 7:4 at the same time, with its own carry in
   tied low.
3. A chain of four half adders adds the low block's carry out to the high
   partial sum.

The carry out is the high block's carry OR the increment carry. The two can
never both be 1.

The `WIDTH` parameter (a multiple of 4) repeats step 2 and step 3 for each
further 4-bit block. The encoder uses it as the +1 incrementer of its counters,
which are 12 bits wide at K = 1148 (`cia_counter`: a = count, b = 0,
cin = 1).

## Top-level interface and timing

`turbo_encoder_using_cia #(K = 1148)`

| port        | dir | meaning                                                    |
|-------------|-----|------------------------------------------------------------|
| clk         | in  | clock, rising edge                                         |
| rst         | in  | asynchronous reset, active high                            |
| ack         | in  | one-clock start pulse (the ACK/START indication of the modem); ignored while busy |
| mode        | in  | 0 = serial, 1 = parallel; sampled together with ack        |
| in_MSD_CRC  | in  | serial input; sampled on the 1148 rising edges after ack, bit 0 first |
| out_TE_data | out | serial coded output, bit 0 first                           |
| out_valid   | out | high for exactly 3456 clocks while out_TE_data is valid    |
| busy        | out | high from ack until the last coded bit                     |

Latency is counted from the rising edge that samples the last input bit,
with that edge as number 1. The first coded bit is valid after:

* 3K+9 = 3453 edges in serial mode;
* 3 edges in parallel mode.

A whole block occupies 8,057 clocks in serial mode and 4,607 in parallel
mode. This count includes the ack edge and the 3,456 output clocks. Loading
and sending take 1,148 + 3,456 of these clocks, so in parallel mode they
dominate.

## How far this follows the description it was built from

Taken from the description:

* the block size (1148) and output size (3456);
* the rate-1/3 PCCC with two 8-state constituent encoders and zero initial
  state;
* the 3GPP interleaver with its 20 × 58 matrix;
* the 12 tail bits and the field order of the output buffer;
* the serial phase sequence, one bit per clock;
* the parallel method as one function of the whole block;
* the 8-bit carry increment adder built from two `rca4` and half adders;
* the top-level port names.

Points where this design decides:

* **Polynomials.** One passage of the description writes g1 = 1 + D² + D³
  and g0 = 1 + D + D³, which exchanges the two. The encoder schematic and
  the 3GPP code it cites use g0 = 1 + D² + D³ (feedback) and
  g1 = 1 + D + D³. The RTL follows 3GPP.
* **Interleaver table.** The original reads the table from a hex file. Here
  it is computed from the 3GPP rules at elaboration.
* **Handshake.** `ack` is used as a start pulse. `out_valid` and `busy` are
  added. The bit order within the serial streams is a choice of this design.
* **Where the CIA is used.** The description says the design employs a
  carry increment adder but not where. Here it is the incrementer of every
  counter.
* **Latency.** The reported cycle counts for the two methods, 9218 and 22,
  are not reproduced. Both methods here are exact, and the one-bit-per-clock
  serial method needs 3K+6 steps by construction.
* **FPGA results.** Resource and power figures for an FPGA implementation
  are not reproduced. No FPGA mapping is included.

Not included: the surrounding IVS blocks (CRC generator, modulator,
demodulator, BCH decoder, ECU, GSM module). The encoder's input is assumed
to be an MSD that already has its CRC.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. The reference model,
`tb/tb_turbo_ref_pkg.sv`, is written differently from the RTL:

* the interleaver builds the padded matrix as 2-D arrays and permutes it;
* the encoder is the polynomial recursion
  a_k = x_k ^ a_(k−2) ^ a_(k−3), z_k = a_k ^ a_(k−1) ^ a_(k−3).

A few fixed values (pi spot entries, and code words for the LFSR block with
seed 0xACE1) were computed outside SystemVerilog and are checked as well.

| testbench                    | what it covers                                         |
|------------------------------|--------------------------------------------------------|
| tb_rca4                      | all 512 input combinations                             |
| tb_carry_increment_adder     | all 2^17 inputs of the 8-bit adder; random 12-bit      |
| tb_cia_counter               | 12-bit count through a wrap, stalls, clears; 8-bit wrap |
| tb_rsc_encoder               | random blocks, termination, state return to zero       |
| tb_rsc_block_encoder         | 1148- and 40-bit blocks against the recursion          |
| tb_turbo_interleaver         | permutation property, every pi(k) for K = 1148 and 40  |
| tb_msd_input_buffer          | serial capture order, hold, reset                      |
| tb_te_output_buffer          | serial order, hold, load priority                      |
| tb_turbo_serial_core         | all 3456 bits of full blocks, latency 3K+7 from start  |
| tb_turbo_parallel_core       | all 3456 bits of full blocks, latency 1                |
| tb_turbo_encoder_using_cia   | end to end at the default size                         |

The end-to-end test `tb_turbo_encoder_using_cia` runs the top module with
its default parameters. It covers serial blocks, parallel blocks, mode
switches between blocks, an `ack` that arrives while busy, and a reset in
the middle of a block. It counts each of these cases and fails if one never
happens.

To run a testbench with Verilator 5 from the repository root:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_turbo_encoder_using_cia \
    -y rtl -y tb +libext+.sv -Irtl -Itb \
    rtl/turbo_pkg.sv tb/tb_turbo_ref_pkg.sv tb/tb_turbo_encoder_using_cia.sv
./obj_dir/Vtb_turbo_encoder_using_cia
```

Change the top module and the last file to run another testbench. The
simulations take about a second each.

## Changing the design

* `K` on the top, on the cores and on the interleaver sets the block size.
  The allowed range is 40…5114, set by the 3GPP interleaver. The
  testbenches exercise K = 1148 and K = 40. The counters
  widen with K in whole 4-bit adder blocks: 12 bits at K = 1148.
* The shared formulas live in `turbo_pkg`: the step function, the field
  offsets and the mode encoding. To change the output field order, edit the
  `off_*` functions and the concatenation in `turbo_parallel_core`.
