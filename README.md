# Parallel CRT-RSA decryption cores, one multiplier and one block RAM each

The design decrypts RSA with a very small core, and gets throughput by
running many of those cores side by side. Each core has one 17 x 17-bit
multiply-accumulate unit, which is the multiplier of one FPGA DSP slice
(DSP48E1 on Virtex-6). It also has one 2k x 18-bit block RAM and a small amount of control
logic. The approach is "few DSP slices, few
memories" (FDFM). All the arithmetic of a core goes through its one
multiplier, and the control keeps that multiplier busy on almost every
clock.

The default top level, `rsa_multicore`, holds 320 such cores. A chain of
shift registers loads operands into the cores and reads results back. There
is no shared bus and no wide multiplexer, so the clock rate of a single core
holds for the whole array.

A 1024-bit decryption takes about 3.5 million clocks with a random key in
simulation, and at most about 4.67 million in the worst case. The CRT
constants must be computed beforehand and loaded with the key (see "What the
host loads").

## Arithmetic

Decryption computes P = C^D mod M with M = p*q. It uses the Chinese
remainder theorem (CRT) in four steps, each done once for h = p and once for
h = q:

1. C_h = C mod h
2. P_h = C_h^(D_h) mod h, with D_p = D mod (p-1) and D_q = D mod (q-1)
3. S_h = P_h * Z_h mod M, with Z_p = q^(p-1) mod M and Z_q = p^(q-1) mod M
4. P = S_p + S_q mod M

Step 2 uses half-length numbers, which is where the speed-up over a plain
C^D mod M comes from. Every multiplication in every step is a Montgomery
multiplication in radix 2^17:

    MM(X, Y) = X * Y * 2^(-17*ny) mod M   (result below 2M, no final subtraction)

Here ny is the number of digits of Y. A number of d digits needs
17*d >= bits + 3. With that much headroom every intermediate value stays
below 2M, so no product needs a final subtraction. The
operations are:

| step | operation                                     | products              |
|------|-----------------------------------------------|-----------------------|
| 1    | T = MM(C, R2_h); C_h = MM(T, 1)                | 2 per prime           |
| 2    | A = MM(R2_h, 1); B = MM(R2_h, C_h); per exponent bit A = MM(A, A), and for a 1 bit also A = MM(A, B); P_h = MM(A, 1) | 3 + 17*dh + (ones in D_h) |
| 3    | T1 = MM(R2_M, P_h); T2 = MM(T1, Z_h); S_h = MM(T2, 1) | 3 per prime    |
| 4    | P = S_p + S_q, then P - M if that does not borrow | adder only         |

R2_h = 2^(34*dh) mod h and R2_M = 2^(34*dM) mod M. Z_h is stored in
Montgomery form, Z_h * 2^(17*dM) mod M. With that form the three products of
step 3 give S_h <= M, so step 4 needs at most one subtraction. The
exponentiation scans all 17*dh bits of D_h from the top; a leading zero bit
only squares a Montgomery 1.

## The Montgomery multiplier (`mont_datapath`, `mm_control`)

The multiplier is the part that needs the closest reading. For each digit
Y_i of Y, with S starting at 0:

    q        = (S_0 + X_0*Y_i) * (-M^-1) mod 2^17
    S_new    = (S + X*Y_i + q*M) / 2^17

The quotient is computed digit by digit over j = 0..nx. Two products are
needed per digit, X_j*Y_i and q*M_j, each with its own 17-bit carry. The
single multiplier takes them in alternate clocks (XY_j, QM_j, XY_j+1, ...).

The multiply-accumulate is pipelined like a DSP slice: operand registers,
a product register, an addend register and a 34-bit output register P. The
upper 17 bits of P are fed back as the addend of the operation two clocks
later. Because the two streams alternate, each stream's carry comes back to
the same stream:

- C_alpha for X_j*Y_i
- C_beta for q*M_j

The low 17 bits go to a 17-bit adder built from ordinary logic. It is used
twice per digit, with two 1-bit carries kept in separate flip-flops:

    gamma       = alpha + beta + C_gamma      (clock after QM_j leaves P)
    S_new(j-1)  = gamma + S_j + C_S           (next clock)

The datapath timing, for XY_j issued in clock e and QM_j in clock e+1:

| clock | action                                                    |
|-------|-----------------------------------------------------------|
| e     | XY_j operands sampled (X_j from RAM port A, Y_i register) |
| e+1   | QM_j operands sampled (M_j from port A, q register)       |
| e+3   | alpha = low half of P (XY_j); S_j read address on port B  |
| e+4   | gamma formed; S_j arrives from port B                     |
| e+5   | S_new(j-1) formed                                         |
| e+6   | S_new(j-1) written on port B                              |

Reads of S run three clocks ahead of the writes to the same slot, so S is
updated in place, with port B doing one read or one write per clock.

The q digit takes six clocks per iteration. First the core forms
X_0*Y_i + S_0, with S_0 entering through the addend register. Then it
multiplies the low half by -M^-1, taking it from the product register.
So one outer iteration takes 2*(nx+1) + 6 clocks. A whole product, from
start to done, takes:

    ny * (2*(nx+1) + 6) + 6 clocks

The six extra clocks are two to fetch Y_0 and X_0 and four to drain the
pipeline. nx is at least 4, so that S_0 of the next iteration is written
before it is read; this only matters below 52-bit operands. The published
count is the same per iteration, with 4 fixed clocks instead of 6.

`mm_control` generates every RAM address and the operation stream. Its
command (`mm_cmd_t`) gives:

- the base and length of X, Y and M;
- the address of -M^-1;
- where the result goes, including an optional split. The high digits of
  a result longer than the modulus can go to a second slot; step 1 uses
  this.

Digits beyond an operand's length are read as zero. So the same sequencer
handles:

- a full-length X with a half-length modulus (C mod p);
- a half-length Y with a full-length X (step 3).

## The core (`rsa_core`, `modexp_control`, `bram_2k18`)

`modexp_control` is the core's state machine. After `run` it does the
following:

1. It scans the end flags of M, p, q, D_p and D_q to learn their digit
   counts.
2. It issues the products listed above in the order C_p, C_q, P_p, P_q,
   S_p, S_q.
3. It adds and conditionally subtracts, one digit per two clocks.
4. It raises `done`, with the plaintext in the P slot.

Between products it reads the next exponent digit and chooses square or
multiply.

The RAM ports belong to `mm_control` while a product runs and to the state
machine otherwise. Port B belongs to the loading chain only while the core
is idle; a chain access to a busy core is ignored.

Every word in the RAM is 18 bits: a 17-bit digit plus a flag. The flag is 1
on the most significant digit, which is how the hardware learns operand
lengths. Values are stored least significant digit first. The RAM map
(base address in words):

| base | slot (128 words)   | base | slot (64 words) | base | slot (64 words) |
|------|--------------------|------|-----------------|------|-----------------|
| 0    | P (plaintext)      | 1024 | Z_q (2 slots)   | 1536 | X (exp. buffer) |
| 128  | C                  | 1088 | (Z_q, upper)    | 1600 | Y (base, Montgomery form) |
| 256  | S (work, S_q)      | 1152 | C_p, then P_p   | 1664 | S (exp. buffer) |
| 384  | R2_M               | 1216 | C_q, then P_q   | 1728 | R2_p            |
| 512  | M                  | 1280 | p               | 1792 | R2_q            |
| 640  | E or D (work, S_p) | 1344 | q               | 1856 | D_p             |
| 768  | -M^-1 mod 2^17     | 1408 | -p^-1 mod 2^17  | 1920 | D_q             |
| 896  | Z_p                | 1472 | -q^-1 mod 2^17  | 1984 | the constant 1  |

Full-length slots hold 128 digits and half-length ones 64. So the largest
modulus is 128*17 - 3 = 2173 bits, with primes up to 1085 bits. All of
64 to 2048 bits fit without change.

### What the host loads

Each value is loaded least significant digit first, with the flag on its
top digit:

- C, M, p, q, D_p, D_q;
- -M^-1, -p^-1 and -q^-1, each mod 2^17 (one digit);
- R2_M, R2_p and R2_q as defined above;
- Z_p and Z_q in Montgomery form as above;
- the constant 1.

The digit counts are dM = ceil((bits(M)+3)/17) and likewise for p and q.
The testbench package `tb_rsa_util` shows every formula.

### Encryption mode

The same core also encrypts (or computes any P^E mod M without CRT). With
`encrypt` high in the cycle of `run`, the state machine does the following:

1. It scans the lengths of M and of E, which is held in the "E or D" slot.
2. It runs plain left-to-right square-and-multiply on the full-length
   modulus.
3. It leaves C = P^E mod M in the C slot.

The host loads P, E, M, -M^-1, R2_M and the constant 1. The accumulator
alternates between the C and P slots; the P slot is free once the base has
been converted into the upper S slot. The last product, MM(A, 1), may run
in place, because it has only one Y digit. Encryption takes
(3 + 17*dE + ones in E) products of dM digits.

## The multicore chain (`rsa_multicore`, `core_link`)

A packet has these fields:

- valid bit;
- send/receive flag (0 = send/write, 1 = receive/read);
- 9-bit core ID;
- 11-bit RAM address;
- 18-bit data.

Each core owns one register of the chain, and packets move one core to the
right per clock. Core IDs run from 1 to 320. A packet put on `link_in` in
clock t acts on core p in clock t + p - 1 and appears on `link_out` in clock
t + 320. For a receive, its data field then holds the word read.

The host can therefore stream one word per clock in each direction. A
1024-bit key is about 500 words per core, so loading all 320 cores takes
about 160,000 clocks. That is small next to the 3.5 million clocks of one
decryption. `run` starts all cores
together; `busy`, `done` and `mult_active` report each core.

## Clock counts

For the worst case (every exponent bit 1), this design needs the following
clocks per decryption. The key sizes and published counts are from the
design's timing table:

| modulus bits | dM / dp | this design | published |
|-------------:|--------:|------------:|----------:|
| 64           | 4 / 3   | 12,263      | 4,312     |
| 128          | 8 / 4   | 21,451      | 19,768    |
| 256          | 16 / 8  | 114,851     | 110,392   |
| 512          | 31 / 16 | 725,800     | 713,048   |
| 1024         | 61 / 31 | 4,666,750   | 4,625,348 |
| 2048         | 121 / 61| 33,214,450  | 33,067,148|

From 512 bits up the difference is 1 to 2 %. It comes from two clocks more
per product, the length scan and the final addition. At 64 bits it is large
for two reasons:

- the headroom rule gives 32-bit primes 3 digits instead of 2;
- the inner loop never runs fewer than 4 digits.

The multiplier forms a real product in about 84 % of the clocks for a
512-bit key and about 91 % for a 1024-bit key (measured in simulation with
random keys).

## Where this design departs from the published one

- Fixed overhead per product is 6 clocks, not 4, and an inner loop runs at
  least 4 digits.
- The headroom rule 17*d >= bits + 3 is applied everywhere. So the largest
  modulus is 2173 bits, not the 2176 that 128 full digits would suggest, and
  the primes of a 64-bit key take 3 digits, not 2.
- R2_h is 2^(34*dh) mod h, matching the multiplier's digit count. The
  published text writes the step-1 constant with 2^(bit length of p).
- Z_p and Z_q are kept in Montgomery form. With that form, the published
  three-product step 3 yields P_h*Z_h mod M, and step 4 needs at most one
  subtraction.
- The exponent is scanned over all its digits, leading zeros included.
- The chain packet has an extra valid bit. Chain access to a busy core is
  ignored.
- The block RAM is an inferred dual-port array: read-first, with port B
  winning a same-address write.

## Simulation

Every file in `rtl/` and `tb/` holds one module or package. With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/rsa_pkg.sv \
        tb/tb_rsa_util.sv tb/tb_rsa_core.sv --top-module tb_rsa_core
    ./obj_dir/Vtb_rsa_core +verilator+rand+reset+2

Every testbench prints `TB_RESULT checks=N failures=M` and stops on a
watchdog.

| testbench                | what it checks |
|--------------------------|----------------|
| `tb_bram_2k18`           | both ports, read latency, read-first, collision |
| `tb_mont_datapath`       | q digits, products and write timing, with the bench acting as sequencer |
| `tb_mm_control`          | products of 1 to 64 digits against wide-integer arithmetic; clocks = ny*(2*(nx+1)+6)+6 |
| `tb_core_link`           | a four-stage chain: writes, reads, latency, busy cores, unused IDs |
| `tb_rsa_core`            | decryption of keys from 40 to 256 bits, exact clock count, refused writes while busy, the final subtraction; encryption with E = 65537 and random exponents, exact clock count |
| `tb_rsa_workloads`       | 512- and 1024-bit keys on one core, clock counts against the published worst case |
| `tb_rsa_multicore`       | 8 cores loaded, run and read back through the chain, then switched to encryption to re-create each cypher text; counts every mechanism |

There is no testbench at the full size of 320 cores. Each of the 320 cores
is a separate parameterisation, so Verilator writes about 100 MB of C++ for
the whole system and compiling it takes more than ten minutes on two threads.
The largest size covered by the testbenches here is therefore 8 cores.
A 320-core build with 64-bit keys (decryption only, same chain and core
logic, built with `-j4` in about five minutes) was run once
and every core's plaintext read back was correct; it is not included.

Keys, plaintexts and cypher texts are generated inside the testbenches by
the `tb_rsa_util` package, so no data files are needed.

Some testbenches read internal signals:

- `tb_mont_datapath` reads `dut.q_r`;
- `tb_mm_control` reads and writes the RAM array `u_bram.mem`;
- `tb_rsa_core` and `tb_rsa_workloads` read `dut.u_me.sub_taken`.

`sub_taken` is otherwise unused inside `rsa_core`, so lint reports it.
