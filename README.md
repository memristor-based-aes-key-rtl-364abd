# Memristor-keyed AES-128 security module

An IoT node needs a secret key that cannot be copied. This design takes the key
from a physical fingerprint: the current–voltage curve of a memristor. Process
variation makes that curve different for every device. The node sweeps a current
through its memristor and digitizes the voltage at 43 points of the sweep with a
3-bit time-based ADC. It then shifts the 43 codes into a 128-bit register, and the
register's contents become the AES-128 key. Two devices whose curves digitize to
the same codes end up with the same key. One device then encrypts and the other
decrypts.

The RTL models two such devices side by side:

```
 device A                                                   device B
 memristor ─V─> t_adc ─3b─> key_generator ─128b key─┐       memristor ─V─> t_adc ─3b─> key_generator ─┐
 (external)     (VTC+Vernier TDC+encoder)  (SIPO)   v       (external)                                v
                                        plaintext -> aes_encrypt -> ciphertext ===> aes_decrypt -> plaintext
```

The memristor and the current source that sweeps it are analog parts outside
this RTL. For each device, the top level brings out the index of the sweep point
being digitized and takes the memristor's node voltage back, as an integer
number of millivolts.

## The time-based ADC (`t_adc`)

This is the least conventional part. It contains three stages.

1. **Voltage-to-time converter** (`vtc`, behavioural model). This is a
   current-starved inverter driven by the conversion clock Vclk. The node voltage
   biases the transistor that sinks the inverter's discharge current. A higher
   voltage therefore makes the output switch earlier after the Vclk falling edge.
   The model turns this into a "Start" edge at
   `T_BASE_PS - GAIN_PS_PER_MV*(V - 385 mV)`, which is 2000 ps − 2 ps/mV·(V − 385),
   clamped at zero.
2. **Vernier delay-line TDC** (`vernier_tdc`, behavioural model). Start runs down
   a chain of slow cells (T1 = 100 ps). The reference edge "Stop" runs down a
   parallel chain of fast cells (T2 = 50 ps). Stop is the Vclk falling edge
   delayed by `T_REF_PS = T_BASE_PS + 1`. Flip-flop *i* takes Start's *i*-th tap
   as data and Stop's *i*-th tap as clock. It reads 1 while Start is still ahead
   after *i* stages, that is while the Start-to-Stop lead is more than
   *i*·(T1 − T2). There are 2ⁿ − 1 = 7 flip-flops, and their outputs form a
   thermometer code.
3. **Thermometer-to-binary encoder** (`therm2bin`, synthesizable). It counts the
   ones in the code. For a clean thermometer code this equals the position of the
   top 1. If a single bubble appears, the result moves by at most one step.

The lead is 1 ps + 2 ps/mV·(V − 385 mV), and the TDC resolution is 50 ps. One
TDC step is therefore exactly 25 mV, so code *k* comes out for
385 + 25k ≤ V < 410 + 25k mV:

| code | node-X voltage | typical voltage used in tests |
|------|----------------|-------------------------------|
| 000  | < 410 mV (saturates below 385) | 407 mV |
| 001  | 410–434 mV | 425 mV |
| 010  | 435–459 mV | 445 mV |
| 011  | 460–484 mV | 467 mV |
| 100  | 485–509 mV | 491 mV |
| 101  | 510–534 mV | 517 mV |
| 110  | 535–559 mV | 547 mV |
| 111  | ≥ 560 mV (saturates above 585) | 580 mV |

The full scale is 200 mV (385–585 mV) in 8 steps of 25 mV. The upper edges of
the published ranges overlap by a millivolt in places. This design resolves them
with the uniform thresholds 385 + 25k mV.

**Clocked interface.** A one-cycle `conv` pulse drives Vclk = ~conv low, which
starts one conversion. The code is registered on the clock edge that ends the
`conv` cycle, and `code_valid` pulses for one cycle after that. Two rules follow:

- The whole analog conversion, about 2.4 ns with the default delays, must fit in
  one clock period.
- `conv` must fall between conversions so that Vclk gets a new falling edge. An
  assertion checks this.

The delay numbers are the model's own. Only their ratios matter. If you change
`GAIN_PS_PER_MV`, `T2_PS` or `LSB_MV`, the parameter `T1_PS` is derived so that one
Vernier step still equals one LSB.

## From 43 codes to a 128-bit key (`key_generator`, `sipo_shift_register`)

The key register is a plain 128-flip-flop serial-in, parallel-out shift
register. The serial input feeds FF1, each flip-flop feeds the next, and
`clear_n` is a common asynchronous clear. A shift enable holds the contents
between conversions.

The controller makes 43 conversions, since ⌈128 / 3⌉ = 43. It shifts each 3-bit
code in serially, **most significant bit first**, and stops after exactly 128
shifts. Only the upper two bits of the 43rd code are therefore used. The first
bit captured ends up in `key[127]`, so reading the key from the top gives the
codes in sweep order. For example, the codes

```
7 7 7 7 7 7 7 6 5 5 4 4 4 3 3 3 3 2 2 2 1 1 0 0 0 0 0 0 0 0 0 0 0 3 3 5 7 7 7 2 1 2 (2)
```

give the key `FFFFFEB648DB6922400000000DDFFA29`.

Timing per point: one `conv` cycle, one cycle until the code arrives, then 3
shift cycles. `key_ready` rises 214 cycles after `start`. `point` tells the sweep
which voltage the ADC needs next. It moves on as soon as a code is captured, so
the voltage has the three shift cycles to settle. `sampling` marks the cycles in
which the voltage must hold still.

## AES-128 cores

`aes_encrypt` and `aes_decrypt` are iterative. Each uses one round circuit
(`aes_enc_round`, `aes_dec_round`) and computes one round per clock. Round keys
are derived on the fly by `aes_key_schedule`, so none is stored. The S-box and
inverse S-box are not typed in as tables. `aes_pkg` computes them at elaboration
time from their definition: the multiplicative inverse in GF(2⁸), built from
exponent and logarithm tables over the generator 0x03, followed by the affine map
with constant 0x63.

- **Encryption.** At `start`, the block is XORed with Key0. Then come 9
  standard rounds (SubBytes, ShiftRows, MixColumns, AddRoundKey) and a final
  round without MixColumns. `done` pulses 10 cycles after the start edge.
- **Decryption.** The core receives Key0 but needs Key10 first. It therefore
  runs the key schedule forward for 10 cycles, applying AddRoundKey with Key10 on
  the last of them. It then performs 10 inverse rounds in the order InvShiftRows,
  InvSubBytes, AddRoundKey, InvMixColumns, and the last round omits
  InvMixColumns. For these rounds it walks the keys backwards, from Key9 down to
  Key0, with the inverse key-schedule step. `done` pulses 20 cycles after the
  start edge.

Blocks are byte strings with byte 0 in bits 127:120, the usual hex notation.
Both cores ignore `start` while busy and hold `dout` until the next block.

## Pairing two devices

Each device's key comes from its own memristor, so two devices agree only if
their curves digitize to identical codes. The intended procedure is procedural,
not logic. The receiving side's sweep current is adjusted until a known message
decrypts correctly. The RTL has no key-comparison hardware. The end-to-end test
acts the procedure out:

1. Device B first sees a curve 30 mV higher than A's. It gets a different key,
   and the decryption fails.
2. B's curve is then "tuned" to within ±1 mV of A's, which is inside the same
   ADC ranges. B regenerates its key and decrypts all messages.

## Top level (`memristor_hsm_top`)

Each device has these port groups (prefix `a_` for the encryptor, `b_` for the
decryptor):

| signal | dir | meaning |
|--------|-----|---------|
| `x_keygen_start` | in | one-cycle pulse: digitize the curve into a new key |
| `x_sweep_point[5:0]`, `x_sweep_req` | out | sweep point needed; voltage must hold while `x_sweep_req` is high |
| `x_vx_mv[9:0]` | in | memristor node voltage, mV |
| `x_key_ready` | out | key complete |
| `a_pt_valid/a_pt_ready/a_pt` → `a_ct_valid/a_ct` | | encrypt one block; ready needs a key and an idle core |
| `b_ct_valid/b_ct_ready/b_ct` → `b_pt_valid/b_pt` | | decrypt one block |

A block is accepted in a cycle where valid and ready are both high. The result
comes with a one-cycle valid pulse, 10 cycles after acceptance for encryption and
20 for decryption. Parameters: `KEY_BITS = 128` and `ADC_BITS = 3`.

## What is synthesizable and what is a model

- **Synthesizable:** `aes_*`, `therm2bin`, `sipo_shift_register`, `key_generator`.
- **Behavioural models with delays:** `vtc` and `vernier_tdc` represent analog
  circuits. `t_adc` and the top level contain them, so a synthesis flow must
  replace those two with real cells. Synthesis tools treat their delays as
  zero, so a synthesized netlist of them means nothing. The Vernier sampling
  flip-flops are ordinary flip-flops clocked by delay-line taps.
- **Not modelled:** the memristor itself, its current source and its access
  transistor. The memristor is specified only through a device model published
  elsewhere. The top takes its voltage as an input.

## Choices this design makes where the scheme leaves things open

- The linear VTC law and the delay values (2 ps/mV, 100 ps and 50 ps cells,
  2000 ps base). The published circuit gives structure but no sizes.
- The ones-counting thermometer encoder.
- The ADC threshold rule described above.
- Shifting each code MSB first, and keeping exactly 128 of the 129 bits. With
  these two choices the worked example of a 43-point curve reproduces its
  128-bit key.
- The shift enable on the SIPO register and its active-low asynchronous clear.
- The controller FSM, the sweep-point interface and all handshakes.
- One round per clock for AES, on-the-fly key expansion, and a decryptor that
  re-derives Key10 for every block: 20 cycles per block instead of 11.
- No clock frequency is specified. The testbenches use 100 MHz.
- Options mentioned only as possible extensions are not built: AES-192/256 and a
  6- or 8-bit ADC. `t_adc` and `therm2bin` are parameterized in `N_BITS`, but only
  3 bits are tested.

## How far it has been checked

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The main checks:

- **AES.** The AES blocks are compared with FIPS-197 vectors (the Appendix A key
  schedule, the Appendix B round and the Appendix C.1 cipher). They are also
  compared with random vectors from an independent software AES. Latency and
  busy behaviour are checked.
- **ADC chain.** The VTC delay law is measured. The Vernier TDC is swept over
  leads from −17 to 423 ps. The ADC is swept over 300–700 mV in 1 mV steps.
- **Key generator.** It is checked on the example curve and on random curves,
  including the 214-cycle latency.
- **End to end.** `tb_memristor_hsm_top` runs at the default sizes. Device A's
  key must be `FFFFFEB648DB6922400000000DDFFA29`. Five 16-byte text messages
  must encrypt to known ciphertexts. For example,
  `546865207265736f6c7574696f6e206f` encrypts to
  `5de1b88669ec12577cc67e3a7dde7f3e`. The test also covers the untuned and tuned
  device-B runs, and it counts that every mechanism occurred: key generation on
  both sides, ADC codes 000 and 111, encryption, decryption, blocks held back by
  `ready`, and a wrong-key decryption.

## Simulating

Verilator 5 with timing support is needed, because the ADC models use delays.
From the repository root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/aes_pkg.sv tb/tb_memristor_hsm_top.sv --top-module tb_memristor_hsm_top -o sim
./obj_dir/sim
```

Swap in any other `tb/tb_<module>.sv` and its top name to run a unit test. The
lint warnings left are expected:

- zero-delay and sync/async notes on the delay-line models.
- the assertion's use of `rst_n` in `disable iff`.

Files: one module or package per file in `rtl/`. `aes_pkg.sv` holds the shared
types, the GF(2⁸) arithmetic and the computed S-boxes.
