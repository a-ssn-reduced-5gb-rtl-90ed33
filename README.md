# Current-balanced 16-to-20-bit parallel transmitter (segmented group-inversion coding)

A wide single-ended parallel link with parallel termination draws driver
current for every line that is driven low. If the number of ZEROs on the bus
changes from one bit slot to the next, the total driver current changes with
it, and the few supply pins of the driver bank turn that current step into
simultaneous switching noise (SSN). Classic bus-inversion coding only halves
the number of *transitions*. With parallel termination, what counts is the
*number of ZEROs and ONEs*.

This design therefore keeps the driver current constant. Each 16-bit data
word goes out on 20 lines: the 16 data bits, split into five groups, plus
four inversion flags. Each group is sent as it is or inverted, so that the 20
lines always carry 9, 10 or 11 ONEs. Two dummy outputs then top the count up,
so that in every bit slot exactly 11 of the 22 outputs are ONE. The encoding
only ever inverts whole groups, so the decoder is one XOR per data bit.

The RTL covers the digital half of the transmitter: four time-interleaved
lanes of PRBS source and encoder, the four-phase timing, and the 22
serializing 4-to-1 multiplexers. It also includes the receiver-side decoder.
The current-mode drivers, the termination, the shared current source and the
receiver comparators are analog and are not part of it.

## The code

### Groups and flags

| group | data bits | flag | bits on the line |
|-------|-----------|------|------------------|
| G5    | D15..D12  | none | 4                |
| G4    | D11..D8   | f4   | 5                |
| G3    | D7..D4    | f3   | 5                |
| G2    | D3..D2    | f2   | 3                |
| G1    | D1..D0    | f1   | 3                |

The 20 line bits are ordered `G5, G4, f4, G3, f3, G2, f2, G1, f1`
(`sgi_pkg::sgi_word_t`, G5 in the most significant bits). A flag of 1 means
"this group, flag included, was inverted". Every flag starts at 0, so an
inverted group carries its flag as a 1.

### Disparity notation

The code works only with the *disparity* of a group: how many more ZEROs
than ONEs it holds, or the reverse. It is written (a, b): a is the majority
bit and b the excess. Examples: `0001` is (0,2), `0111` plus a 0 flag is
(1,1), and a balanced group is (0,0). Inverting a group, flag included,
swaps its majority bit and keeps b.

### Encoding rule

The encoding runs from G5 down to G1 and keeps a running disparity of the
bits already decided:

1. G5 is sent unchanged. The running disparity starts at G5's disparity.
2. For G4, G3, G2 and G1 in turn, the group's disparity is taken with its
   flag counted as a ZERO.
   - If the running disparity is non-zero and has the same majority bit as
     the group, the group is inverted (flag = 1).
   - Otherwise it is sent as it is (flag = 0).
   - The running disparity is then updated.

In other words, each group is encoded to lean the other way from what came
before. When the running disparity is exactly zero, both choices are equally
good, and the group is kept.

This bounds the running disparity at every stage:

| after | possible running disparities              | code width |
|-------|-------------------------------------------|------------|
| G5    | (0,4) (0,2) (0,0) (1,2) (1,4)             | 3 bits     |
| G4    | (0,5) (0,3) (0,1) (1,1) (1,3)             | 3 bits     |
| G3    | (0,4) (0,2) (0,0) (1,2) (1,4)             | 3 bits     |
| G2    | (0,3) (0,1) (1,1) (1,3)                   | 2 bits     |
| G1    | (0,2) (0,0) (1,2)                         | 2 bits     |

The final row is the guarantee: the 20 line bits hold 9, 10 or 11 ONEs.

Worked example, `D = 0x007F`:

- G5 = `0000` gives (0,4).
- G4 = `0000` with its flag is (0,5). The majority matches, so G4 is inverted
  to `1111`, f4 = 1. Running disparity: (1,1).
- G3 = `0111` is (1,1). It is inverted to `1000`, f3 = 1. Running
  disparity: (0,0).
- G2 = `11` is (1,1). The running disparity is zero, so G2 is kept, f2 = 0.
  Running disparity: (1,1).
- G1 = `11` is inverted to `00`, f1 = 1. Running disparity: (0,0).

Result: 10 ONEs out of 20.

### Disparity codes in hardware

Each disparity is carried as a small binary code `{maj, idx}`:

- `maj` is the majority bit; it is 0 for a balance.
- `idx` is b/2 in the sets of even disparities and (b-1)/2 in the sets of odd
  ones.

Five cases fit in 3 bits and three or four cases in 2 bits, which gives the
widths in the table above. The conversions are `code_to_disp` and
`disp_to_code` in `sgi_pkg`.

## Encoder structure (`sgi_encoder`)

```
 D15..12 -> C5 --3--+
 D11..8  -> C4 --3--F4 --3-- F3 --3-- F2 --2-- F1 --2--> dummy logic
 D7..4   -> C3 --3---------/          /        /
 D3..2   -> C2 --2-------------------/        /
 D1..0   -> C1 --2-----------------------------/
            F4..F1 flags -> E blocks: group XOR flag, registered
            G5 -> flip-flop
```

- **Classifiers C1..C5** (`sgi_classifier`) count the ONEs of a group and
  emit its disparity code. C1..C4 count the flag as a ZERO; C5 has no flag.
- **Flag units F4..F1** (`sgi_flag_unit`) form a combinational chain. Each one
  decides its flag from the running-disparity code and the group code, and
  passes the new running-disparity code on. F1 also passes on the final
  disparity, which drives the dummy bits.
- **E blocks** (`sgi_invert_reg`) XOR the group with its flag and register
  the group and the flag. G5 goes through a plain register.

The latency is one lane clock: a word sampled on an enabled edge is on
`word`/`dummy` from that edge on.

The longest path is C -> F4 -> F3 -> F2 -> F1 -> XOR. With four interleaved
encoders it has four bit periods to settle.

### Dummy bits

The final disparity sets the two dummy bits:

| final disparity | ONEs on the line | dummy |
|-----------------|------------------|-------|
| (0,2)           | 9                | `11`  |
| (0,0)           | 10               | `01`  |
| (1,2)           | 11               | `00`  |

So every slot holds exactly 11 ONEs on the 22 outputs. Which dummy bit
carries the single ONE in the balanced case is arbitrary, because the two
replica drivers are identical.

## Transmitter (`sgi_tx`)

Four lanes, each a `prbs16` source feeding an `sgi_encoder`, run at a quarter
of the bit rate on phases phi0..phi3. Each of the 22 outputs has a `ser_mux4`
that sends the four lanes' bits one after another. At a 5 GHz bit clock each
pin runs at 5 Gb/s and each lane at 1.25 GHz.

The RTL uses a single bit-rate clock `clk`. `four_phase_gen` is a 2-bit slot
counter. From it come:

- the one-hot lane clock enables `lane_en`;
- the four 50%-duty phases `phi[k]`, each high in slots k and k+1;
- the multiplexer select `mux_sel = (phase + 2) mod 4`.

Timing:

| edge after reset release | lane loaded  | pins show                    |
|--------------------------|--------------|------------------------------|
| 1 (slot 0 ends)          | lane 0       | -                            |
| 2                        | lane 1       | -                            |
| 3                        | lane 2       | lane 0 word 0, `line_valid`=1 |
| 4                        | lane 3       | lane 1 word 0                |
| 5                        | lane 0       | lane 2 word 0                |
| ...                      |              | lanes 0,1,2,3,0,... in turn  |

Each lane's word is sampled by the multiplexers two slots after it was
loaded, in the middle of its four-slot stable window. `line_valid` goes high
with the first encoded word on the pins and stays high until reset.

An assertion in `sgi_tx` checks that, while `line_valid` is high, exactly 11
of the 22 outputs are ONE.

The PRBS sources are PRBS15 (x^15 + x^14 + 1), advanced 16 bits per lane
clock. Each lane starts from its own seed (`SEEDS` parameter). A seed `w`
lies on the sequence when `w[0] == w[15] ^ w[14]`; all four default seeds
do, so each lane returns to its seed after 32767 words.

## Receiver side (`sgi_decoder`)

`d = group XOR flag` for G4..G1, and G5 passes unchanged. The decoder is
combinational. In `sgi_link_top` it stands beside the transmitter with its
own ports (`rx_word` in, `rx_data` out), because the receiver's comparators
and its sampling are not part of this RTL.

## Interpretations and departures

- **Flag rule.** One summary statement of the scheme says a flag is set when
  the majority bits of the flag unit's two inputs *differ*. The encoding
  tables and the step-by-step rule ("if G5 has excess ZEROs, G4 is encoded to
  contain excess ONES") invert when the group, taken with its flag at 0, has
  the *same* majority bit as the running disparity. This RTL follows the
  tables. The two agree if "majority of the group" means the majority after
  inversion.
- **Tie rule.** With a zero running disparity the group is kept, as the
  encoding tables show.
- **Code bit assignment.** "MSB = majority bit" is given. The low-bit mapping
  `idx` is this design's choice.
- **Dummy bits.** The target of 11 ONEs on 22 outputs is given; how the two
  bits are derived is this design's choice (table above).
- **Clocking.** The original uses four 1.25 GHz phase clocks and
  transistor-level multiplexers steered by them. Here there is one bit clock,
  with clock enables, and a registered multiplexer. The order of the bits on
  the pins is the same; the absolute latency is a property of this RTL.
- **PRBS.** The polynomial and seeds are this design's choice.
- **Reset.** Synchronous active-low reset, `rst_n`, everywhere (a choice).
  After reset the outputs are all zero until `line_valid` rises.
- **Not built.** The open-drain current-mode drivers (0.5 V swing on 50 ohm,
  20 mA), the on-chip termination, the two replica drivers with the shared
  11 x 20 mA pull-down current source, and the receiver comparators. `sgi_tx`
  ends at the drivers' logic inputs: `line` and `dummy`.

## Files

| file                    | contents                                               |
|-------------------------|--------------------------------------------------------|
| `rtl/sgi_pkg.sv`        | sizes, `sgi_word_t`, disparity-code conversions        |
| `rtl/sgi_classifier.sv` | C1..C5                                                 |
| `rtl/sgi_flag_unit.sv`  | F1..F4                                                 |
| `rtl/sgi_invert_reg.sv` | E (XOR + register)                                     |
| `rtl/sgi_encoder.sv`    | 16-to-20 encoder with dummy bits                       |
| `rtl/sgi_decoder.sv`    | XOR decoder                                            |
| `rtl/prbs16.sv`         | PRBS15 source, 16 bits per step                        |
| `rtl/four_phase_gen.sv` | slot counter, phases, lane enables, mux select         |
| `rtl/ser_mux4.sv`       | 4-to-1 serializer for one pin                          |
| `rtl/sgi_tx.sv`         | the transmitter                                        |
| `rtl/sgi_link_top.sv`   | transmitter and decoder side by side                   |
| `tb/sgi_ref_pkg.sv`     | reference PRBS and encoder models for the testbenches  |
| `tb/tb_*.sv`            | one self-checking testbench per module                 |

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with
a watchdog if it hangs.

- `tb_sgi_classifier` and `tb_sgi_flag_unit` are exhaustive over every
  reachable code.
- `tb_sgi_encoder` runs all 65536 input words. For each one it checks:
  - the output against an independent model written from the rule;
  - 9 to 11 ONEs on the line and 11 on all 22 outputs;
  - decoding back to the input;
  - the one-clock latency and the hold while `en` is low;
  - three paths traced by hand through the encoding tables.

  Of the 65536 words, 13440 end with 9 ONEs, 43216 with 10 and 8888 with 11.
- `tb_sgi_tx` checks the slot order, the latency, the per-lane PRBS streams
  and the phases for 2000 slots.
- `tb_sgi_link_top` runs at the default parameters. It sends one complete
  PRBS15 period on every lane: 131068 bit slots, with each line word looped
  into the decoder. It checks every slot and counts that each mechanism
  occurs: inversion of every group, every dummy setting, and every ONE count.
- `tb_drive_current` adds up the driver current per slot at 20 mA per low
  output over 20000 slots. It checks that the coded 22 outputs draw a
  constant 220 mA. It also reports the swing of the same data sent uncoded
  on 16 pins.

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/sgi_pkg.sv tb/sgi_ref_pkg.sv tb/tb_sgi_link_top.sv --top-module tb_sgi_link_top
./obj_dir/Vtb_sgi_link_top
```

Replace the testbench name for any other module. Packages must come first on
the command line.

## Changing it

- The group split, the line order and the lane count are fixed by the code
  and live in `sgi_pkg` and `sgi_encoder`.
- Another group split needs new code widths in the classifier and flag-unit
  instances. Those widths follow from the range of the running disparity at
  each stage.
- To send real data instead of PRBS, drive `sgi_encoder.d` from your source
  in place of `prbs16`.
