# Secure TAP controller

An IEEE 1149.1-2013 test access port (TAP) that does two things beyond a plain JTAG port:

- **Test-mode persistence (TMP).** A `CLAMP_HOLD` instruction can lock the device's pins in test
  mode. They stay locked when the TAP passes through Test-Logic-Reset, which is what happens
  whenever a board-level tester switches other devices in the chain to BYPASS. They are released
  only by `CLAMP_RELEASE`, by a "bypass escape" or by power-on reset. Without this, pins fall back to
  functional mode at unpredictable moments during board test.
- **Authentication.** Until a tester proves that it knows the device's secret, every test
  instruction behaves like BYPASS. To an unauthorised user the device looks like a well-behaved
  one-bit bypass device in the chain. The proof is challenge–response with the LBlock lightweight
  block cipher (64-bit block, 80-bit key).

Everything runs on TCK and is written in synthesizable SystemVerilog. Without the authentication
logic the core needs 19 flip-flops. The LBlock engine and its registers add about 280 more.

The top module `secure_tap_top` has one parameter, `SECURE` (default 1). Setting it to 0 builds
the plain 1149.1-2013 core: it has no authentication module, every test instruction is open and
the authentication codes act as BYPASS.

## Block structure

```
            TMS TCK TRSTN                 TAP_POR*
               |                             |
          +----v----+   ctrl    +------------v---+        +-------------------+
          | tap_fsm |---------->| tmp_controller |<-------| tmp_status_register|<-- TDI
          +---------+           +----------------+ escape +-------------------+
               | ctrl                 | tmp_status, CHReset*         |
   TDI   +-----v----------------+     v                              |
   ----->| instruction_register |  +-------------+  bsr_* ports      |
         +----------------------+  | bsr_control |----------------> external boundary register
               | active instr      +-------------+                   |
         +-----v--------------+        ^                             |
         | instruction_decode |--------+ dec                         |
         +--------------------+<-- authenticated --+                 |
               | dr_sel                            |                 |
         +-----v-----------+   +-----------------+ |                 |
  TDO <--| register_select |<--| bypass_register | |                 |
  TDO_EN +-----------------+<--+ auth_module (LBlock, cipher text, comparator) <-- TDI, device_key
                  ^ ^----------------------------------------------- bsr_tdo
```

| File | Module |
|---|---|
| `rtl/stap_pkg.sv` | State encoding, opcodes, control/decode structs, LBlock S-boxes |
| `rtl/tap_fsm.sv` | 16-state TAP controller |
| `rtl/instruction_register.sv` | 4-bit IR: shift stage and active-instruction latch |
| `rtl/instruction_decode.sv` | Opcode decode and masking before authentication |
| `rtl/bypass_register.sv` | One-bit bypass register |
| `rtl/tmp_controller.sv` | Persistence-Off / Persistence-On state machine |
| `rtl/tmp_status_register.sv` | 2-bit TMP status data register, bypass-escape bit |
| `rtl/bsr_control.sv` | Controls for the external boundary register |
| `rtl/register_select.sv` | TDO multiplexer and falling-edge output stage |
| `rtl/lblock.sv` | LBlock encryption, one round per clock |
| `rtl/auth_module.sv` | Challenge/response register, cipher text register, comparator |
| `rtl/secure_tap_top.sv` | Top level |

## TAP state machine

The state register has 4 bits. It uses the classic 1149.1 example encoding, and all control
outputs are decoded from it combinationally. The TAP itself therefore has only four flip-flops.

| State | Code | TMS=0 | TMS=1 | Active outputs |
|---|---|---|---|---|
| Test-Logic-Reset | F | C | F | `reset_n`=0, select |
| Run-Test/Idle | C | C | 7 | select |
| Select-DR | 7 | 6 | 4 | |
| Capture-DR | 6 | 2 | 1 | clock_dr, capture_dr |
| Shift-DR | 2 | 2 | 1 | clock_dr, shift_dr, enable |
| Exit1-DR | 1 | 3 | 5 | |
| Pause-DR | 3 | 3 | 0 | |
| Exit2-DR | 0 | 2 | 5 | |
| Update-DR | 5 | C | 7 | update_dr |
| Select-IR | 4 | E | F | |
| Capture-IR | E | A | 9 | clock_ir, capture_ir, select |
| Shift-IR | A | A | 9 | clock_ir, shift_ir, select, enable |
| Exit1-IR | 9 | B | D | select |
| Pause-IR | B | B | 8 | select |
| Exit2-IR | 8 | A | D | select |
| Update-IR | D | C | 7 | update_ir, select |

`select` is simply state bit 3. It picks the instruction register for TDO in the IR column and
the data register otherwise. TRSTN resets the state asynchronously, and five TCKs with TMS high
also reach Test-Logic-Reset from any state. The 40-bit TMS sequence
`1011000100010000110001000010001000110011`, applied from Test-Logic-Reset, visits all 16 states.
The testbenches use it.

**Edge timing.** TDI and TMS are sampled on the rising edge of TCK. The shift registers move on
the rising edge. TDO and its output enable `tdo_en` change on the falling edge. The active
instruction and the bypass-escape bit are updated on the falling edge in their Update state.

## Instructions

The instruction register has 4 bits. Capture-IR loads `0101`, so a scan always shifts out `..01`
first. In Test-Logic-Reset the active instruction becomes BYPASS.

| Code | Instruction | Data register | Before authentication |
|---|---|---|---|
| 1111 | BYPASS | bypass | allowed |
| 0100 | AUTH_CHAL | 64-bit auth register | allowed |
| 0101 | AUTH_RESP | 64-bit auth register | allowed |
| 0110 | LOCK | bypass | allowed |
| 0000 | EXTEST | boundary register (external) | acts as BYPASS |
| 0001 | SAMPLE/PRELOAD | boundary register (external) | acts as BYPASS |
| 0010 | CLAMP | bypass, pins in test mode | acts as BYPASS |
| 1010 | CLAMP_HOLD | bypass, pins in test mode, TMP on | acts as BYPASS |
| 1001 | CLAMP_RELEASE | bypass, TMP off | acts as BYPASS |
| 1100 | TMP_STATUS | 2-bit TMP status register | acts as BYPASS |
| others | — | bypass | — |

Only BYPASS (all ones) is fixed by 1149.1, and the code for CLAMP_HOLD comes from the original
simulation. All other codes are this implementation's choice and can be changed in `stap_pkg`.

## Authentication protocol

The tester holds a list of challenge–response pairs (CRPs). Each pair is a 64-bit challenge and its
LBlock encryption under the device key. The key enters on the 80-bit `device_key` port, which
would typically come from fuses. The sequence, all through standard JTAG scans:

1. Load `AUTH_CHAL`. Scan the challenge into the 64-bit auth register (LSB first).
2. Update-DR starts LBlock on the challenge. The cipher needs **32 TCKs** (one round per TCK), so
   idle in Run-Test/Idle for at least 32 clocks. `auth_busy` shows the cipher running. The result
   is stored in an internal cipher text register that cannot be scanned out.
3. Load `AUTH_RESP`. Scan in the response from the CRP. On Update-DR the comparator checks it
   against the cipher text register. A match sets `authenticated`; a mismatch clears it.
4. A cipher text can be compared only once. Every further attempt needs a fresh challenge, so
   guessing costs a 64-bit scan, a 32-clock encryption and another 64-bit scan per try.
5. The bits captured by either AUTH instruction are `{62'b0, cipher_text_ready, authenticated}`.
   The tester reads the outcome from the first two bits shifted out of its next scan.

Once authenticated, all instructions work normally. The flag survives TRSTN and Test-Logic-Reset,
so a test program can reset the TAP freely. It is cleared by the LOCK instruction (on every TCK
while LOCK is active), by a failed comparison and by power-on reset.

Throughput of the cipher: 64 bits per 32 TCK = 2 bits per clock, i.e. 200 kbit/s at 100 kHz.

**How this differs from the source description.** The source describes the chip encrypting the
challenge, "sending the result back", and the user comparing it with the CRP. It also asks for a
cipher-text register and a comparator inside the core. If the chip scanned its result out,
anyone could read it and scan it straight back in. This design therefore keeps the cipher text
inside and does the comparison on chip. The tester learns only pass or fail. One-time use of each
cipher text, the status word and LOCK clearing the flag are this design's own choices.

### LBlock

`lblock.sv` implements the published LBlock cipher. It is a 32-round Feistel network on two
32-bit halves:

`X(i) = P(S(X(i-1) xor K(i-1))) xor (X(i-2) <<< 8)`. The ciphertext is `X32 || X33`.

S applies the eight 4-bit S-boxes s0..s7 to the nibbles. P permutes the nibbles
(u7..u0 = z6 z4 z7 z5 z2 z0 z3 z1). The first round key is the top 32 bits of the 80-bit key. After
each round the key register is rotated left by 29. Its top two nibbles then go through s9 and s8,
and bits 50..46 are XORed with the round number. The S-box tables, the permutation and the
rotation constants are the published cipher's, not derived here. They are checked against its
test vectors: key 0 and plaintext 0 give `c218185308e75bcd`; key `0123456789abcdeffedc` and
plaintext `0123456789abcdef` give `4b7179d8ebee0c26`.

## Test-mode persistence

`tmp_controller` holds one flip-flop:

- **Persistence-On** is entered on the TCK after CLAMP_HOLD becomes the active instruction.
- **Persistence-Off** is entered after CLAMP_RELEASE becomes active, on a *bypass escape*, or
  asynchronously by `TAP_POR*`. TRSTN does not end persistence.
- **Bypass escape** happens on the TCK that leaves Update-IR with BYPASS as the new instruction,
  provided the bypass-escape bit is set. That bit lives in the TMP status register and is 1 after
  power-on.

While persistence is on:

- `bsr_mode` (the boundary register's test-mode line) stays high whatever the instruction.
- `bsr_reset_n` (CHReset*) is kept high, so Test-Logic-Reset does not reset the boundary register.

The TMP status register (instruction TMP_STATUS) captures `{bypass_escape, tmp_status}` and shifts
it out bit 0 first. On Update-DR its bit 1 becomes the new escape bit, so a tester can disable the
escape. Clamp instructions have no effect before authentication.

## Boundary register interface

The boundary-scan cells are not part of this core. It drives them through:

- `bsr_capture`, `bsr_clock`, `bsr_shift`, `bsr_update`: the DR controls. They are active only
  under EXTEST or SAMPLE/PRELOAD.
- `bsr_mode`: high under EXTEST, CLAMP, CLAMP_HOLD, CLAMP_RELEASE or persistence.
- `bsr_reset_n`: the boundary register's reset (CHReset*).

The boundary register's serial output comes back on `bsr_tdo`. There is no IDCODE register, which
is why the reset instruction is BYPASS.

## Resets

| Signal | Resets |
|---|---|
| `trst_n` | TAP state, instruction register, bypass register, TDO stage |
| `tap_por_n` | all of the above, plus TMP controller, TMP status register, authentication and LBlock |

Both are asynchronous and active low.

## Assumptions and limits

- These follow the original design: the encoding and outputs of the state machine; the 4-bit IR
  with `..01` capture and BYPASS at reset; falling-edge TDO; the TMP controller's states, inputs and
  outputs; LBlock's sizes and round count; the rule that unauthenticated devices bypass all test
  instructions.
- These are this implementation's own: the opcodes (except BYPASS and CLAMP_HOLD); the layout of
  the TMP status register and the reset value of its escape bit; the boundary-register control
  logic; the authentication register, status word and compare rule; which resets clear which
  state.
- In the original functional table, RESET is low only in Test-Logic-Reset, while its simulation
  traces show `reset_o` high there. This design follows the table.
- Not built: the boundary-scan cells; IDCODE/ECIDCODE; the 1149.1-2013 initialisation (INIT_*),
  IC-reset and power-domain features, which are listed only as optional parts of the standard.
- The authentication hides the cipher text, but it is not hardened against side channels. The
  secret key is an input port.

## Simulation

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing -Irtl -y rtl -y tb +libext+.sv rtl/stap_pkg.sv \
          tb/secure_tap_top_tb.sv --top-module secure_tap_top_tb
./obj_dir/Vsecure_tap_top_tb
```

Replace the testbench and module name to run any other test, e.g. `tb/lblock_tb.sv` and
`lblock_tb`.

| Testbench | What it checks |
|---|---|
| `tap_fsm_tb` | Every state and output against an independent model; the 40-bit TMS pattern and random TMS; reset by five TMS-high clocks from each state; TRSTN |
| `instruction_register_tb` | `0101` capture, shift order, falling-edge update, BYPASS on reset |
| `instruction_decode_tb` | All 16 codes, authenticated and not |
| `bypass_register_tb` | Capture 0, one-clock delay, hold when deselected |
| `tmp_controller_tb` | All transitions; CHReset* held; escape enabled and disabled; POR |
| `tmp_status_register_tb` | Capture word, shift, write of the escape bit |
| `bsr_control_tb` | Gating and mode, random stimulus |
| `register_select_tb` | Mux choice and falling-edge timing of TDO and its enable |
| `lblock_tb` | Published test vectors; exactly 32 clocks per block |
| `auth_module_tb` | Refused and accepted responses; one-time cipher text; LOCK; 32-clock latency |
| `secure_tap_top_tb` | End to end through the pins at default parameters |
| `ip_core_waveforms_tb` | Plain core (`SECURE=0`): TMS pattern with state trace, IR scan, bypass DR scan, CLAMP_HOLD persistence through Test-Logic-Reset |

`secure_tap_top_tb` covers the TMS pattern, the IR capture value and bypass, masking before
authentication, a refused and then a successful authentication, EXTEST through an 8-cell
behavioural boundary register, persistence across Test-Logic-Reset, escape disabled and enabled,
CLAMP_RELEASE, LOCK, and a bypass scan that halts in Pause-DR halfway. Each mechanism is counted and must occur. The whole run is about 700 TCKs.

The RTL also carries a few concurrent assertions, which Verilator checks when built with
`--assert`:

- only one capture, shift or update line is active at a time;
- Persistence-On is entered only through CLAMP_HOLD;
- the authenticated flag rises only on Update-DR of AUTH_RESP with a fresh cipher text.

Size after generic synthesis, in flip-flop bits:

| Part | Flip-flop bits |
|---|---|
| TAP state machine | 4 |
| LBlock | 152 |
| Authentication module, including LBlock | 282 |
| Complete core | 301 |
