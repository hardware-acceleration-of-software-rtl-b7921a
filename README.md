# String-function accelerator over RS-232

This design runs C string-library functions in dedicated logic. A host sends
the operands of a call such as `strcmp` or `strstr` over a serial line. The
accelerator holds each operand as one wide register of up to 8 characters. It
answers in 1 to 9 clock cycles, because it compares whole strings, or every
character position, in parallel, or steps through a string one character per
clock. The answer goes back to the host as ASCII text.

The structure and timing follow a 2007 master's thesis on hardware acceleration
of string functions (P. A. Kulkarni, Southern Methodist University). That work
used an FPGA board with a 50 MHz clock and a 115200-baud link. Its main finding
still holds for this RTL: an operation takes 20 to 180 ns, while moving the
strings over the serial link takes hundreds of microseconds. Where this RTL
departs from that prototype, the sections below say so.

## Data flow

```
uart_rxd ──> uart_rx ──> string_formatter ──> function unit ──> uart_tx ──> uart_txd
            (8N1 receiver,  (strips STX/ETX,    (selected by       (128-byte FIFO,
             128-byte FIFO)  builds str1/str2)   func_sel)          8N1 framing)
                                  │                    │
                                  └──── timing_probe ──┘──> probe_start, probe_done, op_cycles
```

`string_accel_top` contains one instance of every function unit. The
`func_sel` input picks the unit that the next request starts. All other units
stay idle. Keep `func_sel` stable while a request is in flight.

### Request and reply format

Each string is sent as `STX` (0x02), its characters, then `ETX` (0x03).
Two-operand functions take two framed strings; the second one holds `char1`
for the `strchr` family. Single-operand functions (`strupr`, `strlwr`,
`strlen`) take one. The formatter ignores bytes outside a frame. It keeps the
first 8 characters of a longer string and drops the rest. A repeated `STX`
restarts the current string.

| `func_sel` | function      | operands          | reply                                     | cycles (start to done)                 |
|-----------:|---------------|-------------------|-------------------------------------------|----------------------------------------|
| 0 | `strcmp`      | string1, string2  | `1` equal / `0` not (case sensitive)       | 1                                       |
| 1 | `strcasecmp`  | string1, string2  | `1` equal ignoring case / `0`              | k+1, k = index of the deciding pair     |
| 2 | `strstr`      | string1, string2  | index of first occurrence `0`..`7`, or `!` | p+2 if found at p, else n−m+2            |
| 3 | `strchr`      | string1, char1    | `1` present / `0` absent                   | 2                                       |
| 4 | `strchr_pos`  | string1, char1    | index of first occurrence, or `!`          | 2                                       |
| 5 | `strrchr`     | string1, char1    | index of last occurrence, or `!`           | 2                                       |
| 6 | `strupr`      | string1           | string1 in upper case (L bytes)            | L (one character per cycle)             |
| 7 | `strlwr`      | string1           | string1 in lower case (L bytes)            | L                                       |
| 8 | `strlen`      | string1           | `0`+L as one ASCII digit                   | L (1 for an empty string)               |

Indices are 0-based. For example, `strrchr("ABCDC", 'C')` replies `4` and
`strchr_pos` replies `2`. A "cycle" here counts clock edges from the edge that
sees the start pulse to the edge that raises `done`. A one-cycle operation
finishes on the edge that starts it.

## Function units

All units share one convention. Operands are packed `8*N`-bit vectors with the
first character in the top byte and NUL bytes after the end. `start` is a
one-cycle pulse with the operands, and `done` is a one-cycle pulse with the
result. Results are ASCII, so the top can pass them to the transmitter as they
are.

**Whole-string compare (`strcmp_unit`).** The unit XORs the two 64-bit
registers. The strings are equal exactly when the XOR is all zero. The NUL
padding takes part in the compare, so `"AB"` and `"ABCDE"` differ. The unit
reports only equal or not equal. It does not return the sign that C's `strcmp`
returns.

**Per-character walk (`strcasecmp_unit`, `strupr_unit`, `strlwr_unit`,
`strlen_unit`).** These units handle one character per clock. They handle
character 0 on the same edge that sees `start`, reading it straight from the
operand inputs. That is why a one-character string takes 1 cycle.
- **Case handling.** Upper- and lower-case letters differ only in bit 5, and
  only letters are treated as having a case. `strupr` clears bit 5 of `a`..`z`
  and `strlwr` sets it on `A`..`Z`. `strcasecmp` folds both characters to upper
  case before it compares them.
- **`strcasecmp`** stops at the first pair that differs (reply `0`). It also
  stops when a pair matches and both strings end right after it (reply `1`).
  So `"ABCDEFG"`/`"AABBCED"` takes 2 cycles, and `"Abcde"`/`"AB"` takes 3,
  because `c` meets NUL.
- **`strlen`** follows the original method. It appends the next character of
  string1 to a copy called string3 each clock. It stops as soon as
  `string3 | string1 == string3`, because at that point string3 already holds
  every non-NUL character.
- **`strupr` and `strlwr`** raise `out_valid` once per converted character.
  The top writes each character into the transmit FIFO in the same clock, so
  several characters can queue while the line sends them at the baud rate.

**Parallel character search (`strchr_unit`, `strchr_pos_unit`, `strrchr_unit`).**
`char_match_array` holds N compare blocks. Block i compares character i of
string1 with char1, whatever the string's length. The match vector is
registered in cycle 1. Cycle 2 ORs it (`strchr`) or priority-encodes it. The
encoder favours the lowest index for `strchr_pos` and the highest for
`strrchr`. Every search therefore takes exactly 2 cycles. NUL padding never
matches, so an empty char1 is reported as absent. C's `strchr` would find the
terminator instead.

**Substring search (`strstr_unit`).** This unit is a controller plus a
datapath.
- **Datapath.** A shifter moves string2 right by p character slots, along with
  a mask of its m occupied slots. A comparator reports a match when string1
  equals the shifted string2 in every masked slot.
- **Controller.** It waits in `S_IDLE`. On `start` it spends one cycle
  capturing the operands and measuring both lengths. It then enters `S_SCAN`
  and tries one position per clock, p = 0 … n−m.
- **Timing.** A match at position p finishes in cycle p+2. A miss finishes in
  cycle n−m+2 (cycle 2 if string2 is longer than string1). `"ABCD"`/`"CD"`
  takes 4 cycles and replies `2`. `"ABCD"`/`"a"` takes 5 cycles and replies
  `!`. An empty string2 matches at position 0.
- **Outputs.** The unit also has `found` and `pos` outputs. The top sends only
  the ASCII result.

## Serial link

`baud_counter` divides the 50 MHz clock by 434 (`BAUD_TICK_COUNT` = 433), which
gives 115200 baud with an 8.68 µs bit. It pulses at each bit boundary and at
mid-bit (`HALF_BAUD_TICK_COUNT` = 216). It also counts 10 bits per frame: one
start bit, 8 data bits LSB first, one stop bit, no parity.

- **`uart_tx`** pops a byte from its FIFO into a shift register, with a 0 start
  bit below it. On each bit boundary the register shifts right and a 1 fills in
  from the top, which produces the stop bit. The frame ends after 10 bit times.
- **`uart_rx`** passes the line through a two-flop synchroniser and starts a
  frame on a low level. It samples each bit at mid-bit. After the 10th sample
  (the middle of the stop bit) it writes the data byte to its FIFO and is ready
  for the next start bit. The stop bit is not checked, so framing errors are
  not reported.
- **`sync_fifo`** (128 × 8, show-ahead) stands where the prototype used the FPGA
  vendor's FIFO macro. It ignores a write when full and a read when empty.

Link cost of one request: every byte takes 10 bits, or 86.8 µs. A two-operand
request with strings of m and n characters costs (m + n + 4) × 86.8 µs to
receive, plus 86.8 µs per reply byte. For `strcmp("A","A")` that is 520.8 µs
in and 86.8 µs out, against 20 ns of computation.

## Measurement outputs

`probe_start` rises on the clock after an operation starts. `probe_done` rises
on the clock after it finishes. Both are meant for two scope channels, and the
time between the rising edges is the operation's run time. Both pins drop when
the next request begins to arrive. `op_cycles` gives the same interval in
clock cycles and saturates at 16 bits.

Four `hex7seg` decoders drive active-low 7-segment digits:
- `hex_hi`/`hex_lo` show the last byte sent.
- `hex_rx_hi`/`hex_rx_lo` show the last byte received.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `N` | 8 | characters per operand register (64 bits); `strcasecmp_unit` needs N ≥ 2, and ASCII digit replies assume N ≤ 10 |
| `BAUD_COUNTER_WIDTH` | 9 | width of the baud counter |
| `BAUD_TICK_COUNT` | 433 | clocks per bit − 1 (50 MHz / 434 = 115200 baud) |
| `HALF_BAUD_TICK_COUNT` | 216 | receive sampling point inside a bit |
| `FIFO_DEPTH` | 128 | receive and transmit FIFO entries |

For another clock, set `BAUD_TICK_COUNT` = f_clk / baud − 1 and
`HALF_BAUD_TICK_COUNT` to about half of that. Then widen `BAUD_COUNTER_WIDTH`
if needed.

## Where this RTL differs from the original prototype

- **Build.** All nine units sit in one design behind `func_sel`, so one
  configuration serves every function. The request framing also depends on
  `func_sel`: one string for `strupr`, `strlwr` and `strlen`, two for the
  others.
- **Not-found reply.** It is `!`, as in the prototype's logic. Its written
  description calls this value NULL.
- **Receiver frame end.** The receiver ends a frame at the stop-bit sample, not
  at the end of the stop bit. With the original timing, start detection
  slipped about 3 clocks further behind with every gap-free byte.
- **`strcasecmp` timing.** For the pair `ABCDEFG`/`ABcDEFg`, the original
  tables give 8 cycles, and its measured time (about 160 ns) agrees. The
  one-pair-per-clock rule, which fits every other row (for example `Abcd`/`abcd`
  in 4), gives 7, and this RTL takes 7.
- **`strcasecmp` case folding.** The original describes ignoring bit 5 in every
  character comparison. Applied to every character, that would also treat
  pairs such as `@` and `` ` `` as equal. This RTL folds only `a`..`z` to upper
  case before comparing, as C's `strcasecmp` does.
- **`strstr` reply.** The function is described both as returning found/not
  found and as returning the position. The reply carries the position (`!` if
  absent), and the unit has a separate `found` output.
- **Empty `strupr`/`strlwr` strings.** An empty string produces no reply bytes.
  The host must not wait for one.
- **Lengths over 8.** Strings longer than 8 characters are cut to 8 without
  warning.

## Simulation

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and ends with a watchdog. To run one with
Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/str_pkg.sv tb/tb_string_accel_top.sv --top-module tb_string_accel_top
./obj_dir/Vtb_string_accel_top
```

To run a block testbench, swap in its name, for example `tb_strstr_unit`.

- **`tb_string_accel_top`** runs with every parameter at its default,
  including the real 434-clock bit. It acts as the host:
  - It sends 36 requests: the published result-table rows for all nine
    functions plus strings longer than 8 characters.
  - It checks every reply against a reference model of the C functions.
  - It checks `op_cycles` against the cycle rules above.
  - It checks the link time and both probe edges for each request.
  - It also checks the displays.
  - It counts each mechanism (every function, `strcasecmp` early exit,
    `strstr` hit and miss, `!` replies, multi-byte replies through the transmit
    FIFO, truncation, one- and two-operand framing). Any mechanism that never
    occurs counts as a failure.

  The run takes about 2.2 M clock cycles, or a few seconds.
- **Unit testbenches.** The per-function testbenches replay the published
  tables and then add a few hundred random strings over a small alphabet, so
  that matches are common. They check both the value and the cycle count.
- **Serial link.** The link testbenches decode or drive the line bit by bit.
  They include bursts of 100 gap-free bytes and senders 2 % fast or slow.

Simulation checks function and cycle counts only. Timing at 50 MHz or above has
not been checked on any FPGA or ASIC flow.
