# SMS paging for an FPGA-based motor speed controller

A machine controller that already lives in an FPGA can page its operator by
SMS without extra hardware beyond a GSM modem on a serial line. This design
adds such a pager to a servo-motor speed controller, all in one chip:

* an **error handling module (EHM)** decides that something is wrong. It
  averages the speed error over a moving window and compares the average with a
  threshold, so short disturbances are ignored and only a lasting failure to
  track the reference counts. It also watches on/off alarm signals that stay
  away from their normal level too long;
* on an alarm the motor is **switched off** at once;
* the **message handling unit (MHU)** drives a GSM modem with AT commands over
  an RS-232 link and has the modem send a stored text message, checking every
  answer and retrying when the modem stays silent.

Everything is synthesizable SystemVerilog. The message handling, which a
small soft processor running a program could also do, is a state machine here.

```
 ref_speed ─┐
 act_speed ─┴─> speed_controller ──> drive (0 while motor_off)
                    │ e = ref − act       ▲ shutdown
                    ▼                     │
                   ehm ── alarms[0] ──┬───┴── motor_off = |(alarms & SHUTDOWN_MASK)
 dig_in ──────> ehm_digital ─ alarms[N_DIG:1]
                                      ▼
                                     mhu ── msg_rom (AT lines and texts)
                                      │ ▲      resp_detect (finds "OK" and ">")
                                      ▼ │
                 baud_gen ──> uart_tx / uart_rx <──> GSM modem (external)
```

## Deciding that something is wrong

### The averaged speed error (`ehm`, `ehm_fir`)

The speed controller outputs the signed error *e = reference − measured
speed*. The EHM samples it once every sampling period *T* and keeps the last
*N* samples, so the averaging window is *W = N·T*. With the defaults:

| quantity | value | in the RTL |
|---|---|---|
| sampling period T | 0.4 s | `SAMPLE_CYC` = 20,000,000 cycles at 50 MHz |
| taps N | 5 | `N_TAPS` = 5 |
| window W | 2 s | N·T |
| threshold e_th | 10 speed divisions (4 % of full speed) | `E_TH` = 10 |

The filter (`ehm_fir`) is an N-tap FIR with equal taps, built as a shift
register of samples plus a running sum: each new sample is added and the one
leaving the window is subtracted. It outputs the **sum**, not the average. The
comparator therefore tests `|sum| > N·E_TH` (here `|sum| > 50`), which is
exactly `|average| > E_TH` without a divider.

Reading the numbers:

* a constant error of 11 divisions alarms after the fifth sample (55 > 50),
  2 s after it starts; an error of exactly 10 never alarms;
* a large error alarms sooner: a sensor that reads 0 while the reference is
  100 alarms at the first sample, at most 0.4 s later;
* one sample of 40 divisions between good samples averages to 8 and is
  ignored. This is the "surge rejection" the window is there for.

The magnitude is compared, so running too fast alarms like running too slow.
The alarm sets two cycles after the deciding sample. It is latched and holds
the motor off until `alarm_clear`, which also empties the window and restarts
the sampling period.

The window length is the trade-off to tune. *W* should be the longest time for
which an error above the threshold can be tolerated. *T* only has to be short
enough for the bandwidth of the error. A smaller *T* at the same *W* means more
taps and more logic.

### Digital alarm inputs (`ehm_digital`)

On/off machine signals (`dig_in`, `N_DIG` = 2 by default) raise an alarm when
they stay away from their normal level (`DIG_NORMAL`) for longer than a preset
time (`DIG_PERSIST_CYC`, 1 s by default). Each input has its own counter. The
counter runs while the input is abnormal and restarts whenever the input
returns to normal, so an excursion must be continuous to count. The inputs pass
through a two-flip-flop synchroniser, and the alarm sets `DIG_PERSIST_CYC` + 3
cycles after the input changes.

### What an alarm does

`alarms[0]` is the speed alarm and `alarms[i]` is digital input *i−1*. All
alarms are latched. `SHUTDOWN_MASK` selects the sources that switch the motor
off; by default all of them do. While the motor is held off by a source other
than the speed alarm, the speed EHM is kept cleared. The large speed error is
then the expected result of the shutdown, and it would otherwise raise a second
alarm and send a second message. Every alarm source that rises also queues one
text message.

## Talking to the modem: the message handling unit

### The protocol

A GSM modem in SMS text mode needs three command lines per message. Each
command starts with `AT` and ends with a carriage return (0Dh):

| step | MHU sends | modem answers | when |
|---|---|---|---|
| 1 | `AT+CMGF=1<CR>` (bytes 41 54 2B 43 4D 47 46 3D 31 0D) | `OK` | once, after reset |
| 2 | `AT+CMGS="9363665"<CR>` | `>` (text prompt) | per alarm |
| 3 | `<text><Ctrl-Z>` (Ctrl-Z = 1Ah) | `+CMGS: n` … `OK` | per alarm |

`msg_rom` holds these lines as constants: the text-mode command, the
destination command built from the `PHONE` parameter, and one text per alarm
source (`MSGS`; source 0, the speed alarm, defaults to "Hello world"). They are
indexed by line, source and character. `resp_detect` scans the received bytes.
It flags `OK` (an `O` directly followed by a `K`, either case, so "Ok" counts)
and the `>` prompt. Everything else is ignored: echoes, line feeds, `+CMGS`
result lines.

### The state machine

The MHU has three states: IDLE, SEND (characters of the current line go to
the transmitter one by one, with valid/ready) and WAIT. In WAIT it waits for
the answer that belongs to the current line:

* if the answer arrives, the step succeeds at once. Step 1 then raises
  `modem_ready`, step 2 moves on to step 3, and step 3 pulses `page_sent`
  with `page_id` naming the alarm source;
* if no answer has arrived `RESP_TIMEOUT_CYC` cycles (1 s) after the last
  character was handed to the transmitter, the **same line is sent again**.
  Step 3 repeats only the text, not the destination command;
* a step is tried at most `MAX_TRIALS` (5) times. After the fifth failure,
  `comm_error` is set and stays set until reset. A message in progress is then
  dropped. A failed initialisation starts over, so the pager recovers by
  itself when the modem comes back.

An answer counts if it arrives at any time after its step has started, even
while the line is still being transmitted. The detector is cleared at each
step start, so an answer cannot be assembled from bytes of two steps.

After reset the MHU initialises the modem before anything else. Alarms are
taken on their rising edge and kept as pending bits. An alarm raised during
initialisation or during another message is served afterwards, lowest source
number first. Each rising edge produces exactly one message.

### Timing at 9600 baud

One character takes 10 bits × 326 × 16 cycles ≈ 1.04 ms. A page (18 + 12
characters sent, and the modem's echo and answers received) takes about 70 ms
from the alarm to `page_sent`. The full-size simulation measures 3.43 million
cycles (68.7 ms). Initialisation takes under 30 ms. Both are far below the
1 s response timeout, so a retry only happens when the modem really does not
answer.

## Serial link (`baud_gen`, `uart_tx`, `uart_rx`)

`baud_gen` divides the clock into an enable pulse at 16 × the baud rate. The
divisor is CLK_HZ / (16·BAUD), rounded: 326 at 50 MHz and 9600 baud, so the
link runs 0.16 % slow. `uart_tx` sends 8N1 frames, LSB first, with a
valid/ready handshake. `ready` is low for the whole frame, and an assertion
checks that `valid` is held until accepted. `uart_rx` synchronises the line,
confirms the start bit half a bit after the falling edge and samples each bit
in its middle. It presents each byte with a one-cycle `valid`. A frame whose
stop bit is low is dropped. There are no FIFOs: the MHU sends one character at
a time and takes each received byte when it arrives.

## The speed controller (`speed_controller`)

A plain positional PID, updated every `CTRL_CYC` cycles (1 ms):

```
integ <= clamp(integ + e, ±INT_LIM)
drive <= sat_0..255( (KP·e + KI·integ + KD·(e − e_prev)) >>> GAIN_SHIFT )
```

It has default gains KP = 4, KI = 1, KD = 0 and a shift of 2. The integrator
is clamped for anti-windup. `shutdown` forces the drive to 0 and clears the
integrator and the previous error. The error output `e` is combinational, so
the EHM sees the current error. Speeds are 8-bit values in "divisions": a
threshold of 10 divisions being 4 % of full speed puts full speed at about 250.
This controller is a placeholder for whatever loop the machine already has. The
gains were chosen only so that the simulated first-order motor settles well
inside one sampling period, and they must be tuned for a real motor.

## Parameters of `paging_controller_top`

| parameter | default | meaning |
|---|---|---|
| `CLK_HZ` | 50,000,000 | clock frequency, used to derive the defaults below |
| `BAUD` | 9600 | serial bit rate |
| `SAMPLE_CYC` | CLK_HZ·0.4 | EHM sampling period T |
| `N_TAPS` | 5 | EHM window length in samples |
| `E_TH` | 10 | speed error threshold, divisions |
| `RESP_TIMEOUT_CYC` | CLK_HZ | time allowed for each modem answer (1 s) |
| `MAX_TRIALS` | 5 | trials per protocol step before `comm_error` |
| `CTRL_CYC` | CLK_HZ/1000 | PID update period (1 ms) |
| `N_DIG` | 2 | digital alarm inputs |
| `DIG_NORMAL` | 0 | normal level of each digital input |
| `DIG_PERSIST_CYC` | CLK_HZ | preset time of the digital inputs (1 s) |
| `SHUTDOWN_MASK` | all ones | alarm sources that switch the motor off |
| `PHONE` | "9363665" | destination number, up to 16 digits |
| `MSGS` | {"Alarm input 2", "Alarm input 1", "Hello world"} | one text per source, source 0 last in the list; up to 40 characters each; give it anew when changing `N_DIG` |

All timing is in clock cycles. A different clock only needs `CLK_HZ`.

## How far to trust it, and where it is this design's own

The following come straight from the source description of the system: the
partition into speed controller, EHM, MHU, UARTs and baud generator; the AT
command lines and the answers expected; the retry rule (about 1 s per answer,
5 trials, then an error signal); the EHM as an N-tap FIR followed by a
comparator, with T = 0.4 s, N = 5, W = 2 s and e_th = 10; the motor shutdown and
the message on alarm; and the digital alarm rule (abnormal for longer than a
preset time).

These are choices made here, where the description says nothing:

* the message handling is a state machine instead of a program on a soft
  processor; its order of work (initialise, then wait for alarms) mirrors
  that program's;
* a step ends as soon as its answer arrives, instead of always waiting the full
  second;
* after the trial limit a message is dropped and initialisation starts over;
  `comm_error` is sticky;
* the 50 MHz clock, 9600 baud and 8N1 frames, 16× oversampling, no UART FIFOs;
* equal FIR taps, magnitude comparison, strict "greater than", a latched alarm
  re-armed by `alarm_clear`;
* the PID structure, gains and update rate, and 8-bit speeds;
* the digital inputs: how many, normal levels, preset time, synchroniser;
  "priority level" read as a per-source shutdown mask plus a fixed service
  order; one text per source, and every text except "Hello world";
* keeping the speed EHM cleared while another source holds the motor off.

Not part of the RTL: the GSM modem, the network and the receiving phone, the
motor and its speed sensor. The speed arrives as a number on `act_speed`. The
testbenches contain behavioural models of the modem and of a first-order motor.

## Verification

Every module has a self-checking testbench in `tb/` that ends with a line
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_baud_gen` | pulse spacing for a small divisor and for the 50 MHz / 9600 baud default (326 cycles) |
| `tb_uart_tx` | frame bits decoded independently, bit period, ready during a frame |
| `tb_uart_rx` | received bytes, latency about 9.5 bits, framing error, glitch rejection |
| `tb_msg_rom` | all lines, including the byte frame of step 1, for each text; custom number and text |
| `tb_resp_detect` | OK/Ok/ok, prompts, split or cleared pairs that must not count |
| `tb_mhu` | retries one timeout apart, exact lines, text-only retry, five trials then `comm_error`, an alarm during initialisation, two sources served in order |
| `tb_ehm_fir` | running sum against a reference over random samples, clear |
| `tb_ehm` | threshold equal vs exceeded, alarm time after the 5th or the 1st sample, latching, surge rejection |
| `tb_ehm_digital` | short excursions ignored, alarm after preset time ±1 cycle, per-channel, clear |
| `tb_speed_controller` | PID output against a model, saturation both ways, shutdown and restart |
| `tb_paging_controller_top` | whole system at reduced timing with modem and motor models: initialisation retry, tracking, surge rejected, sensor failure leading to shutdown and one SMS, re-arm, digital alarm with its own text, silent modem leading to `comm_error`; each of these must occur |
| `tb_paging_full` | whole system at the default parameters: initialisation, 1.2 s of normal running, sensor failure, alarm within 0.4 s, one SMS (about 90 million cycles, under a minute) |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/pager_pkg.sv tb/tb_paging_controller_top.sv \
    --top-module tb_paging_controller_top --Mdir obj -o sim
./obj/sim
```

The simulator is two-state, and every register read by the design is reset.
The testbenches were also run with registers starting at random values before
reset.

Size after coarse synthesis of the whole design: 310 flip-flop bits and about
430 word-level cells. The smallest Spartan-3 has 3,840 flip-flops, so the
design fits it easily.

## Files

* `rtl/pager_pkg.sv`: character codes, line and state types
* `rtl/paging_controller_top.sv`: the system
* `rtl/speed_controller.sv`, `rtl/ehm.sv`, `rtl/ehm_fir.sv`, `rtl/ehm_digital.sv`
* `rtl/mhu.sv`, `rtl/msg_rom.sv`, `rtl/resp_detect.sv`
* `rtl/baud_gen.sv`, `rtl/uart_tx.sv`, `rtl/uart_rx.sv`
* `tb/tb_*.sv`: testbenches; `tb/gsm_modem_model.sv`: behavioural modem
