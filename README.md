# Hardware SNTP server and client: network time without a processor

This is synthesizable SystemVerilog for a small time-distribution system. An
SNTP **server** takes its time from a GPS receiver's pulse-per-second (PPS)
output and its NMEA RMC sentences. It answers NTP requests on an Ethernet LAN.
An SNTP **client** on the same LAN keeps its own clock locked to the server.
It then *pretends to be a GPS receiver* for the equipment wired to it (for
example a remote terminal unit in a substation): it drives a PPS pulse and
sends an RMC sentence each second on a serial line. The equipment gets GPS
time without its own GPS antenna.

Both stations are pure logic. Packet parsing, packet building, timestamping,
offset computation, clock discipline and the date conversions are all done by
state machines and datapaths, with no CPU and no software. The target is a
small FPGA at 50 MHz. The goal is a local clock within 10 µs of GPS under good
conditions: a lightly loaded LAN with no switches in the path.

```
            GPS receiver                                   equipment (RTU)
          RMC (RS-232)   PPS                             RMC (RS-232)   PPS
               |          |                                   ^          ^
   +-----------v----------v-----------+          +------------|----------|---------+
   | uart --> time_rx                  |          | time_tx --> uart                 |
   |             | (GPS time at PPS)   |          |    ^ (second ticks, time)        |
   |             v                     |          |    |                             |
   |          sntp_sync  (local clock) |          | sntp_sync  (local clock)         |
   |             ^                     |          |    ^ (t1..t4 per exchange)       |
   |             |  time for replies   |          |    |                             |
   |          proto_if (server)        |          | proto_if (client)                |
   +-------------|---------------------+          +----|-----------------------------+
                 |  Ethernet frames (MAC, PHY not included)  |
                 +---------------------- LAN -----------------+
                                   BOOTP server configures both
   sntp_server                                      sntp_client
```

`sntp_system` puts the two stations side by side. They are two separate
chips, so each keeps its own clock, reset and ports (`srv_*`, `cli_*`). The
LAN between them is left to the testbench.

## Time format and the local clock (`sntp_sync`)

Time is carried everywhere as a 54-bit value, `ts_t`. The top 32 bits are NTP
seconds, counted from 1900-01-01. The low 22 bits are a binary fraction of a
second, so one LSB is 2^-22 s ≈ 238 ns. An NTP 64-bit timestamp is this value
followed by ten zero bits.

The clock is a phase accumulator: `{seconds, fraction, ACC_W more fraction
bits}`. An increment is added to it every system clock cycle:

```
increment = 2^(22+ACC_W) / CLK_HZ      nominal rate
          + freq_trim                  fixed trim, set by BOOTP
          + freq_corr                  learned frequency correction
          + slew                       temporary phase-correction term
```

With ACC_W = 32 the increment resolves about 2^-54 s per cycle, well below
1 ppb. The clock never jumps during normal operation. Offsets are removed by
running it slightly fast or slow. `sec_tick` pulses in the cycle the seconds
field rolls over.

### One measurement

A measurement is four timestamps. The classic on-wire equations give:

```
delay  = (t4 - t1) - (t3 - t2)
offset = ((t2 - t1) + (t3 - t4)) / 2        (reference minus local)
```

All differences are taken modulo 2^54 and sign-extended to 56 bits. This
works across the seconds wrap, as long as the true difference is under about
half the range.

- **Client:** the timestamps are t1 (request sent), t2 (request arrived at the
  server), t3 (reply sent) and t4 (reply arrived).
- **Server:** a GPS measurement is fed in as t1 = t4 = local time at the PPS
  edge and t2 = t3 = the GPS time of that edge. This makes offset = GPS − local
  and delay = 0. The same datapath serves both roles.

`offset_valid` rises two cycles after `meas_valid`. The correction takes
effect at the end of the next cycle.

### Discipline (p and q)

Two numbers, both delivered by BOOTP, shape the loop:

- **p** is the poll exponent. The client polls every 2^p s. The server is
  fixed at p = 0, one GPS measurement per second.
- **q** is the attenuation. A larger q gives softer corrections.

The nominal setting is p = 0, q = 2. Each measurement does one of two things:

- **|offset| > STEP_LIMIT (128 ms):** the clock is stepped by the offset at
  once. The slew is cancelled and `locked` drops. This happens when a station
  first gets time, since its clock starts at zero (1900).
- **Otherwise:**
  - `slew` is set so that offset/2^q is worked off evenly over the next 2^p s.
  - offset/2^(2p+q+FREQ_SH) seconds per second is added to `freq_corr`. This
    integral term learns the oscillator's frequency error.
  - `locked` is set when |offset| ≤ LOCK_LIMIT (42 LSB = 10 µs).

Each update is an offset × constant multiply followed by an arithmetic shift.

This is a proportional-plus-integral loop. Its behaviour depends on q:

| q | Loop behaviour |
|---|----------------|
| 0 | Critically damped: a phase error is removed in one poll, with one small overshoot. |
| > 0 | Underdamped, with a slow swing past zero. |

In simulation, a client whose oscillator is 50–100 ppm off is stepped at its
first exchange. It then learns the frequency error (to within the 10 % the testbenches allow) and stays within
a clock cycle or two of the server.

## Protocol and configuration interface (`proto_if`, `proto_rx`, `proto_tx`)

This block is the control unit of each station. It works directly on the
MAC's byte stream:

- Receive: `rx_data`/`rx_valid`/`rx_last`, with preamble and FCS already
  removed.
- Transmit: `tx_data`/`tx_valid`/`tx_last` with a `tx_ready` back-pressure
  signal.

**Receiving.** `proto_rx` never stores a frame. It picks the fields it needs
(Ethernet, ARP, IPv4, UDP, NTP and BOOTP) out of the stream by byte index as
they go past. It walks the BOOTP option list on the fly. The local time at
the frame's first byte is latched as its receive timestamp. The decoded frame
is complete one cycle after `rx_last`.

**Transmitting.** `proto_tx` latches a frame description and the current
local time. That time becomes the frame's transmit timestamp and is written
into the NTP transmit field. The frame is then streamed out: each byte is
chosen from header vectors built from the latched fields, and the IPv4 header
checksum is computed on the fly. The UDP checksum is sent as zero, which IPv4
allows. Frame sizes:

| Frame | Length (bytes) |
|-------|----------------|
| ARP | 60 |
| BOOTP | 342 |
| NTP | 90 |

**Sequence.**

1. **Configuration.** A BOOTP request is broadcast every `RETRY_S` s until a
   reply arrives with our MAC address and transaction id. The reply supplies:

   | Field or option | Meaning |
   |-----------------|---------|
   | `yiaddr` | own IP address |
   | 1 | subnet mask |
   | 42 | NTP server (first address) |
   | 224 | p (1 byte) |
   | 225 | q (1 byte) |
   | 226 | UART bit period in clock cycles (2 bytes) |
   | 227 | frequency trim (4 bytes, signed) |

   Options 224–227 are site-specific codes. Missing options keep their reset
   values: p = 0, q = 2, 4800 baud, no trim.
2. **Client only:** the server's MAC address is resolved by ARP. The request
   is repeated every second until answered.
3. **Run.**
   - Both roles answer ARP requests for their own address.
   - The client sends a request (version 4, mode 3) every 2^p s. It accepts a
     reply only if both of these hold:
     - the reply's originate timestamp equals the transmit timestamp of the
       request it sent;
     - the leap indicator is not 3 (3 means an unsynchronised server).

     Other replies are dropped and counted.
   - The server answers every request with a reply that has:
     - mode 4, stratum 1, reference id "GPS";
     - leap indicator 0 while locked to GPS, 3 otherwise;
     - originate = the request's transmit field;
     - receive = arrival time of the request's first byte;
     - transmit = the time the reply starts.

     While the MAC is busy, one reply can wait. A request that arrives while
     one is already waiting is dropped and counted.

   Transmit priority: ARP reply, then NTP reply, then the station's own
   requests.

Timestamps are taken at the MAC-side byte stream, so fixed MAC and PHY
latencies are not included. The client takes its transmit time when its
frame builder starts, two cycles before the first byte leaves. This adds a
constant 2.5 cycles to the measured delay and about one cycle of offset bias
at 50 MHz (40 ns).

## GPS side of the server (`time_rx`)

**PPS capture.** The PPS input passes through a synchroniser. Its rising edge
latches the local time, less the two cycles the synchroniser adds.

**RMC parsing.** Sentences arrive from the UART and are checked one character
at a time:

- The sentence name must be `RMC` (any talker).
- The status field must be `A`.
- The time and date fields must be digits.
- The XOR checksum must match.

A `$` restarts the parser at any point.

**Date conversion.** The date and time are converted to NTP seconds by a
small sequential unit:

1. Add the lengths of the years from 1900, one per cycle.
2. Add the lengths of the months, one per cycle.
3. Add days·86400 + h·3600 + m·60 + s.

This takes about 140 cycles for dates in this century. Two-digit years are
read as 20yy.

**Pairing with PPS.** A sentence is taken to describe the second that began
at the last PPS edge. It is used only if that edge is less than one second
old. The result, GPS time plus local time at that edge, is one server
measurement. The server steps on its first good second and locks on the next.

## GPS emulation in the client (`time_tx`)

At each `sec_tick`, `time_tx` does the following:

1. It raises `pps_out` for `PPS_WIDTH` cycles (100 ms by default).
2. It splits the new second into day, hour, minute and second. A 33-cycle
   restoring divider (`seq_div`) divides by 86400, 3600 and 60.
3. It walks years and months to get the calendar date.
4. It sends this 40-character sentence through the UART:

```
$GPRMC,hhmmss.00,S,,,,,,,ddmmyy,,,A*CS<CR><LF>
```

S is `A` while the client is locked and `V` otherwise. The position fields
are empty. The whole sentence takes 40 character times: about 83 ms at
4800 baud, or 3.5 ms at 115200 baud. A tick that comes while a sentence is
still being sent gets its PPS pulse but no second sentence.

## UART (`uart`)

The UART sends 8 data bits, no parity, 1 stop bit (8N1), LSB first. The bit
period in clock cycles comes from BOOTP at run time. The receiver synchronises
its input with two flip-flops, starts on a falling edge, samples at mid-bit,
and flags a low stop bit. The server uses only the receiver (from the GPS).
The client uses only the transmitter (to the equipment).

## What is not here

- **Ethernet MAC and PHY.** Use any MAC that delivers frames as a byte stream
  with an end-of-frame marker and accepts them with a ready handshake.
- **RS-232 level shifters and the oscillator.**
- **GPS receiver and the equipment.** `tb/gps_model.sv` is a behavioural GPS
  model for simulation only.

Compared with the original description of this system, the design departs in
these ways:

- **Format conversions.** The original uses converter blocks plus a small
  8-bit soft processor. Here they are plain state machines.
- **Discipline law.** The original names a published clock-discipline
  algorithm but does not give it. The loop above follows its spirit (p, q,
  slewing by frequency changes) but is this design's own.
- **No frame memories.** The original uses a few block RAMs. This design
  parses and builds frames on the fly and stores no frame, so it needs no
  RAM.
- **Accuracy numbers.** Sub-microsecond client accuracy was measured on real
  hardware for poll exponents p = 0–6 and attenuations q = 0–3. Simulation
  cannot reproduce those numbers, because they depend on real oscillator
  noise and network jitter. `tb_sntp_pq_sweep` checks only that the loop
  converges without steps for every such setting.
- **Resources and power.** This design has not been characterised for
  resource use or power.
- **Unspecified details, chosen here:**
  - BOOTP option codes 224–227
  - retry timing
  - the one-deep reply queue on the server
  - the step and lock limits
  - the RMC field layout
  - the PPS width

## Parameters (defaults)

| Parameter | Where | Default | Meaning |
|-----------|-------|---------|---------|
| `CLK_HZ` | all | 50 000 000 | system clock; sets the nominal increment and all timers |
| `ACC_W` | `sntp_sync` | 32 | extra fraction bits of the accumulator |
| `STEP_LIMIT` | `sntp_sync` | 536 871 (128 ms) | larger offsets step the clock |
| `LOCK_LIMIT` | `sntp_sync` | 42 (10 µs) | `locked` threshold |
| `FREQ_SH` | `sntp_sync` | 2 | extra attenuation of the frequency term |
| `PPS_WIDTH` | `time_tx` | CLK_HZ/10 | client PPS pulse length |
| `RETRY_S` | `proto_if` | 2 | BOOTP retry interval, seconds |
| `MAC_ADDR`, `SRV_MAC`, `CLI_MAC` | stations, top | 02:00:00:00:00:01 / …:02 | station MAC addresses |

Shared types and constants are in `rtl/sntp_pkg.sv`. They include `ts_t`,
`ofs_t`, the configuration struct, frame descriptions, option codes and
calendar helpers.

## Load

At 100 Mb/s, a 90-byte NTP frame plus FCS, preamble and gap takes about
9.1 µs on the wire. The server parses a request while it arrives and builds
the reply at one byte per cycle. It can therefore follow the line rate, about
100 000 requests per second, as long as the MAC drains replies as fast as
requests arrive. 10 000 requests per second leaves the logic idle over 95 % of
the time. A request is dropped only when the MAC stalls the transmitter for
longer than a request time, and the drop is counted.

## Simulating

The testbenches are self-checking. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. Build any of them with
Verilator 5, for example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/sntp_pkg.sv tb/tb_net_pkg.sv tb/tb_sntp_system.sv --top-module tb_sntp_system
./obj_dir/Vtb_sntp_system
```

Most benches lower `CLK_HZ` so that many simulated seconds run quickly. The
design is written in terms of `CLK_HZ`, so nothing else changes.

| Testbench | What it exercises |
|-----------|-------------------|
| `tb_uart` | random bytes and baud dividers, loopback, framing errors |
| `tb_sntp_sync` | seconds counting, the offset/delay equations on random timestamps, latency, step, slew rate, frequency learning, lock flag |
| `tb_sntp_pq_sweep` | the discipline loop for every p ∈ {0,2,4,6} and q ∈ {0..3}: exact measurement, convergence, no spurious steps |
| `tb_time_rx` | random dates 2000–2099, leap days, bad checksum, wrong status or sentence name, garbage, PPS pairing and age limit |
| `tb_time_tx` | RMC sentences for random and edge-case dates against an independent calendar, PPS width and timing, status letter |
| `tb_proto_if` | client and server: BOOTP (retry, wrong id ignored, options parsed), ARP both ways, NTP request and reply fields, IPv4 checksums, poll interval, originate check, leap-indicator handling, reply queue and drop under a stalled transmitter |
| `tb_sntp_server` | GPS model → step and lock; NTP replies' timestamps within 3 cycles of GPS time |
| `tb_sntp_client` | model server giving true time; client 100 ppm slow; bad replies ignored, step, lock, learned frequency within 10 %, PPS on true seconds, RMC sentences |
| `tb_sntp_system` | both stations, GPS model, LAN model, BOOTP server that ignores the first request; 40 s at CLK_HZ = 200 kHz. Counts every mechanism: BOOTP retry, ARP, unsynchronised replies, server and client steps, slews, locks, PPS, RMC, request bursts and a forced drop. Final clocks within a few cycles of GPS time. |
| `tb_sntp_system_full` | the top at its default 50 MHz: server locks to GPS, then the client (100 ppm fast) is stepped by its first exchange. The next exchange measures exactly the accumulated drift, and the PPS and RMC outputs are checked. About 2 s of simulated time, roughly 6 minutes of wall-clock time. |

The testbench helpers are in `tb/tb_net_pkg.sv`. It builds frames, RMC
sentences and civil-date conversions by closed-form formulas, independent of
the loops in the RTL.

## Limits worth knowing

- **Dates.** NTP era 0 only, 1900–2036. Incoming RMC years are 2000–2099.
  Outgoing years are printed modulo 100.
- **Timestamp resolution.** Timestamps are quantised to whole clock cycles.
  At 50 MHz that is 20 ns, well inside the 238 ns clock LSB.
- **Delay filtering.** Measurements are not filtered for delay. A single
  exchange delayed asymmetrically (for example by a queue in a switch)
  disturbs the clock by half the asymmetry, and the loop then works it off.
- **Unauthenticated.** Any host on the LAN can answer BOOTP and configure a
  station.
