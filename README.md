# LHCb upgrade readout slice in SystemVerilog

This is synthesizable SystemVerilog for the digital part of the trigger-less
readout of the LHCb upgrade. It covers the front-end (FE) chip logic, a
back-end (BE) board, and the timing and fast control (TFC) master and
interface. The top level, `lhcb_readout_top`, joins eight TFC masters behind a
partitioning switch, one TFC interface, three FE chips of 32 channels and one
BE board into a working readout slice. It goes from detector hits to
multi-event packets (MEPs) for the DAQ network.

## Data path

1. **FE chip** (`fe_chip`). On every bunch crossing the channel hits are
   zero-suppressed (`fe_zs_format`). Each crossing gives one packet: an 11-bit
   header followed by the data.
   - Header layout: length in bits 10:5, the 4 LSBs of the bunch counter in
     bits 4:1, and a truncation flag in bit 0.
   - Zero-suppressed data is a list of 5-bit channel addresses. At most 12 fit
     in the 63 data bits; any further hits set the truncation flag.
   - Other packet forms: non-zero-suppressed (NZS) crossings send the raw
     32 hits; vetoed crossings send the header only.

   Packets wait in a derandomising buffer (`fe_buffer`). Its occupancy is
   counted in bits, and it truncates with hysteresis: above a high mark it
   stores headers only, until the occupancy falls to a low mark. Its pointers
   are triple-redundant (`tmr_reg`). The GBT packer (`gbt_packer`) lays the
   packets back to back across the 80-bit GBT data field. It sends one frame
   per crossing, and only while the link is ready. The FE also has:
   - a bunch counter with a programmable offset, reset by the TFC
     (`bx_counter`);
   - an ECS-style register file (`fe_config`) for the channel mask, counter
     offset, NZS and pattern modes, truncation thresholds and status counters;
   - a digital test-pattern generator (`fe_pattern_gen`).

2. **BE board** (`be_module`). Each link has three stages:
   - an unpacker (`be_unpacker`) recovers the packets from the frame stream
     using the length field, and checks that the bunch counter increments;
   - an input buffer (`be_input_buffer`) truncates with hysteresis;
   - a trigger buffer (`be_trigger_match`) pairs data with the TFC decisions
     through the 4 bunch-counter bits. It drops rejected crossings and tags
     accepted ones with the local Event-ID.

   After the per-link stages:
   - The event builder (`be_event_builder`) merges the links event by event
     and checks that their Event-IDs agree.
   - The MEP builder (`mep_builder`) packs events into MEPs. It closes a MEP
     after a packing factor of events, on a change of destination, or on a
     timeout.

   The board also has:
   - a throttle word built from the buffer alarms (`be_throttle`);
   - monitoring counters with a coherent snapshot (`counter_snapshot`);
   - a spy memory that captures whole MEPs (`mep_spy`);
   - a DAQ data generator that replaces the event data on demand
     (`daq_datagen`).

3. **TFC** (`tfc_master`, `tfc_interface`). The master produces one 44-bit
   word per crossing. It contains:
   - the bunch ID, with the BID and FE resets at the end of every orbit;
   - the bunch-crossing veto for the empty part of the orbit and for the
     crossings after an NZS readout;
   - forced calibration and NZS triggers, which can be sent to a special
     farm destination;
   - the interaction-trigger decision: the OR of the ECAL, HCAL and MUON
     decisions, aligned to a common latency and blocked by the throttle;
   - a MEP destination taken from farm-node requests.

   For each accepted event a master also emits an event data bank for the
   farm (`tfc_event_bank`). It holds five 32-bit words:
   - word 0: the event number;
   - word 1: the bunch ID of the triggered crossing, the trigger type, and
     which of ECAL, HCAL and MUON fired;
   - words 2 to 4: the run number, the orbit number and universal time.

   A local run sends a reduced bank of words 0 and 1 only. The event number
   counts accepts since the last Event-ID reset, so its low bits equal the
   Event-ID the BE gives the same event.

   Several independent masters can run at once, one per partition. The
   partitioning switch (`tfc_switch`) gives each sub-system's TFC link the
   word of the master selected for it, one crossing later. It also sends each
   link's throttle back to that master. The slice is one sub-system, so
   `part_sel` chooses its master and each master has its own run enable.

   The interface turns each word into two outputs. The FE gets a 24-bit word.
   The BE gets a decision with the trigger-latency offset removed from the
   bunch ID. The interface also returns the BE throttle to the master.

The whole design runs on one clock. FE and TFC logic advance on a crossing
strobe (`bx_en`). The BE logic works on every clock. In the top level, four
clocks make one crossing.

## What follows the architecture and what is this design's own

**From the architecture:**
- The 3564-crossing orbit with 119 empty crossings, and the 12-bit bunch ID.
- The 80-bit GBT data field and the 11-bit header of the worked example.
- The field layouts of the 44-bit and 24-bit TFC words.
- Header-only truncation in both FE and BE buffers.
- Matching by bunch counter in the BE, the Event-ID counter, and MEPs with a
  near-full alarm that throttles the trigger.
- The content of the event data bank, farm requests, a throttle word under
  20 bits, counter snapshots, the MEP spy and the data generator.
- Triple-redundant pointers and the FE test pattern.

**Own choices:**
- All buffer depths and thresholds.
- The bit order on the link: header bit 0 goes first.
- Zero suppression as a list of channel addresses.
- Two packets per crossing in the packer, so that a backlog can drain.
- The recovery policy when a packet or a decision is missing.
- The 24-bit Event-ID and the trigger-type codes.
- The widths, word order and reduced form of the event data bank.
- The layout of the MEP and fragment words.
- The number of links and channels in the top level, and the sub-trigger
  latencies.
- The switch as a registered multiplexer per link. In the top level the
  masters share their trigger and command inputs; only the run enables differ.

Each source file starts with a comment that describes its interface and
timing and marks the same split.

The 24-bit FE word is laid out as BID 23:12, reserve 11:9, calibration type
8:5, BX veto 4, NZS 3, data force 2, FE reset 1 and BID reset 0. The 44-bit
TFC word is laid out as BID 43:32, MEP destination 31:16, trigger type 15:12,
calibration type 11:8, then trigger, BX veto, NZS, data force, BE reset,
FE reset, Event-ID reset and BID reset in bits 7 down to 0.

## Not included

- The analogue front end, the GBTX chip and its error correction, and the
  GBT-SCA slow control.
- The optical links and the GBT firmware in the BE FPGA. The top level brings
  the GBT links out as ports, and the test bench models them.
- The sub-trigger processors and the TFC server processor.
- The Ethernet/IP stack and the 4 GB DAQ buffer. The BE presents MEPs as a
  64-bit word stream instead.
- Legacy TTC support.

## Verification

Every block in `rtl/` has a self-checking test bench in `tb/`. Each one ends
by printing `TB_RESULT checks=N failures=M`. The test benches use random
stimulus and independent reference models; `tb/lhcb_tb_pkg.sv` provides a
bit-serial model of the link stream.

`tb_lhcb_readout_top` runs the full slice at its default size for six orbits.
It models the GBT links with a different latency per link, and the DAQ
network with random back-pressure and one long stall. It checks that every
accepted crossing comes out, in order, as one event with the expected
fragments from every link. It also counts the mechanisms the slice must show,
and fails if any count is zero:
- a partition switch to a second master;
- forced triggers sent to the special destination;
- event data banks, full and reduced;
- orbit reset and BX veto;
- zero suppression and ZS truncation;
- FE buffer truncation;
- NZS readout and calibration triggers;
- throttle;
- full MEPs and destination changes;
- channel masking;
- spy capture, counter snapshot and the data generator.

The code builds with Verilator 5, for example:

    verilator --binary --timing -Irtl -Itb rtl/lhcb_pkg.sv tb/lhcb_tb_pkg.sv \
        tb/tb_lhcb_readout_top.sv --top-module tb_lhcb_readout_top

Yosys with the slang front end also reads and synthesizes it.
