# SecX: hardware auditing of third-party accelerators

A chip that hosts accelerators from several vendors raises questions that no
single party can answer alone. Did the accelerator really take 2 ms for that
JPEG, or did the host's memory system starve it? Did the host hand it the
input it claims? Did anyone tamper with the data on the way? SecX answers
these with a small, trusted auditing fabric. Neither the host nor the guest
accelerators can bypass or forge it.

For every job an accelerator (a *guest*) runs, SecX records the following:

- how long the job took and its throughput (QoS);
- the latency distribution of its memory and I/O accesses (QoE);
- a hash of everything it read as input (HoI) and wrote as output (HoO).

Each record is signed and kept in an on-chip non-volatile store. Later it can
serve as evidence for either side.

This repository is synthesizable SystemVerilog of that fabric, following the
SecX design as published ("SecX: A Framework for Collecting Runtime
Statistics for SoCs with Multiple Accelerators"). It is sized at its main
configuration: 24 guests, 4 tasks per guest, 4 resources, 16 latency bins and
a 7000-log store.

## The pieces

```
   guest domain          |                 host domain
                         |
 accelerator --- mG  <===|===>  gateway (GW) -------- memory / I/O
   (guest)    guest      |      ├─ access list
              meter      |      ├─ TLB (32 entries, 4-way)  <-> host core
                         |      └─ mGW gateway meter
                         |              │ signed logs
                         |              ▼
                         |      log arbiter ──> Auditor-Comptroller (AC)
                         |                        ├─ HMAC-SHA256 check
                         |                        └─ 7000-log store
```

Every guest has a pair of meters, and each side watches the other:

- **mG** sits next to the accelerator, in the guest's domain.
- **mGW** sits inside the gateway, in the host's domain.

The gateway is the guest's only way into the system. It checks every access
against an access list, translates it through its own small TLB and forwards
it to the resource. There is one **Auditor-Comptroller** for the chip. It
receives each job's log, checks the signature and stores it.

| Part | Module | What it does |
|---|---|---|
| Top | `secx_top` | 24 × (mG + gateway), log arbiter, AC |
| Gateway | `secx_gateway` | request FSM, host-to-guest channel, events |
| Gateway meter | `secx_meter_gw` | job ids, timestamps, bins, hashes, log |
| Guest meter | `secx_meter_g` | job check, request stamping, response check, HoT |
| Auditor-Comptroller | `secx_ac` | log receive, HMAC check, store, read port |
| Shared building blocks | `secx_timer`, `secx_id_gen`, `secx_nonce_seq`, `secx_xor_cipher`, `secx_verifier`, `secx_cam`, `secx_freq_bins`, `secx_tab_hash`, `secx_logger`, `secx_sha256_core`, `secx_hmac_sha256`, `secx_tlb`, `secx_access_list`, `secx_log_arb`, `secx_log_nvm` | see each file's header |
| Types | `secx_pkg` | message, job-command and log layouts |

## Dual metering: how a delay is caught

This is the core of SecX and the least obvious part.

Any message that crosses between the domains can be held back by the side
that carries it. A host could slow a competitor's accelerator, and a guest
could blame the host for its own slowness. To catch this, the sending meter
stamps each message with its own time. The receiving meter then checks the
stamp against its own clock. All meters run from one clock and reset, so
their timers agree.

A stamp in clear could simply be rewritten, so it travels as a *digest*:

```
req_msg_t  = { job_id[64], req_id[8], res_id[8], time_stamp[64], nonce[8] }   152 bits
digest     = req_msg_t XOR GMK
```

- **GMK.** The global meter key is a 152-bit secret shared by all meters.
- **Nonce.** The nonce comes from a secret 1024 × 8-bit sequence that only
  the two meters of a pair know. Each meter keeps a send pointer and a
  receive pointer into it:
  - every message a meter sends carries the byte at its send pointer;
  - the receiver compares it with the byte at its own receive pointer;
  - both pointers advance by one per message.

  A replayed or forged digest therefore decrypts to the wrong nonce.
- **Checks.** `secx_verifier` flags two conditions:
  - `timing_err` when the stamp lies in the future or is more than `TAU`
    cycles old (`TAU` = 16);
  - `nonce_err` when the nonce is wrong.
- **Cost.** Encryption and decryption are one registered XOR stage each.
  That gives the two extra cycles per crossing that the design budgets for.

At start-up each mGW fills its nonce sequence from a 16-bit LFSR seeded by
the host (`ns_start`, `ns_seed`). This takes 1024 cycles. It sends every byte
to its mG XORed with the GMK. The LFSR stands in for a true random source.

Where the checks happen:

| Message | Stamped by | Checked by | On failure |
|---|---|---|---|
| job create | mGW | mG (`ja_*`) | job is *dropped*; the guest reports it in its completion |
| request | mG (`rq_*`) | mGW | `ev_timing_err` / `ev_nonce_err`; the access still proceeds |
| response | mGW | mG (`rs_*`) | `rs_timing_err` / `rs_nonce_err` to the guest |

## Life of a job

1. **Create.** The host core sends a job command through `hjc_*`
   (`job_cmd_t`: task code, input and output address ranges).
   - The gateway opens a read-only input window and a read-write output
     window in its access list.
   - mGW takes a free task slot among the 4 (a CAM keyed by job-id) and makes
     the job-id `{guest_id, counter}`. It records the start time and clears
     the slot's bins and hashes.
   - The message goes to the guest with its digest (`g_h2g_*`, kind 0).
   - The guest hands the digest to mG (`ja_*`). If mG accepts it, the job can
     be used from the next cycle.
2. **Accesses.** The guest gives mG a request (`rq_*`) and gets a `req_id`
   and a digest one cycle later. It sends both to the gateway (`g_rq_*`).
   - The gateway checks the digest and the access list, records the send
     time in a 16-entry request CAM, then looks up the TLB.
   - On a miss, the gateway raises `tlb_miss_*` to the host core, waits for
     `tlb_fill_*` and retries.
   - It then issues the access on `m_rq_*`.
   - When the response returns on `m_rs_*`, mGW computes the latency and
     counts it in the bins. The data is returned to the guest with a fresh
     digest (`g_h2g_*`, kind 1), and the guest has mG check it (`rs_*`).
   - A denied access is never sent to the resource and raises `ev_denied`.
3. **Complete.** The guest reads its HoT from mG (`cp_*`) and sends
   `{job_id, HoT, dropped}` to the gateway (`g_cp_*`).
   - A HoT that differs from mGW's own raises `ev_hot_mismatch`: data was
     changed between guest and gateway.
   - mGW then signs and sends the log and frees the slot. A dropped job
     produces no log.

## The three hashes

HoI, HoO and HoT use simple tabulation hashing (`secx_tab_hash`):

- Each meter pair holds a secret 256 × 128-bit table, loaded through `tbl_*`.
- Each byte of a 64-bit data word indexes the table, and the eight 128-bit
  codes are XORed into the word's code.
- A digest is the XOR of the codes of all its words. It therefore does not
  depend on the order in which the accesses complete.

Which words go into which hash:

| Hash | Kept in | Covers |
|---|---|---|
| HoI | mGW | read responses inside the job's input window |
| HoO | mGW | write requests inside the output window |
| HoT | both meters | the data of every request and response |

## QoS and QoE

- **QoS latency** is completion time minus start time, in cycles.
- **QoS throughput** is output bytes (8 per write to the output window)
  × 3.4 GHz / latency. A 64-cycle restoring divider in `secx_logger`
  computes it, and the result saturates at 2³² − 1 B/s.
- **QoE** is a set of 16 bins per resource and task slot. A latency `L`
  falls into bin `min(L >> 4, 15)`. Each bin is a saturating 32-bit counter.

## The log and its journey to the AC

The log follows a fixed 578-byte layout (`log_body_t` in `secx_pkg`):

| Field | Bytes | Content |
|---|---|---|
| timestamp | 16 | completion time (64-bit, zero-extended) |
| job-id | 8 | `{guest_id, counter}` |
| guest-id | 1 | gateway number |
| job-type | 1 | task code of the job command |
| QoS latency | 4 | cycles |
| QoS throughput | 4 | bytes per second |
| QoE | 256 | 4 resources × 16 bins × 32 bits, resource r bin b at bit (16r+b)·32 |
| HoI | 128 | 128-bit digest, zero-extended |
| HoO | 128 | 128-bit digest, zero-extended |
| checksum | 32 | HMAC-SHA256 of the 546 bytes above |

The key is a 256-bit log key shared by all the auditor hardware.

`secx_hmac_sha256` runs 12 SHA-256 blocks: the inner hash over
key ⊕ ipad and the 546 bytes, then the outer hash. `secx_sha256_core` does
one round per clock, so a block takes 66 cycles and a signature about 800.

The log leaves the gateway as 73 64-bit words, most significant first, with
`log_last` on the final word. `secx_log_arb` gives one gateway the path to
the AC and holds it until `last`. The grant rotates among the gateways, so
logs are never interleaved.

The AC then processes the log:

1. It buffers the log and recomputes the HMAC.
2. If the checksum matches, it copies the log into the next of 7000 slots of
   `secx_log_nvm`. The store is circular: when it is full, the oldest log is
   overwritten and `ac_overflows` counts it.
3. A bad checksum or a wrongly sized log is dropped and counted in
   `ac_rejected`.

Logs are read back by slot and word on `ac_rd_*`, with the data one cycle
later.

## Handshakes and timing rules

- All valid/ready channels transfer on a rising edge where both are high.
- Results of the meters' side ports (`ja_*`, `rq_*`, `rs_*`) come as
  `*_done` pulses at fixed latencies. These are given in each module's
  header.
- A gateway serves one request at a time from its guest.
- The gateway's channel to the guest carries job creates and responses. A
  job create goes first, and the guest must accept each message before the
  next is offered.
- `secx_meter_gw` asserts that a job create and a response never enter it in
  the same cycle: both use the send nonce. The gateway enforces this.
- Reset is asynchronous and active low everywhere. The tables, keys and
  nonce sequences must be loaded after reset, before the first job.

## Parameters

| Parameter | Default | Origin |
|---|---|---|
| `N_GUESTS` | 24 | published system |
| `T` (tasks per guest) | 4 | published |
| `R` (resources) | 4 | published |
| `NBINS` | 16 | published |
| `BIN_SHIFT` | 4 (16-cycle bins) | own choice |
| `MAX_N_REQ` (outstanding requests) | 16 | own choice |
| `TAU` (allowed crossing delay) | 16 cycles | own choice |
| `NONCE_DEPTH` | 1024 × 8 bit | published |
| `TLB_ENTRIES` / `TLB_WAYS` | 32 / 4 | published |
| `NWIN` (host address windows) | 4 | own choice |
| `NJA` (stored logs) | 7000 | published |

## Where this RTL departs from the published design

- **Not built:**
  - The RSA engine, and with it the AC's encrypted export of logs to host
    storage and to the auditor's servers.
  - The PUF-based meter authentication and the GMK distribution. The keys,
    tables and nonce seeds are loaded through ports instead.
  - The system NoC, host cores, caches and the accelerators themselves. They
    connect through the top's ports, and a log arbiter stands in for the NoC
    on the log path.
- **Completion message.** It travels in clear. The published design signs
  completion-protocol messages with SHA but gives no format for it.
- **XOR cost.** It is one cycle on each side, matching the stated two extra
  cycles per crossing. A simulation table elsewhere quotes 4 cycles.
- **Digest width.** Digests are 128 bits, as the hashing is described. The
  128-byte log fields hold them zero-extended.
- **Own choices.** Every width, handshake, encoding, bin range, id format,
  access-list format, TLB replacement policy and store policy that the
  published design leaves open is this design's own. Each is noted in the
  file that implements it.
- **Non-volatile store.** The log store is a plain synchronous array, not a
  model of resistive RAM.

## Simulating

Every testbench in `tb/` is self-checking. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. They need no files
besides `rtl/` and `tb/`. For example, with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/secx_pkg.sv tb/secx_ref_pkg.sv $(ls rtl/secx_*.sv | grep -v secx_pkg) \
  tb/secx_guest_model.sv \
  tb/tb_secx_top.sv --top-module tb_secx_top -o sim
obj_dir/sim +verilator+rand+reset+2
```

- **`tb_secx_top`** runs the whole fabric at its default size: 24 guests
  with two jobs each. It builds in about 3 minutes and runs in seconds.
  - Each guest is driven by `secx_guest_model`, a behavioural accelerator,
    host core and memory (latency 3–72 cycles).
  - The guests misbehave by number: a late request, a forged nonce,
    corrupted write data, an access outside every window and a dropped job.
  - At the end every stored log is read back from the AC and checked: its
    HMAC against a reference model, its ids, its HoI and HoO against a
    reference tabulation hash, its QoE count and its throughput.
  - The test also counts each mechanism (TLB miss, denial, timing and nonce
    errors, HoT mismatch, drop, log contention, several bins) and fails if
    one never happened.
- **`tb_secx_gateway`** puts one gateway, its guest meter and the model
  through all the misbehaviours on a single guest.
- Each building block has its own testbench:
  - The SHA-256 core is checked against the FIPS 180-4 examples. The HMAC is
    checked against a known value and a reference model, along with its
    cycle count.
  - The TLB, CAM, bins, hashing, cipher, verifier, nonce sequence, arbiter,
    store and AC are checked against simple reference models.

`tb/secx_ref_pkg.sv` holds those reference models:

- byte-level SHA-256 and HMAC;
- the tabulation table, `entry(pair, i)` from an xorshift mix;
- the memory contents, `{pa[31:0] ^ 0x5a5a5a5a, pa[31:0]}`;
- the log checks.
