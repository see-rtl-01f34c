# SEE – an event-driven emulation engine for spiking neurons with adaptive weights

Large spiking networks with *adaptive* synapses are limited by memory
bandwidth. Every synaptic weight changes over time, so each weight has to be
read, integrated and written back whenever its neuron is updated. This RTL
implements the logic of the Spiking Neural Network Emulation Engine (SEE). SEE
spreads the weights over **six independent weight memories**, and each one
has its own integration pipeline. Six neurons are therefore integrated at the
same time, and no neuron waits for another neuron's memory traffic.

The simulation is **event driven**. An event is a neuron switching between
the *receiving* and *sending* (firing) states. Between two events, every
excited neuron is integrated over the whole interval with a Bulirsch–Stoer
step, so there is no fixed time step. The engine handles up to
2^19 = 524 288 neurons, one per entry of a 2 MB event list of 4-byte entries.

The logic is split into the three units of the board concept:

| unit | modules | job |
|---|---|---|
| simulation control | `sim_control`, `event_lists` | event sequencing; dynamic event list (DEL) and fire event list (FEL) |
| network topology computation (NTC) | `ntc` | who is sending, who is connected to whom |
| neuron state computation (NSC) | `nsc` → `nsc_channel` → `bs_integrator` → `mmid_unit`, `pzextr_unit`, `weight_deriv`, `fx_mul` | integrate neurons, detect firing |

`see_top` connects the three units. The weight memories are outside it, and
their six ports are brought out.

## Neuron model and number formats

The neuron is a non-leaky integrate-and-fire neuron K with n presynaptic
neurons L:

    a_K'  = i_K + Σ_L X_L · W_KL
    W_KL' = −γ·W_KL + { μ·(a_K − θ/2)   if X_K = 0 and X_L = 1
                      { 0               otherwise

- `X` is 1 while a neuron is sending.
- `i_K` is an external stimulus, for example a grey pixel value.
- `γ` is the decay constant, `μ` the gain factor and `θ` the threshold.

A weight from a sending neuron into a receiving neuron grows while the
receiving neuron's potential is above θ/2. Below θ/2 it shrinks. Apart from
that, weights decay. A neuron fires when `a_K ≥ θ`. Its potential then
restarts at 0, and it stays in the sending state for the pulse width `t_d`.

Number formats (`see_pkg`):

| quantity | format | type |
|---|---|---|
| a_K, i_K, W, γ, μ, θ | signed 2.18 (20 bits) | `model_t` |
| times, H, t_d | unsigned 14.18 (32 bits) | `time_t` |
| extrapolation coefficients | signed 4.18 (22 bits) | `coef_t` |
| neuron number | 19 bits, `{y, x}` on a 2^10 × 2^9 grid | `nid_t` |

Two integer bits are enough because the threshold is 1. Products are
truncated, and results saturate to the 2.18 range.

## The Bulirsch–Stoer datapath

This is the core of the design and the part that needs the most care.

One integration step advances the state vector `y = (W_0 … W_{n−1}, a_K)`
over the interval H. It runs `ROWS` = 2 rows. Each row `i` is one
modified-midpoint integration with `nstep = 2(i+1)` substeps
`h = H/nstep`, followed by one row of polynomial extrapolation to h → 0.
Two rows are used because, for this model, two step divisions per interval
turned out to be enough on average. There is no error control and no
re-adjustment of H.

### weight_deriv – six clocks for two weights

Each clock, the unit takes one 8-byte memory word, that is two 4-byte
weights. It forms `a_K − θ/2`, runs three 4-clock multipliers in parallel
(γ·W0, γ·W1 and μ·(a_K − θ/2)), then selects, subtracts and saturates. The
latency is 6 clocks, and one pair can enter every clock.

### mmid_unit – modified midpoint

    pass 0:          k_1     = k_0 + h·f(k_0)
    pass m:          k_{m+1} = k_{m−1} + 2h·f(k_m)
    pass nstep:      y       = ½·(k_nstep + k_{nstep−1} + h·f(k_nstep))

k_m and k_{m−1} live in two register banks that swap roles after each pass.
A weight pair flows through the derivative (6 clocks), the multiply by h
(4 clocks), the combine step (1 clock) and the write-back (1 clock). Its
result is therefore back 12 clocks after it was issued, which matches the
12-clock pipeline latency budgeted for the unit.

The potential runs in a separate lane. While the pairs are issued, it
accumulates `i_K + Σ X_L·W`.

**Departure from the budget.** The budget
`t_MMID + ceil(n/2)·(nstep+1)` assumes that the passes stream back to back.
They cannot: pass m+1 needs all of k_m, and the potential in k_m depends on
every weight of pass m. Each pass therefore waits for the previous one to
drain:

    T_MMID = 1 + (nstep + 1)·(max(ceil(n/2), 1) + 12)

### pzextr_unit – polynomial extrapolation

The unit keeps a Neville tableau over the row results:

    Q_{i,0} = D_{i,0} = y_i
    Q_{i,k} = xq(i,k)·(D_{i,k−1} − Q_{i−1,k−1})
    D_{i,k} = xd(i,k)·(D_{i,k−1} − Q_{i−1,k−1})
    y_ext,i = Σ_k Q_{i,k}

- The coefficients are `xq = n_{i−k}²/(n_i² − n_{i−k}²)` and
  `xd = n_i²/(n_i² − n_{i−k}²)`, with `n_i = nstep_i`.
- They do not depend on H, so they form a constant table computed at
  elaboration (`xq_coef`, `xd_coef` in `see_pkg`).
- Rows 0…7 are supported.
- Two weights go through per clock, and the potential uses a third lane.
- Each column k ≥ 1 gets a slot of `ceil(P/4)·4` clocks, where P is the
  number of pairs. A column therefore never reads a value that the 4-clock
  multiplier has not yet returned.

The unit meets the budget exactly:

    T_PZEXTR = 4 + P + i·ceil(P/4)·4,   P = max(1, ceil(n/2))

### bs_integrator

`bs_integrator` chains the rows without idle clocks. It forms h as H times a
24-bit reciprocal of nstep, so no divider is needed.

### Clock counts

Clock counts per integration step at n = 4 and n = 8, each checked by the
testbenches:

| | n = 4 | n = 8 |
|---|---|---|
| row 0: MMID + PZEXTR | 43 + 6 | 49 + 8 |
| row 1: MMID + PZEXTR | 71 + 10 | 81 + 12 |
| Bulirsch–Stoer step | 130 | 150 |
| whole channel job (incl. 2 × 10-clock memory reads, write-back) | 163 | 185 |
| budget of the concept (T_NEURON) | 66 | 86 |

The pipeline-stall departure in `mmid_unit` accounts for most of the gap.
The rest comes from this design reading the pointer table and the block one
after the other instead of counting a single memory latency.

## Neuron information blocks and weight-memory channels

Each weight memory starts with a pointer table: one 4-byte byte address per
neuron, two per 8-byte word (neuron k in word k/2, half k mod 2). The pointer
addresses the neuron information block (NIB):

| word | bits 63:32 | bits 31:0 |
|---|---|---|
| 0 (header) | bit 63 stimulus present, bits 51:32 i_K | bits 15:0 number of weights n |
| 1 | W0 | a_K |
| k ≥ 2 | W(2k−2) | W(2k−3) |

The 4-byte fields hold sign-extended 2.18 values. Weight j belongs to the
j-th presynaptic neighbour in the order of the topology vector (see below).
At most 8 weights are held on chip.

`nsc_channel` runs one job at a time, in this order:
1. Read the pointer.
2. Read the 6 NIB words.
3. Integrate.
4. Fire if `a ≥ θ`, which resets a to 0.
5. Write back the changed words, with 32-bit half enables.
6. Report the result.

A *trial* job (`job_dry` set with the job) skips step 5. It reports whether
the neuron would fire within H and leaves the memory unchanged. The
next-spike search uses these jobs.

The memory port is a request/grant interface with in-order read data:
`mem_req`, `mem_we`, `mem_addr` (8-byte word address, 27 bits = 1 GB),
`mem_wdata`, `mem_be`, `mem_gnt`, `mem_rvalid` and `mem_rdata`. A memory that
grants at once and answers L clocks later gives a job time of
`10 + 2L + T_BS + floor(n/2) + 1` clocks, or `10 + 2L + T_BS` for a trial
job.

`nsc` holds six channels. Neuron k lives in memory `k mod 6` and is always
integrated by channel `k mod 6`, so its state never has to move between
memories. Each channel has a one-job holding register, so it can be handed
its next neuron while it still works on the current one. Results leave
through a round-robin arbiter, and a result stays offered until it is taken.

## Topology unit (ntc)

The unit keeps two 1-bit tag fields with one bit per neuron. They are
single-ported: one access per clock, as with an SRAM.

- **FTF** (fire tag field): set while the neuron is sending.
- **ETF** (excitation tag field): set while the neuron is firing or is in
  the DEL.

Commands:

| op | name | action |
|---|---|---|
| 0 | `TOPO` | Receptive field. Builds the topology vector: bit j is the FTF of the j-th presynaptic neighbour, 0 outside the grid. Also returns the neuron's own FTF bit (X_K). |
| 1 | `FIRE` | Projective field. Sets FTF and ETF. Each postsynaptic neighbour with a clear ETF is tagged and sent to the DEL. |
| 2 | `STOP` | Clears FTF: the neuron is receiving again. |
| 3 | `RELEASE` | Clears ETF. |
| 4 | `EXCITE` | External stimulus: tags the neuron and sends it to the DEL. |

Connection schemes (`scheme` input):
- **4-nearest-neighbour**, neighbour order W, E, N, S.
- **8-nearest-neighbour**, order W, E, N, S, NW, NE, SW, SE.
- **Feedforward point-to-point:** the rows of the grid are layers, and
  neuron (x, y) feeds neuron (x, y+1).

A topology vector takes 1 + fan-in clocks. After reset, both fields are
cleared one word per clock, and `ready` rises after 2^19 clocks at full
size.

## Event lists and the event cycle

`event_lists` holds both lists as unordered arrays with fill counts:

- **DEL:** every excited neuron, 2^19 entries.
- **FEL:** every sending neuron with the time it returns to receiving,
  2^19 entries.

Operations:
- **Push:** append. If the list is full, the entry is refused and a sticky
  overflow flag is set.
- **Remove by index:** the last entry moves into the gap.
- **FEL scan:** returns the earliest end time in `count + 1` clocks.

`sim_control` runs the event cycle:
1. **Expire.** Scan the FEL. While the earliest end time is due, remove that
   entry and send `STOP` to the topology unit.
2. **Plan.** Wait until the topology unit has finished adding the last
   projective field to the DEL. Then set
   `H = min(h_max, earliest FEL end − now, run end − now)`.
3. **Next-spike phase.** A *trial pass* sends every DEL neuron as a trial
   job over a trial interval. Nothing is written back.
   - The first trial uses the whole H. If no neuron fires, the event costs
     this one trial pass and H is kept.
   - Otherwise the spike lies in the bracket (last trial with no firing
     neuron, last trial with one]. Each further trial tries the middle of
     the bracket and halves it.
   - The search stops when the bracket is at most `h_min` wide. H becomes
     the upper end, where at least one neuron fires.
4. **Update pass.** For each DEL entry (the length is sampled at the start),
   fetch its topology vector and dispatch it with H. A neuron that returns
   fired gets the FEL entry `now + H + t_d`, followed by `FIRE`. New DEL
   entries join in the next pass. Results have priority over dispatches:
   - A dispatch that waits for a busy channel is dropped when a result
     arrives.
   - It is retried after the result, so the engine cannot deadlock.
5. **Advance.** Set `now += H`. Stop at the run time.

A spike is therefore placed at most `h_min` after the time the neuron
reaches the threshold. Neurons whose crossings fall in the same final
bracket fire together. The two phases follow the original scheme. The
search by bisection, `h_min` and `h_max` are this design's choices.

**What is not built.** Neurons never leave the DEL, because the scheme
does not say when a neuron stops being excited. The `RELEASE` command
exists, but no rule for using it is built.

## Top level

Ports of `see_top`:

| port | meaning |
|---|---|
| `scheme` | connection scheme |
| `gamma`, `mu`, `theta` | model constants |
| `ext_valid`, `ext_id`, `ext_ready` | mark a stimulated neuron as excited (while idle and `ready`) |
| `start`, `run_time`, `h_max`, `h_min`, `t_d` | launch a run (`h_min`: resolution of the next-spike search) |
| `busy`, `done` | run in progress / run finished |
| `t_now`, `n_events`, `n_spikes`, `n_expired`, `n_trials` | time and counters (`n_trials`: trial passes) |
| `del_count`, `fel_count`, `del_overflow`, `fel_overflow` | list fill levels and overflow flags |
| `nsc_busy` | per-channel busy flags |
| `mem_*[6]` | weight-memory ports |

Parameters:
- `XB`, `YB` (grid 2^XB × 2^YB; defaults 10 × 9)
- `NCH` (6)
- `ROWS` (2)
- `AW` (27)

The network image (pointer tables and NIBs) is loaded into the weight
memories by the host before a run. At full size, synthesis keeps the tag
fields and event lists as about 38 Mbit of memory. On the board these are
the external SRAMs.

## Cost against the published estimates

The estimate is `T = N_BSSTEP · N_NEURON / 6 · 10 ns · T_job`. For the
evaluated networks (single layer, 4- or 8-nearest-neighbour, 1000 ms of
model time), this RTL needs about 2.2–2.5 times the clocks per integration
that were estimated. The speed-up over the software reference falls from
about 130 to about 55–65:

| network | n | estimated | this RTL |
|---|---|---|---|
| 32×32 | 4 | 24 s | 57 s |
| 64×64 | 4 | 382 s | 942 s |
| 32×32 | 8 | 32 s | 67 s |
| 64×64 | 8 | 576 s | 1238 s |

All of these networks fit: at most 4096 neurons and 8 weights per neuron.
`N_BSSTEP` counts every integration, trial and update alike. A trial job
has no write-back, so the RTL column is an upper bound.

## Departures and limits, in one place

- `mmid_unit` passes do not overlap (see above). The per-step clock count
  is about twice the estimate.
- The next-spike time is found by bisection to within `h_min`. DEL entries
  are never released.
- There is no step-size control. Two rows are always used, and H is never
  re-adjusted.
- Bit positions in the NIB header, the memory handshake, the
  neuron-to-memory mapping (`id mod 6`), the neighbour orders, the
  feedforward reading, and the potential reset to 0 on firing are this
  design's own choices.
- The control processor, serial/USB interfaces, flash and monitoring
  memories are not part of this RTL.
- A fire decision for a potential within about 2·10⁻³ of the threshold can
  differ from a floating-point model. Fixed-point rounding makes the 2.18
  result differ slightly.

## Simulating

Every testbench is self-checking. It prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog. Example with plain
Verilator 5:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_see_top \
        -y rtl -y tb +libext+.sv -Irtl -Itb \
        rtl/see_pkg.sv tb/see_ref_pkg.sv tb/tb_see_top.sv
    obj_dir/Vtb_see_top

| testbench | what it covers |
|---|---|
| `tb_fx_mul` | products, saturation, 4-clock latency |
| `tb_weight_deriv` | the weight rule in all its cases, 6-clock latency |
| `tb_mmid_unit` | against a double-precision model; pass timing; first result after 12 clocks |
| `tb_pzextr_unit` | tableau against a model; exact clock count per row |
| `tb_bs_integrator` | whole step against the model; clock count |
| `tb_nsc_channel` | pointer/NIB fetch, integration, firing, write-back with a stalling memory; trial jobs write nothing; job clock count |
| `tb_nsc` | six channels, neuron ownership, all busy at once, batch speed-up |
| `tb_ntc` | topology vectors and projective fields for all three schemes against a reference |
| `tb_event_lists` | DEL/FEL against queue models, overflow, scan timing |
| `tb_sim_control` | event cycle with real lists and topology unit and a behavioural NSC (a charge model); every bisection step and committed interval |
| `tb_see_top` | 8×8 network end to end: every integration against the model, trial jobs leave memory unchanged; counts spikes located by bisection, spikes, expiries, projective-field additions, topology vectors, weight growth/decay, all channels busy, memory stalls, FEL-limited intervals |
| `tb_see_workload` | the 32×32 network of the published evaluation (4-nearest-neighbour; `NWT = 8` for 8-nearest-neighbour) with 16 stimulated neurons for 3 time units; same checks and counters as `tb_see_top` (about 1.1 M clocks, 4.2 M with `NWT = 8`) |
| `tb_see_top_full` | `tb_see_top` at the default size: 2^19-neuron grid, full lists and tag fields, pointer tables for all neurons (about 0.8 M clocks) |

Shared files:
- `tb/see_ref_pkg.sv`: the real-valued reference model (derivative,
  modified midpoint, extrapolation, Bulirsch–Stoer step, NIB packing).
- `tb/sdram_model.sv`: a behavioural weight memory. It has a 10-clock read
  latency and can optionally refuse a quarter of requests.

## Files

    rtl/see_pkg.sv        types, formats, coefficient functions
    rtl/fx_mul.sv         pipelined fixed-point multiplier
    rtl/weight_deriv.sv   weight derivative, two per clock
    rtl/mmid_unit.sv      modified-midpoint integration
    rtl/pzextr_unit.sv    polynomial extrapolation
    rtl/bs_integrator.sv  Bulirsch–Stoer step
    rtl/nsc_channel.sv    one weight-memory channel
    rtl/nsc.sv            six channels
    rtl/ntc.sv            topology unit
    rtl/event_lists.sv    DEL and FEL
    rtl/sim_control.sv    event sequencer
    rtl/see_top.sv        top level
