# kNN-encrypted drone authentication accelerator

A drone has to prove to a server that it is registered, without revealing its
identity on the wire and without two requests looking alike. This RTL does
that with the secure k-nearest-neighbour (kNN) encryption trick. A drone's
identity is a binary vector. It is split at random under a secret bit mask
and multiplied by secret matrices. The results are *encrypted indices*:

* the registration authority (RA) encrypts each registered drone's ID `p_i`
  into `E(p_i)` and stores it on the authentication server;
* at request time the drone encrypts its own ID `q` into `E(q)` with its own key;
* the server computes the dot product `E(p_i)·E(q)` for every stored drone.

The keys are built so that all the matrices cancel inside that dot product,
which leaves the plain `p_i·q`. The server can therefore recognise the drone
without ever seeing `p_i` or `q`. All arithmetic is IEEE-754 double
precision, the number format the scheme was specified with.

The design follows the scheme of the thesis *Privacy-Aware and Hardware-Based
Acceleration Authentication Scheme for Internet of Drones* (T. E. Henson). That
work built three accelerators: the RA encryption, the drone encryption and the
server's dot-product search. It gives the algorithm, the data sizes and the
data types. It gives no microarchitecture, so the pipelines, interfaces, the
parallelism and the exact acceptance rule are this design's own choices. They
are listed under "Where this design makes its own choices".

## The algebra the hardware relies on

Let `n` be the ID length (`N_ID`). The secret of the system is:

* a bit vector `S` of length `n`;
* six random `n x n` matrices `m1, m2, n1, n2, n3, n4`, with entries in 0.01..1.

**Keys.**

* RA key: `S`, `K1 = m1·n1`, `K2 = m1·n2`, `K3 = m2·n3`, `K4 = m2·n4`.
* Drone key: `S`, `D1 = n1⁻¹·m'`, `D2 = n2⁻¹·m''`, `D3 = n3⁻¹·m'''`,
  `D4 = n4⁻¹·m''''`.
  Here `m' + m'' = m1⁻¹` and `m''' + m'''' = m2⁻¹` are random splits made anew
  for each drone. That makes every drone's key unique.

**Split.** Both sides turn their ID into two real vectors.

* RA: where `S[k] = 1`, the ID bit is copied into both vectors. Elsewhere
  `p'[k]` is random in 0.01..1 and `p''[k] = p[k] − p'[k]`.
* Drone: the same with the roles of `S = 0` and `S = 1` swapped.

**Encrypt.**

* RA: `I1 = p'·K1`, `I2 = p'·K2`, `I3 = p''·K3`, `I4 = p''·K4`. These are row
  vectors times matrices.
* Drone: `T1 = D1·q'ᵀ` … `T4 = D4·q''ᵀ`. These are matrices times column
  vectors.
* `E = [I1 I2 I3 I4]`, and likewise `[T1 … T4]`. Each index holds `4n` doubles.

**Why it works.**

```
E(p)·E(q) = p'·m1·(m'+m'')·q'ᵀ + p''·m2·(m'''+m'''')·q''ᵀ = p'·q'ᵀ + p''·q''ᵀ = p·q
```

The last step holds because at every position one side copied its bit and the
other side's two parts add up to its bit. So for binary IDs the score is the
number of common ones.

If all IDs have the same Hamming weight `W`, only a drone's own entry scores
`W`; any other registered ID scores `W−1` or less. The server therefore accepts
when `|score − target| ≤ tol`, with `target = W` and a tolerance well below 1
(for example 0.25) to absorb rounding.

The random split values are drawn fresh for every encryption. Two requests of
the same drone therefore produce different `E(q)` but the same score. This is
what makes requests unlinkable.

Key generation is not in the hardware: inverting matrices and forming their
products is RA software. The testbenches do it in `tb/knn_keygen_pkg.sv`.

## Block structure

```
iod_auth_top
├── u_ra_enc   knn_encrypt (MODE_RA)      RA: p_i → E(p_i), uploaded to the store
│     ├── mt19937        random words for the split
│     ├── knn_split      ID → (v', v'') under S
│     ├── key_store      K1..K4, four banks
│     └── knn_matvec     4 × fp64_mac lanes
├── u_dr_enc   knn_encrypt (MODE_DRONE)   drone: q → E(q), streamed to the search
├── u_store    index_store                E(p_i) of up to NUM_DRONES drones
└── u_search   dot_search                 E(q)·E(p_i), slot by slot, first match wins
      └── 4 × fp64_mac + adder tree + tolerance compare
```

Shared types and constants are in `knn_pkg`: `fp64_t`, the mode enum, and the
double constants 1.0, 0.99 and 0.01. `fp64_add` and `fp64_mul` are the
combinational double-precision operators that everything else is built from.

| Parameter | Default | Meaning |
|---|---|---|
| `N_ID` | 128 | ID length in bits. The encrypted index has `4·N_ID` doubles. Must be a power of two. |
| `NUM_DRONES` | 200 | Slots in the server's index store. |

The defaults are the configuration used for the thesis's server-side
comparison: a 512-double encrypted index searched against 200 drones. The
other evaluated ID sizes are 4, 32, 64, 256 and 512. They are the same RTL
with `N_ID` changed. An ID shorter than `N_ID` can also be zero-padded,
because padding changes no dot product.

At the default size the key store of each encryption unit holds
4 × 128 × 128 doubles (4 Mbit). The index store holds 200 × 512 doubles
(6.5 Mbit).

## Double-precision arithmetic

`fp64_add` and `fp64_mul` round to nearest, ties to even. Their results are
bit-identical to a simulator's `real` arithmetic for normal numbers, and the
testbenches check this bit for bit. Simplifications:

* subnormal inputs count as zero;
* results that underflow become +0;
* overflow gives infinity;
* NaN and infinity inputs get no special treatment.

The values in this datapath (0.01..1, sums up to a few times `N_ID`) never come
near those limits.

`fp64_mac` is the "A += X·Y" element. Stage 1 registers the product. Stage 2
adds it into the accumulator, or loads it when `in_first` is set. It accepts
one term per cycle, and a sum is ready two cycles after its `in_last` term.
The adder and multiplier are single-cycle combinational logic. That is fine
in simulation and synthesis, but it is a long path; a fast FPGA build would
pipeline them further.

## Encryption unit (`knn_encrypt`)

1. **Random source.** This is `mt19937`, a standard 32-bit Mersenne Twister.
   The thesis names it as its random generator.
   * A `seed_load` pulse fills the 624-word state, one word per cycle.
   * It then delivers one tempered word every two cycles, because each state
     word is twisted just before it is used.
   * A start that arrives during seeding is held until the generator is ready.
2. **Split.** `knn_split` handles one element per random word. The random
   value is `r = (1.w − 1)·0.99 + 0.01`, where `1.w` is the double in [1,2)
   whose fraction begins with the 32-bit word `w`. A word is taken for every
   element whatever `S` holds, so the run time does not depend on the key.
3. **Matrix-vector pass.** `knn_matvec` runs four MAC lanes in lock step, one
   per sub-index. Lanes 1–2 use `v'` and lanes 3–4 use `v''`.
   * For output element `o` the lanes walk `k = 0..N_ID−1`.
   * The only difference between the modes is the key address:
     `k·N_ID + o` (RA, row vector × matrix) or `o·N_ID + k` (drone,
     matrix × column vector).
4. **Output stream.** Each `out_valid` cycle carries element `out_idx` of all
   four sub-indices. That element sits at index positions `o`, `N+o`, `2N+o`
   and `3N+o`. `done` marks the last element. There is no backpressure.

Timing for one encryption, once the generator is seeded:

* about `2·N_ID` cycles of split;
* then `N_ID²` cycles of MAC issue, plus a 4-cycle pipeline.

At `N_ID = 128` that is about 16.6 k cycles.

Keys are written one double per cycle through `key_we/key_mat/key_addr/key_data`.
Element (row, col) of matrix `j` goes to address `row·N_ID + col` of bank `j`.
`S` is a plain input vector.

## Server search (`index_store`, `dot_search`)

**Index store.** The RA unit's output stream is written straight into
`index_store`, at the slot given with the RA request (`ra_slot`, latched at
start). Writing the last element of a slot makes
`registered = max(registered, slot+1)`. `srv_clear` empties the store.

**Search.** The drone unit's output stream fills the query buffer of
`dot_search`. Its `done` starts the search.

* For slots `0, 1, …` the unit streams the stored index element by element
  into four MAC lanes (one per sub-index).
* It adds the four partial sums as `(S1+S2)+(S3+S4)`, subtracts `match_target`
  and compares the magnitude with `match_tol`.
* Slots are issued back to back, so the search stops at the first hit.

Cycle counts:

* A match in slot `s` is decided `(s+1)·N_ID + 6` cycles after the search
  starts.
* A reject takes `registered·N_ID + 6` cycles.
* At the defaults the worst case is 25,606 cycles.

`auth_accept`, `auth_slot` and `auth_score` hold from `auth_done` until the
next request. The unit then spends 8 more cycles draining its pipelines before
it takes a new request. A drone request made while the server is busy is
ignored.

## Top-level ports (`iod_auth_top`)

| Group | Ports |
|---|---|
| RA side | `ra_seed`, `ra_seed_load`, `ra_key_*`, `ra_s_key`, `ra_start`, `ra_id`, `ra_slot` → `ra_busy`, `ra_done` |
| Upload stream (`E(p_i)`, what would go over the network) | `ep_valid`, `ep_idx`, `ep_data[4]` |
| Drone side | `dr_seed`, `dr_seed_load`, `dr_key_*`, `dr_s_key`, `dr_start`, `dr_id` → `dr_busy` |
| Request stream (`E(q)`) | `eq_valid`, `eq_idx`, `eq_data[4]` |
| Server | `srv_clear`, `match_target`, `match_tol` → `registered`, `auth_busy`, `auth_done`, `auth_accept`, `auth_slot`, `auth_score` |

Doubles travel as raw 64-bit words (`knn_pkg::fp64_t`). Reset (`rst_n`) is
asynchronous and active low. It clears all control state; the memories are
not reset. The network links between RA, drones and server are not modelled:
the two index streams are the points where they would attach.

## Where this design makes its own choices

* **Number format.** IEEE-754 double throughout, as specified. The rounding
  mode and the subnormal/NaN simplifications are this design's choice.
* **Parallelism.** The thesis unrolls loops where data allow but gives no
  factor. Here there are four MAC lanes per encryption unit and four in the
  search, one per sub-index.
* **Random numbers.** The thesis uses a seeded mt19937 for the key matrices and
  draws split values "at random" in 0.01..1. Using mt19937 for the split, and
  the mapping from word to value, are choices made here.
* **Acceptance rule.** The thesis accepts "if a match is found". The target and
  tolerance inputs, and the convention of equal-weight IDs that makes the
  match unique, are this design's choice.
* **Slots and occupancy.** Slots are given by the uploader, and the store
  counts "highest completed slot + 1".
* **Interfaces.** All handshakes, stream formats and reset behaviour are this
  design's choice.
* **Drone key terms.** The drone key's third and fourth terms are taken as
  `n3⁻¹·m'''` and `n4⁻¹·m''''`, with `m''' + m'''' = m2⁻¹`. Only this reading
  makes the products cancel.

Not implemented in hardware:

* key generation (random matrices, inversion, products and splits), which is
  RA software in the scheme;
* the radio network.

The resource, latency and power figures reported for the HLS versions on
Kintex UltraScale+ and Nexys A7 boards cannot be compared with this RTL cycle
for cycle. The HLS clock and schedules are not known.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends with a
`TB_RESULT checks=… failures=…` line.

| Testbench | What it checks |
|---|---|
| `tb_fp64_mac` | 3000 random dot products (mixed signs, wide exponents, cancellation), bit-exact against `real` arithmetic, plus the 2-cycle latency |
| `tb_mt19937` | Published reference outputs for seed 5489, and 3300 words for two seeds against a whole-array software model |
| `tb_knn_split` | Both modes, bit-exact against `real` arithmetic, including the extreme random words |
| `tb_key_store`, `tb_index_store` | Memory behaviour and the occupancy count |
| `tb_knn_matvec` | Both addressing modes, bit-exact sums and the `N²+4` cycle count |
| `tb_knn_encrypt` | The algebra end to end: `E(p)·E(q) = p·q` to 1e-6 with keys from a generated secret, re-encryptions that differ, and the wait for seeding |
| `tb_dot_search` | Bit-exact scores, first-match-wins, tolerance window, reject, empty store, and the `(s+1)·N+6` timing |
| `tb_iod_auth_top` | The whole scheme at 8-bit IDs and 6 slots (see below) |
| `tb_iod_auth_sizes` | Runs `tb_auth_scenario` (the scenario as a parameterised module) at 4-, 32-, 64- and 256-bit IDs with 3 to 6 slots, one size after another (about half a minute) |
| `tb_iod_auth_full` | The same scenario at the default parameters: 200 drones registered at 128-bit IDs, then authentications including a match in the last slot; a few million cycles, seconds of simulation |

The system scenario used by the last three testbenches:

* registration of every slot;
* accepted requests with the right slot, score and search time;
* an early stop on a match before the last slot;
* an unregistered ID rejected after all slots;
* a drone with a key from another secret rejected;
* the same drone twice with different `E(q)`;
* a request held off during re-seeding;
* a reject on an empty store.

Each of these events is counted, and an event that never happens fails the
test.

### Running a testbench

From the directory holding `rtl/` and `tb/`, for example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/knn_pkg.sv tb/knn_keygen_pkg.sv tb/tb_iod_auth_top.sv \
  --top-module tb_iod_auth_top -o sim
./obj_dir/sim
```

Substitute any other testbench name. The package files must come first on the
command line. `tb_iod_auth_full` finishes in seconds.

Simulated sizes: 8-bit IDs (unit and system tests), 4, 32, 64 and 256-bit
IDs with small stores (`tb_iod_auth_sizes`) and the default 128-bit IDs with
200 slots. 512-bit IDs are reached by changing `N_ID` but have not been
simulated: generating their keys in the testbench alone would take too long.
