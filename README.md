# Parallel decodable turbo code (PDTC) encoder and decoder

This is a synthesizable SystemVerilog implementation of a parallelised turbo
codec. A packet of 160 information bits is split over four banks of 40
bits. Four upper and four lower recursive systematic convolutional (RSC)
encoders code the banks. The lower encoders read through a collision-free
bank interleaver, and every encoder is terminated with two bits, which gives
512 coded bits per packet. The receiver quantises the packet to K = 6-bit
metrics. Four soft-in soft-out MAP decoders then work on the packet in
parallel for four iterations. Each iteration has two *cluster runs*: one on
the natural-order data with the upper parity, and one on the interleaved
data with the lower parity. The same four decoders serve both runs.

Default configuration:

| quantity | value |
|---|---|
| parallel MAP decoders N | 4 |
| information bits per decoder | 40 (+2 termination = 42 trellis steps) |
| packet | 160 information bits, 512 coded symbols |
| metric width K | 6 bits, range [-31, 31] |
| iterations | 4 |
| algorithm | max-log-MAP (log-MAP by parameter) |
| decoder pipeline | "Architecture-B": 4 cycles of latency, 46 cycles per 42-step block |
| decoding latency | 2 x 4 x 48 = 384 clock cycles per packet |

## Structure

```
              +-------------+
 info bits -->| pdtc_encoder|--> sys / p1 / p2 / lower-tail bits per bank and step
              +-------------+
                                (channel: outside the design)
              +--------------+   +-------------------------------------------+
 raw samples->| obs_quantiser|-->| pdtc_decoder                              |
              +--------------+   |  obs_buffer (ping-pong, d/p1/p2 x 4 banks)|
 NormMax,       q_lut --q_code-->|  pdtc_interleaver   pdtc_controller      |--> LL, hard bits
 SNR index                       |  4 x map_decoder  La / Le / LL memories   |
                                 +-------------------------------------------+
```

`turbo_top` holds the four parts. Its ports are plain signals and arrays:

* **Encoder:** `enc_wr_*` writes information bits by bank and address;
  `enc_start` starts coding; `enc_out_*` gives one step of all banks per
  cycle.
* **Receiver:** `rx_valid`, `rx_sample` and `rx_ready` carry the 512 raw
  samples of a packet, with `norm_max` and `snr_idx` alongside.
* **Results:** `dec_done` pulses when a packet is decoded. `res_valid` then
  stays high until `res_ack`. While it is high, `res_bank`/`res_addr` select
  a bit, and `res_ll`/`res_bit` return its LL value and hard decision one
  cycle later.

The encoder output is not looped back to the receiver, because the
modulation and the noise belong to the channel.

## Arithmetic

All probabilities share one K-bit signed format and one quantisation step:
observations, branch and node metrics, a priori (La), extrinsic (Le) and
a posteriori (LL) values.

* **clipsum (+):** saturating addition over [-(2^(K-1)-1), 2^(K-1)-1]. If an
  operand is already at plus_inf the result is plus_inf. Otherwise, if one
  is at minus_inf the result is minus_inf. Otherwise the sum is saturated.
  **clipsubtract (-):** a (+) (-b).
* **Branch metric:** bit b is sent as x = 1 - 2b, so a positive metric
  means 0. For input bit u and parity bit p:
  `gamma = [u = 0]La (+) x_u Qs (+) x_p Qp`.
* **Normalisation:** after every recursion step the largest of the four
  new state metrics is subtracted from all of them. This is a plain
  difference limited at minus_inf, so the best state is always exactly 0,
  even when it had saturated.
* **max\*:** with max-log-MAP, max\* is a plain max. With log-MAP, max\* is
  `max (+) LUT(|a-b|)`, read from an 8-entry table that holds
  floor(ln(1+e^(-i q))/q) for the current step q (`maxstar`, 256 rows).
* **LL and Le:** LL = max\*(u=0 terms) (-) max\*(u=1 terms). Le is formed
  the same way from alpha (+) x_p Qp (+) beta, that is, without the a priori
  and systematic parts. In exact arithmetic this equals LL - La - 2Qs. Done
  as a subtraction on saturated values, it would flip signs: under the
  clipsum rules, -inf (-) -inf = +inf.

## Parts

### pdtc_encoder
Each bank is held in a 1-bit dual-port RAM. Port A reads in natural order
for the upper encoders. Port B reads interleaved addresses for the lower
encoders: lower encoder j takes, at step t, the bit of bank (j+t) mod 4.
The code is the 4-state RSC code with feedback 1+D+D^2 and feedforward
1+D^2 (octal 7/5). After 40 steps two termination bits drive each encoder to
state 0. Outputs appear 3 cycles after a step is issued, and a packet takes
42 output cycles.

### pdtc_interleaver
The interleaver is collision-free. At step t, decoder j of the interleaved
cluster reads bank (j+t) mod 4 at address pi_b(t). Each pi_b is one of four
fixed S-random permutations of length 40 with S = 5. In every step the four
decoders therefore use four different banks, and the mapping covers all
160 bits once. At the termination steps there is no interleaving:
interleaved mode reads the lower encoder's own termination values. For
both the forward and the backward step of a cycle, the block gives the
per-bank addresses, the rotation and a termination flag one cycle later.

### obs_quantiser and q_lut
Normalisation is per packet. The quantiser stores the 512 raw samples and
finds their largest magnitude, ObsMax. A restoring divider forms
floor(NormMax 2^10 / ObsMax) in 15 cycles. Each sample is then written as
`Q = floor(y * scale / 2^10)`, limited to +-NormMax, into the free copy of
the observation buffer, and `load_done` closes the copy. NormMax is a
run-time input. `load_done` comes 15 + 512 + 4 cycles after the last
sample. The quantiser waits while both buffer copies are full, and it
accepts the next packet as soon as the transfer ends.

`q_lut` gives the quantisation step `q = (2Es/N0 + 3 sqrt(2Es/N0)) / NormMax`
as an 8-bit code with 3 integer and 5 fraction bits. It is indexed by
NormMax and by an SNR index, where Es/N0 = -10 dB + 0.25 dB x index. Only the
log-MAP correction uses q; max-log-MAP needs no SNR estimate.

### obs_buffer
The buffer holds d, p1 and p2 for each bank, in two copies (ping-pong).
The d memory has 44 words: 40 data values, 2 upper termination values and
2 lower termination values. The p1 and p2 memories have 42 words each. One
copy fills while the decoder reads the other. The forward side of the
decoders reads through port A, the backward side through port B.

### map_decoder (centre-to-top, Architecture-B)
The decoder runs the forward and backward recursions together, one step
each per cycle. Input cycle c brings step c to the forward side and step
41-c to the backward side. In cycles 0..20 only the metrics are computed,
and alpha_0..alpha_20 and beta_42..beta_22 are kept in two 21-word
memories. From cycle 21 on, each cycle produces LL and Le for steps c and
41-c, using the stored values at address 41-c. Only half the metrics are
ever stored, and a block takes 21 + 21 cycles instead of 2 x 42.

The pipeline has four register stages:
1. recursion and normalisation, with the metric memory read;
2. the alpha (+) gamma (+) beta sums and the max\* trees;
3. the LL and Le differences;
4. the output register.

Outputs leave 4 cycles after their input cycle, so a block occupies the
decoder for 46 cycles.

### pdtc_decoder and pdtc_controller
Each bank has three memories:

* **La:** a priori values, read in cluster run 1 and written in run 2.
* **Le:** extrinsic values, written in run 1 and read in run 2.
* **LL:** a posteriori values, overwritten by every run.

All three are kept in natural order. Run 2 reaches them through the
interleaver, and its results are rotated back to their home banks. One
cluster run is 48 cycles:

| cycles | what happens |
|---|---|
| 42 | step issue |
| 1 | interleaver table read |
| 1 | memory read |
| 4 | decoder pipeline |

The next run starts after the last write of the previous one. A packet
therefore takes 2 x ITER x (42 + 6) = 384 cycles. This is the pipelined
latency (D/N + 6) 2I, with the 42 trellis steps of a decoder in place of
D/N. La is forced to 0 in the first run and at the termination steps.
Decoding starts on its own once a packet is stored and the previous result
has been collected.

## Parameters

* `turbo_pkg`: N_DEC, INFO_LEN, TAIL, K, ITER, S_RANDOM. The interleaver
  tables exist for 4 x 40 only. Other sizes elaborate with a plain rotation
  table and are not S-random.
* `turbo_top` / `pdtc_decoder`: `LOG_MAP` (0 = max-log-MAP, 1 = log-MAP) and
  `ITERATIONS`.
* `obs_quantiser`: `RAW_W` (raw sample width, 12) and `F` (fraction bits of
  the scale, 10).

## Throughput

With the default sizes, a packet of 160 bits takes 384 cycles. That is
33.3 Mbit/s at 80 MHz (max-log-MAP) and 25 Mbit/s at 60 MHz (log-MAP). The
published comparison uses N = 8 (max-log-MAP) and N = 6 (log-MAP) to fill a
larger device: (160/8 + 6) x 8 = 208 cycles gives 61.5 Mbit/s at 80 MHz.
This build has N = 4, and wider configurations would need new interleaver
tables.

## Design choices not fixed by the published description

* The constituent code is 7/5 RSC. The sign convention is bit 0 -> +1.
* Normalisation is a limited plain difference, not clipsubtract (see
  Arithmetic).
* Le is computed from the parity-only terms (see Arithmetic).
* The interleaver uses the bank rotation (j + t) mod N. The tables were
  drawn once and are fixed.
* A cluster run counts 42 steps, so a packet takes 384 cycles rather than
  368.
* The quantiser floors twice (reciprocal, then product), so the largest
  sample can land one step below NormMax.
* The q table covers -10 dB to +5.75 dB in 0.25 dB steps, for NormMax 1..31.
* All handshakes (load_done, res_valid/res_ack, start/busy/done) are this
  design's own.

## Not built

* **Architecture-A:** the single-cycle datapath, which takes 42 cycles per
  block. Only the pipelined version is here.
* **PDRAC:** the parallel repeat-accumulate decoder. Its description
  stays at block level: the repetition factor, interleaver and decoder
  schedule are not given.

## Simulating

Every testbench is a plain top-level module. With Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/turbo_pkg.sv tb/tb_turbo_top.sv --top-module tb_turbo_top
./obj_dir/Vtb_turbo_top
```

Each testbench ends with a line `TB_RESULT checks=N failures=M`. The
end-to-end run at full size (eight packets) takes well under a second. The
reference models live in `tb/turbo_ref_pkg.sv`, which imports `turbo_pkg`
for the interleaver tables only.

## Verification

Every block has a self-checking testbench in `tb/`. The reference models
are independent: a plain full-length BCJR and a two-cluster iterative
decoder in `tb/turbo_ref_pkg.sv`, built from loops over integers.

* `tb_map_decoder`: both algorithms are checked bit-exact against the
  reference over 40 blocks, with heavy saturation included. Also checked:
  every step is output once, and the 46-cycle block timing.
* `tb_pdtc_decoder`: the max-log and log-MAP decoders are compared
  bit-exact with the iterative reference. Also checked: the 384-cycle
  latency, ping-pong loading, and the buffer-full case.
* `tb_turbo_top`: end-to-end at default sizes. Eight packets go through the
  encoder, a BPSK/AWGN channel model, the quantiser and the decoder. Every
  coded bit and every final LL value is compared. Also checked: error-free
  decoding at low noise, and counts of each mechanism (ping-pong, receiver
  stall, result waiting, saturation, corrected errors, latency).
* Unit tests cover the package arithmetic, max\*, the RAM, the interleaver
  (permutation, collision-free, S-random), the buffer, the controller
  schedule, the encoder, the quantiser and the q table.
