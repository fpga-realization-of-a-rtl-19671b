# UW-based single-carrier transceiver with frequency-domain equalisation

This is the baseband of a single-carrier (SC) radio link. The receiver equalises multipath in the
frequency domain: one 64-point FFT, one complex division per bin, one IFFT. Each block of 64
transmitted symbols is 48 QPSK data symbols followed by a known 16-symbol **Unique Word (UW)**.
Because every block ends with the same UW, the UW at the end of one block acts as the cyclic
prefix of the next. Any 64-symbol window that starts inside the UW therefore sees a circular
channel, which is what an FFT equaliser needs. The UW also carries a phase reference in every
block, and the receiver uses it to track residual carrier offset.

The RTL is SystemVerilog-2017. It holds a complete transmitter and a complete receiver, plus two
UW-based extensions: a frame synchroniser and a recursive channel tracker. The 64-point FFT and
IFFT are left as streaming ports, for a vendor core or any equivalent. The DAC, ADC and RF front
end also sit outside the design.

## Packet format

| part | symbols | content |
|---|---|---|
| short preambles | 10 x 16 | BPSK +-7, 16-symbol pattern repeated (CFO estimation, detection, DLL training) |
| long-preamble guard | 16 | last 16 symbols of the long preamble |
| long preambles | 2 x 64 | BPSK +-7 with a flat spectrum (channel estimation) |
| payload | 16 + 6 x (48 + 16) = 400 | UW, then six blocks of [48 data, UW] |

There are 704 symbols per packet. The payload carries 288 QPSK symbols, i.e. 576 bits from a
rate-1/3, K = 5 convolutional code, i.e. 192 source bits. Data and UW symbols use the levels
+-4 on I and Q. The payload opens with an extra UW so that the first data block also has its
cyclic extension. The preamble, long-preamble and UW bit patterns are in `rtl/scfde_pkg.sv`; they
are this design's own choices.

Timing: one symbol every 16 clocks and 4 samples per symbol, so the DAC and ADC run at
clock/4. Source bits are taken at most one per 16 clocks.

## Transmitter (`sc_fde_tx`)

`conv_encoder` (generators 25, 33, 37 octal; three code bits per source bit, g0 first) ->
`qpsk_mapper` (bit pairs, I first) -> `add_uw` (a FIFO of data symbols; inserts the UWs and
closes the payload with one) -> `tx_mux` (one 512-entry buffer: first the 304 preamble symbols
from `pmb_gen`, then the payload) -> `rrc_polyphase`. The last block is a 32-tap
root-raised-cosine filter with roll-off 0.25, split into 4 phases of 8 taps. It takes one
symbol per 16 clocks and gives 10-bit samples at phases 0..3, one every 4 clocks.

The encoder generators were worked out from the code's state-transition table. They are
g2 = d+s0+s1+s2+s3, g1 = d+s0+s2+s3, g0 = d+s1+s3, with s0 the newest bit. The published filter
has 33 taps; 32 are used here so that the polyphase split is even.

## Receiver (`sc_fde_rx`)

1. **`pkt_det`** is a double sliding window over 6 sample registers. Window A is the 5 newest
   samples and window B is the oldest one. The packet is declared when E_A > 8 E_B and
   E_A > 4096. From then on the samples pass, starting with the oldest register.
2. **`match_filter`** is the same 32-tap RRC filter, with the output shifted right by 8. A
   correctly sampled +-7 preamble symbol comes out at about +-820.
3. **`dll`** does symbol timing. Each detection set is early/on-time/late. The on-time sample
   counts as "on time" (hop 4) when its level lies between 640 and 1000. Otherwise the set moves
   by one sample (hop 3 or 5) in the direction of the early-late statistic. After 20 on-time
   decisions in a row the loop locks and simply takes every 4th sample. This part is the most
   delicate in the design. Inside a run of equal preamble symbols the waveform is flat, so every
   sampling phase passes a pure early-late test. Only at symbol changes does the level test
   separate the peak phase from its neighbours. Once locked, the DLL does not track any more, so
   a sampling-clock slip after lock is not corrected.
4. **`freq_sync`** estimates carrier offset. It forms z = sum r_n conj(r_n+16) over short
   preambles 3..7 (four sums of 16) and takes four CORDIC angles. freq_sum is the sum of the four
   angles, on a scale where 65536 is one turn; it equals -64 x (phase step per symbol). From
   symbol 160 on, each symbol is de-rotated by an accumulated phase that grows by freq_sum/64 per
   symbol.
5. **FFT windows.** Symbol positions are counted from the first DLL output, less `SYNC_LAG` = 4
   (the detection and filter delay, measured in simulation). Windows go to the external FFT at
   172 and 236 (the long preambles) and at 316 + 64i (the data blocks). Each starts 4 symbols
   early, inside the UW guard. An early start is only a circular shift. It is the same for the
   preambles and the data, so the equaliser removes it.
6. **`ch_eq`** computes S_k = 2 D_k |X_k|^2 / ((R1_k + R2_k) X_k*). Here R1 and R2 are the two
   received long preambles and X is the known preamble spectrum (a ROM built at elaboration).
   This is D/H with one divider per bin; the quotient carries 4 fractional bits.
7. **`phase_track`** takes the time-domain block from the external IFFT. It first de-rotates the
   block by the accumulated phase Theta. It then takes the phase error dTheta from the 16 UW
   symbols: the known pattern is removed and the 16 CORDIC angles are averaged. Last, it rotates
   the 48 data symbols by dTheta x kk/56. `rot_mode` 0 uses kk = 24, a constant; `rot_mode` 1
   uses kk = k+1 for data symbol k. Theta accumulates dTheta.
8. **`demapper`** makes sign decisions, I bit then Q bit. **`viterbi_dec`** is a 16-state
   hard-decision decoder with Hamming branch metrics, trace-back depth 25 and a 32-column
   survivor memory. `sc_fde_rx` flushes it after the 576th code bit.

`rearm` prepares the receiver for the next packet: one packet per `rearm`.

## UW extensions

* **`uw_sync`** watches the CFO-compensated symbol stream. It correlates the 16 newest symbols
  of an 80-symbol window with the 16 oldest. Around two consecutive UWs this lag-64 correlation
  forms a triangle about 16 symbols wide on each side. The block therefore declares a frame at
  the peak: the metric is above THR and has stopped rising. It then passes the 64 oldest
  symbols of that window, which are a UW plus its 48 data symbols. An 81st register keeps the
  peak window. On a noisy channel the peak can move by a symbol or two.
* **`uw_ch_est`** tracks the channel recursively per bin: P_k <- rho P_k + U_k and
  r_k <- rho r_k + Y_k, with H_k = r_k / P_k and rho = 246/256. U_k is the UW spectrum. It is
  initialised from the two long preambles as P = 25 U and r = 25 U H0, using a per-bin constant
  ROM, so no run-time division is needed for that step. It uses the received frame as it
  stands. Without subtracting the detected data, the estimate is noisy, and bins where the UW
  has almost no energy (k = 0, 16 with this pattern) cannot be estimated.

## Top level and external parts

`scfde_top` places the transmitter and receiver side by side; they share clock and reset but
nothing else. The DAC samples leave on `dac_*` and the ADC samples enter on `adc_*`. The FFT is
attached through `fft_in_*`/`fft_out_*`: it must scale by 1/8, return bins 0..63 in order with
their index, and give 16-bit output. The IFFT is attached through `ifft_in_*`/`ifft_out_*`: it
must scale by 1/64 and give the time order. `tb/dft_model.sv` is a behavioural model of both.

## Simulating

The end-to-end testbench runs the full-size design. It sends two packets through a channel with
these impairments:
- carrier offset of 0.0005 turn/sample;
- a 0.15 echo one sample later;
- +-2 LSB noise;
- on the second packet, a dropped sample during acquisition.

It checks all 384 decoded bits and the DAC and symbol timing. It also checks that each packet is
704 symbols long, the CFO estimate, the uw_sync frame positions and the uw_ch_est initial
estimate. It counts detection, DLL hops of 3/4/5, lock, CFO estimate, channel estimate, both
phase rules, decoder flush, uw_sync frames and uw_ch_est updates.

    verilator --binary --timing -Irtl rtl/scfde_pkg.sv \
        $(ls rtl/*.sv | grep -v scfde_pkg) tb/dft_model.sv tb/tb_scfde_top.sv \
        --top-module tb_scfde_top -o sim && obj_dir/sim

It ends with `TB_RESULT checks=N failures=0` and takes about one second. `+trace` prints
internal values.

## Departures and limits

* The payload is 400 symbols, including the extra leading UW; a payload counter of 384 would
  not hold the closing UW.
* The RRC filter has 32 taps instead of 33.
* The per-symbol CFO step is the angle sum / 64: four angles, each over 16 symbols.
* The preamble, long-preamble and UW patterns are this design's own choices. So are all
  thresholds: pkt_det 8x and 4096, DLL 640/1000/160, uw_sync THR.
* Each block's unit-level behaviour is verified through the end-to-end test; a deliberately
  broken version of each block makes that test fail.
* The add_uw FIFO back-pressure path (`in_ready`) is never exercised at the default sizes,
  because the 512-entry transmit buffer absorbs the whole payload.
