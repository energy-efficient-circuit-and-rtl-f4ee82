# Four energy-efficient accelerators for intelligent systems

This repository holds synthesizable SystemVerilog for four accelerators. They sit side by side in one top level, `intelligent_systems_top`. They share only clock and reset.

1. **PIMCA** is a programmable in-memory-computing DNN accelerator.
   - 108 capacitive-coupling SRAM macros of 256×128 bits, grouped into 6 processing elements (PEs) of 3×6 macros.
   - Each macro column computes a 256-input binary multiply-accumulate and digitises it with an 11-level flash ADC.
   - A configurable adder tree combines 9 or 18 macros.
   - A 256-way SIMD unit post-processes results.
   - A two-group, six-bank activation memory reads any 3×1×256 patch per cycle.
   - A small instruction processor provides repeat fields, eight nested hardware loops and a six-stage pipeline (fetch, decode, load, in-memory compute, SIMD, write-back).
2. **Vesti** is a binary/low-precision CNN accelerator built on resistive XNOR-SRAM macros.
   - Two cores of 36 macros of 256×64 bits each.
   - Each macro column evaluates a ternary XNOR-accumulate of 256 inputs. A flash ADC with ten comparators digitises it as a thermometer code.
   - Decode and LUT logic turns that code back into a bitcount.
   - A 256-lane ALU does bit-serial shift-and-accumulate, batch normalisation, binary/ReLU activation and 2×2 max-pooling.
   - A 3×3-tiled activation memory supplies any 3×3×256 window per cycle, with zero padding.
   - The two cores are double-buffered: one computes a layer while the other loads the next layer's weights.
3. **CNN learning processor** is the datapath for SGD-with-momentum training in 16-bit fixed point.
   - A 16×16 output-stationary MAC array accumulates in 22 bits.
   - A configurable 22→16-bit rounding stage follows it.
   - A 16-way SIMD unit does ReLU, mask, max and the momentum weight update.
   - A rotated 16-SRAM weight memory can read a weight block directly or transposed, as backpropagation needs.
   - A 16-SRAM interleaved input store returns any 4×4 patch with zero padding.
4. **ECG processor** does arrhythmia detection and biometric authentication.
   - A symmetric FIR filter with pre-adders (148 taps, 8-bit coefficients, 13-bit samples).
   - Threshold R-peak detection.
   - A heart-rate and heart-rate-variability unit, which compares the standard deviation of the last three rates with a threshold.
   - Four sparse neural networks with a fixed number of nonzero weights per neuron, using 29 multipliers in total.
   - A 128-entry tanh table and a 48-segment piecewise-linear 1/√x unit.
   - Cosine-similarity matching against an enrolled template.

The analog parts are written as behavioural models; each model's file says so in its first comment. These parts are the in-memory-computing bitcells, the bitline voltages and the flash ADCs (`c3sram_macro`, `xnor_sram_macro`). Each model computes the ideal count a column produces and quantises it into the same 11 levels as the real ADC. Mismatch and noise are not modelled.

## Layout

- `rtl/` holds one module or package per file, named after it:
  - `pimca_*` and `c3sram_macro`;
  - `vesti_*` and `xnor_sram_macro`;
  - `cnn_*`;
  - `ecg_*`;
  - the top level, `intelligent_systems_top`.
- `tb/` holds one self-checking testbench per module, `tb_<module>.sv`.
  - `pimca_stim`, `vesti_stim`, `cnn_stim` and `ecg_stim` are stimulus and checking programs. Both the per-accelerator testbench and the top-level testbench use them.
  - Every testbench ends with `TB_RESULT checks=<n> failures=<n>` and has a watchdog.
  - Where a latency or rate is defined, the testbench checks the cycle count.

## Running

Any testbench builds with Verilator 5, for example:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb rtl/pimca_pkg.sv rtl/vesti_pkg.sv \
    tb/tb_intelligent_systems_top.sv --top tb_intelligent_systems_top -o sim
./obj_dir/sim
```

The top-level testbench runs all four accelerators at their full default sizes in about two minutes. It fails if any mechanism never occurred. Examples of such mechanisms are hardware loops, padding, double-buffer swaps, transposed reads, momentum updates and authentication decisions.

## What is built and what is not

All listed blocks are implemented and pass their tests, except these partial ones:

- **CNN input feeder.**
  - Built: the 16 interleaved SRAMs with zero padding.
  - Not built: the two-level FIFO array that reuses inputs between convolution steps. Every patch is read from the SRAMs instead.
- **CNN top.** It sequences fully-connected forward, backward and update passes only. Convolution layer sequencing is not built.
- **ECG top.** These parts are not built:
  - the band-pass filter bank;
  - the adaptive R-peak threshold and beat alignment;
  - outlier removal;
  - beat normalisation;
  - feature-vector averaging.

  R-peaks use a fixed threshold with a 50-sample refractory period instead.
- **CNN memories.** The weight memory holds 16 × 4096 16-bit words (65,536 weights). The original chip has more than 1 MB of SRAM and trains networks with up to 131k parameters such as LeNet-5. Raise `DEPTH` in `cnn_weight_mem` to match.
- **Vesti.** The ALU has no residual (shortcut) addition, so residual networks are not supported; plain VGG-style networks and MLPs are.
- **PIMCA.** No layer-level compiler or decoder exists. Programs are written directly as instruction words.

The off-chip DRAM and the commercial ECG analog front end are outside the chips and are not modelled. Their data enter through load ports.

## Own choices

Some details had to be chosen here. They are marked as own choices in each file header:

- instruction encodings and SIMD opcodes;
- fixed-point formats (Q formats for tanh, 1/√x, heart rate and the CNN datapath);
- ADC reference levels;
- memory tiling arithmetic;
- pipeline depths.

The published sizes and counts of the original chips are the parameter defaults.

Synthesis of the full top level produces very large netlists. The main cause is the macro arrays, which are modelled as flip-flops instead of SRAM.
