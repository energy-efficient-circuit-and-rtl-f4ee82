// c3sram_macro -- behavioural model of a capacitive-coupling in-memory-computing
// SRAM macro (8T1C bitcells, MAC wordlines, MAC bitlines, per-column flash ADC).
//
// Behavioural model: the real macro computes on analog bitline charge. This model
// reproduces its digital function. In memory mode a whole row of COLS weight bits
// is written or read (registered read, one cycle). In MAC mode every row i
// receives a ternary input (act_en[i]=0 means 0, otherwise act_pos[i]=1 means +1
// and 0 means -1), each bitcell multiplies it with its stored weight (1 = +1,
// 0 = -1), and each column sums the 256 products (bMAC, range -ROWS..+ROWS).
// An 11-level flash ADC per column (ten comparators) then quantizes the sum
// linearly in a confined range: level = round(bMAC / ADC_STEP) clamped to -5..+5,
// returned as a 4-bit signed code. ADC_STEP = 24 places the ten references over
// bMAC -120..+120 as in the 256x64 macro; the array in the PIMCA accelerator uses
// 128 columns. A '0' input leaves both MAC wordlines at the reset level, so it
// contributes nothing, as in the macro.
// Timing: mac_en is sampled at a rising edge (reset/evaluate half cycles), the ADC
// codes appear in q one cycle later with q_valid. A disabled macro (mac_en low)
// drives all-zero codes, which is how the accelerator skips padded inputs.
// Choices of this model: idealised (no noise or offset), comparator thresholds at
// the midpoints between the 11 reconstruction levels, and reset-to-zero outputs.
module c3sram_macro #(
  parameter int ROWS     = 256,
  parameter int COLS     = 64,
  parameter int ADC_STEP = 24
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // memory mode
  input  logic                     we,
  input  logic                     re,
  input  logic [$clog2(ROWS)-1:0]  addr,
  input  logic [COLS-1:0]          wdata,
  output logic [COLS-1:0]          rdata,
  // MAC mode
  input  logic                     mac_en,
  input  logic [ROWS-1:0]          act_en,
  input  logic [ROWS-1:0]          act_pos,
  output logic signed [3:0]        q [COLS],
  output logic                     q_valid
);
  logic [COLS-1:0] mem [ROWS];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    if (re) rdata <= mem[addr];
  end

  // ideal column sum followed by the 11-level confined-linear quantizer
  function automatic logic signed [3:0] adc(input int s);
    int lvl;
    lvl = 0;
    for (int k = 0; k < 10; k++)
      if (2 * s > (2 * k - 9) * ADC_STEP) lvl++;
    return 4'(lvl - 5);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_valid <= 1'b0;
      for (int c = 0; c < COLS; c++) q[c] <= '0;
    end else begin
      q_valid <= mac_en;
      if (mac_en) begin
        for (int c = 0; c < COLS; c++) begin
          int s;
          s = 0;
          for (int r = 0; r < ROWS; r++)
            if (act_en[r]) s += (act_pos[r] == mem[r][c]) ? 1 : -1;
          q[c] <= adc(s);
        end
      end else begin
        for (int c = 0; c < COLS; c++) q[c] <= '0;
      end
    end
  end
endmodule
