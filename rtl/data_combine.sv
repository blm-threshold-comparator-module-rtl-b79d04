// Data combine: merges the two measurements of one detector channel into a
// single charge value per 40 us step.
//
// The tunnel electronics digitise the detector current with a current-to-
// frequency converter: an integrator that is reset each time it reaches a
// threshold (one count) plus a 12-bit ADC that reads the integrator level in
// between. The charge of one step is therefore counts*4096 plus the fall of the
// ADC reading. A minimum-value hold (MVH) keeps the lowest ADC reading since the
// last count; an ADC reading above it is noise and contributes nothing, a lower
// reading contributes MVH - adc and becomes the new minimum. When counts is
// non-zero the integrator was reset, so the difference MVH - adc is negative
// and the MVH is reloaded with the new reading.
//
// The data path (delay, MVH, A-B as a signed difference sign-extended
// to 20 bits, counts appended with 12 zero LSBs, 20-bit signed addition)
// follows the system description, except that the difference is 13 bits wide:
// a 12-bit signed difference would wrap for jumps of more than 2047 ADC units,
// which occur at every count. The exact MVH update rule is this design's
// reading of the description. The 20-bit result is passed on as an unsigned charge.
//
// Timing: one result per in_valid, out_valid and dout one clock later.
// The first sample after reset only loads the MVH and gives 0.
module data_combine
  import blm_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [W_ADC-1:0]  adc,
  input  logic [W_CNT-1:0]  counts,
  output logic              out_valid,
  output logic [W_DATA-1:0] dout
);

  logic [W_ADC-1:0] mvh;      // minimum of the delayed ADC readings
  logic             primed;   // mvh holds a reading

  // A - B, with A the held minimum and B the new reading. It spans
  // -4095..+4095, so it is kept as a 13-bit signed value.
  wire logic signed [W_ADC:0]    diff     = $signed({1'b0, mvh} - {1'b0, adc});
  wire logic signed [W_DATA-1:0] diff_ext = W_DATA'(diff);
  wire logic signed [W_DATA-1:0] cnt_ext  = $signed({counts, {W_ADC{1'b0}}});
  wire logic                     below    = adc < mvh;
  wire logic                     has_cnt  = counts != '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mvh       <= '0;
      primed    <= 1'b0;
      out_valid <= 1'b0;
      dout      <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        if (!primed) begin
          dout <= '0;
          mvh  <= adc;
        end else if (has_cnt) begin
          dout <= W_DATA'(cnt_ext + diff_ext);
          mvh  <= adc;
        end else if (below) begin
          dout <= W_DATA'(diff_ext);
          mvh  <= adc;
        end else begin
          dout <= '0;
        end
        primed <= 1'b1;
      end
    end
  end

endmodule
