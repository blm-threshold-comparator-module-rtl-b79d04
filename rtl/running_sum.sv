// Running sum stage: one shift register feeding two moving-sum windows.
//
// Each new value is written into a circular buffer of LEN entries. Two
// accumulators hold the sum of the last TAP and of the last LEN values: on
// every new value they add it and subtract the value that has just left their
// window (V(n-TAP) and V(n-LEN)), so a window of any length costs one
// subtraction and one addition per step. Buffer entries that were never
// written read as zero (a fill counter), so the memory needs no reset.
// Sums wrap modulo 2^W_S / 2^W_L, which is exact as long as the true sum fits.
//
// The add/subtract structure follows the system description; the circular
// buffer in place of a physical shift register is this design's choice.
//
// Timing: on in_valid the buffer and both sums update; the new sums and upd
// are visible the next clock.
module running_sum #(
  parameter int unsigned LEN  = 128,
  parameter int unsigned TAP  = 64,
  parameter int unsigned W_IN = 20,
  parameter int unsigned W_S  = 22,
  parameter int unsigned W_L  = 22
)(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [W_IN-1:0] din,
  output logic [W_S-1:0]  sum_short,
  output logic [W_L-1:0]  sum_long,
  output logic            upd
);

  localparam int unsigned AW = (LEN > 1) ? $clog2(LEN) : 1;

  logic [W_IN-1:0] mem [LEN];
  logic [AW-1:0]   wp;                       // next slot to write = oldest entry
  logic [AW:0]     fill;                     // number of valid entries, saturates at LEN

  // slot of V(n-TAP): TAP positions behind the write pointer
  wire [AW:0] tap_raw = {1'b0, wp} + (AW+1)'(LEN - TAP);
  wire [AW-1:0] tap_ptr = AW'((tap_raw >= (AW+1)'(LEN)) ? tap_raw - (AW+1)'(LEN) : tap_raw);

  wire [W_IN-1:0] old_s = (fill >= (AW+1)'(TAP)) ? mem[tap_ptr] : '0;
  wire [W_IN-1:0] old_l = (fill >= (AW+1)'(LEN)) ? mem[wp]      : '0;

  always_ff @(posedge clk) begin
    if (in_valid) mem[wp] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp        <= '0;
      fill      <= '0;
      sum_short <= '0;
      sum_long  <= '0;
      upd       <= 1'b0;
    end else begin
      upd <= in_valid;
      if (in_valid) begin
        wp        <= (wp == AW'(LEN - 1)) ? '0 : wp + 1'b1;
        if (fill != (AW+1)'(LEN)) fill <= fill + 1'b1;
        sum_short <= sum_short + W_S'(din) - W_S'(old_s);
        sum_long  <= sum_long  + W_L'(din) - W_L'(old_l);
      end
    end
  end

endmodule
