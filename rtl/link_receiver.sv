// Link receiver: frame assembly and CRC-32 check for one optical link.
//
// The transceiver delivers decoded 16-bit words with a start-of-frame flag on
// the first word. Sixteen words form one 256-bit frame: 224 data bits followed
// by the 32-bit CRC remainder. The CRC is updated word by word as the words
// arrive, so the check result is ready together with the last word.
// CRC-32 over the data bits is what the system uses; the polynomial
// (0x04C11DB7), the all-ones seed, MSB-first order and the absence of a final
// inversion are this design's choices.
//
// Timing: frame_valid pulses for one clock, the cycle after the 16th word was
// accepted; frame, crc_ok and code_err_seen are held until the next frame.
// A sof in the middle of a frame discards the partial frame and starts anew.
module link_receiver
  import blm_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 valid,
  input  logic                 sof,
  input  logic [WORD_W-1:0]    word,
  input  logic                 code_err,
  output logic                 frame_valid,
  output logic [FRAME_W-1:0]   frame,
  output logic                 crc_ok,
  output logic                 code_err_seen
);

  logic [FRAME_W-WORD_W-1:0] shreg;   // words received so far
  logic [4:0]         wcnt;      // words received in the current frame
  logic               active;    // a frame is being assembled
  logic [31:0]        crc;       // running CRC over the data words
  logic               cerr;      // 8b/10b error seen in the current frame

  wire accept  = valid && (sof || active);
  wire in_data = sof || (wcnt < 5'(FRAME_WORDS - 2));  // words 0..13 are data
  wire [31:0] crc_base = sof ? CRC_SEED : crc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg         <= '0;
      wcnt          <= '0;
      active        <= 1'b0;
      crc           <= CRC_SEED;
      cerr          <= 1'b0;
      frame_valid   <= 1'b0;
      frame         <= '0;
      crc_ok        <= 1'b0;
      code_err_seen <= 1'b0;
    end else begin
      frame_valid <= 1'b0;
      if (accept) begin
        shreg <= {shreg[FRAME_W-2*WORD_W-1:0], word};
        if (in_data) crc <= crc32_word(crc_base, word);
        cerr <= (sof ? 1'b0 : cerr) | code_err;
        if (!sof && wcnt == 5'(FRAME_WORDS - 1)) begin
          // last word: the frame is complete
          active        <= 1'b0;
          wcnt          <= '0;
          frame_valid   <= 1'b1;
          frame         <= {shreg[FRAME_W-WORD_W-1:0], word};
          crc_ok        <= ({shreg[WORD_W-1:0], word} == crc);
          code_err_seen <= cerr | code_err;
        end else begin
          active <= 1'b1;
          wcnt   <= sof ? 5'd1 : wcnt + 5'd1;
        end
      end
    end
  end

endmodule
