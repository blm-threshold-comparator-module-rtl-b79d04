// Shared constants and types of the BLM threshold comparator (BLETC) design.
//
// The card receives two tunnel cards (link pairs), each carrying 8 detector
// channels in a 256-bit frame every 40 us over a primary and a redundant link.
// The frame layout below is this design's own choice: only the 16-bit card ID,
// the frame ID, 224 data bits and the 32-bit CRC remainder are fixed by the
// system description. The running-sum windows, widths and the threshold table
// geometry (16 detectors, 32 energy levels, 12 sums) follow the system
// description.
package blm_pkg;

  localparam int unsigned N_CARD      = 2;   // link pairs per surface card
  localparam int unsigned CH_PER_CARD = 8;   // detectors per tunnel card
  localparam int unsigned N_CH        = N_CARD * CH_PER_CARD;  // 16
  localparam int unsigned N_RS        = 12;  // running sums per channel
  localparam int unsigned N_ENERGY    = 32;  // beam energy levels
  localparam int unsigned N_RS32      = 8;   // RS01..RS08 use 32-bit thresholds
  localparam int unsigned N_RS64      = 4;   // RS09..RS12 use 64-bit thresholds
  localparam int unsigned RS_W        = 40;  // widest running sum

  localparam int unsigned W_ADC  = 12;
  localparam int unsigned W_CNT  = 8;
  localparam int unsigned W_DATA = 20;       // merged detector data

  localparam int unsigned FRAME_W = 256;
  localparam int unsigned WORD_W  = 16;
  localparam int unsigned FRAME_WORDS = FRAME_W / WORD_W;

  // Frame field positions (MSB first: the first word received is 255:240).
  localparam int unsigned F_CARD_ID_LSB  = 240;
  localparam int unsigned F_FRAME_ID_LSB = 224;
  localparam int unsigned F_CH_LSB       = 64;   // channel k at F_CH_LSB + 20*k
  localparam int unsigned F_STATUS_LSB   = 32;
  localparam int unsigned F_CRC_LSB      = 0;

  localparam logic [31:0] CRC_POLY = 32'h04C1_1DB7;
  localparam logic [31:0] CRC_SEED = 32'hFFFF_FFFF;

  // Bits used by each running sum RS01..RS12.
  localparam int unsigned RS_BITS [N_RS] = '{20, 22, 22, 22, 26, 26, 32, 32, 36, 36, 40, 40};

  typedef logic [RS_W-1:0] rs_t;

  typedef struct packed {
    logic [W_CNT-1:0] counts;
    logic [W_ADC-1:0] adc;
  } ch_raw_t;

  typedef enum logic [1:0] {SEL_A = 2'd0, SEL_B = 2'd1, SEL_DUMP = 2'd2} sel_e;

  // Error flags of one processed frame of one link pair.
  typedef struct packed {
    logic sw_trig;     // signal select raised a software trigger
    logic crc_a;       // primary CRC-32 failed (or frame missing in the window)
    logic crc_b;       // redundant CRC-32 failed (or frame missing)
    logic code_a;      // 8b/10b error on the primary link
    logic code_b;      // 8b/10b error on the redundant link
    logic crc_cmp;     // the two CRC remainders differ
    logic sel_dump;    // signal select decided to dump
    logic tunnel;      // tunnel status word reports a fault
    logic card_id;     // card ID differs from the expected one
    logic frame_id;    // frame ID not previous+1 (missing frame)
  } rcc_err_t;

  localparam int unsigned N_ERR = 10;
  localparam int unsigned W_ERRCNT = 16;

  typedef struct packed {
    logic [N_CARD-1:0][N_ERR-1:0][W_ERRCNT-1:0] count;  // per card, per flag
    logic [N_CARD-1:0][W_ERRCNT-1:0]            frames;  // frames processed
    logic [N_CARD-1:0]                          failure; // failure dump held
  } status_t;

  // One CRC-32 update step over a 16-bit word, MSB first.
  function automatic logic [31:0] crc32_word(input logic [31:0] crc, input logic [15:0] w);
    logic [31:0] c;
    c = crc;
    for (int i = 15; i >= 0; i--) begin
      if (c[31] ^ w[i]) c = (c << 1) ^ CRC_POLY;
      else              c = c << 1;
    end
    return c;
  endfunction

endpackage
