// Signal select: decides which of the two redundant frames of a tunnel card
// is used, from the CRC-32 check of each frame and the comparison of their
// 4-byte CRC remainders.
//
// The decision table is the system's own:
//   CRC A  CRC B  CRCs equal | output
//   bad    bad    -          | dump
//   bad    ok     -          | B
//   ok     bad    -          | A
//   ok     ok     no         | dump (one of the two generators is wrong)
//   ok     ok     yes        | A (default)
// Every row except the default one also raises a software trigger (an error
// report). Purely combinational.
module signal_select
  import blm_pkg::*;
(
  input  logic crc_ok_a,
  input  logic crc_ok_b,
  input  logic crc_equal,
  output sel_e sel,
  output logic sw_trigger
);

  always_comb begin
    unique case ({crc_ok_a, crc_ok_b})
      2'b00:   sel = SEL_DUMP;
      2'b01:   sel = SEL_B;
      2'b10:   sel = SEL_A;
      default: sel = crc_equal ? SEL_A : SEL_DUMP;
    endcase
    sw_trigger = !(crc_ok_a && crc_ok_b && crc_equal);
  end

endmodule
