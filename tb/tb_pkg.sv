// Testbench helpers: a reference CRC-32 over a whole frame and a frame
// builder for the assumed 256-bit link frame
// {card ID 16, frame ID 16, 8 x {counts 8, ADC 12}, tunnel status 32, CRC 32}.
package tb_pkg;

  // Reference CRC-32 (polynomial 0x04C11DB7, seed all ones, MSB first, no
  // final inversion) over the 224 data bits, one bit at a time.
  function automatic logic [31:0] ref_crc(input logic [223:0] d);
    logic [31:0] r;
    logic        fb;
    r = '1;
    for (int i = 223; i >= 0; i--) begin
      fb = r[31] ^ d[i];
      r  = {r[30:0], 1'b0};
      if (fb) r = r ^ 32'h04C1_1DB7;
    end
    return r;
  endfunction

  function automatic logic [255:0] make_frame(input logic [15:0] card_id,
                                               input logic [15:0] frame_id,
                                               input logic [159:0] chans,
                                               input logic [31:0] tstatus);
    logic [223:0] d;
    d = {card_id, frame_id, chans, tstatus};
    return {d, ref_crc(d)};
  endfunction

endpackage
