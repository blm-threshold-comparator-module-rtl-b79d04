// Testbench of rcc: frame pairs through both links with every case of the
// selection table, a missing link, tunnel faults, a wrong card ID and a
// skipped frame ID. Expected outputs are derived from the scenario, not from
// the block.
module tb_rcc;
  import blm_pkg::*;
  import tb_pkg::*;

  localparam logic [15:0] CID = 16'hB1E7;

  logic clk = 0, rst_n = 0;
  logic [1:0] rx_valid = '0, rx_sof = '0, rx_code_err = '0;
  logic [1:0][15:0] rx_word = '0;
  logic [15:0] expected_card_id = CID;
  logic out_valid, data_valid, dump;
  ch_raw_t [CH_PER_CARD-1:0] ch_data;
  rcc_err_t err;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rcc #(.PAIR_TIMEOUT(64)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // send frame fa on link 0 and fb on link 1 (en selects links), link 1 skewed
  task automatic send_pair(input logic [255:0] fa, input logic [255:0] fb, input logic [1:0] en, input int skew);
    for (int c = 0; c < 16 + skew; c++) begin
      @(negedge clk);
      rx_valid = '0; rx_sof = '0;
      if (en[0] && c < 16) begin rx_valid[0] = 1; rx_sof[0] = (c == 0); rx_word[0] = fa[255-16*c -: 16]; end
      if (en[1] && c >= skew) begin rx_valid[1] = 1; rx_sof[1] = (c == skew); rx_word[1] = fb[255-16*(c-skew) -: 16]; end
    end
    @(negedge clk);
    rx_valid = '0; rx_sof = '0;
  endtask

  task automatic expect_out(input logic [159:0] chans, input logic exp_dump, input rcc_err_t exp_err);
    int t;
    t = 0;
    do begin @(posedge clk); #1; t++; end while (!out_valid && t < 200);
    checks++;
    if (!out_valid || data_valid !== !exp_err.sel_dump || dump !== exp_dump || err !== exp_err || (!exp_dump || !exp_err.sel_dump) && ch_data !== chans) begin
      failures++;
      $display("FAIL t=%0t valid=%b dump=%b/%b err=%b/%b", $time, out_valid, dump, exp_dump, err, exp_err);
    end
  endtask

  function automatic logic [159:0] rnd_chans();
    return {$urandom, $urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    logic [255:0] f, g;
    logic [159:0] ch, ch2;
    rcc_err_t e;
    logic [15:0] fid;
    fid = 16'd100;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 120; n++) begin
      int sc;
      sc = n % 10;
      ch = rnd_chans();
      e = '0;
      if (n > 0 && sc != 3 && sc != 4) e.frame_id = 1'b0;
      case (sc)
        0: begin // both good
             f = make_frame(CID, fid, ch, 0);
             fork send_pair(f, f, 2'b11, n % 5); expect_out(ch, 0, e); join
           end
        1: begin // primary corrupted: take B
             f = make_frame(CID, fid, ch, 0); g = f; g[100 + n] ^= 1;
             e.crc_a = 1; e.sw_trig = 1;
             fork send_pair(g, f, 2'b11, 2); expect_out(ch, 0, e); join
           end
        2: begin // redundant corrupted: take A
             f = make_frame(CID, fid, ch, 0); g = f; g[40 + n] ^= 1;
             e.crc_b = 1; e.sw_trig = 1;
             fork send_pair(f, g, 2'b11, 0); expect_out(ch, 0, e); join
           end
        3: begin // both corrupted: dump, frame not used
             f = make_frame(CID, fid, ch, 0); g = f; g[200] ^= 1; f[40] ^= 1;
             e.crc_a = 1; e.crc_b = 1; e.sw_trig = 1; e.sel_dump = 1;
             fork send_pair(f, g, 2'b11, 1); expect_out(ch, 1, e); join
             fid--;   // this frame ID was not accepted
           end
        4: begin // both CRCs valid but different: dump
             ch2 = ch ^ 160'h1;
             f = make_frame(CID, fid, ch, 0); g = make_frame(CID, fid, ch2, 0);
             e.crc_cmp = 1; e.sw_trig = 1; e.sel_dump = 1;
             fork send_pair(f, g, 2'b11, 0); expect_out(ch, 1, e); join
             fid--;
           end
        5: begin // redundant link silent: timeout, take A
             f = make_frame(CID, fid, ch, 0);
             e.crc_b = 1; e.sw_trig = 1;
             fork send_pair(f, f, 2'b01, 0); expect_out(ch, 0, e); join
           end
        6: begin // tunnel fault: data used, dump requested
             f = make_frame(CID, fid, ch, 32'h0000_0100);
             e.tunnel = 1;
             fork send_pair(f, f, 2'b11, 0); expect_out(ch, 1, e); join
           end
        7: begin // wrong card ID: reported only
             f = make_frame(CID ^ 16'h0400, fid, ch, 0);
             e.card_id = 1;
             fork send_pair(f, f, 2'b11, 3); expect_out(ch, 0, e); join
           end
        8: begin // a frame was lost: frame ID skips one
             fid++;
             f = make_frame(CID, fid, ch, 0);
             e.frame_id = 1;
             fork send_pair(f, f, 2'b11, 0); expect_out(ch, 0, e); join
           end
        default: begin // 8b/10b error on the primary link
             f = make_frame(CID, fid, ch, 0);
             e.code_a = 1;
             fork
               begin repeat (4) @(negedge clk); rx_code_err[0] = 1; @(negedge clk); rx_code_err[0] = 0; end
               send_pair(f, f, 2'b11, 0);
               expect_out(ch, 0, e);
             join
           end
      endcase
      fid++;
      repeat (100) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
