// Testbench of link_receiver: random frames with correct and corrupted CRC,
// gaps between words, an 8b/10b error and a restart by sof mid-frame.
module tb_link_receiver;
  import tb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic valid = 0, sof = 0, code_err = 0;
  logic [15:0] word = '0;
  logic frame_valid, crc_ok, code_err_seen;
  logic [255:0] frame;
  int checks = 0, failures = 0, dbg_n = 0;

  always #5 clk = ~clk;

  link_receiver dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input logic [255:0] f, input int gap, input int err_word);
    for (int w = 0; w < 16; w++) begin
      @(negedge clk);
      valid = 1; sof = (w == 0); word = f[255-16*w -: 16]; code_err = (w == err_word);
      @(negedge clk);
      valid = 0; sof = 0; code_err = 0;
      repeat (gap) @(negedge clk);
    end
  endtask

  task automatic expect_frame(input logic [255:0] f, input logic ok, input logic cerr);
    int t;
    t = 0;
    do begin @(posedge clk); #1; t++; end while (!frame_valid && t < 80);
    checks++;
    if (!frame_valid || frame !== f || crc_ok !== ok || code_err_seen !== cerr) begin
      failures++;
      $display("%0t FAIL n=%0d frame_valid=%b crc_ok=%b exp %b cerr=%b exp %b", $time, dbg_n, frame_valid, crc_ok, ok, code_err_seen, cerr);
    end
  endtask

  initial begin
    logic [255:0] f;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      dbg_n = n;
      f = make_frame(16'($urandom), 16'(n), {$urandom, $urandom, $urandom, $urandom, $urandom}, (n % 7 == 0) ? $urandom : 32'd0);
      case (n % 4)
        0, 1: fork send(f, n % 3, -1); expect_frame(f, 1'b1, 1'b0); join
        2: begin
             logic [255:0] g;
             g = f;
             g[$urandom_range(255, 0)] ^= 1'b1;     // single-bit error anywhere
             fork send(g, 0, -1); expect_frame(g, 1'b0, 1'b0); join
           end
        3: fork send(f, 1, n % 16); expect_frame(f, 1'b1, 1'b1); join
      endcase
    end
    // a sof in the middle of a frame restarts it
    f = make_frame(16'h1234, 16'h0042, {5{32'hA5A5_5A5A}}, 32'd0);
    for (int w = 0; w < 7; w++) begin
      @(negedge clk); valid = 1; sof = (w == 0); word = 16'hFFFF;
    end
    @(negedge clk); valid = 0; sof = 0;
    fork send(f, 0, -1); expect_frame(f, 1'b1, 1'b0); join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
