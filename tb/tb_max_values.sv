// Testbench of max_values with a 5-step "second": the running sums change at
// every step (tick) and are swept like the comparator does. After every
// published second all 192 maxima are read back and compared with the maximum
// of the values of that second's steps (the value present at a boundary
// belongs to both seconds).
module tb_max_values;
  import blm_pkg::*;

  localparam int SPS = 5;
  localparam int STEPS = 6 * SPS + 2;

  logic clk = 0, rst_n = 0;
  logic [3:0] scan_ch = '0, scan_rs = '0;
  rs_t rs_value;
  logic tick = 0;
  logic [7:0] rd_addr = '0;
  rs_t rd_data;
  logic second_done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  max_values #(.SAMPLES_PER_SEC(SPS)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  rs_t v [STEPS + 1][16][12];
  int  step = 0;

  // sweep like the comparator
  always_ff @(posedge clk) begin
    if (scan_rs == 11) begin scan_rs <= 0; scan_ch <= scan_ch + 1; end
    else scan_rs <= scan_rs + 1;
  end
  assign rs_value = (scan_rs < 12) ? v[step][scan_ch][scan_rs] : '0;

  int published = 0;
  always @(posedge clk) begin
    if (second_done) begin
      #1;
      published++;
      for (int c = 0; c < 16; c++)
        for (int s = 0; s < 12; s++) begin
          rs_t m;
          m = '0;
          for (int j = (published - 1) * SPS; j <= published * SPS; j++) if (v[j][c][s] > m) m = v[j][c][s];
          rd_addr = {c[3:0], s[3:0]};
          #0.1;
          checks++;
          if (rd_data !== m) begin
            failures++;
            if (failures < 10) $display("FAIL second %0d ch %0d rs %0d: %0d exp %0d", published, c, s, rd_data, m);
          end
        end
    end
  end

  initial begin
    for (int j = 0; j <= STEPS; j++)
      for (int c = 0; c < 16; c++)
        for (int s = 0; s < 12; s++) v[j][c][s] = rs_t'({$urandom_range(255, 0), $urandom});
    // before the first second nothing is published
    repeat (3) @(negedge clk);
    checks++;
    if (rd_data !== '0) failures++;
    rst_n = 1;
    for (int j = 1; j <= STEPS; j++) begin
      repeat (400) @(negedge clk);
      tick = 1; step = j;
      @(negedge clk);
      tick = 0;
    end
    repeat (400) @(negedge clk);
    checks++;
    if (published != STEPS / SPS) begin failures++; $display("FAIL published %0d seconds", published); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
