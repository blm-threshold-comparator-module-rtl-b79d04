// Testbench of running_sum: random values with random gaps; both sums are
// compared after every update with sums recomputed from the full input
// history. Runs the default 128/64 configuration and a small odd one.
module tb_running_sum;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [19:0] din = '0;
  logic [21:0] s_a, l_a;
  logic [15:0] s_b, l_b;
  logic upd_a, upd_b;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  running_sum dut_a (.clk, .rst_n, .in_valid, .din, .sum_short(s_a), .sum_long(l_a), .upd(upd_a));
  running_sum #(.LEN(5), .TAP(3), .W_IN(20), .W_S(16), .W_L(16)) dut_b (
    .clk, .rst_n, .in_valid, .din, .sum_short(s_b), .sum_long(l_b), .upd(upd_b));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint hist[$];

  function automatic longint wsum(int w);
    longint s;
    s = 0;
    for (int i = 0; i < w && i < hist.size(); i++) s += hist[hist.size() - 1 - i];
    return s;
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      in_valid = 1; din = 20'($urandom_range(16383, 0));
      hist.push_back(longint'(din));
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!upd_a || s_a !== 22'(wsum(64)) || l_a !== 22'(wsum(128))) begin
        failures++;
        if (failures < 10) $display("FAIL A n=%0d %0d/%0d %0d/%0d", n, s_a, wsum(64), l_a, wsum(128));
      end
      checks++;
      if (s_b !== 16'(wsum(3)) || l_b !== 16'(wsum(5))) begin
        failures++;
        if (failures < 10) $display("FAIL B n=%0d", n);
      end
      repeat ($urandom_range(2, 0)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
