// Testbench of data_combine: a model of the tunnel integrator (ADC level that
// falls with charge and jumps back by 4096 at each count, plus upward noise)
// drives the block. Each output is checked against the merging rule, and the
// sum of all outputs against the injected charge.
module tb_data_combine;
  import blm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [11:0] adc = '0;
  logic [7:0] counts = '0;
  logic out_valid;
  logic [19:0] dout;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  data_combine dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int level, q, noise, mvh, expv;
    longint total_q, total_out;
    bit first;
    level = 3000; mvh = 0; first = 1; total_q = 0; total_out = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      int cnt;
      // charge of this step: mostly small, sometimes several counts
      q = (n % 50 == 0) ? $urandom_range(20000, 4096) : $urandom_range(40, 0);
      if (n == 0) q = 0;
      cnt = 0;
      level -= q;
      while (level < 0) begin level += 4096; cnt++; end
      noise = $urandom_range(2, 0);
      if (level + noise > 4095) noise = 0;
      @(negedge clk);
      in_valid = 1; adc = 12'(level + noise); counts = 8'(cnt);
      // reference merge
      if (first)                      expv = 0;
      else if (cnt > 0)               expv = cnt * 4096 + mvh - (level + noise);
      else if (level + noise < mvh)   expv = mvh - (level + noise);
      else                            expv = 0;
      if (first || cnt > 0 || level + noise < mvh) mvh = level + noise;
      first = 0;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || dout !== 20'(expv)) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d dout=%0d exp %0d", n, dout, expv);
      end
      total_q += longint'(q);
      total_out += longint'(dout);
    end
    // the merged data must account for the injected charge up to the noise
    checks++;
    if (total_out > total_q + 4 || total_out < total_q - 4) begin
      failures++;
      $display("FAIL total charge %0d vs %0d", total_out, total_q);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
