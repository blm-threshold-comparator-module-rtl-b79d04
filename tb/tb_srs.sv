// Testbench of srs: 2^21 + 2^17 random 40 us values (below 2^18, the largest
// value per step the sum widths allow), enough to fill and roll the 84 s
// window. After every value each of the twelve sums is compared with the sum
// of its window taken from a prefix-sum table of the input: RS(i) at N values
// is the sum of values [E - W, E), W its window and E = N rounded down to its
// refresh period.
module tb_srs;
  import blm_pkg::*;

  localparam int NS = (1 << 21) + (1 << 17);
  localparam longint WIN [12] = '{1, 2, 8, 16, 64, 256, 2048, 16384, 32768, 131072, 524288, 2097152};
  localparam longint REF [12] = '{1, 1, 1, 1, 2, 2, 64, 64, 2048, 2048, 16384, 16384};
  localparam int BITS[12] = '{20, 22, 22, 22, 26, 26, 32, 32, 36, 36, 40, 40};

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [19:0] din = '0;
  rs_t [N_RS-1:0] rs;
  logic upd;
  int checks = 0, failures = 0;
  int hits [12];

  always #5 clk = ~clk;

  srs dut (.*);

  initial begin
    repeat (NS * 6 + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint pre [];   // pre[k] = sum of the first k values

  initial begin
    pre = new[NS + 1];
    pre[0] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NS; n++) begin
      @(negedge clk);
      in_valid = 1; din = 20'($urandom_range((1 << 18) - 1, 0));
      pre[n + 1] = pre[n] + longint'(din);
      @(negedge clk);
      in_valid = 0;
      repeat (4) @(negedge clk);      // let the slow stages settle
      for (int i = 0; i < 12; i++) begin
        longint e, b, expv;
        e = ((longint'(n) + 1) / REF[i]) * REF[i];
        b = (e > WIN[i]) ? e - WIN[i] : 0;
        expv = (pre[e] - pre[b]) & ((longint'(1) << BITS[i]) - 1);
        // check every value for the fast sums, every refresh for the slow ones
        if (i < 6 || (longint'(n) + 1) % REF[i] == 0 || n % 997 == 0) begin
          checks++;
          if (longint'(rs[i]) != expv) begin
            failures++;
            if (failures < 10) $display("FAIL n=%0d RS%0d = %0d exp %0d", n, i + 1, rs[i], expv);
          end
          if (e >= WIN[i] && (longint'(n) + 1) % REF[i] == 0) hits[i]++;
        end
      end
    end
    // every window must have been full and refreshed at least once
    for (int i = 0; i < 12; i++) begin
      checks++;
      if (hits[i] == 0) begin failures++; $display("FAIL RS%0d never full", i + 1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
