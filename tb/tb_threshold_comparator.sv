// Testbench of threshold_comparator: fills the whole table through the write
// port, presents running sums from a model indexed by the scan address, and
// checks the per-detector requests of complete sweeps against a reference
// for several beam energies, including sums equal to and one above their
// threshold and 40-bit sums against 64-bit thresholds. Before the sweeps, the
// whole table is read back through the read port and compared word by word.
module tb_threshold_comparator;
  import blm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [4:0] beam_energy = '0;
  logic [3:0] scan_ch, scan_rs;
  rs_t rs_value;
  logic wr_en = 0;
  logic [12:0] wr_addr = '0;
  logic [31:0] wr_data = '0;
  logic [12:0] rd_addr = '0;
  logic [31:0] rd_data;
  logic [N_CH-1:0] dump_req;
  logic sweep_done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  threshold_comparator dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint thr [16][32][12];     // reference table
  rs_t    val [16][12];         // running sums presented to the comparator

  assign rs_value = (scan_rs < 12) ? val[scan_ch][scan_rs] : '0;

  function automatic logic [15:0] expected(int e);
    logic [15:0] r;
    r = '0;
    for (int c = 0; c < 16; c++)
      for (int s = 0; s < 12; s++)
        if (longint'(val[c][s]) > thr[c][e][s]) r[c] = 1'b1;
    return r;
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // thresholds: any value, 64-bit ones above 2^32 for some entries
    for (int c = 0; c < 16; c++)
      for (int e = 0; e < 32; e++)
        for (int s = 0; s < 12; s++)
          thr[c][e][s] = (s < 8) ? longint'($urandom_range(32'h7fff_ffff, 1000))
                                 : {24'd0, 8'($urandom_range(3, 0)), 32'($urandom)};
    for (int c = 0; c < 16; c++)
      for (int e = 0; e < 32; e++)
        for (int s = 0; s < 12; s++) begin
          if (s < 8) begin
            @(negedge clk); wr_en = 1; wr_addr = 13'({c[3:0], e[4:0], s[2:0]}); wr_data = 32'(thr[c][e][s]);
          end else begin
            @(negedge clk); wr_en = 1; wr_addr = 13'(4096 + 2 * {c[3:0], e[4:0], 2'(s - 8)}); wr_data = thr[c][e][s][31:0];
            @(negedge clk); wr_en = 1; wr_addr = 13'(4096 + 2 * {c[3:0], e[4:0], 2'(s - 8)} + 1); wr_data = thr[c][e][s][63:32];
          end
        end
    @(negedge clk); wr_en = 0;
    // read-back of every word, one clock latency
    for (int a = 0; a < 8192; a++) begin
      logic [31:0] exw;
      if (a < 4096) exw = 32'(thr[a >> 8][(a >> 3) & 31][a & 7]);
      else begin
        int i;
        logic [63:0] t;
        i = (a - 4096) >> 1;
        t = 64'(thr[i >> 7][(i >> 2) & 31][8 + (i & 3)]);
        exw = (a & 1) ? t[63:32] : t[31:0];
      end
      rd_addr = 13'(a);
      @(negedge clk);
      checks++;
      if (rd_data !== exw) begin
        failures++;
        if (failures < 10) $display("FAIL read-back word %0d = %h, expected %h", a, rd_data, exw);
      end
    end
    for (int t = 0; t < 60; t++) begin
      logic [15:0] ex;
      beam_energy = 5'($urandom_range(31, 0));
      // most sums far below, a few exactly at or one above their threshold
      for (int c = 0; c < 16; c++)
        for (int s = 0; s < 12; s++) begin
          val[c][s] = rs_t'(thr[c][beam_energy][s] / 2);
          if ($urandom_range(40, 0) == 0) val[c][s] = rs_t'(thr[c][beam_energy][s]);
          if ($urandom_range(40, 0) == 0) val[c][s] = rs_t'(thr[c][beam_energy][s] + 1);
        end
      if (t == 5) val[3][11] = rs_t'(thr[3][beam_energy][11] + 1);   // a long sum over
      ex = expected(int'(beam_energy));
      // skip the sweep in progress, then check the next complete one
      @(posedge sweep_done);
      @(posedge sweep_done);
      #1;
      checks++;
      if (dump_req !== ex) begin
        failures++;
        $display("FAIL t=%0d energy=%0d dump_req=%h exp %h", t, beam_energy, dump_req, ex);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
