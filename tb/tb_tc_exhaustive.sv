// Exhaustive threshold test of blm_tc_top at its default parameters: every one
// of the 6144 threshold table fields (16 detectors x 32 energy levels x 12
// running sums) is shown to be able to trigger a dump request.
//
// Both tunnel-card models first send 16389 steps of constant data (channel k
// sends 1..3 counts per step with a constant ADC reading, so after the first
// step each detector delivers a fixed charge v per step), which leaves every
// running sum, RS12 included, non-zero. Then the frames stop and all sums hold
// still. The expected value of each sum is worked out here from the window and
// refresh period of each running sum.
//
// Each iteration starts from a table of thresholds no sum can exceed and
// changes two fields of the targeted (detector, sum): at the energy under test
// the threshold is the sum minus one, at the next energy it equals the sum.
// The table is reloaded from the NV-RAM model through reload_req. The test
// then checks:
// - at the energy under test, dump_req names only that detector, and the
//   permits follow the masking table;
// - at the next energy, nothing is requested (the comparison is strict) and
//   both permits are given.
// The changed words and the masking word are also read back from the card.
// The masking word is random, except that detector 0 is unconnected and
// detector 1 maskable. Every running sum, every energy level and each masking
// class must have tripped at least once.
module tb_tc_exhaustive;
  import blm_pkg::*;
  import tb_pkg::*;

  localparam int DIV     = 4;        // permit_output default half period
  localparam longint N_STEPS = 16389;  // steps sent before the sums are frozen
  localparam logic [31:0] T_NONE32 = 32'hFFFF_FFFF;
  localparam logic [63:0] T_NONE64 = 64'h0000_00FF_FFFF_FFFF;
  localparam longint WIN [12] = '{1, 2, 8, 16, 64, 256, 2048, 16384, 32768, 131072, 524288, 2097152};
  localparam longint REF [12] = '{1, 1, 1, 1, 2, 2, 64, 64, 2048, 2048, 16384, 16384};

  logic clk = 0, rst_n = 0;
  logic [1:0][1:0] rx_valid = '0, rx_sof = '0, rx_code_err = '0;
  logic [1:0][1:0][15:0] rx_word = '0;
  logic [1:0][15:0] expected_card_id = {16'h5A01, 16'h5A00};
  logic [4:0] beam_energy = '0;
  logic [13:0] nv_addr;
  logic nv_rd;
  logic [31:0] nv_rdata;
  logic reload_req = 0;
  logic [13:0] tbl_rd_addr = '0;
  logic [31:0] tbl_rd_data;
  logic permit_in_unmask = 1, permit_in_mask = 1;
  logic permit_out_unmask, permit_out_mask;
  logic [7:0] max_rd_addr = '0;
  rs_t max_rd_data;
  logic max_second_done;
  logic [15:0] dump_req;
  logic table_ok;
  status_t status;
  logic [1:0] err_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  nvram_model nv (.clk, .addr(nv_addr), .rd(nv_rd), .rdata(nv_rdata));
  blm_tc_top dut (.*);

  initial begin
    repeat (80_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- permit line monitors: given = toggled recently ------------------------
  int since_u = 1000, since_m = 1000;
  logic last_u = 0, last_m = 0;
  always @(posedge clk) begin
    since_u = (permit_out_unmask != last_u) ? 0 : since_u + 1;
    since_m = (permit_out_mask   != last_m) ? 0 : since_m + 1;
    last_u = permit_out_unmask; last_m = permit_out_mask;
  end
  wire given_u = since_u <= DIV + 1;
  wire given_m = since_m <= DIV + 1;

  // ---- tunnel-card models ------------------------------------------------------
  int          cnt [16];
  logic [15:0] fid [2] = '{16'd0, 16'd0};

  task automatic send_card(int card);
    logic [255:0] f;
    logic [159:0] ch;
    for (int k = 0; k < 8; k++) ch[20*k +: 20] = {8'(cnt[card*8+k]), 12'd1500};
    f = make_frame(expected_card_id[card], fid[card], ch, 32'd0);
    fid[card]++;
    for (int w = 0; w < 16; w++) begin
      @(negedge clk);
      rx_valid[card] = 2'b11;
      rx_sof[card] = {2{w == 0}};
      rx_word[card][0] = f[255-16*w -: 16];
      rx_word[card][1] = f[255-16*w -: 16];
    end
    @(negedge clk);
    rx_valid[card] = '0; rx_sof[card] = '0;
  endtask

  task automatic step();
    fork
      send_card(0);
      send_card(1);
    join
    repeat (4) @(negedge clk);
  endtask

  // Value of running sum rs after n inputs: the first input only primes the
  // merging filter (0), every later one is v. A running sum over window W
  // refreshed every R steps covers the inputs [e-W, e) with e = floor(n/R)*R.
  function automatic longint expected_sum(int ch, int rs, longint n);
    longint v, e, b;
    v = longint'(cnt[ch]) * 4096;
    e = (n / REF[rs]) * REF[rs];
    b = (e > WIN[rs]) ? e - WIN[rs] : 0;
    return v * ((e > 0 ? e - 1 : 0) - (b > 0 ? b - 1 : 0));
  endfunction

  // ---- tables ---------------------------------------------------------------------
  function automatic int a32(int ch, int e, int rs);
    return (ch << 8) | (e << 3) | rs;
  endfunction
  function automatic int a64(int ch, int e, int rs, int half);
    return 4096 + 2 * ((ch << 7) | (e << 2) | (rs - 8)) + half;
  endfunction

  task automatic set_thr(int ch, int e, int rs, logic [63:0] t);
    if (rs < 8) nv.mem[a32(ch, e, rs)] = t[31:0];
    else begin
      nv.mem[a64(ch, e, rs, 0)] = t[31:0];
      nv.mem[a64(ch, e, rs, 1)] = t[63:32];
    end
  endtask

  task automatic reload();
    @(negedge clk); reload_req = 1; @(negedge clk); reload_req = 0;
    @(negedge clk);
    checks++;
    if (table_ok) begin failures++; $display("FAIL table_ok stayed high on reload"); end
    wait (table_ok);
    repeat (2 * 192 + 20) @(negedge clk);   // two full sweeps
  endtask

  task automatic read_word(int a);
    @(negedge clk); tbl_rd_addr = 14'(a);
    @(negedge clk);
    checks++;
    if (tbl_rd_data !== nv.mem[a]) begin
      failures++;
      if (failures < 20) $display("FAIL read-back word %0d = %h, expected %h", a, tbl_rd_data, nv.mem[a]);
    end
  endtask

  task automatic readback(int ch, int e, int rs);
    if (rs < 8) read_word(a32(ch, e, rs));
    else begin
      read_word(a64(ch, e, rs, 0));
      read_word(a64(ch, e, rs, 1));
    end
    read_word(8192);
  endtask

  int hit_rs [12];
  int hit_e [32];
  int hit_class [3];   // unconnected, maskable, un-maskable

  task automatic expect_state(input logic [15:0] req, input logic eu, input logic em, input string what);
    checks++;
    if (dump_req !== req || given_u !== eu || given_m !== em) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s: dump_req %h permits %b%b, expected %h %b%b", what, dump_req, given_u, given_m, req, eu, em);
    end
  endtask

  initial begin
    logic [15:0] connected, maskable;
    longint s;
    int e2, cls;
    logic eu, em;

    for (int ch = 0; ch < 16; ch++) cnt[ch] = 1 + int'($urandom % 3);
    connected = 16'($urandom) & ~16'h0001;
    connected[1] = 1'b1;
    maskable = 16'($urandom);
    maskable[1] = 1'b1;
    for (int ch = 0; ch < 16; ch++)
      for (int e = 0; e < 32; e++)
        for (int rs = 0; rs < 12; rs++) set_thr(ch, e, rs, (rs < 8) ? 64'(T_NONE32) : T_NONE64);
    nv.mem[8192] = {maskable, connected};

    repeat (5) @(negedge clk);
    rst_n = 1;
    wait (table_ok);
    for (longint i = 0; i < N_STEPS; i++) step();
    repeat (2 * 192 + 20) @(negedge clk);
    expect_state(16'h0000, 1, 1, "frozen sums below the empty table");

    for (int ch = 0; ch < 16; ch++) begin
      cls = !connected[ch] ? 0 : maskable[ch] ? 1 : 2;
      eu = (cls != 2);
      em = (cls == 0);
      for (int e = 0; e < 32; e++)
        for (int rs = 0; rs < 12; rs++) begin
          s = expected_sum(ch, rs, N_STEPS);
          e2 = (e + 1) % 32;
          set_thr(ch, e, rs, 64'(s - 1));
          set_thr(ch, e2, rs, 64'(s));
          beam_energy = 5'(e);
          reload();
          readback(ch, e, rs);
          readback(ch, e2, rs);
          expect_state(16'(1) << ch, eu, em, $sformatf("detector %0d energy %0d RS%02d at sum-1", ch, e, rs + 1));
          if (dump_req === 16'(1) << ch) begin hit_rs[rs]++; hit_e[e]++; hit_class[cls]++; end
          beam_energy = 5'(e2);
          repeat (2 * 192 + 20) @(negedge clk);
          expect_state(16'h0000, 1, 1, $sformatf("detector %0d energy %0d RS%02d at sum", ch, e2, rs + 1));
          set_thr(ch, e, rs, (rs < 8) ? 64'(T_NONE32) : T_NONE64);
          set_thr(ch, e2, rs, (rs < 8) ? 64'(T_NONE32) : T_NONE64);
        end
    end

    for (int rs = 0; rs < 12; rs++) begin
      checks++;
      if (hit_rs[rs] == 0) begin failures++; $display("FAIL RS%02d never tripped", rs + 1); end
    end
    for (int e = 0; e < 32; e++) begin
      checks++;
      if (hit_e[e] == 0) begin failures++; $display("FAIL energy %0d never tripped", e); end
    end
    for (int c = 0; c < 3; c++) begin
      checks++;
      if (hit_class[c] == 0) begin failures++; $display("FAIL masking class %0d never tripped", c); end
    end
    $display("tripped: %0d unconnected, %0d maskable, %0d un-maskable", hit_class[0], hit_class[1], hit_class[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
