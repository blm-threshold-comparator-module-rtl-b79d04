// End-to-end testbench of blm_tc_top at its default parameters.
//
// Two tunnel-card models send frames (CRC-32, card and frame IDs, 8 channels
// of counts + ADC) on both links of each pair; an NV-RAM model holds the
// tables. The ADC is held constant, so a channel sending c counts per step has
// RS01 = c*4096. The test walks through: table load at power-on, normal
// operation, a maskable, an unconnected and an un-maskable detector above
// threshold, a beam energy change, every link fault (primary or redundant CRC
// error, both bad, CRC mismatch, missing link, tunnel fault, wrong card ID,
// lost frame, each counted and strobed on err_out), a broken daisy chain, a 64-bit threshold on RS09, a table
// reload on request, the read-back of the whole reloaded table, and the
// publication of one second (25000 steps) of MAX values. Each mechanism is counted; one that never happened is a failure.
module tb_blm_tc_top;
  import blm_pkg::*;
  import tb_pkg::*;

  localparam int DIV = 4;      // permit_output default half period
  localparam logic [31:0] T_NONE32 = 32'hFFFF_FFFF;
  localparam logic [63:0] T_NONE64 = 64'h0000_00FF_FFFF_FFFF;

  logic clk = 0, rst_n = 0;
  logic [1:0][1:0] rx_valid = '0, rx_sof = '0, rx_code_err = '0;
  logic [1:0][1:0][15:0] rx_word = '0;
  logic [1:0][15:0] expected_card_id = {16'hC001, 16'hC000};
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
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanisms ------------------------------------------------------
  typedef enum int {M_LOAD, M_NORMAL, M_MASKABLE, M_UNCONNECTED, M_UNMASKABLE, M_ENERGY,
                    M_SEL_B, M_SEL_A, M_BOTH_BAD, M_CRC_MISMATCH, M_TIMEOUT, M_TUNNEL,
                    M_CARD_ID, M_FRAME_ID, M_CHAIN, M_LONG_SUM, M_RELOAD, M_READBACK, M_MAX_SECOND, M_NUM} mech_e;
  int mech [M_NUM];
  bit ok_flag = 1;   // all checks since the last counted mechanism passed

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

  task automatic check_permits(input logic eu, input logic em, input string what);
    checks++;
    if (given_u !== eu || given_m !== em) begin
      failures++; ok_flag = 0;
      $display("FAIL %s: permits %b%b expected %b%b (dump_req %h)", what, given_u, given_m, eu, em, dump_req);
    end
  endtask

  // ---- tunnel-card models -------------------------------------------------------
  int          cnt [16];             // counts per step for each channel
  logic [15:0] fid [2] = '{16'd0, 16'd0};
  int          steps0 = 0;           // steps delivered for card 0

  typedef enum int {F_OK, F_BAD_A, F_BAD_B, F_BAD_BOTH, F_MISMATCH, F_MISS_B, F_TUNNEL, F_CARD_ID, F_SKIP} fault_e;

  function automatic logic [159:0] chans(int card, int delta);
    logic [159:0] r;
    for (int k = 0; k < 8; k++) r[20*k +: 20] = {8'(cnt[card*8+k] + delta), 12'd2000};
    return r;
  endfunction

  task automatic send_card(int card, fault_e f);
    logic [255:0] fa, fb;
    logic [15:0] cid;
    if (f == F_SKIP) fid[card]++;
    cid = (f == F_CARD_ID) ? 16'hBAD0 : expected_card_id[card];
    fa = make_frame(cid, fid[card], chans(card, 0), (f == F_TUNNEL) ? 32'h0000_0004 : 32'd0);
    fb = fa;
    if (f == F_BAD_A || f == F_BAD_BOTH) fa[77] ^= 1'b1;
    if (f == F_BAD_B || f == F_BAD_BOTH) fb[130] ^= 1'b1;
    if (f == F_MISMATCH) fb = make_frame(cid, fid[card], chans(card, 1), 32'd0);
    if (f != F_BAD_BOTH && f != F_MISMATCH) fid[card]++;
    else fid[card]++;   // the tunnel card counts every frame it sends
    for (int w = 0; w < 16; w++) begin
      @(negedge clk);
      rx_valid[card] = (f == F_MISS_B) ? 2'b01 : 2'b11;
      rx_sof[card] = {2{w == 0}};
      rx_word[card][0] = fa[255-16*w -: 16];
      rx_word[card][1] = fb[255-16*w -: 16];
    end
    @(negedge clk);
    rx_valid[card] = '0; rx_sof[card] = '0;
    if (card == 0 && f != F_BAD_BOTH && f != F_MISMATCH) steps0++;
  endtask

  // one 40 us step of both cards (card 0 may carry a fault)
  task automatic step(input fault_e f0 = F_OK);
    fork
      send_card(0, f0);
      send_card(1, F_OK);
    join
    repeat (4) @(negedge clk);
  endtask

  task automatic steps(input int n);
    for (int i = 0; i < n; i++) step();
  endtask

  task automatic settle();
    repeat (500) @(negedge clk);
  endtask

  // ---- tables ---------------------------------------------------------------------
  function automatic int a32(int ch, int e, int rs);
    return (ch << 8) | (e << 3) | rs;
  endfunction
  function automatic int a64(int ch, int e, int rs, int half);
    return 4096 + 2 * ((ch << 7) | (e << 2) | (rs - 8)) + half;
  endfunction

  task automatic fill_tables(input int t_e0);
    for (int ch = 0; ch < 16; ch++)
      for (int e = 0; e < 32; e++) begin
        for (int rs = 0; rs < 8; rs++) nv.mem[a32(ch, e, rs)] = T_NONE32;
        for (int rs = 8; rs < 12; rs++) begin
          nv.mem[a64(ch, e, rs, 0)] = T_NONE64[31:0];
          nv.mem[a64(ch, e, rs, 1)] = T_NONE64[63:32];
        end
        if (e == 0) nv.mem[a32(ch, e, 0)] = 32'(t_e0 * 4096);
        if (e == 7) nv.mem[a32(ch, e, 0)] = 32'(2 * 4096);
        if (e == 9) nv.mem[a32(ch, e, 0)] = 32'(10 * 4096);
      end
    // RS09 of detector 2 at energy 9: 1000 counts
    nv.mem[a64(2, 9, 8, 0)] = 32'(1000 * 4096);
    nv.mem[a64(2, 9, 8, 1)] = 32'd0;
    // masking: detector 1 unconnected, detectors 5 and 12 maskable
    nv.mem[8192] = {16'h1022, 16'hFFFD};
  endtask

  // ---- maximum of RS01 per channel over the first second ---------------------------
  int max1 [16];
  bit max_second_seen = 0;
  always @(posedge clk) if (max_second_done) max_second_seen = 1;
  always @(posedge clk) begin
    if (dut.rcc_data_valid[0] && steps0 <= 25000)
      for (int ch = 0; ch < 16; ch++) if (cnt[ch] > max1[ch]) max1[ch] = cnt[ch];
  end

  // error strobes of card 0: one per frame pair with an error
  int strobes0 = 0, last_strobes = 0;
  always @(posedge clk) if (rst_n && err_out[0]) strobes0++;

  task automatic check_count(input int card, input int e, input int prev, input string what);
    checks++;
    if (strobes0 <= last_strobes) begin
      failures++; ok_flag = 0; $display("FAIL %s: no error strobe", what);
    end
    last_strobes = strobes0;
    checks++;
    if (int'(status.count[card][e]) != prev + 1) begin
      failures++; ok_flag = 0; $display("FAIL %s not counted (%0d -> %0d)", what, prev, status.count[card][e]);
    end
  endtask

  localparam int E_CRCA = 8, E_CRCB = 7, E_CMP = 4, E_SEL = 3, E_TUN = 2, E_CID = 1, E_FID = 0;

  initial begin
    int b;
    fill_tables(10);
    for (int ch = 0; ch < 16; ch++) cnt[ch] = 1;
    repeat (5) @(negedge clk);
    rst_n = 1;
    // power-on load of the tables
    wait (table_ok);
    if (ok_flag) mech[M_LOAD]++; ok_flag = 1;
    check_permits(0, 0, "no permit before the first frames");

    steps(5); settle();
    check_permits(1, 1, "normal operation"); if (ok_flag) mech[M_NORMAL]++; ok_flag = 1;

    // energy 9 before RS09 was first refreshed: no request
    beam_energy = 9; steps(3); settle();
    check_permits(1, 1, "energy 9, long sum not yet refreshed");
    beam_energy = 0;

    cnt[12] = 11; steps(5); settle();
    check_permits(1, 0, "maskable detector over threshold"); if (ok_flag) mech[M_MASKABLE]++; ok_flag = 1;
    cnt[12] = 1; steps(3); settle();
    check_permits(1, 1, "maskable detector back below");

    cnt[1] = 11; steps(5); settle();
    check_permits(1, 1, "unconnected detector over threshold"); if (ok_flag) mech[M_UNCONNECTED]++; ok_flag = 1;
    checks++;
    if (!dump_req[1]) begin failures++; ok_flag = 0; $display("FAIL no request from detector 1"); end
    cnt[1] = 1;

    cnt[3] = 11; steps(5); settle();
    check_permits(0, 0, "un-maskable detector over threshold"); if (ok_flag) mech[M_UNMASKABLE]++; ok_flag = 1;
    cnt[3] = 1; steps(3); settle();
    check_permits(1, 1, "un-maskable detector back below");

    cnt[0] = 3; steps(5); settle();
    check_permits(1, 1, "3 counts at energy 0");
    beam_energy = 7; steps(2); settle();
    check_permits(0, 0, "3 counts at energy 7"); if (ok_flag) mech[M_ENERGY]++; ok_flag = 1;
    beam_energy = 0; cnt[0] = 1; steps(3); settle();
    check_permits(1, 1, "back to energy 0");

    // ---- link faults on card 0 ----
    checks++;
    if (strobes0 != 0) begin failures++; $display("FAIL %0d error strobes in clean operation", strobes0); end
    b = int'(status.count[0][E_CRCA]); step(F_BAD_A); settle();
    check_count(0, E_CRCA, b, "primary CRC error"); check_permits(1, 1, "primary CRC error: redundant used"); if (ok_flag) mech[M_SEL_B]++; ok_flag = 1;
    b = int'(status.count[0][E_CRCB]); step(F_BAD_B); settle();
    check_count(0, E_CRCB, b, "redundant CRC error"); check_permits(1, 1, "redundant CRC error: primary used"); if (ok_flag) mech[M_SEL_A]++; ok_flag = 1;
    b = int'(status.count[0][E_SEL]); step(F_BAD_BOTH); settle();
    check_count(0, E_SEL, b, "both CRC errors"); check_permits(0, 0, "both links bad"); if (ok_flag) mech[M_BOTH_BAD]++; ok_flag = 1;
    steps(1); settle(); check_permits(1, 1, "clean frame after both bad");
    b = int'(status.count[0][E_CMP]); step(F_MISMATCH); settle();
    check_count(0, E_CMP, b, "CRC mismatch"); check_permits(0, 0, "CRC mismatch"); if (ok_flag) mech[M_CRC_MISMATCH]++; ok_flag = 1;
    steps(1); settle();
    b = int'(status.count[0][E_CRCB]); step(F_MISS_B); settle();
    check_count(0, E_CRCB, b, "missing redundant frame"); check_permits(1, 1, "missing redundant frame"); if (ok_flag) mech[M_TIMEOUT]++; ok_flag = 1;
    b = int'(status.count[0][E_TUN]); step(F_TUNNEL); settle();
    check_count(0, E_TUN, b, "tunnel fault"); check_permits(0, 0, "tunnel fault"); if (ok_flag) mech[M_TUNNEL]++; ok_flag = 1;
    steps(1); settle();
    b = int'(status.count[0][E_CID]); step(F_CARD_ID); settle();
    check_count(0, E_CID, b, "card ID"); check_permits(1, 1, "card ID error is reported only"); if (ok_flag) mech[M_CARD_ID]++; ok_flag = 1;
    b = int'(status.count[0][E_FID]); step(F_SKIP); settle();
    check_count(0, E_FID, b, "lost frame"); check_permits(1, 1, "lost frame is reported only"); if (ok_flag) mech[M_FRAME_ID]++; ok_flag = 1;

    // ---- daisy chain ----
    permit_in_mask = 0; settle();
    check_permits(1, 0, "maskable chain open"); if (ok_flag) mech[M_CHAIN]++; ok_flag = 1;
    permit_in_mask = 1; settle();

    // ---- long sum with a 64-bit threshold ----
    while (steps0 < 2100) step();
    settle();
    check_permits(1, 1, "before energy 9");
    beam_energy = 9; settle();
    check_permits(0, 0, "RS09 of detector 2 over its 64-bit threshold");
    checks++;
    if (dump_req !== 16'h0004) begin failures++; ok_flag = 0; $display("FAIL dump_req %h", dump_req); end
    if (ok_flag) mech[M_LONG_SUM]++; ok_flag = 1;
    beam_energy = 0; settle();

    // ---- reload with a higher energy-0 threshold (20 counts) ----
    fill_tables(20);
    @(negedge clk); reload_req = 1; @(negedge clk); reload_req = 0;
    repeat (20) @(negedge clk);
    check_permits(0, 0, "during table reload");
    wait (table_ok); steps(2); settle();
    cnt[3] = 11; steps(5); settle();
    check_permits(1, 1, "11 counts below the reloaded threshold"); if (ok_flag) mech[M_RELOAD]++; ok_flag = 1;
    cnt[3] = 1;

    // ---- read-back of the loaded tables ----
    for (int a = 0; a < 8193; a++) begin
      @(negedge clk); tbl_rd_addr = 14'(a);
      @(negedge clk);
      checks++;
      if (tbl_rd_data !== nv.mem[a]) begin
        failures++; ok_flag = 0;
        $display("FAIL table read-back word %0d = %h, expected %h", a, tbl_rd_data, nv.mem[a]);
      end
    end
    if (ok_flag) mech[M_READBACK]++; ok_flag = 1;

    // ---- one second of MAX values ----
    while (steps0 < 25000 + 5) step();
    repeat (600) @(negedge clk);
    for (int ch = 0; ch < 16; ch++) begin
      max_rd_addr = {ch[3:0], 4'd0};
      #1;
      checks++;
      if (max_rd_data !== rs_t'(max1[ch] * 4096)) begin
        failures++; ok_flag = 0; $display("FAIL max RS01 of detector %0d = %0d, expected %0d", ch, max_rd_data, max1[ch] * 4096);
      end
    end
    if (max1[3] == 11 && max_second_seen && ok_flag) mech[M_MAX_SECOND]++;

    for (int m = 0; m < M_NUM; m++) begin
      checks++;
      if (mech[m] == 0) begin failures++; $display("FAIL mechanism %s never happened", mech_e'(m)); end
    end
    $display("mechanisms:");
    for (int m = 0; m < M_NUM; m++) $display("  %-16s %0d", mech_e'(m), mech[m]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
