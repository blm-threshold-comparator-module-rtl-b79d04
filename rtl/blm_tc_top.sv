// BLETC: beam loss monitor threshold comparator card, top level.
//
// Two tunnel cards each send the readings of 8 detectors every 40 us over a
// primary and a redundant optical link. Per tunnel card an rcc block checks
// both frames (CRC-32, CRC comparison, select, tunnel status, card and frame
// ID) and demultiplexes the 8 channels. Each of the 16 channels then passes a
// data_combine (counts and ADC merged into one charge value) and an srs (12
// moving sums from 40 us to 84 s). A multiplexer presents one running sum at a
// time to the threshold_comparator, which sweeps all 192 sums against the
// threshold table entry of the present beam energy, and to max_values, which
// keeps the maxima of the last second. channel_masking turns the per-detector
// requests into the maskable and the un-maskable permit; error_status
// withdraws both on a failed link pair or a tunnel fault. Each permit leaves
// the card through a permit_output as a square wave, daisy-chained with the
// permit of the previous card. table_loader fills the threshold and masking
// tables from the external NV-RAM after reset and on request; the loaded
// tables can be read back (tbl_rd_addr, same map as the NV-RAM, word 8192 the
// masking word) for the table check of the control system. err_out gives one
// strobe per link pair for every frame pair that carried an error.
//
// The partition and data flow follow the system description; interface
// details (single clock, word strobes, NV-RAM port, readout ports) are this
// design's choices. The transceivers, NV-RAM, VME interface and the
// post-mortem/capture buffers are outside this top: their signals are ports.
//
// Timing: one clock domain. A frame pair reaches the data path 2 clocks after
// its later frame completes; the sums are compared within one 192-clock sweep
// and the permits follow 2-4 clocks later.
module blm_tc_top
  import blm_pkg::*;
#(
  parameter int unsigned PERMIT_DIV      = 4,
  parameter int unsigned SAMPLES_PER_SEC = 25000,
  parameter int unsigned PAIR_TIMEOUT    = 64
)(
  input  logic                               clk,
  input  logic                               rst_n,
  // optical links: [card][link], link 0 primary, 1 redundant
  input  logic [N_CARD-1:0][1:0]             rx_valid,
  input  logic [N_CARD-1:0][1:0]             rx_sof,
  input  logic [N_CARD-1:0][1:0][WORD_W-1:0] rx_word,
  input  logic [N_CARD-1:0][1:0]             rx_code_err,
  input  logic [N_CARD-1:0][15:0]            expected_card_id,
  input  logic [4:0]                         beam_energy,
  // NV-RAM read port and table update request
  output logic [13:0]                        nv_addr,
  output logic                               nv_rd,
  input  logic [31:0]                        nv_rdata,
  input  logic                               reload_req,
  // read-back of the loaded tables, one clock latency
  input  logic [13:0]                        tbl_rd_addr,
  output logic [31:0]                        tbl_rd_data,
  // beam permit lines (daisy chain)
  input  logic                               permit_in_unmask,
  input  logic                               permit_in_mask,
  output logic                               permit_out_unmask,
  output logic                               permit_out_mask,
  // readout
  input  logic [7:0]                         max_rd_addr,
  output rs_t                                max_rd_data,
  output logic                               max_second_done,
  output logic [N_CH-1:0]                    dump_req,
  output logic                               table_ok,
  output status_t                            status,
  output logic [N_CARD-1:0]                  err_out    // strobe: a frame pair with any error
);

  // ---- receive, check & compare --------------------------------------------
  logic     [N_CARD-1:0]                  rcc_valid;
  logic     [N_CARD-1:0]                  rcc_data_valid;
  ch_raw_t  [N_CARD-1:0][CH_PER_CARD-1:0] rcc_ch;
  logic     [N_CARD-1:0]                  rcc_dump;
  rcc_err_t [N_CARD-1:0]                  rcc_err;

  for (genvar c = 0; c < N_CARD; c++) begin : g_card
    rcc #(.PAIR_TIMEOUT(PAIR_TIMEOUT)) u_rcc (
      .clk, .rst_n,
      .rx_valid(rx_valid[c]), .rx_sof(rx_sof[c]), .rx_word(rx_word[c]),
      .rx_code_err(rx_code_err[c]), .expected_card_id(expected_card_id[c]),
      .out_valid(rcc_valid[c]), .data_valid(rcc_data_valid[c]), .ch_data(rcc_ch[c]), .dump(rcc_dump[c]), .err(rcc_err[c])
    );
  end

  // ---- per-channel processing ----------------------------------------------
  rs_t [N_CH-1:0][N_RS-1:0] rs_all;

  for (genvar ch = 0; ch < N_CH; ch++) begin : g_ch
    localparam int unsigned C = ch / CH_PER_CARD;
    localparam int unsigned K = ch % CH_PER_CARD;
    logic              dc_valid;
    logic [W_DATA-1:0] dc_data;

    data_combine u_dc (
      .clk, .rst_n, .in_valid(rcc_data_valid[C]),
      .adc(rcc_ch[C][K].adc), .counts(rcc_ch[C][K].counts),
      .out_valid(dc_valid), .dout(dc_data)
    );

    srs u_srs (
      .clk, .rst_n, .in_valid(dc_valid), .din(dc_data), .rs(rs_all[ch]), .upd()
    );
  end

  // ---- running-sum multiplexer ---------------------------------------------
  logic [3:0] scan_ch, scan_rs;
  rs_t        rs_mux;

  always_comb begin
    rs_mux = (scan_rs < 4'(N_RS)) ? rs_all[scan_ch][scan_rs] : '0;
  end

  // ---- tables ------------------------------------------------------------------
  logic            tw_en;
  logic [12:0]     tw_addr;
  logic [31:0]     tw_data;
  logic [N_CH-1:0] connected, maskable;

  table_loader u_loader (
    .clk, .rst_n, .reload_req,
    .nv_addr, .nv_rd, .nv_rdata,
    .wr_en(tw_en), .wr_addr(tw_addr), .wr_data(tw_data),
    .connected, .maskable, .table_ok
  );

  // ---- threshold comparator & masking ----------------------------------------
  logic [31:0] tc_rd_data;

  threshold_comparator u_tc (
    .clk, .rst_n, .beam_energy,
    .scan_ch, .scan_rs, .rs_value(rs_mux),
    .wr_en(tw_en), .wr_addr(tw_addr), .wr_data(tw_data),
    .rd_addr(tbl_rd_addr[12:0]), .rd_data(tc_rd_data),
    .dump_req, .sweep_done()
  );

  // table read-back: thresholds from the comparator, word 8192 the masking word
  logic        rd_mask_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_mask_q <= 1'b0;
    else        rd_mask_q <= tbl_rd_addr[13];
  end
  assign tbl_rd_data = rd_mask_q ? {maskable, connected} : tc_rd_data;

  logic tc_permit_unmask, tc_permit_mask;

  channel_masking u_mask (
    .clk, .rst_n, .dump_req, .connected, .maskable, .table_ok,
    .permit_unmask(tc_permit_unmask), .permit_mask(tc_permit_mask)
  );

  // ---- MAX values ------------------------------------------------------------
  max_values #(.SAMPLES_PER_SEC(SAMPLES_PER_SEC)) u_max (
    .clk, .rst_n, .scan_ch, .scan_rs, .rs_value(rs_mux),
    .tick(rcc_data_valid[0]), .rd_addr(max_rd_addr), .rd_data(max_rd_data),
    .second_done(max_second_done)
  );

  // ---- error & status reporting ----------------------------------------------
  logic sys_ok;

  error_status u_err (
    .clk, .rst_n, .err_valid(rcc_valid), .err(rcc_err), .dump(rcc_dump),
    .status, .err_out, .permit_ok(sys_ok)
  );

  // ---- permit lines ------------------------------------------------------------
  permit_output #(.DIV(PERMIT_DIV)) u_out_unmask (
    .clk, .rst_n, .permit_in(permit_in_unmask), .permit_local(tc_permit_unmask && sys_ok),
    .line_out(permit_out_unmask)
  );

  permit_output #(.DIV(PERMIT_DIV)) u_out_mask (
    .clk, .rst_n, .permit_in(permit_in_mask), .permit_local(tc_permit_mask && sys_ok),
    .line_out(permit_out_mask)
  );

endmodule
