// Receive, Check & Compare (RCC) for one tunnel card.
//
// A tunnel card sends the same frame over a primary (A) and a redundant (B)
// optical link. Each link has its own link_receiver (frame assembly and CRC-32
// check). When the first of the two frames arrives, a pairing window of
// PAIR_TIMEOUT clocks opens; the pair is evaluated when both frames are in, or
// when the window expires, in which case the missing link counts as a CRC
// error. The two CRC remainders are compared and signal_select picks A, B or a
// dump. The selected frame is then checked: tunnel status word (any set bit is
// a tunnel fault), tunnel card ID against expected_card_id, and frame ID
// against the previous frame ID plus one (missing frames). The CRC remainder,
// IDs and status are truncated away and the 8 detector channels are
// demultiplexed.
//
// The check sequence (CRC per link, CRC comparison, select, tunnel status,
// truncate, demux) and the ID checks follow the system description; the frame
// layout, the pairing window and which errors request a dump are this design's
// choices: a select dump or a tunnel fault sets dump, ID errors are reported.
//
// Timing: out_valid pulses one clock after the pair is evaluated, i.e. two
// clocks after the later frame_valid; err is valid with it. data_valid pulses
// with out_valid when a frame was selected: a dumped pair delivers no data.
module rcc
  import blm_pkg::*;
#(
  parameter int unsigned PAIR_TIMEOUT = 64
)(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [1:0]                 rx_valid,     // [0] primary A, [1] redundant B
  input  logic [1:0]                 rx_sof,
  input  logic [1:0][WORD_W-1:0]     rx_word,
  input  logic [1:0]                 rx_code_err,
  input  logic [15:0]                expected_card_id,
  output logic                       out_valid,    // a pair was evaluated (err valid)
  output logic                       data_valid,   // ... and a frame was selected (ch_data valid)
  output ch_raw_t [CH_PER_CARD-1:0]  ch_data,
  output logic                       dump,
  output rcc_err_t                   err
);

  logic [1:0]               fv;
  logic [1:0][FRAME_W-1:0]  fr;
  logic [1:0]               cok;
  logic [1:0]               cerr;

  for (genvar l = 0; l < 2; l++) begin : g_link
    link_receiver u_rx (
      .clk, .rst_n,
      .valid(rx_valid[l]), .sof(rx_sof[l]), .word(rx_word[l]), .code_err(rx_code_err[l]),
      .frame_valid(fv[l]), .frame(fr[l]), .crc_ok(cok[l]), .code_err_seen(cerr[l])
    );
  end

  // ---- pairing of the two links --------------------------------------
  logic [1:0] got;                  // links that delivered in the open window
  logic [1:0] got_ev;               // links that delivered, for the evaluation
  logic       win_open;
  logic [$clog2(PAIR_TIMEOUT+1)-1:0] win_cnt;
  logic       eval;                 // evaluate the pair this cycle

  wire [1:0] got_n   = got | fv;
  wire       timeout = win_open && (win_cnt == ($bits(win_cnt))'(PAIR_TIMEOUT - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      got      <= '0;
      got_ev   <= '0;
      win_open <= 1'b0;
      win_cnt  <= '0;
      eval     <= 1'b0;
    end else begin
      eval <= 1'b0;
      if (got_n == 2'b11 || timeout) begin
        eval     <= 1'b1;
        got_ev   <= got_n;
        got      <= '0;
        win_open <= 1'b0;
        win_cnt  <= '0;
      end else if (got_n != 2'b00) begin
        got      <= got_n;
        win_open <= 1'b1;
        win_cnt  <= win_open ? win_cnt + 1'b1 : '0;
      end
    end
  end

  // ---- compare and select ----------------------------------------------
  wire ok_a = got_ev[0] && cok[0];
  wire ok_b = got_ev[1] && cok[1];
  wire crc_equal = (fr[0][F_CRC_LSB +: 32] == fr[1][F_CRC_LSB +: 32]);
  sel_e sel;
  logic sw_trig;

  signal_select u_sel (
    .crc_ok_a(ok_a), .crc_ok_b(ok_b), .crc_equal(crc_equal),
    .sel(sel), .sw_trigger(sw_trig)
  );

  wire [FRAME_W-1:0] frame_sel = (sel == SEL_B) ? fr[1] : fr[0];
  wire [15:0] card_id  = frame_sel[F_CARD_ID_LSB  +: 16];
  wire [15:0] frame_id = frame_sel[F_FRAME_ID_LSB +: 16];
  wire [31:0] tstatus  = frame_sel[F_STATUS_LSB   +: 32];

  logic [15:0] last_fid;
  logic        fid_known;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      data_valid <= 1'b0;
      ch_data    <= '0;
      dump      <= 1'b0;
      err       <= '0;
      last_fid  <= '0;
      fid_known <= 1'b0;
    end else begin
      out_valid  <= 1'b0;
      data_valid <= 1'b0;
      if (eval) begin
        out_valid    <= 1'b1;
        data_valid   <= sel != SEL_DUMP;
        err.sw_trig  <= sw_trig;
        err.crc_a    <= !ok_a;
        err.crc_b    <= !ok_b;
        err.code_a   <= got_ev[0] && cerr[0];
        err.code_b   <= got_ev[1] && cerr[1];
        err.crc_cmp  <= got_ev == 2'b11 && !crc_equal;
        err.sel_dump <= sel == SEL_DUMP;
        if (sel == SEL_DUMP) begin
          // no trustworthy frame: report no data and request a dump
          err.tunnel   <= 1'b0;
          err.card_id  <= 1'b0;
          err.frame_id <= 1'b0;
          dump         <= 1'b1;
          ch_data      <= '0;
        end else begin
          err.tunnel   <= tstatus != '0;
          err.card_id  <= card_id != expected_card_id;
          err.frame_id <= fid_known && frame_id != last_fid + 16'd1;
          dump         <= tstatus != '0;
          last_fid     <= frame_id;
          fid_known    <= 1'b1;
          for (int k = 0; k < CH_PER_CARD; k++)
            ch_data[k] <= frame_sel[F_CH_LSB + W_DATA*k +: W_DATA];
        end
      end
    end
  end

endmodule
