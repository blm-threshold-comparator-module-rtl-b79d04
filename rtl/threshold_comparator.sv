// Threshold comparator: compares every running sum of every detector with its
// threshold for the present beam energy.
//
// The threshold table holds one value per detector, energy level and running
// sum (16 x 32 x 12). As in the system's memory plan, RS01..RS08 use 32-bit
// thresholds (4096 words) and RS09..RS12 64-bit thresholds (2048 words, kept
// here as a low and a high 32-bit half), 262,144 bits in all. The comparator
// sweeps continuously over the 192 (detector, sum) pairs, one per clock: it
// drives scan_ch/scan_rs to the running-sum multiplexer, reads the threshold in
// the same clock, and compares one clock later. A sum strictly above its
// threshold sets the detector's request; at the end of each sweep the requests
// of the sweep are published on dump_req (not latched beyond the sweep).
//
// Table writes use a 32-bit port: addresses 0..4095 are the 32-bit thresholds,
// index {ch, energy, rs}; addresses 4096..8191 the 64-bit thresholds as
// {index, half} with half 0 the low word, index {ch, energy, rs-8}. A read
// port with the same map returns the table as loaded, so that the control
// system can compare it with the master copy (the combiner-initiated table
// test). The table geometry and the read-back follow the system description;
// the sweep order, the strict comparison and the address map are this
// design's choices.
//
// Timing: a sweep takes 192 clocks; dump_req and sweep_done update two clocks
// after the last pair of a sweep was addressed. rd_data follows rd_addr after
// one clock.
module threshold_comparator
  import blm_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic [4:0]          beam_energy,
  output logic [3:0]          scan_ch,
  output logic [3:0]          scan_rs,
  input  rs_t                 rs_value,      // running sum at scan_ch/scan_rs
  input  logic                wr_en,
  input  logic [12:0]         wr_addr,
  input  logic [31:0]         wr_data,
  input  logic [12:0]         rd_addr,
  output logic [31:0]         rd_data,
  output logic [N_CH-1:0]     dump_req,
  output logic                sweep_done
);

  logic [31:0] thr32   [N_CH*N_ENERGY*N_RS32];
  logic [31:0] thr64lo [N_CH*N_ENERGY*N_RS64];
  logic [31:0] thr64hi [N_CH*N_ENERGY*N_RS64];

  // ---- table write port ------------------------------------------------
  always_ff @(posedge clk) begin
    if (wr_en) begin
      if (!wr_addr[12])     thr32[wr_addr[11:0]]   <= wr_data;
      else if (!wr_addr[0]) thr64lo[wr_addr[11:1]] <= wr_data;
      else                  thr64hi[wr_addr[11:1]] <= wr_data;
    end
  end

  // ---- table read-back port ------------------------------------------------
  always_ff @(posedge clk) begin
    if (!rd_addr[12])     rd_data <= thr32[rd_addr[11:0]];
    else if (!rd_addr[0]) rd_data <= thr64lo[rd_addr[11:1]];
    else                  rd_data <= thr64hi[rd_addr[11:1]];
  end

  // ---- sweep address -----------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scan_ch <= '0;
      scan_rs <= '0;
    end else if (scan_rs == 4'(N_RS - 1)) begin
      scan_rs <= '0;
      scan_ch <= scan_ch + 1'b1;         // 16 channels: wraps naturally
    end else begin
      scan_rs <= scan_rs + 1'b1;
    end
  end

  wire [11:0] a32 = {scan_ch, beam_energy, scan_rs[2:0]};
  wire [10:0] a64 = {scan_ch, beam_energy, 2'(scan_rs - 4'd8)};

  // ---- stage 1: threshold read, sum registered ----------------------------
  logic [31:0] t32_q, t64lo_q, t64hi_q;
  rs_t         v_q;
  logic [3:0]  ch_q;
  logic        wide_q, last_q, v1;

  always_ff @(posedge clk) begin
    t32_q   <= thr32[a32];
    t64lo_q <= thr64lo[a64];
    t64hi_q <= thr64hi[a64];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q    <= '0;
      ch_q   <= '0;
      wide_q <= 1'b0;
      last_q <= 1'b0;
      v1     <= 1'b0;
    end else begin
      v_q    <= rs_value;
      ch_q   <= scan_ch;
      wide_q <= scan_rs >= 4'(N_RS32);
      last_q <= scan_ch == 4'(N_CH - 1) && scan_rs == 4'(N_RS - 1);
      v1     <= 1'b1;
    end
  end

  // ---- stage 2: compare and collect --------------------------------------
  wire [63:0] thr  = wide_q ? {t64hi_q, t64lo_q} : {32'd0, t32_q};
  wire        over = v1 && (64'(v_q) > thr);

  logic [N_CH-1:0] acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc        <= '0;
      dump_req   <= '0;
      sweep_done <= 1'b0;
    end else begin
      sweep_done <= v1 && last_q;
      if (v1 && last_q) begin
        dump_req <= acc | (N_CH'(over) << ch_q);
        acc      <= '0;
      end else if (over) begin
        acc[ch_q] <= 1'b1;
      end
    end
  end

endmodule
