// Error and status reporting for the whole card.
//
// For each of the two link pairs it counts processed frames and each kind of
// error flag (CRC per link, 8b/10b per link, CRC comparison, select dump,
// tunnel fault, card ID, frame ID) in saturating 16-bit counters, and it holds
// a failure flag per pair while that pair's last frame requested a dump. The
// un-maskable permit output is given only while no pair has a failure. A
// one-clock strobe per pair (err_out) marks every frame pair that carried any
// error flag, for a TTL output or a logic analyser trigger. An error report to
// software and to a TTL output, and one feeding the un-maskable permit, follow
// the system description; the counters, their width, the strobe and the
// release of a failure on the next clean frame are this design's choices.
//
// Timing: counters, err_out and permit_ok update one clock after err_valid.
// permit_ok is low in reset and until each pair has delivered a clean frame.
module error_status
  import blm_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [N_CARD-1:0]      err_valid,
  input  rcc_err_t [N_CARD-1:0]  err,
  input  logic [N_CARD-1:0]      dump,
  output status_t                status,
  output logic [N_CARD-1:0]      err_out,
  output logic                   permit_ok
);

  logic [N_CARD-1:0] seen;    // a frame of this pair was processed

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      status    <= '0;
      seen      <= '0;
      err_out   <= '0;
      permit_ok <= 1'b0;
    end else begin
      for (int c = 0; c < N_CARD; c++) begin
        err_out[c] <= err_valid[c] && (|err[c]);
        if (err_valid[c]) begin
          seen[c] <= 1'b1;
          status.failure[c] <= dump[c];
          if (status.frames[c] != '1) status.frames[c] <= status.frames[c] + 1'b1;
          for (int e = 0; e < N_ERR; e++)
            if (err[c][e] && status.count[c][e] != '1)
              status.count[c][e] <= status.count[c][e] + 1'b1;
        end
      end
      permit_ok <= (&(seen | err_valid)) && !(|(status.failure & ~err_valid))
                   && !(|(dump & err_valid));
    end
  end

endmodule
