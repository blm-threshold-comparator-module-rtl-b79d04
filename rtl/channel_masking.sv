// Channel masking: turns the per-detector dump requests into the two beam
// permit signals of the card.
//
// The masking table gives two bits per detector: connected and maskable.
// Requests of unconnected detectors are ignored. A request of a connected
// maskable detector withdraws the maskable permit; a request of a connected
// un-maskable detector withdraws both permits, so it can never be hidden by
// masking the maskable line (masking itself, allowed only with safe beam, is
// done by the interlock system that receives the lines). Both permits are
// withdrawn while the tables are not loaded. The table contents follow the
// system description; the routing rule and the fail-safe on table_ok are this
// design's choices.
//
// Timing: registered, one clock from dump_req to the permits. Permits are low
// in reset.
module channel_masking
  import blm_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic [N_CH-1:0] dump_req,
  input  logic [N_CH-1:0] connected,
  input  logic [N_CH-1:0] maskable,
  input  logic            table_ok,
  output logic            permit_unmask,
  output logic            permit_mask
);

  wire [N_CH-1:0] req    = dump_req & connected;
  wire            req_um = |(req & ~maskable);
  wire            req_m  = |(req & maskable);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      permit_unmask <= 1'b0;
      permit_mask   <= 1'b0;
    end else begin
      permit_unmask <= table_ok && !req_um;
      permit_mask   <= table_ok && !req_um && !req_m;
    end
  end

endmodule
