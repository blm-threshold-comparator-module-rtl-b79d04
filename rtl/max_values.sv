// MAX values: keeps, for every detector and running sum, the largest value
// seen during the current second and publishes it at the end of each second.
//
// It observes the comparator's sweep over the 192 (detector, sum) pairs, so it
// sees every sum several times per 40 us step. A second is counted as
// SAMPLES_PER_SEC steps (tick pulses). After a second ends, the next full
// sweep moves each running maximum into the published store and restarts the
// running maximum from the present value. The readout port (rd_addr =
// {ch, rs}) reads the published store. Keeping the maxima of the last second
// follows the system description; the roll-over scheme and the read port are
// this design's choices.
//
// Timing: one pair per clock at the scan inputs; rd_data is combinational from
// rd_addr.
module max_values
  import blm_pkg::*;
#(
  parameter int unsigned SAMPLES_PER_SEC = 25000
)(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [3:0]  scan_ch,
  input  logic [3:0]  scan_rs,
  input  rs_t         rs_value,
  input  logic        tick,          // one pulse per 40 us step
  input  logic [7:0]  rd_addr,       // {ch, rs}
  output rs_t         rd_data,
  output logic        second_done    // pulses when a new second was published
);

  localparam int unsigned N = N_CH * 16;   // address space {ch, rs}

  rs_t cur  [N];
  rs_t last [N];

  logic [$clog2(SAMPLES_PER_SEC+1)-1:0] steps;
  logic init_done;      // cur[] was written by a first full sweep
  logic init_run;       // the initial sweep is in progress
  logic pending;        // a second ended; roll over on the next sweep
  logic rolling;        // the roll-over sweep is in progress
  logic published;      // last[] holds a complete second

  wire [7:0] a     = {scan_ch, scan_rs};
  wire       first = (scan_ch == '0) && (scan_rs == '0);
  wire       lastp = (scan_ch == 4'(N_CH - 1)) && (scan_rs == 4'(N_RS - 1));
  wire       init  = !init_done && (init_run || first);
  wire       roll  = init_done && (rolling || (pending && first));
  rs_t       m;

  always_comb begin
    m = (cur[a] > rs_value) ? cur[a] : rs_value;
  end

  always_ff @(posedge clk) begin
    if (init) begin
      cur[a]  <= rs_value;
    end else if (roll) begin
      last[a] <= m;
      cur[a]  <= rs_value;
    end else if (init_done) begin
      cur[a]  <= m;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      steps       <= '0;
      init_done   <= 1'b0;
      init_run    <= 1'b0;
      pending     <= 1'b0;
      rolling     <= 1'b0;
      published   <= 1'b0;
      second_done <= 1'b0;
    end else begin
      second_done <= 1'b0;
      if (init) begin
        init_run <= !lastp;
        if (lastp) init_done <= 1'b1;
      end
      if (roll) begin
        if (first) pending <= 1'b0;
        rolling <= !lastp;
        if (lastp) begin
          published   <= 1'b1;
          second_done <= 1'b1;
        end
      end
      if (tick) begin
        if (steps == ($bits(steps))'(SAMPLES_PER_SEC - 1)) begin
          steps   <= '0;
          pending <= 1'b1;
        end else begin
          steps <= steps + 1'b1;
        end
      end
    end
  end

  assign rd_data = published ? last[rd_addr] : '0;

endmodule
