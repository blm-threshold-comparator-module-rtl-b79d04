// Table loader: copies the threshold and masking tables from the external
// non-volatile RAM into the FPGA after reset and whenever an update is
// requested (by the Combiner card).
//
// It reads N_WORDS consecutive 32-bit NV-RAM words. Words 0..8191 (32 KB) are
// written through to the threshold comparator's table port at the same
// address; the last word is the masking table (bits 15:0 connected,
// bits 31:16 maskable). table_ok is low from reset or a request until the
// last word has been taken, so the permits stay withdrawn while the tables are
// incomplete. Loading at power-on and on request follows the system
// description; the NV-RAM layout, its one-clock read latency and the
// fail-safe table_ok are this design's choices.
//
// Timing: one word per clock; a full load takes N_WORDS + 2 clocks.
module table_loader
  import blm_pkg::*;
#(
  parameter int unsigned N_WORDS = 8193
)(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            reload_req,
  output logic [13:0]     nv_addr,
  output logic            nv_rd,
  input  logic [31:0]     nv_rdata,
  output logic            wr_en,
  output logic [12:0]     wr_addr,
  output logic [31:0]     wr_data,
  output logic [N_CH-1:0] connected,
  output logic [N_CH-1:0] maskable,
  output logic            table_ok
);

  typedef enum logic [1:0] {S_READ, S_DRAIN, S_DONE} state_e;
  state_e      state;
  logic        rd_q;         // a read was issued last clock
  logic [13:0] addr_q;       // its address

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_READ;
      nv_addr   <= '0;
      nv_rd     <= 1'b0;
      rd_q      <= 1'b0;
      addr_q    <= '0;
      wr_en     <= 1'b0;
      wr_addr   <= '0;
      wr_data   <= '0;
      connected <= '0;
      maskable  <= '0;
      table_ok  <= 1'b0;
    end else begin
      wr_en  <= 1'b0;
      rd_q   <= nv_rd;
      addr_q <= nv_addr;
      // data of the previous read
      if (rd_q) begin
        if (addr_q == 14'(N_WORDS - 1)) begin
          connected <= nv_rdata[15:0];
          maskable  <= nv_rdata[31:16];
        end else begin
          wr_en   <= 1'b1;
          wr_addr <= addr_q[12:0];
          wr_data <= nv_rdata;
        end
      end
      unique case (state)
        S_READ: begin
          table_ok <= 1'b0;
          if (!nv_rd) begin
            nv_rd   <= 1'b1;
            nv_addr <= '0;
          end else if (nv_addr == 14'(N_WORDS - 1)) begin
            nv_rd <= 1'b0;
            state <= S_DRAIN;
          end else begin
            nv_addr <= nv_addr + 1'b1;
          end
        end
        S_DRAIN: begin
          if (!rd_q) begin
            table_ok <= 1'b1;
            state    <= S_DONE;
          end
        end
        default: begin
          if (reload_req) begin
            table_ok <= 1'b0;
            state    <= S_READ;
          end
        end
      endcase
    end
  end

endmodule
