// Behavioural model of the external non-volatile RAM holding the threshold
// and masking tables: 8193 words of 32 bits, read data one clock after the
// read strobe. Testbenches fill mem directly.
module nvram_model (
  input  logic        clk,
  input  logic [13:0] addr,
  input  logic        rd,
  output logic [31:0] rdata
);
  logic [31:0] mem [8193];

  always_ff @(posedge clk) begin
    if (rd) rdata <= (addr < 14'd8193) ? mem[addr] : 32'hDEAD_BEEF;
  end
endmodule
