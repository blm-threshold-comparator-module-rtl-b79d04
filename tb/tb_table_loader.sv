// Testbench of table_loader: an NV-RAM model with a table generated from a
// formula; every table write is checked for address and data, the masking
// word and table_ok are checked, then a reload with new contents is requested
// and checked the same way, including that table_ok drops during the reload.
module tb_table_loader;
  import blm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic reload_req = 0;
  logic [13:0] nv_addr;
  logic nv_rd;
  logic [31:0] nv_rdata;
  logic wr_en;
  logic [12:0] wr_addr;
  logic [31:0] wr_data;
  logic [15:0] connected, maskable;
  logic table_ok;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  nvram_model nv (.clk, .addr(nv_addr), .rd(nv_rd), .rdata(nv_rdata));
  table_loader dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] content(int a, int seed);
    return 32'(a * 32'h9E37_79B1 + seed);
  endfunction

  int seed = 7;
  bit written [8192];

  // check every write against the NV-RAM content
  always @(posedge clk) begin
    if (rst_n && wr_en) begin
      checks++;
      if (wr_data !== content(int'(wr_addr), seed) || written[wr_addr]) begin
        failures++;
        if (failures < 10) $display("FAIL write %0d: %h", wr_addr, wr_data);
      end
      written[wr_addr] = 1;
    end
  end

  task automatic finish_load(input logic [31:0] mask_word);
    int t;
    t = 0;
    while (!table_ok && t < 20000) begin @(posedge clk); t++; end
    #1;
    checks++;
    if (!table_ok || t < 8193) begin failures++; $display("FAIL load took %0d clocks", t); end
    checks++;
    if ({maskable, connected} !== mask_word) begin failures++; $display("FAIL masking word"); end
    for (int a = 0; a < 8192; a++) if (!written[a]) begin
      failures++; $display("FAIL word %0d never written", a); break;
    end
    checks++;
  endtask

  initial begin
    for (int a = 0; a < 8192; a++) nv.mem[a] = content(a, seed);
    nv.mem[8192] = 32'h8001_FFFC;
    repeat (3) @(negedge clk);
    rst_n = 1;
    finish_load(32'h8001_FFFC);
    // on-demand update with a new table
    repeat (50) @(negedge clk);
    seed = 12345;
    for (int a = 0; a < 8192; a++) begin nv.mem[a] = content(a, seed); written[a] = 0; end
    nv.mem[8192] = 32'h0F0F_1234;
    @(negedge clk); reload_req = 1;
    @(negedge clk); reload_req = 0;
    @(negedge clk);
    checks++;
    if (table_ok) begin failures++; $display("FAIL table_ok during reload"); end
    finish_load(32'h0F0F_1234);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
