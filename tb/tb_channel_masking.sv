// Testbench of channel_masking: random request and masking patterns, single
// requests of each detector class, and the table_ok fail-safe.
module tb_channel_masking;
  import blm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [15:0] dump_req = '0, connected = '0, maskable = '0;
  logic table_ok = 0;
  logic permit_unmask, permit_mask;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  channel_masking dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic eu, input logic em);
    @(posedge clk); #1;
    checks++;
    if (permit_unmask !== eu || permit_mask !== em) begin
      failures++;
      $display("FAIL req=%h con=%h msk=%h ok=%b -> %b%b exp %b%b", dump_req, connected, maskable, table_ok,
               permit_unmask, permit_mask, eu, em);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // tables not loaded: no permit
    check(0, 0);
    table_ok = 1;
    // table as in the masking example: 1,2 unconnected maskable; 3 connected un-maskable; 16 connected maskable
    connected = 16'b1111_1111_1111_1100;
    maskable  = 16'b1000_0000_0000_0011;
    for (int d = 0; d < 16; d++) begin
      @(negedge clk); dump_req = 16'(1) << d;
      if (d < 2)       check(1, 1);        // unconnected: ignored
      else if (d < 15) check(0, 0);        // un-maskable: both permits withdrawn
      else             check(1, 0);        // maskable: only the maskable permit
    end
    for (int n = 0; n < 500; n++) begin
      logic [15:0] r;
      logic bu, bm;
      @(negedge clk);
      dump_req = 16'($urandom) & 16'($urandom) & 16'($urandom);
      connected = 16'($urandom); maskable = 16'($urandom); table_ok = ($urandom_range(9, 0) != 0);
      r = dump_req & connected;
      bu = 0; bm = 0;
      for (int d = 0; d < 16; d++) if (r[d]) begin if (maskable[d]) bm = 1; else bu = 1; end
      check(table_ok && !bu, table_ok && !bu && !bm);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
