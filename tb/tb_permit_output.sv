// Testbench of permit_output: with both permits given the line must toggle
// every DIV clocks; withdrawing either permit must stop it (held low) within
// one clock, and it must restart when both return.
module tb_permit_output;

  localparam int DIV = 4;

  logic clk = 0, rst_n = 0;
  logic permit_in = 0, permit_local = 0;
  logic line_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  permit_output #(.DIV(DIV)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // measure the clocks between toggles while permitted
  task automatic check_wave(input int toggles);
    logic prev;
    int   since;
    prev = line_out; since = 0;
    for (int t = 0; t < toggles; ) begin
      @(posedge clk); #1;
      since++;
      if (line_out !== prev) begin
        if (t > 0) begin
          checks++;
          if (since != DIV) begin failures++; $display("FAIL half period %0d", since); end
        end
        t++; since = 0; prev = line_out;
      end
      if (since > 4 * DIV) begin failures++; checks++; $display("FAIL line stuck"); break; end
    end
  endtask

  task automatic check_stopped(input int clocks);
    repeat (2) @(posedge clk);
    for (int i = 0; i < clocks; i++) begin
      @(posedge clk); #1;
      checks++;
      if (line_out !== 1'b0) begin failures++; $display("FAIL line moves without permit"); break; end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    check_stopped(20);
    for (int r = 0; r < 20; r++) begin
      @(negedge clk); permit_in = 1; permit_local = 1;
      check_wave(10 + r);
      @(negedge clk);
      if (r % 2 != 0) permit_in = 0; else permit_local = 0;
      check_stopped(30);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
