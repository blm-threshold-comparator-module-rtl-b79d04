// Testbench of error_status: random error reports of both link pairs; every
// counter, the frame counts, the failure flags, the error strobe and the
// permit are compared with a reference after each report, and saturation of a counter is checked.
module tb_error_status;
  import blm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [1:0] err_valid = '0, dump = '0;
  rcc_err_t [1:0] err = '0;
  status_t status;
  logic permit_ok;
  logic [1:0] err_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  error_status dut (.*);

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cnt [2][N_ERR];
  int frames [2];
  bit fail [2];
  bit seen [2];

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (permit_ok !== 0) begin failures++; $display("FAIL permit before any frame"); end
    for (int n = 0; n < 70000; n++) begin
      @(negedge clk);
      err_valid = 2'($urandom);
      if (n >= 1000 && n < 69000) err_valid[0] = 1'b1;
      for (int c = 0; c < 2; c++) begin
        err[c] = rcc_err_t'(($urandom_range(3, 0) == 0) ? $urandom : 0);
        dump[c] = ($urandom_range(7, 0) == 0);
        if (n >= 1000 && n < 69000) begin err[c][3] = 1'b1; dump[c] = 0; end  // drive one counter to saturation
        if (err_valid[c]) begin
          seen[c] = 1; fail[c] = dump[c];
          if (frames[c] < 65535) frames[c]++;
          for (int e = 0; e < N_ERR; e++) if (err[c][e] && cnt[c][e] < 65535) cnt[c][e]++;
        end
      end
      @(negedge clk);
      for (int c = 0; c < 2; c++) begin
        checks++;
        if (err_out[c] !== (err_valid[c] && (|err[c]))) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d card %0d err_out %b", n, c, err_out[c]);
        end
      end
      err_valid = '0;
      if (n % 97 == 0 || n > 68990) begin
        for (int c = 0; c < 2; c++) begin
          checks++;
          if (status.frames[c] !== 16'(frames[c]) || status.failure[c] !== fail[c]) begin
            failures++; $display("FAIL n=%0d card %0d frames/failure", n, c);
          end
          for (int e = 0; e < N_ERR; e++) begin
            checks++;
            if (status.count[c][e] !== 16'(cnt[c][e])) begin
              failures++;
              if (failures < 10) $display("FAIL n=%0d card %0d count %0d = %0d exp %0d", n, c, e, status.count[c][e], cnt[c][e]);
            end
          end
        end
        checks++;
        if (permit_ok !== (seen[0] && seen[1] && !fail[0] && !fail[1])) begin
          failures++; $display("FAIL n=%0d permit_ok", n);
        end
      end
    end
    checks++;
    if (status.count[0][3] !== 16'hFFFF) begin failures++; $display("FAIL no saturation"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
