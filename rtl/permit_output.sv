// Permit output: drives one daisy-chained beam permit line as a frequency.
//
// The line carries a square wave of period 2*DIV clocks while both the permit
// arriving from the previous card of the chain and this card's own permit are
// given. A withdrawn permit, a reset or a failure stops the wave (line held
// low), which the receiving interlock system detects as a change of frequency.
// Sending the permit as a frequency and daisy-chaining it follow the system
// description; the frequency and the level-coded incoming permit are this
// design's choices.
//
// Timing: the wave stops at the first clock edge after a permit falls.
module permit_output #(
  parameter int unsigned DIV = 4
)(
  input  logic clk,
  input  logic rst_n,
  input  logic permit_in,
  input  logic permit_local,
  output logic line_out
);

  logic [$clog2(DIV+1)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= '0;
      line_out <= 1'b0;
    end else if (!(permit_in && permit_local)) begin
      cnt      <= '0;
      line_out <= 1'b0;
    end else if (cnt == ($bits(cnt))'(DIV - 1)) begin
      cnt      <= '0;
      line_out <= ~line_out;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

endmodule
