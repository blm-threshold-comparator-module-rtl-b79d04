// Successive Running Sums (SRS) of one detector channel.
//
// Twelve moving-sum windows RS01..RS12, from 1 step (40 us) to 2^21 steps
// (about 84 s), are kept with six running_sum stages SR0..SR5 whose shift
// registers are fed at decreasing rates:
//
//   stage  input                       refresh   length  short / long window
//   SR0    40 us value                 1         2       RS01 = 1,     RS02 = 2
//   SR1    40 us value                 1         16      RS03 = 8,     RS04 = 16
//   SR2    RS02, every 2nd step        2         128     RS05 = 64,    RS06 = 256
//   SR3    RS05, every 64th step       64        256     RS07 = 2048,  RS08 = 16384
//   SR4    RS07, every 2048th step     2048      64      RS09 = 32768, RS10 = 131072
//   SR5    RS08, every 16384th step    16384     128     RS11 = 2^19,  RS12 = 2^21
//
// A stage is fed with a sum exactly when that sum covers a block of steps
// disjoint from the previous one, so each entry of a slow register is the sum
// of one refresh period. Windows, refresh periods and sum widths (20, 22, 22,
// 22, 26, 26, 32, 32, 36, 36, 40, 40 bits) follow the system description;
// which sum feeds which stage is derived from them.
//
// Interface: din with in_valid once per 40 us step. rs[i] holds RS(i+1),
// zero-extended to 40 bits. Timing: RS01..RS04 are updated one clock after
// in_valid; each slower stage one clock after the stage that feeds it.
module srs
  import blm_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [W_DATA-1:0]    din,
  output rs_t [N_RS-1:0]       rs,
  output logic                 upd        // RS01..RS04 were updated
);

  logic [19:0] rs01;  logic [21:0] rs02;
  logic [21:0] rs03;  logic [21:0] rs04;
  logic [25:0] rs05;  logic [25:0] rs06;
  logic [31:0] rs07;  logic [31:0] rs08;
  logic [35:0] rs09;  logic [35:0] rs10;
  logic [39:0] rs11;  logic [39:0] rs12;
  logic [5:0]  u;      // update pulse of each stage

  // decimation counters: which update of the feeding stage goes on
  logic        ph2;    // SR0 updates, mod 2
  logic [4:0]  ph3;    // SR2 updates, mod 32
  logic [4:0]  ph4;    // SR3 updates, mod 32
  logic [7:0]  ph5;    // SR3 updates, mod 256
  logic        v2, v3, v4, v5;

  always_comb begin
    v2 = u[0] && ph2;
    v3 = u[2] && (ph3 == 5'd31);
    v4 = u[3] && (ph4 == 5'd31);
    v5 = u[3] && (ph5 == 8'd255);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph2 <= 1'b0;
      ph3 <= '0;
      ph4 <= '0;
      ph5 <= '0;
    end else begin
      if (u[0]) ph2 <= ~ph2;
      if (u[2]) ph3 <= ph3 + 1'b1;
      if (u[3]) begin
        ph4 <= ph4 + 1'b1;
        ph5 <= ph5 + 1'b1;
      end
    end
  end

  running_sum #(.LEN(2),   .TAP(1),  .W_IN(20), .W_S(20), .W_L(22)) u_sr0 (
    .clk, .rst_n, .in_valid(in_valid), .din(din),  .sum_short(rs01), .sum_long(rs02), .upd(u[0]));
  running_sum #(.LEN(16),  .TAP(8),  .W_IN(20), .W_S(22), .W_L(22)) u_sr1 (
    .clk, .rst_n, .in_valid(in_valid), .din(din),  .sum_short(rs03), .sum_long(rs04), .upd(u[1]));
  running_sum #(.LEN(128), .TAP(32), .W_IN(22), .W_S(26), .W_L(26)) u_sr2 (
    .clk, .rst_n, .in_valid(v2),       .din(rs02), .sum_short(rs05), .sum_long(rs06), .upd(u[2]));
  running_sum #(.LEN(256), .TAP(32), .W_IN(26), .W_S(32), .W_L(32)) u_sr3 (
    .clk, .rst_n, .in_valid(v3),       .din(rs05), .sum_short(rs07), .sum_long(rs08), .upd(u[3]));
  running_sum #(.LEN(64),  .TAP(16), .W_IN(32), .W_S(36), .W_L(36)) u_sr4 (
    .clk, .rst_n, .in_valid(v4),       .din(rs07), .sum_short(rs09), .sum_long(rs10), .upd(u[4]));
  running_sum #(.LEN(128), .TAP(32), .W_IN(32), .W_S(40), .W_L(40)) u_sr5 (
    .clk, .rst_n, .in_valid(v5),       .din(rs08), .sum_short(rs11), .sum_long(rs12), .upd(u[5]));

  always_comb begin
    rs[0]  = RS_W'(rs01);  rs[1]  = RS_W'(rs02);
    rs[2]  = RS_W'(rs03);  rs[3]  = RS_W'(rs04);
    rs[4]  = RS_W'(rs05);  rs[5]  = RS_W'(rs06);
    rs[6]  = RS_W'(rs07);  rs[7]  = RS_W'(rs08);
    rs[8]  = RS_W'(rs09);  rs[9]  = RS_W'(rs10);
    rs[10] = RS_W'(rs11);  rs[11] = RS_W'(rs12);
    upd    = u[0];
  end

endmodule
