// da_top: the proposed carry-chain-free distributed-arithmetic MACs side by
// side.
//
// Five independent designs, each with its own start, samples, status and
// result, sharing only clock and reset:
//   sda1  one-LUT serial DA, four products, bit-level PEs (r = 1)
//   sdar  the same with r-bit PEs, r = R_SDA (8 by default, the suggested
//         cost/performance compromise)
//   sda2  two-LUT serial DA, eight products, bit-level adder array
//   sda2r the same with r-bit PEs in adder array and accumulator, r = R_SDA
//   pda2  2-bit parallel DA, four products
// All use N-bit two's complement samples and unsigned COEF_W-bit constant
// coefficients. See each module for its timing; results are valid while the
// corresponding done is high.
module da_top #(
    parameter int unsigned N      = da_pkg::WORD_N,
    parameter int unsigned COEF_W = da_pkg::COEF_W,
    parameter int unsigned R_SDA  = 8,
    parameter logic [4*COEF_W-1:0] COEFS4 = da_pkg::COEFS4,
    parameter logic [8*COEF_W-1:0] COEFS8 = da_pkg::COEFS8,
    localparam int unsigned L     = COEF_W + 2
) (
    input  logic                    clk,
    input  logic                    rst_n,
    // one-LUT serial DA, 1-bit PEs
    input  logic                    sda1_start,
    input  logic [3:0][N-1:0]       sda1_x,
    output logic                    sda1_busy,
    output logic                    sda1_done,
    output logic signed [N+L-1:0]   sda1_y,
    // one-LUT serial DA, r-bit PEs
    input  logic                    sdar_start,
    input  logic [3:0][N-1:0]       sdar_x,
    output logic                    sdar_busy,
    output logic                    sdar_done,
    output logic signed [N+L-1:0]   sdar_y,
    // two-LUT serial DA
    input  logic                    sda2_start,
    input  logic [7:0][N-1:0]       sda2_x,
    output logic                    sda2_busy,
    output logic                    sda2_done,
    output logic signed [N+L:0]     sda2_y,
    // two-LUT serial DA, r-bit PEs
    input  logic                    sda2r_start,
    input  logic [7:0][N-1:0]       sda2r_x,
    output logic                    sda2r_busy,
    output logic                    sda2r_done,
    output logic signed [N+L:0]     sda2r_y,
    // 2-bit parallel DA
    input  logic                    pda2_start,
    input  logic [3:0][N-1:0]       pda2_x,
    output logic                    pda2_busy,
    output logic                    pda2_done,
    output logic signed [N+L-1:0]   pda2_y
);

  sda1_mac4 #(.N(N), .COEF_W(COEF_W), .R(1), .COEFS(COEFS4)) u_sda1 (
      .clk, .rst_n, .start(sda1_start), .x(sda1_x),
      .busy(sda1_busy), .done(sda1_done), .y(sda1_y)
  );

  sda1_mac4 #(.N(N), .COEF_W(COEF_W), .R(R_SDA), .COEFS(COEFS4)) u_sdar (
      .clk, .rst_n, .start(sdar_start), .x(sdar_x),
      .busy(sdar_busy), .done(sdar_done), .y(sdar_y)
  );

  sda2_mac8 #(.N(N), .COEF_W(COEF_W), .R(1), .COEFS(COEFS8)) u_sda2 (
      .clk, .rst_n, .start(sda2_start), .x(sda2_x),
      .busy(sda2_busy), .done(sda2_done), .y(sda2_y)
  );

  sda2_mac8 #(.N(N), .COEF_W(COEF_W), .R(R_SDA), .COEFS(COEFS8)) u_sda2r (
      .clk, .rst_n, .start(sda2r_start), .x(sda2r_x),
      .busy(sda2r_busy), .done(sda2r_done), .y(sda2r_y)
  );

  pda2_mac4 #(.N(N), .COEF_W(COEF_W), .COEFS(COEFS4)) u_pda2 (
      .clk, .rst_n, .start(pda2_start), .x(pda2_x),
      .busy(pda2_busy), .done(pda2_done), .y(pda2_y)
  );

endmodule
