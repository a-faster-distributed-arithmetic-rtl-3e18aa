// sda1_mac4: one-LUT serial distributed-arithmetic MAC for four products,
// with the carry chain taken out of the clocked loop.
//
// Computes Y = A0*x0 + A1*x1 + A2*x2 + A3*x3 for N-bit two's complement
// samples x_k and unsigned COEF_W-bit constant coefficients A_k.
// Datapath: four PSCs present bit c of every sample (LSB first) as the LUT
// address; the LUT gives Z_c = sum_k A_k x_{k,c}; the inverter inverts Z_c in
// the sign-bit cycle; the carry-save shift accumulator (R = 1: bit-level PEs,
// R > 1: r-bit PEs) adds it while shifting one bit per clock. The bit that
// leaves the accumulator each clock is a finished product bit and goes into
// the output shift register (N-1 bits). After the last clock the final
// carry-propagate adder combines the residual sums and carries with the
// compensating one (IO) into the upper LUT_W+1 result bits.
// Timing: `start` (while idle) loads the samples; N clocks later `done` rises
// and `y` is valid (N+1 clocks in all, including the load). The clock period
// is set by PSC -> LUT -> XOR -> one PE (or one r-cell ripple).
// The result is y = {cpa_out, sr}, N + LUT_W bits, two's complement. The
// extra MSB term in the compensation constant (see cpa) and the control are
// this RTL's own; the datapath follows the published structure.
module sda1_mac4 #(
    parameter int unsigned N      = da_pkg::WORD_N,
    parameter int unsigned COEF_W = da_pkg::COEF_W,
    parameter int unsigned R      = 1,
    parameter logic [4*COEF_W-1:0] COEFS = da_pkg::COEFS4,
    localparam int unsigned L     = COEF_W + 2,
    localparam int unsigned YW    = N + L
) (
    input  logic                 clk,
    input  logic                 rst_n,
    input  logic                 start,
    input  logic [3:0][N-1:0]    x,
    output logic                 busy,
    output logic                 done,
    output logic signed [YW-1:0] y
);

  localparam int unsigned CW = $clog2(N + 1);

  logic          load, inv;
  logic [CW-1:0] cnt;
  logic [3:0]    xbit;
  logic [L-1:0]  z, zi, s;
  logic [L+1:0]  cv;
  logic [N-2:0]  sr;
  logic [L:0]    res;

  da_ctrl #(.DATA(N), .EXTRA(0)) u_ctrl (
      .clk, .rst_n, .start, .load, .busy, .cnt, .inv, .done
  );

  for (genvar k = 0; k < 4; k++) begin : g_psc
    psc #(.N(N), .BPC(1)) u_psc (
        .clk, .rst_n, .load, .shift(busy), .din(x[k]), .dout(xbit[k])
    );
  end

  da_lut #(.COEF_W(COEF_W), .TAPS(4), .OUT_W(L), .COEFS(COEFS)) u_lut (
      .addr(xbit), .z
  );

  da_inverter #(.W(L)) u_inv (.inv, .a(z), .y(zi));

  sda_shift_acc #(.W(L), .R(R)) u_acc (
      .clk, .rst_n, .clr(load), .en(busy), .z(zi), .s, .cv
  );

  // Product bits Y_0..Y_{N-2} leave the accumulator in clocks 2..N.
  out_shift_reg #(.N(N-1)) u_sr (
      .clk, .rst_n, .clr(load), .en(busy && cnt != '0), .din(s[0]), .q(sr)
  );

  // cv[L+1] (the top r-bit PE's C1) is always 0 here and is not added.
  // Compensating one at the residual LSB (weight 2^(N-1) of Y) plus the
  // MSB term that makes the residual two's complement.
  cpa #(.W(L+1), .K((L+1)'(1) | ((L+1)'(1) << L))) u_cpa (
      .a({1'b0, s}), .b(cv[L:0]), .io(done), .y(res)
  );

  assign y = {res, sr};

endmodule
