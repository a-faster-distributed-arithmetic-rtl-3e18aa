// pda2_mac4: 2-bit parallel distributed-arithmetic MAC for four products,
// with no carry chain in the clocked loop.
//
// Computes Y = A0*x0 + A1*x1 + A2*x2 + A3*x3 (N-bit two's complement samples,
// N even; unsigned COEF_W-bit coefficients), two bit positions per clock.
// Each PSC presents bits 2i (even) and 2i+1 (odd) of its sample. The even
// bits address one LUT (word Z, weight 1), the odd bits a second LUT with the
// same contents (word Z1, weight 2); Z1 alone is inverted in the last data
// clock, since the sign bit N-1 is odd. The 2-bit scaling adder array adds
// Z + 2*Z1 in carry-save form, the 2-bit scaling accumulator adds that word
// while scaling by 1/4 per clock, and its N low cells collect the low product
// bits. After the last clock the final adder resolves sums and carries and
// adds the compensating one at weight 2^(N-1) (IO) together with an MSB term
// that makes the result two's complement.
// Timing: `start` loads; N/2 data clocks and one flush clock in the adder
// array, the accumulator one clock behind; `done` rises N/2+2 clocks after
// the load (N/2+3 clocks in all, one more than the published count of
// N/2+2, because here the load clock is counted). y is N + LUT_W bits.
module pda2_mac4 #(
    parameter int unsigned N      = da_pkg::WORD_N,
    parameter int unsigned COEF_W = da_pkg::COEF_W,
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

  localparam int unsigned M  = N + L + 1;
  localparam int unsigned CW = $clog2(N / 2 + 3);

  logic          load, inv;
  logic [CW-1:0] cnt;
  logic [3:0]    xe, xo;
  logic [L-1:0]  ze, zo, zoi;
  logic [L:0]    sa, ca;
  logic          ff;
  logic [M-1:0]  s, c;
  logic [YW-1:0] sum;

  da_ctrl #(.DATA(N / 2), .EXTRA(2)) u_ctrl (
      .clk, .rst_n, .start, .load, .busy, .cnt, .inv, .done
  );

  for (genvar k = 0; k < 4; k++) begin : g_psc
    logic [1:0] d;
    psc #(.N(N), .BPC(2)) u_psc (
        .clk, .rst_n, .load, .shift(busy), .din(x[k]), .dout(d)
    );
    assign xe[k] = d[0];
    assign xo[k] = d[1];
  end

  da_lut #(.COEF_W(COEF_W), .TAPS(4), .OUT_W(L), .COEFS(COEFS)) u_lut_even (
      .addr(xe), .z(ze)
  );
  da_lut #(.COEF_W(COEF_W), .TAPS(4), .OUT_W(L), .COEFS(COEFS)) u_lut_odd (
      .addr(xo), .z(zo)
  );

  da_inverter #(.W(L)) u_inv (.inv, .a(zo), .y(zoi));

  pda_adder_array #(.W(L)) u_add (
      .clk, .rst_n, .clr(load), .en(busy), .z(ze), .z1(zoi),
      .s(sa), .c(ca), .ff
  );

  pda_scaling_acc #(.N(N), .W_IN(L + 1)) u_acc (
      .clk, .rst_n, .clr(load), .en(busy && cnt != '0),
      .in(sa), .ff_in(ff), .s, .c
  );

  // The top accumulator bits (s[M-1], c[M-1:M-2]) weigh 2^YW and more; the
  // result is exact modulo 2^YW, so they are not added.
  cpa #(.W(YW), .K(YW'(1) << (N - 1) | YW'(1) << (YW - 1))) u_cpa (
      .a(s[YW-1:0]), .b({c[YW-2:0], 1'b0}), .io(done), .y(sum)
  );

  assign y = sum;

  a_flushed: assert property (@(posedge clk) disable iff (!rst_n) done |-> (ca == '0 && !ff));

endmodule
