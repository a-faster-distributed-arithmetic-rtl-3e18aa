// sda2_mac8: two-LUT serial distributed-arithmetic MAC for eight products,
// with no carry chain in the clocked loop.
//
// Computes Y = sum_{k=0..7} A_k x_k (N-bit two's complement samples,
// unsigned COEF_W-bit coefficients). Samples x0..x3 address LUT 1 and x4..x7
// address LUT 2. Both LUT words are inverted in the sign cycle and added by
// the bit-level adder array, whose carries stay in their PEs; its registered
// sum word feeds the bit-level shift accumulator one clock later. The
// accumulator shifts one finished product bit per clock into an N-bit output
// shift register. After the last clock the final adder combines residual
// sums and carries; the two deferred +1s of the two inversions weigh 2^(N-1)
// each, together one 1 at weight 2^N: the IO bit at the residual LSB.
// R selects bit-level (1) or r-bit PEs for both the adder array and the
// shift accumulator; with R > 1 both are one or two bits wider than the LUT
// word, with zero inputs on top.
// Timing: `start` loads; the adder array takes LUT words for N clocks and one
// flush clock; the accumulator runs one clock behind; `done` rises N+2 clocks
// after the load (N+3 clocks in all). The result y = {cpa_out, sr} is
// N + LUT_W + 1 bits, two's complement. Control and the MSB term of the
// compensation constant are this RTL's choices.
module sda2_mac8 #(
    parameter int unsigned N      = da_pkg::WORD_N,
    parameter int unsigned COEF_W = da_pkg::COEF_W,
    parameter int unsigned R      = 1,
    parameter logic [8*COEF_W-1:0] COEFS = da_pkg::COEFS8,
    localparam int unsigned L     = COEF_W + 2,
    localparam int unsigned YW    = N + L + 1
) (
    input  logic                 clk,
    input  logic                 rst_n,
    input  logic                 start,
    input  logic [7:0][N-1:0]    x,
    output logic                 busy,
    output logic                 done,
    output logic signed [YW-1:0] y
);

  localparam int unsigned CW = $clog2(N + 3);
  // Array width: the LUT width for bit-level PEs. With r-bit PEs one more
  // bit, whose inputs are 0, catches the top PE's carries, and one more if
  // that would leave a single-cell top PE.
  localparam int unsigned WA = (R == 1) ? L
                             : (((L + 1) % R == 1) ? L + 2 : L + 1);

  logic          load, inv;
  logic [CW-1:0] cnt;
  logic [7:0]    xbit;
  logic [L-1:0]  z0, z1, z0i, z1i;
  logic [WA-1:0] sa, s;
  logic [WA+1:0] ca, cv;
  logic [N-1:0]  sr;
  logic [L:0]    res;

  da_ctrl #(.DATA(N), .EXTRA(2)) u_ctrl (
      .clk, .rst_n, .start, .load, .busy, .cnt, .inv, .done
  );

  for (genvar k = 0; k < 8; k++) begin : g_psc
    psc #(.N(N), .BPC(1)) u_psc (
        .clk, .rst_n, .load, .shift(busy), .din(x[k]), .dout(xbit[k])
    );
  end

  da_lut #(.COEF_W(COEF_W), .TAPS(4), .OUT_W(L),
           .COEFS(COEFS[0 +: 4*COEF_W])) u_lut1 (.addr(xbit[3:0]), .z(z0));
  da_lut #(.COEF_W(COEF_W), .TAPS(4), .OUT_W(L),
           .COEFS(COEFS[4*COEF_W +: 4*COEF_W])) u_lut2 (.addr(xbit[7:4]), .z(z1));

  da_inverter #(.W(L)) u_inv1 (.inv, .a(z0), .y(z0i));
  da_inverter #(.W(L)) u_inv2 (.inv, .a(z1), .y(z1i));

  sda_adder_array #(.W(WA), .R(R)) u_add (
      .clk, .rst_n, .clr(load), .en(busy), .a(WA'(z0i)), .b(WA'(z1i)),
      .s(sa), .cv(ca)
  );

  sda_shift_acc #(.W(WA), .R(R)) u_acc (
      .clk, .rst_n, .clr(load), .en(busy && cnt != '0), .z(sa), .s, .cv
  );

  // Product bits Y_0..Y_{N-1} leave the accumulator in clocks 3..N+2.
  out_shift_reg #(.N(N)) u_sr (
      .clk, .rst_n, .clr(load), .en(busy && cnt > CW'(1)), .din(s[0]), .q(sr)
  );

  // The residual is exact modulo 2^(L+1); bits of s and cv above L weigh
  // 2^(L+1) and more and are not added.
  cpa #(.W(L+1), .K((L+1)'(1) | ((L+1)'(1) << L))) u_cpa (
      .a((L+1)'(s)), .b(cv[L:0]), .io(done), .y(res)
  );

  assign y = {res, sr};

  // The adder array holds no carry once the result is complete.
  a_flushed: assert property (@(posedge clk) disable iff (!rst_n) done |-> ca == '0);

endmodule
