// sda_shift_acc: carry-save shift accumulator of the serial DA designs.
//
// Every enabled clock it computes  V <= z + (V - s[0]) / 2 : the word z is
// added while the accumulated value moves one bit towards the LSB, and the
// LSB that falls out (s[0], registered) is one finished bit of the product.
// V is kept in carry-save form, so no carry crosses a PE boundary in a clock:
//   R = 1 : W bit-level PEs (pe_bit). Bit j adds z[j], the sum bit of bit j+1
//           and its own carry. V = sum 2^j s[j] + sum 2^(j+1) c_j.
//   R > 1 : ceil(W/R) r-bit PEs (pe_rbit); carries ripple inside a PE only.
//           The last PE has fewer cells when R does not divide W.
// Outputs: `s` (sum bits) and `cv`, all carry bits placed at their weight, so
// that V = s + cv. cv is W+2 bits; bit W+1 can only be set by the top PE's
// C1, which stays 0 while V < 2^(W+1) (true for the DA use, where z < 2^W).
// The representation is exact; the top bit takes 0 as its shifted-in sum
// bit, which suits non-negative values. `clr` empties it.
// Timing: one clock per word; the critical path is one bit (R = 1) or one
// R-cell ripple.
module sda_shift_acc #(
    parameter int unsigned W = da_pkg::LUT_W,
    parameter int unsigned R = 1
) (
    input  logic         clk,
    input  logic         rst_n,
    input  logic         clr,
    input  logic         en,
    input  logic [W-1:0] z,
    output logic [W-1:0] s,
    output logic [W+1:0] cv
);

  // Sum bit of the next more significant position (the one-bit shift).
  logic [W-1:0] i2;
  assign i2 = {1'b0, s[W-1:1]};

  if (R == 1) begin : g_bit
    logic [W-1:0] c;
    for (genvar j = 0; j < W; j++) begin : g_pe
      pe_bit u_pe (
          .clk, .rst_n, .clr, .en,
          .i1(z[j]), .i2(i2[j]), .i3(c[j]),
          .s(s[j]), .c(c[j])
      );
    end
    assign cv = {1'b0, c, 1'b0};
  end else begin : g_rbit
    localparam int unsigned NPE = (W + R - 1) / R;
    logic [NPE:0]   c1_chain;
    logic [W+1:0]   cv_w [NPE+1];
    assign c1_chain[0] = 1'b0;
    assign cv_w[0]     = '0;
    for (genvar m = 0; m < NPE; m++) begin : g_pe
      localparam int unsigned LO = m * R;
      localparam int unsigned RW = (LO + R <= W) ? R : W - LO;
      logic c_top;
      pe_rbit #(.R(RW)) u_pe (
          .clk, .rst_n, .clr, .en,
          .i1(z[LO +: RW]), .i2(i2[LO +: RW]),
          .c1_in(c1_chain[m]),
          .s(s[LO +: RW]), .c(c_top), .c1(c1_chain[m+1])
      );
      // C of the last cell weighs 2^(LO+RW), C1 weighs 2^(LO+RW+1).
      assign cv_w[m+1] = cv_w[m]
                       | ((W+2)'(c_top)          << (LO + RW))
                       | ((W+2)'(c1_chain[m+1])  << (LO + RW + 1));
    end
    assign cv = cv_w[NPE];
  end

endmodule
