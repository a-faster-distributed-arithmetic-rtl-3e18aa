// sda_adder_array: bit-level adder array of the two-LUT serial DA design.
//
// Adds the two (inverted when INV is set) LUT words a and b without a carry
// chain across the word. Because the accumulator after it shifts by one bit
// per clock, a carry of weight 2^(j+1) produced now has weight 2^j relative
// to the next pair of words, so it is kept and added back at the same
// position in the next clock:
//   R = 1 : bit j is a pe_bit adding a[j], b[j] and its own carry.
//   R > 1 : r-bit PEs (pe_rbit with i1 = a, i2 = b): carries ripple inside a
//           PE; the last cell's C returns to it and its C1 enters the lowest
//           cell of the next PE. The caller keeps the top bit of a and b at
//           0, so the top PE never produces a C1, and avoids a one-cell top
//           PE, so one flush clock empties every PE.
// The registered sum word `s` goes to the shift accumulator one clock later.
// Carries still held after the last word are flushed by one extra enabled
// clock with a = b = 0. Over a run, sum_t 2^t s(t) = sum_t 2^t (a(t) + b(t)).
// `cv` shows the held carries at their weights (s + cv = a + b + cv_prev/2);
// it is zero after the flush.
module sda_adder_array #(
    parameter int unsigned W = da_pkg::LUT_W,
    parameter int unsigned R = 1
) (
    input  logic         clk,
    input  logic         rst_n,
    input  logic         clr,
    input  logic         en,
    input  logic [W-1:0] a,
    input  logic [W-1:0] b,
    output logic [W-1:0] s,
    output logic [W+1:0] cv
);

  if (R == 1) begin : g_bit
    logic [W-1:0] c;
    for (genvar j = 0; j < W; j++) begin : g_pe
      pe_bit u_pe (
          .clk, .rst_n, .clr, .en,
          .i1(a[j]), .i2(b[j]), .i3(c[j]),
          .s(s[j]), .c(c[j])
      );
    end
    assign cv = {1'b0, c, 1'b0};
  end else begin : g_rbit
    localparam int unsigned NPE = (W + R - 1) / R;
    logic [NPE:0] c1_chain;
    logic [W+1:0] cv_w [NPE+1];
    assign c1_chain[0] = 1'b0;
    assign cv_w[0]     = '0;
    for (genvar m = 0; m < NPE; m++) begin : g_pe
      localparam int unsigned LO = m * R;
      localparam int unsigned RW = (LO + R <= W) ? R : W - LO;
      logic c_top;
      pe_rbit #(.R(RW)) u_pe (
          .clk, .rst_n, .clr, .en,
          .i1(a[LO +: RW]), .i2(b[LO +: RW]),
          .c1_in(c1_chain[m]),
          .s(s[LO +: RW]), .c(c_top), .c1(c1_chain[m+1])
      );
      assign cv_w[m+1] = cv_w[m]
                       | ((W+2)'(c_top)         << (LO + RW))
                       | ((W+2)'(c1_chain[m+1]) << (LO + RW + 1));
    end
    assign cv = cv_w[NPE];
  end

endmodule
