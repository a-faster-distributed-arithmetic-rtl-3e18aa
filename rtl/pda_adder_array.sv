// pda_adder_array: bit-level 2-bit scaling adder array of the 2-bit parallel
// DA design.
//
// Each clock it adds the even-bit LUT word z (weight 1) and the odd-bit LUT
// word z1 (weight 2, already inverted in the sign cycle) without carry
// propagation. PE k (k = 0..W) is a pe_bit adding z[k], z1[k-1] and the
// registered carry of PE k+1. The accumulator that follows scales by 1/4
// per clock, so a carry of weight 2^(k+1) now has weight 2^(k-1) next clock:
// it belongs to PE k-1. The carry of PE 0 would fall below the array; it is
// delayed once more in the flip-flop `ff` and handed to the accumulator one
// position below the array's LSB. The sum word `s` (W+1 bits) goes to the
// accumulator one clock later. One extra enabled clock with z = z1 = 0
// flushes the held carries (`c` is then zero).
module pda_adder_array #(
    parameter int unsigned W = da_pkg::LUT_W
) (
    input  logic         clk,
    input  logic         rst_n,
    input  logic         clr,
    input  logic         en,
    input  logic [W-1:0] z,
    input  logic [W-1:0] z1,
    output logic [W:0]   s,
    output logic [W:0]   c,
    output logic         ff
);

  logic [W:0]   za, zb;
  logic [W:0]   cin;
  assign za  = {1'b0, z};
  assign zb  = {z1, 1'b0};
  assign cin = {1'b0, c[W:1]};   // carry of PE k+1 for PE k

  for (genvar k = 0; k <= W; k++) begin : g_pe
    pe_bit u_pe (
        .clk, .rst_n, .clr, .en,
        .i1(za[k]), .i2(zb[k]), .i3(cin[k]),
        .s(s[k]), .c(c[k])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   ff <= 1'b0;
    else if (clr) ff <= 1'b0;
    else if (en)  ff <= c[0];
  end

endmodule
