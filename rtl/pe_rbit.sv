// pe_rbit: r-bit processing element of the serial shift accumulator.
//
// R cells, one per bit. Inside the PE the carries ripple from cell to cell
// without a register, so the carry chain is R cells long instead of the full
// word. Cell k adds i1[k] (LUT bit), i2[k] (registered sum of the next more
// significant bit, i.e. the accumulator shift) and the carry from cell k-1.
// The lowest cell takes, instead of a ripple carry, `c1_in`: the registered
// high carry C1 of the PE below. The last cell adds a fourth bit, its own
// registered carry C, and produces two registered carries: C (weight 2,
// fed back to this cell next clock, where the one-bit shift gives it
// weight 1) and C1 (weight 4, which after the shift lands on the lowest cell
// of the next PE). All sums and both last-cell carries are registered on an
// enabled clock; `clr` zeroes them and wins over `en`.
// With R = 1 the single cell takes both c1_in and its own carry (four
// inputs); the serial accumulator uses pe_bit instead for the 1-bit case.
module pe_rbit #(
    parameter int unsigned R = 8
) (
    input  logic         clk,
    input  logic         rst_n,
    input  logic         clr,
    input  logic         en,
    input  logic [R-1:0] i1,
    input  logic [R-1:0] i2,
    input  logic         c1_in,
    output logic [R-1:0] s,
    output logic         c,
    output logic         c1
);

  logic [R-1:0] s_d;
  logic         c_d, c1_d;

  always_comb begin
    logic [2:0] t;
    logic       rip;
    rip = c1_in;
    t   = '0;
    for (int unsigned k = 0; k < R; k++) begin
      t = 3'(i1[k]) + 3'(i2[k]) + 3'(rip);
      if (k == R - 1) t = t + 3'(c);
      s_d[k] = t[0];
      rip    = t[1];
    end
    c_d  = t[1];
    c1_d = t[2];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   {c1, c, s} <= '0;
    else if (clr) {c1, c, s} <= '0;
    else if (en)  {c1, c, s} <= {c1_d, c_d, s_d};
  end

endmodule
