// out_shift_reg: the shift registers SR that collect the low product bits.
//
// The serial accumulator produces one finished product bit per clock, LSB
// first. On every enabled clock this register shifts towards bit 0 and takes
// `din` into its top bit, so after N shifts q[0] holds the first bit taken
// (product bit Y_0) and q[N-1] the last. `clr` empties it.
module out_shift_reg #(
    parameter int unsigned N = da_pkg::WORD_N - 1
) (
    input  logic         clk,
    input  logic         rst_n,
    input  logic         clr,
    input  logic         en,
    input  logic         din,
    output logic [N-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   q <= '0;
    else if (clr) q <= '0;
    else if (en)  q <= N'({din, q} >> 1);
  end

endmodule
