// pda_scaling_acc: bit-level 2-bit scaling accumulator of the 2-bit parallel
// DA design.
//
// M = N + W_IN carry-save cells. Cell p is a pe_bit adding its input bit, the
// sum bit of cell p+2 and the carry of cell p+1, so each enabled clock does
//   V <= I + V / 4,   V = sum 2^p s[p] + sum 2^(p+1) c[p],
// with no carry crossing cells. The input word `in` enters at cells
// N..N+W_IN-1 and `ff_in` (the adder array's delayed lowest carry) at cell
// N-1; cells 0..N-2 get 0. The N low cells take the place of the output shift
// registers: running N/2+1 clocks moves the first word from cell N down to
// cell 0, so at the end cell p holds weight 2^p of the product and nothing
// has left the bottom. Outputs s and c (carry of cell p weighs 2^(p+1)) go
// to the final carry-propagate adder. `clr` empties it.
module pda_scaling_acc #(
    parameter int unsigned N    = da_pkg::WORD_N,
    parameter int unsigned W_IN = da_pkg::LUT_W + 1,
    parameter int unsigned M    = N + W_IN
) (
    input  logic            clk,
    input  logic            rst_n,
    input  logic            clr,
    input  logic            en,
    input  logic [W_IN-1:0] in,
    input  logic            ff_in,
    output logic [M-1:0]    s,
    output logic [M-1:0]    c
);

  // i1: input bits; s_up/c_up: sum of cell p+2 and carry of cell p+1.
  logic [M-1:0] i1, s_up, c_up;
  assign i1   = {in, ff_in, (N-1)'(0)};
  assign s_up = {2'b00, s[M-1:2]};
  assign c_up = {1'b0, c[M-1:1]};

  for (genvar p = 0; p < M; p++) begin : g_pe
    pe_bit u_pe (
        .clk, .rst_n, .clr, .en,
        .i1(i1[p]), .i2(s_up[p]), .i3(c_up[p]),
        .s(s[p]), .c(c[p])
    );
  end

endmodule
