// da_lut: distributed-arithmetic lookup table (DALUT).
//
// Holds the 2**TAPS partial sums of the coefficients A_0..A_{TAPS-1}: entry
// `addr` is the sum of the A_k whose address bit k is 1 (entry 0 is 0, entry
// 2**TAPS-1 the sum of all). The address is formed by the current bit of each
// sample, so `z` is Z_c = sum_k A_k x_{k,c}. The table is built at elaboration
// from the COEFS parameter ({A_{TAPS-1}, ..., A_0}, COEF_W bits each,
// unsigned) and read combinationally, like a ROM in FPGA function generators.
// Output width OUT_W = COEF_W + log2(TAPS) (n+2 for four samples) holds every
// entry without overflow.
module da_lut #(
    parameter int unsigned COEF_W = da_pkg::COEF_W,
    parameter int unsigned TAPS   = da_pkg::TAPS,
    parameter int unsigned OUT_W  = COEF_W + $clog2(TAPS),
    parameter logic [TAPS*COEF_W-1:0] COEFS = da_pkg::COEFS4
) (
    input  logic [TAPS-1:0]  addr,
    output logic [OUT_W-1:0] z
);

  function automatic logic [OUT_W-1:0] partial_sum(int unsigned a);
    logic [OUT_W-1:0] acc;
    acc = '0;
    for (int unsigned k = 0; k < TAPS; k++)
      if (a[k]) acc += OUT_W'(COEFS[k*COEF_W +: COEF_W]);
    return acc;
  endfunction

  logic [OUT_W-1:0] rom [2**TAPS];

  for (genvar a = 0; a < 2**TAPS; a++) begin : g_rom
    assign rom[a] = partial_sum(a);
  end

  assign z = rom[addr];

endmodule
