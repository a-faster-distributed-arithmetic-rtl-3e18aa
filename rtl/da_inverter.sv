// da_inverter: the "Inverter" between a LUT and the accumulator.
//
// When the sign bits of the samples address the LUT, the LUT word has to be
// subtracted instead of added. Two's complement negation is ~Z + 1; this
// block does only the bitwise inversion (a row of XOR gates driven by INV),
// and the +1 is deferred to the final carry-propagate adder as a
// compensating one, so no carry chain is needed here. Purely combinational.
module da_inverter #(
    parameter int unsigned W = da_pkg::LUT_W
) (
    input  logic         inv,
    input  logic [W-1:0] a,
    output logic [W-1:0] y
);

  assign y = a ^ {W{inv}};

endmodule
