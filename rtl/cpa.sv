// cpa: final carry-propagate adder with the compensating one.
//
// After the last clock the accumulator still holds its value as separate sum
// and carry words; this adder resolves them: y = a + b + (io ? K : 0),
// modulo 2^W. It is combinational and sits outside the clocked loop, so its
// carry chain does not set the clock period.
// K carries the compensating one(s): each inversion ~Z = -Z - 1 done in the
// sign cycle left out a +1, which is put back here, at the weight of the
// inverted word's LSB, when IO is set. This RTL also places in K one bit at
// the result's MSB position. The inverted word is zero-extended in the
// accumulator, which leaves the result offset by exactly 2^(W-1); adding
// that bit (i.e. flipping the MSB) turns the sum into a proper two's
// complement number. The designs pass K as a parameter.
module cpa #(
    parameter int unsigned W = da_pkg::LUT_W + 1,
    parameter logic [W-1:0] K = W'(1)
) (
    input  logic [W-1:0] a,
    input  logic [W-1:0] b,
    input  logic         io,
    output logic [W-1:0] y
);

  assign y = a + b + (io ? K : W'(0));

endmodule
