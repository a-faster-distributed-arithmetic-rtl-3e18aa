// pe_bit: bit-level processing element (PE).
//
// A full adder whose sum and carry are both registered: on an enabled clock
// {c, s} <= i1 + i2 + i3. The PE never passes its carry on within the same
// clock, so a row of PEs has no carry chain. The neighbours decide what i3
// is: in the serial designs it is the PE's own carry `c` fed back (the
// accumulator shifts by one bit per clock, so the carry, of weight 2, has
// weight 1 in the next clock); in the 2-bit parallel design it is the carry
// of the next more significant PE (scaling by 4 per clock moves a carry one
// position down). `clr` zeroes both flip-flops and wins over `en`.
// Timing: one clock from inputs to s and c.
module pe_bit (
    input  logic clk,
    input  logic rst_n,
    input  logic clr,
    input  logic en,
    input  logic i1,
    input  logic i2,
    input  logic i3,
    output logic s,
    output logic c
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   {c, s} <= 2'b00;
    else if (clr) {c, s} <= 2'b00;
    else if (en)  {c, s} <= 2'(i1) + 2'(i2) + 2'(i3);
  end

endmodule
