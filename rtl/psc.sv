// psc: parallel-to-serial converter (PSC) for one data sample x_k.
//
// A DA MAC reads its samples one bit position at a time, LSB first. The PSC
// captures an N-bit word on `load` and, on every `shift`, moves it BPC bit
// positions towards the LSB, filling with zeros. `dout` shows the BPC lowest
// bits: BPC = 1 for the serial designs, BPC = 2 for the 2-bit parallel design
// (dout[0] is the even bit 2i, dout[1] the odd bit 2i+1). Filling with zeros
// makes the LUT address 0 once all bits are out, so the LUT then outputs 0;
// that zero fill is a choice of this RTL. `load` wins over `shift`.
// Timing: dout is valid in the cycle after the load edge and changes after
// every shift edge.
module psc #(
    parameter int unsigned N   = 32,
    parameter int unsigned BPC = 1
) (
    input  logic           clk,
    input  logic           rst_n,
    input  logic           load,
    input  logic           shift,
    input  logic [N-1:0]   din,
    output logic [BPC-1:0] dout
);

  logic [N-1:0] sr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sr_q <= '0;
    else if (load)  sr_q <= din;
    else if (shift) sr_q <= sr_q >> BPC;
  end

  assign dout = sr_q[BPC-1:0];

endmodule
