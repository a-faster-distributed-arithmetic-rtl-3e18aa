// da_ctrl: sequencer of a DA multiply-accumulate operation.
//
// A `start` while idle is accepted on that clock edge: `load` is high in that
// cycle, so the PSCs capture the samples and the accumulators are cleared.
// The controller then stays `busy` for STEPS = DATA + EXTRA clocks, counting
// them in `cnt` (0 in the first busy cycle). DATA is the number of clocks
// that present LUT words (n for serial, n/2 for 2-bit parallel); EXTRA are
// the pipeline and carry-flush clocks of the design. `inv` is high in the
// last data cycle, when the sign bits address the LUT, so the LUT word is
// inverted. After the last step `done` rises and stays high until the next
// start; the datapath uses it as IO, the signal that adds the compensating
// one in the final adder, so the result is valid while `done` is high.
// A start while busy is ignored. The sequencing itself is this RTL's choice;
// the clock counts it gives match the ones reported for the serial designs.
module da_ctrl #(
    parameter int unsigned DATA  = da_pkg::WORD_N,
    parameter int unsigned EXTRA = 0,
    parameter int unsigned CW    = $clog2(DATA + EXTRA + 1)
) (
    input  logic          clk,
    input  logic          rst_n,
    input  logic          start,
    output logic          load,
    output logic          busy,
    output logic [CW-1:0] cnt,
    output logic          inv,
    output logic          done
);

  localparam int unsigned STEPS = DATA + EXTRA;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      cnt  <= '0;
    end else if (start && !busy) begin
      busy <= 1'b1;
      done <= 1'b0;
      cnt  <= '0;
    end else if (busy) begin
      cnt <= cnt + 1'b1;
      if (cnt == CW'(STEPS - 1)) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

  assign load = start && !busy;
  assign inv  = busy && (cnt == CW'(DATA - 1));

  // busy and done are never high together.
  a_busy_done: assert property (@(posedge clk) disable iff (!rst_n) !(busy && done));

endmodule
