// tb_out_shift_reg: self-checking test of the product-bit shift register.
// Shifts in random bit streams (with enable gaps and clears) and compares
// the register with a reference model: after N enabled shifts q[0] holds the
// first bit taken.
module tb_out_shift_reg;
  localparam int unsigned N = 31;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0, din = 1'b0;
  logic [N-1:0] q, model;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  out_shift_reg dut (.clk, .rst_n, .clr, .en, .din, .q);

  initial begin
    model = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 500; t++) begin
      din = 1'($urandom); en = ($urandom % 4) != 0; clr = ($urandom % 50) == 0;
      if (clr) model = '0;
      else if (en) model = {din, model[N-1:1]};
      @(negedge clk);
      checks++;
      if (q != model) begin failures++; $display("FAIL t=%0d q=%h exp %h", t, q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
