// tb_pe_bit: self-checking test of the bit-level processing element.
// Drives all eight input combinations and random sequences with clear and
// enable; after each clock, {c, s} must equal the sum of the three inputs
// (when enabled), keep its value (when not), or be zero (after clear).
module tb_pe_bit;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0;
  logic i1 = 1'b0, i2 = 1'b0, i3 = 1'b0;
  logic s, c;
  logic [1:0] model;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pe_bit dut (.clk, .rst_n, .clr, .en, .i1, .i2, .i3, .s, .c);

  initial begin
    model = 2'b00;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      if (t < 8) begin
        {i1, i2, i3} = 3'(t); en = 1'b1; clr = 1'b0;
      end else begin
        {i1, i2, i3} = 3'($urandom); en = ($urandom % 4) != 0; clr = ($urandom % 10) == 0;
      end
      if (clr)     model = 2'b00;
      else if (en) model = 2'(i1) + 2'(i2) + 2'(i3);
      @(negedge clk);
      checks++;
      if ({c, s} != model) begin failures++; $display("FAIL t=%0d {c,s}=%b exp %b", t, {c, s}, model); end
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
