// tb_sda_shift_acc: self-checking test of the carry-save shift accumulator.
// Instances with bit-level PEs (R = 1) and 8-bit PEs (R = 8), W = 34, take
// the same random words (enable gaps and clears included). A reference value
// follows V <= z + (V - lsb) / 2; after each clock the accumulator's value
// s + cv must equal it, and s[0] must be its LSB.
module tb_sda_shift_acc;
  localparam int unsigned W = 34;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0;
  logic [W-1:0] z = '0, s1, s8;
  logic [W+1:0] cv1, cv8;
  longint unsigned model;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sda_shift_acc #(.W(W), .R(1)) u1 (.clk, .rst_n, .clr, .en, .z, .s(s1), .cv(cv1));
  sda_shift_acc #(.W(W), .R(8)) u8 (.clk, .rst_n, .clr, .en, .z, .s(s8), .cv(cv8));

  initial begin
    model = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      z = (t % 7 == 0) ? '1 : W'({$urandom, $urandom});
      en = ($urandom % 6) != 0; clr = ($urandom % 64) == 0;
      if (clr) model = 0;
      else if (en) model = longint'(z) + (model >> 1);
      @(negedge clk);
      checks += 4;
      if (longint'(s1) + longint'(cv1) != model) begin failures++; $display("FAIL r=1 value t=%0d", t); end
      if (longint'(s8) + longint'(cv8) != model) begin failures++; $display("FAIL r=8 value t=%0d", t); end
      if (s1[0] != model[0]) begin failures++; $display("FAIL r=1 lsb t=%0d", t); end
      if (s8[0] != model[0]) begin failures++; $display("FAIL r=8 lsb t=%0d", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
