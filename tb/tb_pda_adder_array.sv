// tb_pda_adder_array: self-checking test of the 2-bit scaling adder array.
// Random z (weight 1) and z1 (weight 2) words are applied; after each clock
//   s + 2c  ==  z + 2*z1 + (carries of PEs 1..W before the clock) / 4 * 2
// i.e. every PE k added the carry of PE k+1, and ff holds the carry PE 0 had
// before the clock. A flush clock with zero inputs must leave no carries.
module tb_pda_adder_array;
  localparam int unsigned W = 34;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0;
  logic [W-1:0] z = '0, z1 = '0;
  logic [W:0] s, c;
  logic ff;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pda_adder_array #(.W(W)) dut (.clk, .rst_n, .clr, .en, .z, .z1, .s, .c, .ff);

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 40; run++) begin
      clr = 1'b1; @(negedge clk); clr = 1'b0; en = 1'b1;
      for (int t = 0; t <= 16; t++) begin
        logic [W+2:0] lhs, rhs;
        logic c0;
        c0 = c[0];
        z  = (t == 16) ? '0 : ((run % 4 == 0) ? '1 : W'({$urandom, $urandom}));
        z1 = (t == 16) ? '0 : ((run % 4 == 0) ? '1 : W'({$urandom, $urandom}));
        rhs = (W+3)'(z) + ((W+3)'(z1) << 1) + ((W+3)'(c) >> 1);
        @(negedge clk);
        lhs = (W+3)'(s) + ((W+3)'(c) << 1);
        checks += 2;
        if (lhs != rhs) begin failures++; $display("FAIL value run %0d t %0d", run, t); end
        if (ff != c0) begin failures++; $display("FAIL ff run %0d t %0d", run, t); end
      end
      en = 1'b0;
      checks++;
      if (c != '0) begin failures++; $display("FAIL carries left run %0d", run); end
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
