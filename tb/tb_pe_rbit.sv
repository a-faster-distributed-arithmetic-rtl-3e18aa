// tb_pe_rbit: self-checking test of the r-bit processing element.
// For R = 8 and R = 1 it drives random i1, i2, c1_in and checks, after each
// enabled clock, that the registered word keeps the arithmetic:
//   s + 2^R * c + 2^(R+1) * c1 = i1 + i2 + c1_in + 2^(R-1) * c_prev
// (c_prev being the own carry fed back into the last cell). Clear is checked.
module tb_pe_rbit;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0;
  logic [7:0] i1 = '0, i2 = '0;
  logic c1_in = 1'b0;
  logic [7:0] s8;
  logic c8, c18;
  logic s1, c1, c11;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pe_rbit #(.R(8)) u8 (.clk, .rst_n, .clr, .en, .i1, .i2, .c1_in, .s(s8), .c(c8), .c1(c18));
  pe_rbit #(.R(1)) u1 (.clk, .rst_n, .clr, .en, .i1(i1[0]), .i2(i2[0]), .c1_in,
                       .s(s1), .c(c1), .c1(c11));

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 500; t++) begin
      int unsigned e8, e1;
      i1 = 8'($urandom); i2 = 8'($urandom); c1_in = 1'($urandom);
      en = ($urandom % 5) != 0; clr = ($urandom % 20) == 0;
      e8 = i1 + i2 + c1_in + (c8 << 7);
      e1 = i1[0] + i2[0] + c1_in + c1;
      if (clr) begin e8 = 0; e1 = 0; end
      else if (!en) begin
        e8 = s8 + (c8 << 8) + (c18 << 9);
        e1 = s1 + (c1 << 1) + (c11 << 2);
      end
      @(negedge clk);
      checks += 2;
      if (s8 + (c8 << 8) + (c18 << 9) != e8) begin failures++; $display("FAIL r=8 t=%0d", t); end
      if (s1 + (c1 << 1) + (c11 << 2) != e1) begin failures++; $display("FAIL r=1 t=%0d", t); end
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
