// tb_da_lut: self-checking test of the DA lookup table.
// For the default four coefficients, every one of the 16 addresses is read
// and compared with the sum of the selected coefficients, computed here.
module tb_da_lut;
  localparam int unsigned COEF_W = 32;
  localparam logic [4*COEF_W-1:0] COEFS = da_pkg::COEFS4;
  logic [3:0] addr;
  logic [COEF_W+1:0] z;
  int checks = 0, failures = 0;

  da_lut dut (.addr, .z);

  initial begin
    for (int a = 0; a < 16; a++) begin
      logic [COEF_W+1:0] e;
      e = '0;
      for (int k = 0; k < 4; k++)
        if (a[k]) e = e + (COEF_W+2)'(COEFS[k*COEF_W +: COEF_W]);
      addr = 4'(a);
      #1;
      checks++;
      if (z !== e) begin failures++; $display("FAIL addr %0d: %h vs %h", a, z, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
