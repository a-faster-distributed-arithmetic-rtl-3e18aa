// tb_da_inverter: self-checking test of the sign-cycle inverter.
// Random words pass unchanged with inv = 0 and come out as their one's
// complement with inv = 1; also checks that a + y = 2^W - 1 when inverted.
module tb_da_inverter;
  localparam int unsigned W = 34;
  logic inv;
  logic [W-1:0] a, y;
  int checks = 0, failures = 0;

  da_inverter #(.W(W)) dut (.inv, .a, .y);

  initial begin
    for (int i = 0; i < 200; i++) begin
      a = W'({$urandom, $urandom});
      inv = i[0];
      #1;
      checks++;
      if (inv ? ((W+1)'(a) + (W+1)'(y) != (W+1)'({W{1'b1}})) : (y != a)) begin
        failures++;
        $display("FAIL inv=%b a=%h y=%h", inv, a, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
