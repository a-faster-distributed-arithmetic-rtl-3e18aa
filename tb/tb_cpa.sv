// tb_cpa: self-checking test of the final carry-propagate adder.
// With the default width and compensating constant (K = 1), random sum and
// carry words are added with IO off and on, including all-ones words that
// make a carry ripple through every bit; the result must be a + b + IO*K
// modulo 2^W.
module tb_cpa;
  localparam int unsigned W = 35;
  logic [W-1:0] a, b, y;
  logic io;
  int checks = 0, failures = 0;

  cpa dut (.a, .b, .io, .y);

  initial begin
    for (int i = 0; i < 300; i++) begin
      logic [W:0] e;
      if (i < 4) begin a = '1; b = W'(i); end
      else begin a = W'({$urandom, $urandom}); b = W'({$urandom, $urandom}); end
      io = i[0];
      e = (W+1)'(a) + (W+1)'(b) + (W+1)'(io);
      #1;
      checks++;
      if (y != e[W-1:0]) begin failures++; $display("FAIL a=%h b=%h io=%b y=%h", a, b, io, y); end
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
