// tb_psc: self-checking test of the parallel-to-serial converter.
// A 1-bit and a 2-bit-per-clock instance are loaded with random words and
// shifted; every output bit is compared with the matching bit of the word
// (zero once the word is exhausted). Load priority over shift is checked.
module tb_psc;
  localparam int unsigned N = 32;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, shift = 1'b0;
  logic [N-1:0] din;
  logic d1;
  logic [1:0] d2;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  psc #(.N(N), .BPC(1)) u1 (.clk, .rst_n, .load, .shift, .din, .dout(d1));
  psc #(.N(N), .BPC(2)) u2 (.clk, .rst_n, .load, .shift, .din, .dout(d2));

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    din = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 50; t++) begin
      logic [N-1:0] w;
      w = $urandom;
      din = w;
      load = 1'b1; shift = (t % 2 == 1);   // load wins over shift
      @(negedge clk);
      load = 1'b0; shift = 1'b1;
      for (int b = 0; b < N + 2; b++) begin
        check(d1 == ((b < N) ? w[b] : 1'b0), $sformatf("1-bit psc bit %0d", b));
        if (2 * b < N) check(d2 == w[2*b +: 2], $sformatf("2-bit psc step %0d", b));
        else           check(d2 == 2'b00, "2-bit psc zero fill");
        @(negedge clk);
      end
      shift = 1'b0;
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
