// tb_sda_adder_array: self-checking test of the two-operand adder array.
// Three instances: bit-level PEs (R = 1, W = 34) and r-bit PEs with R = 8 and
// R = 3 (W = 35, top input bit held at 0 as in the two-LUT MAC). Each run
// adds T random word pairs (all-ones words in some runs) and then one flush
// clock with zero inputs. Per clock, s + cv must equal a + b + cv_prev / 2;
// after the flush no carry may be left and sum_t 2^t s(t) must equal
// sum_t 2^t (a + b).
module tb_sda_adder_array;
  localparam int unsigned W = 34;
  localparam int unsigned T = 20;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0;
  logic [W-1:0] a = '0, b = '0;
  logic [W-1:0] s1;
  logic [W:0]   s8, s3;
  logic [W+1:0] cv1;
  logic [W+2:0] cv8, cv3;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sda_adder_array #(.W(W)) u1 (.clk, .rst_n, .clr, .en, .a, .b, .s(s1), .cv(cv1));
  sda_adder_array #(.W(W+1), .R(8)) u8 (.clk, .rst_n, .clr, .en, .a({1'b0, a}), .b({1'b0, b}), .s(s8), .cv(cv8));
  sda_adder_array #(.W(W+1), .R(3)) u3 (.clk, .rst_n, .clr, .en, .a({1'b0, a}), .b({1'b0, b}), .s(s3), .cv(cv3));

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 40; run++) begin
      logic [127:0] want, got1, got8, got3;
      want = 0; got1 = 0; got8 = 0; got3 = 0;
      clr = 1'b1; @(negedge clk); clr = 1'b0; en = 1'b1;
      for (int t = 0; t <= T; t++) begin
        logic [W+3:0] r1, r8, r3;
        a = (t == T) ? '0 : ((run % 3 == 0) ? '1 : W'({$urandom, $urandom}));
        b = (t == T) ? '0 : ((run % 3 == 0) ? '1 : W'({$urandom, $urandom}));
        want += (128'(a) + 128'(b)) << t;
        r1 = (W+4)'(a) + (W+4)'(b) + ((W+4)'(cv1) >> 1);
        r8 = (W+4)'(a) + (W+4)'(b) + ((W+4)'(cv8) >> 1);
        r3 = (W+4)'(a) + (W+4)'(b) + ((W+4)'(cv3) >> 1);
        @(negedge clk);
        got1 += 128'(s1) << t;
        got8 += 128'(s8) << t;
        got3 += 128'(s3) << t;
        check((W+4)'(s1) + (W+4)'(cv1) == r1, $sformatf("r=1 run %0d t %0d", run, t));
        check((W+4)'(s8) + (W+4)'(cv8) == r8, $sformatf("r=8 run %0d t %0d", run, t));
        check((W+4)'(s3) + (W+4)'(cv3) == r3, $sformatf("r=3 run %0d t %0d", run, t));
      end
      en = 1'b0;
      check(cv1 == '0 && cv8 == '0 && cv3 == '0, $sformatf("carries left run %0d", run));
      check(got1 == want, $sformatf("r=1 total run %0d", run));
      check(got8 == want, $sformatf("r=8 total run %0d", run));
      check(got3 == want, $sformatf("r=3 total run %0d", run));
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
