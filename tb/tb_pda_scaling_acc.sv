// tb_pda_scaling_acc: self-checking test of the 2-bit scaling accumulator,
// at N = 8, W_IN = 10 (18 cells). Each run clears it and applies N/2+1 random
// input words and ff bits; a reference follows V <= I + V/4 with
// I = in * 2^N + ff * 2^(N-1). The accumulator's value s + 2c must equal the
// reference after every clock (nothing may leave the bottom cells).
module tb_pda_scaling_acc;
  localparam int unsigned N = 8, W_IN = 10, M = N + W_IN;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0;
  logic [W_IN-1:0] in = '0;
  logic ff_in = 1'b0;
  logic [M-1:0] s, c;
  longint unsigned model;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pda_scaling_acc #(.N(N), .W_IN(W_IN)) dut (.clk, .rst_n, .clr, .en, .in, .ff_in, .s, .c);

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 100; run++) begin
      clr = 1'b1; @(negedge clk); clr = 1'b0; en = 1'b1;
      // First word arrives with ff = 0, as in the design.
      model = 0;
      for (int t = 0; t <= N / 2; t++) begin
        in = (run % 5 == 0) ? '1 : W_IN'($urandom);
        ff_in = (t == 0) ? 1'b0 : 1'($urandom);
        model = (longint'(in) << N) + (longint'(ff_in) << (N - 1)) + (model >> 2);
        @(negedge clk);
        checks++;
        if (longint'(s) + (longint'(c) << 1) != model) begin
          failures++; $display("FAIL run %0d t %0d: %0d vs %0d", run, t,
                               longint'(s) + (longint'(c) << 1), model);
        end
      end
      en = 1'b0;
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
