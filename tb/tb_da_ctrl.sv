// tb_da_ctrl: self-checking test of the operation sequencer.
// With DATA = 5 and EXTRA = 2 it starts operations (including a start while
// busy, which must be ignored) and checks cycle by cycle: load only on an
// accepted start, busy for exactly DATA+EXTRA clocks with cnt counting from 0,
// inv only in the last data cycle, done from the end until the next start.
module tb_da_ctrl;
  localparam int unsigned DATA = 5, EXTRA = 2;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic load, busy, inv, done;
  logic [2:0] cnt;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  da_ctrl #(.DATA(DATA), .EXTRA(EXTRA)) dut (.clk, .rst_n, .start, .load, .busy, .cnt, .inv, .done);

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(!busy && !done && !load, "idle after reset");
    for (int op = 0; op < 5; op++) begin
      start = 1'b1;
      #1 check(load, "load on start");
      @(negedge clk);
      start = (op == 2);   // a start while busy is ignored
      for (int t = 0; t < DATA + EXTRA; t++) begin
        #1;
        check(busy && !done, $sformatf("busy step %0d", t));
        check(cnt == 3'(t), $sformatf("cnt step %0d", t));
        check(inv == (t == DATA - 1), $sformatf("inv step %0d", t));
        check(!load, "no load while busy");
        @(negedge clk);
        start = 1'b0;
      end
      check(!busy && done, "done after the last step");
      repeat (op) begin @(negedge clk); check(done && !busy, "done holds"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
