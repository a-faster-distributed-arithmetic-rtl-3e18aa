// tb_sda2_mac8: self-checking test of the two-LUT serial DA MAC.
//
// Instances run the same operations: bit-level PEs in the adder array and
// shift accumulator (R = 1, the default) and 8-bit PEs (R = 8). Each operation
// applies eight samples, waits for done, and compares y with
// sum_k A_k * x_k computed here with wide signed integer arithmetic. It also
// checks that done rises N+3 clocks after start (load, N bit clocks, one
// pipeline clock, one carry-flush clock). Samples include the extremes and
// random words. Further instances: all coefficients at 2^32-1 (R = 1), and
// R = 2 with default and with maximum coefficients.
module tb_sda2_mac8;
  localparam int unsigned N = 32;
  localparam int unsigned COEF_W = 32;
  localparam int unsigned L = COEF_W + 2;
  localparam logic [8*COEF_W-1:0] COEFS = da_pkg::COEFS8;
  localparam int NOPS = 300;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [7:0][N-1:0] x;
  logic busy1, busy8, done1, done8;
  logic signed [N+L:0] y1, y8;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sda2_mac8 dut1 (.clk, .rst_n, .start, .x, .busy(busy1), .done(done1), .y(y1));
  sda2_mac8 #(.R(8)) dut8 (.clk, .rst_n, .start, .x, .busy(busy8), .done(done8), .y(y8));
  // Largest coefficients: every LUT word reaches its top bits.
  logic busym, donem;
  logic signed [N+L:0] ym;
  sda2_mac8 #(.COEFS('1)) dutm (.clk, .rst_n, .start, .x, .busy(busym), .done(donem), .y(ym));
  // r = 2: the arrays become 36 bits wide (a one-cell top PE is avoided).
  logic busy2, done2;
  logic signed [N+L:0] y2, ym2;
  logic busym2, donem2;
  sda2_mac8 #(.R(2)) dut2 (.clk, .rst_n, .start, .x, .busy(busy2), .done(done2), .y(y2));
  sda2_mac8 #(.R(2), .COEFS('1)) dutm2 (.clk, .rst_n, .start, .x, .busy(busym2), .done(donem2), .y(ym2));

  function automatic logic signed [127:0] ref_max(logic [7:0][N-1:0] xs);
    logic signed [127:0] acc = 0;
    for (int k = 0; k < 8; k++) acc += 128'(33'h0_FFFF_FFFF) * 128'($signed(xs[k]));
    return acc;
  endfunction

  function automatic logic signed [127:0] ref_mac(logic [7:0][N-1:0] xs);
    logic signed [127:0] acc = 0;
    for (int k = 0; k < 8; k++)
      acc += $signed({96'd0, COEFS[k*COEF_W +: COEF_W]}) *
             128'($signed(xs[k]));
    return acc;
  endfunction

  function automatic logic [N-1:0] pick(int unsigned sel);
    case (sel % 6)
      0: return {1'b1, {(N-1){1'b0}}};
      1: return {1'b0, {(N-1){1'b1}}};
      2: return '0;
      3: return '1;
      default: return N'({$urandom, $urandom});
    endcase
  endfunction

  task automatic run_op(logic [7:0][N-1:0] xs);
    logic signed [127:0] exp_y;
    int cycles;
    x = xs;
    exp_y = ref_mac(xs);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cycles = 1;
    while (!done1) begin
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (cycles != N + 3) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", cycles, N + 3);
    end
    checks += 5;
    if (!donem || 128'(ym) != ref_max(xs)) begin failures++; $display("FAIL max coefs x=%h y=%h", xs, ym); end
    if (!done2 || 128'(y2) != exp_y) begin failures++; $display("FAIL r=2 x=%h y=%h", xs, y2); end
    if (!donem2 || 128'(ym2) != ref_max(xs)) begin failures++; $display("FAIL r=2 max coefs x=%h y=%h", xs, ym2); end
    if (128'(y1) != exp_y) begin failures++; $display("FAIL r=1 x=%h y=%h exp=%h", xs, y1, exp_y); end
    if (!done8 || 128'(y8) != exp_y) begin failures++; $display("FAIL r=8 x=%h y=%h exp=%h", xs, y8, exp_y); end
  endtask

  initial begin
    x = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // every combination of extreme samples
    for (int a = 0; a < 4 * 4 * 4 * 4; a++) begin
      logic [7:0][N-1:0] xs;
      for (int k = 0; k < 4; k++) xs[k] = pick((a >> (2 * k)) & 3);
      for (int k = 4; k < 8; k++) xs[k] = xs[k-4];
      run_op(xs);
    end
    for (int i = 0; i < NOPS; i++) begin
      logic [7:0][N-1:0] xs;
      for (int k = 0; k < 8; k++) xs[k] = pick($urandom);
      run_op(xs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
