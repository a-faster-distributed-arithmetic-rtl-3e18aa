// tb_pda2_mac4: self-checking test of the 2-bit parallel DA MAC.
//
// Two instances run the same operations: the default size (N = 32) and
// N = 8, whose short words make carries reach the top cells often. Each
// operation applies four samples, waits for done, and compares y with
// sum_k A_k * x_k computed here with wide signed integer arithmetic. It also
// checks that done rises N/2+3 clocks after start (load, N/2 two-bit clocks,
// the adder-array flush, the accumulator's last clock). Samples include the
// extremes and random words. A third instance has all coefficients at
// 2^32-1.
module tb_pda2_mac4;
  localparam int unsigned N = 32;
  localparam int unsigned COEF_W = 32;
  localparam int unsigned L = COEF_W + 2;
  localparam logic [4*COEF_W-1:0] COEFS = da_pkg::COEFS4;
  localparam int NOPS = 300;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [3:0][N-1:0] x;
  logic busy1, busy8, done1, done8;
  logic signed [N+L-1:0] y1;
  logic signed [8+L-1:0] y8;
  logic [3:0][7:0] x8;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pda2_mac4 dut1 (.clk, .rst_n, .start, .x, .busy(busy1), .done(done1), .y(y1));
  pda2_mac4 #(.N(8)) dut8 (.clk, .rst_n, .start(start8), .x(x8), .busy(busy8), .done(done8), .y(y8));

  logic start8 = 1'b0;
  // Largest coefficients: every LUT word reaches its top bits.
  logic busym, donem;
  logic signed [N+L-1:0] ym;
  pda2_mac4 #(.COEFS('1)) dutm (.clk, .rst_n, .start, .x, .busy(busym), .done(donem), .y(ym));

  function automatic logic signed [127:0] ref_max(logic [3:0][N-1:0] xs);
    logic signed [127:0] acc = 0;
    for (int k = 0; k < 4; k++) acc += 128'(33'h0_FFFF_FFFF) * 128'($signed(xs[k]));
    return acc;
  endfunction

  function automatic logic signed [127:0] ref_mac(logic [3:0][N-1:0] xs);
    logic signed [127:0] acc = 0;
    for (int k = 0; k < 4; k++)
      acc += $signed({96'd0, COEFS[k*COEF_W +: COEF_W]}) *
             128'($signed(xs[k]));
    return acc;
  endfunction

  function automatic logic signed [127:0] ref_mac8(logic [3:0][7:0] xs);
    logic signed [127:0] acc = 0;
    for (int k = 0; k < 4; k++)
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

  task automatic run_op(logic [3:0][N-1:0] xs);
    logic signed [127:0] exp_y, exp_y8;
    int cycles;
    x = xs;
    for (int k = 0; k < 4; k++) x8[k] = xs[k][N-1 -: 8];
    exp_y = ref_mac(xs);
    exp_y8 = ref_mac8(x8);
    @(negedge clk) begin start = 1'b1; start8 = 1'b1; end
    @(negedge clk) begin start = 1'b0; start8 = 1'b0; end
    cycles = 1;
    while (!done1) begin
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (cycles != N / 2 + 3) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", cycles, N / 2 + 3);
    end
    checks += 3;
    if (!donem || 128'(ym) != ref_max(xs)) begin failures++; $display("FAIL max coefs x=%h y=%h", xs, ym); end
    if (128'(y1) != exp_y) begin failures++; $display("FAIL n=32 x=%h y=%h exp=%h", xs, y1, exp_y); end
    if (!done8 || 128'(y8) != exp_y8) begin failures++; $display("FAIL n=8 x=%h y=%h exp=%h", x8, y8, exp_y8); end
  endtask

  initial begin
    x = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // every combination of extreme samples
    for (int a = 0; a < 4 * 4 * 4 * 4; a++) begin
      logic [3:0][N-1:0] xs;
      for (int k = 0; k < 4; k++) xs[k] = pick((a >> (2 * k)) & 3);
      run_op(xs);
    end
    for (int i = 0; i < NOPS; i++) begin
      logic [3:0][N-1:0] xs;
      for (int k = 0; k < 4; k++) xs[k] = pick($urandom);
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
