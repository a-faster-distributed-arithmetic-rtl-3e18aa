// tb_da_top: end-to-end test of all five DA MACs at full size (N = 32,
// 32-bit coefficients, default parameters).
//
// Every design runs a series of operations on random and extreme samples,
// started at independent moments so the designs overlap in time; starts
// while busy are also issued and must be ignored. Each result is compared
// with sum_k A_k * x_k computed here, and each latency with the expected
// clock count (N+1, N+1, N+3, N+3, N/2+3 including the load clock).
// It also counts how often the mechanisms of the carry-free designs occur
// and fails if one never does:
//   sign subtraction  an operation with a negative sample (inverted LUT word)
//   C1 carry          an r-bit PE passing its high carry C1 to the next PE,
//                     in the r-bit accumulator and in the r-bit adder array
//   residual carry    carries left in the two-LUT adder array after the last
//                     data clock, removed by the extra flush clock
//   FF carry          the 2-bit adder array's lowest carry entering the
//                     accumulator through the FF
//   ignored start     a start during an operation
module tb_da_top;
  localparam int unsigned N = 32;
  localparam int unsigned COEF_W = 32;
  localparam int unsigned L = COEF_W + 2;
  localparam logic [4*COEF_W-1:0] C4 = da_pkg::COEFS4;
  localparam logic [8*COEF_W-1:0] C8 = da_pkg::COEFS8;
  localparam int NOPS = 150;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [4:0] start = '0;
  logic [3:0][N-1:0] x1, xr, xp;
  logic [7:0][N-1:0] x2, x2r;
  logic [4:0] busy, done;
  logic signed [N+L-1:0] y1, yr, yp;
  logic signed [N+L:0] y2, y2r;
  int checks = 0, failures = 0;
  int n_neg = 0, n_c1 = 0, n_c1a = 0, n_resid = 0, n_ff = 0, n_ign = 0;

  always #5 clk = ~clk;

  da_top dut (
      .clk, .rst_n,
      .sda1_start(start[0]), .sda1_x(x1), .sda1_busy(busy[0]), .sda1_done(done[0]), .sda1_y(y1),
      .sdar_start(start[1]), .sdar_x(xr), .sdar_busy(busy[1]), .sdar_done(done[1]), .sdar_y(yr),
      .sda2_start(start[2]), .sda2_x(x2), .sda2_busy(busy[2]), .sda2_done(done[2]), .sda2_y(y2),
      .sda2r_start(start[4]), .sda2r_x(x2r), .sda2r_busy(busy[4]), .sda2r_done(done[4]), .sda2r_y(y2r),
      .pda2_start(start[3]), .pda2_x(xp), .pda2_busy(busy[3]), .pda2_done(done[3]), .pda2_y(yp)
  );

  function automatic logic signed [127:0] ref_mac(logic [7:0][N-1:0] xs, int taps);
    logic signed [127:0] acc = 0;
    for (int k = 0; k < taps; k++)
      acc += $signed({96'd0, C8[k*COEF_W +: COEF_W]}) * 128'($signed(xs[k]));
    return acc;
  endfunction

  function automatic logic [N-1:0] pick();
    case ($urandom % 6)
      0: return {1'b1, {(N-1){1'b0}}};
      1: return {1'b0, {(N-1){1'b1}}};
      2: return '1;
      default: return N'($urandom);
    endcase
  endfunction

  // Mechanism monitors.
  always @(posedge clk) begin
    if (dut.u_sdar.busy && dut.u_sdar.u_acc.g_rbit.c1_chain[4:1] != '0) n_c1++;
    if (dut.u_sda2r.busy && dut.u_sda2r.u_add.g_rbit.c1_chain[4:1] != '0) n_c1a++;
    if (dut.u_pda2.busy && dut.u_pda2.u_acc.ff_in) n_ff++;
    if (dut.u_sda2.busy && dut.u_sda2.cnt == 6'(N) && dut.u_sda2.ca != '0) n_resid++;
  end

  // One driver per design: d = 0 sda1, 1 sdar, 2 sda2, 3 pda2, 4 sda2r.
  task automatic driver(int d);
    int lat_exp;
    lat_exp = (d == 2 || d == 4) ? N + 3 : (d == 3) ? N / 2 + 3 : N + 1;
    for (int op = 0; op < NOPS; op++) begin
      logic [7:0][N-1:0] xs;
      logic signed [127:0] e, got;
      int cyc;
      for (int k = 0; k < 8; k++) xs[k] = pick();
      // The 4-product designs use coefficients A0..A3, which equal C4.
      e = ref_mac(xs, (d == 2 || d == 4) ? 8 : 4);
      if (xs[0][N-1] | xs[1][N-1] | xs[2][N-1] | xs[3][N-1]) n_neg++;
      case (d)
        0: x1 = xs[3:0];
        1: xr = xs[3:0];
        2: x2 = xs;
        4: x2r = xs;
        default: xp = xs[3:0];
      endcase
      repeat ($urandom % 3) @(negedge clk);
      start[d] = 1'b1;
      @(negedge clk);
      start[d] = 1'b0;
      cyc = 1;
      while (!done[d]) begin
        if (cyc == 5 && op % 10 == 3) begin
          start[d] = 1'b1; n_ign++;
        end else start[d] = 1'b0;
        @(negedge clk);
        cyc++;
      end
      start[d] = 1'b0;
      case (d)
        0: got = 128'(y1);
        1: got = 128'(yr);
        2: got = 128'(y2);
        4: got = 128'(y2r);
        default: got = 128'(yp);
      endcase
      checks += 2;
      if (cyc != lat_exp) begin failures++; $display("FAIL design %0d latency %0d exp %0d", d, cyc, lat_exp); end
      if (got != e) begin failures++; $display("FAIL design %0d op %0d y=%h exp=%h", d, op, got, e); end
    end
  endtask

  initial begin
    x1 = '0; xr = '0; x2 = '0; x2r = '0; xp = '0;
    if (C8[0 +: 4*COEF_W] != C4) begin failures++; $display("FAIL coefficient sets differ"); end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    fork
      driver(0);
      driver(1);
      driver(2);
      driver(3);
      driver(4);
    join
    checks += 6;
    if (n_neg == 0)   begin failures++; $display("FAIL no sign subtraction"); end
    if (n_c1 == 0)    begin failures++; $display("FAIL no C1 carry between r-bit PEs"); end
    if (n_c1a == 0)   begin failures++; $display("FAIL no C1 carry in the r-bit adder array"); end
    if (n_resid == 0) begin failures++; $display("FAIL no residual adder-array carry"); end
    if (n_ff == 0)    begin failures++; $display("FAIL no FF carry"); end
    if (n_ign == 0)   begin failures++; $display("FAIL no ignored start"); end
    $display("mechanisms: sign=%0d c1=%0d c1_array=%0d residual=%0d ff=%0d ignored_start=%0d",
             n_neg, n_c1, n_c1a, n_resid, n_ff, n_ign);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
