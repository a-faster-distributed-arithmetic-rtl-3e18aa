// tb_fig9_sweep: the one-LUT serial DA MAC over the word sizes and carry
// chain lengths of the cost/performance sweep.
//
// The sweep covers word sizes n = 8, 16, 32 and 64, with n-bit coefficients,
// and PE widths r = 1, 2, 3, 4, 8 and 16. It adds r = n+2, where one PE spans
// the whole accumulator, so the carry chain is as long as the word, as in a
// conventional accumulator. Those are 28 instances of sda1_mac4. Each runs
// its own series of operations on random and extreme samples, and all run at
// the same time. Each result is compared with sum_k A_k * x_k, computed here
// with 256-bit integers. Each latency is checked against n+1 clocks from start
// to done. When r does not divide n+2, the top PE is shorter than r, so these
// odd sizes are covered too.
//
// The coefficients are fixed bit patterns cut to n bits. They include the
// all-ones maximum and a word with only its MSB and LSB set.
module tb_fig9_sweep;
  localparam int NOPS = 40;
  localparam int NUNITS = 28;
  localparam int unsigned NS[4] = '{8, 16, 32, 64};
  localparam int unsigned RS[6] = '{1, 2, 3, 4, 8, 16};

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0, finished = 0, n_neg = 0;

  always #5 clk = ~clk;

  // Four w-bit coefficients, A0 in the low bits.
  function automatic logic [255:0] mk_coefs(int unsigned w);
    logic [63:0] pat[4] = '{64'hFFFF_FFFF_FFFF_FFFF, 64'h0, 64'h3C6E_F372_FE94_F82B,
                            64'h0B50_4F33_9E37_79B9};
    logic [63:0] mask = (w == 64) ? '1 : (64'(1) << w) - 1;
    logic [255:0] r = '0;
    for (int k = 0; k < 4; k++) begin
      logic [63:0] v = (k == 1) ? ((64'(1) << (w - 1)) | 64'(1)) : (pat[k] & mask);
      r |= 256'(v) << (k * w);
    end
    return r;
  endfunction

  function automatic logic signed [255:0] ref_mac(logic [255:0] co, int unsigned w,
                                                  logic [3:0][63:0] xs);
    logic signed [255:0] acc = 0;
    logic [63:0] mask = (w == 64) ? '1 : (64'(1) << w) - 1;
    for (int k = 0; k < 4; k++) begin
      logic signed [63:0] xv = $signed(xs[k] << (64 - w)) >>> (64 - w);
      logic signed [255:0] cv = $signed(256'((co >> (k * w)) & 256'(mask)));
      acc += cv * 256'(xv);
    end
    return acc;
  endfunction

  function automatic logic [63:0] pick(int unsigned w);
    logic [63:0] mask = (w == 64) ? '1 : (64'(1) << w) - 1;
    case ($urandom % 6)
      0: return 64'(1) << (w - 1);
      1: return mask >> 1;
      2: return mask;
      default: return {$urandom, $urandom} & mask;
    endcase
  endfunction

  for (genvar i = 0; i < 4; i++) begin : g_n
    localparam int unsigned NN = NS[i];
    localparam logic [4*NN-1:0] CO = (4 * NN)'(mk_coefs(NN));
    for (genvar j = 0; j < 7; j++) begin : g_r
      localparam int unsigned RR = (j == 6) ? NN + 2 : RS[(j < 6) ? j : 0];
      logic start = 1'b0;
      logic [3:0][NN-1:0] x = '0;
      logic busy, done;
      logic signed [2*NN+1:0] y;

      sda1_mac4 #(.N(NN), .COEF_W(NN), .R(RR), .COEFS(CO)) dut (
          .clk, .rst_n, .start, .x, .busy, .done, .y
      );

      initial begin
        @(posedge rst_n);
        for (int op = 0; op < NOPS; op++) begin
          logic [3:0][63:0] xs;
          logic signed [255:0] e;
          int cyc;
          for (int k = 0; k < 4; k++) begin
            xs[k] = pick(NN);
            x[k] = NN'(xs[k]);
          end
          if (x[0][NN-1] | x[1][NN-1] | x[2][NN-1] | x[3][NN-1]) n_neg++;
          e = ref_mac(256'(CO), NN, xs);
          @(negedge clk);
          start = 1'b1;
          @(negedge clk);
          start = 1'b0;
          cyc = 1;
          while (!done) begin
            @(negedge clk);
            cyc++;
          end
          checks += 2;
          if (cyc != NN + 1) begin
            failures++;
            $display("FAIL n=%0d r=%0d latency %0d", NN, RR, cyc);
          end
          if (256'(y) != e) begin
            failures++;
            $display("FAIL n=%0d r=%0d op %0d y=%h exp=%h", NN, RR, op, 256'(y), e);
          end
        end
        finished++;
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (finished == NUNITS);
    checks++;
    if (n_neg == 0) begin failures++; $display("FAIL no negative sample"); end
    $display("sweep: %0d configurations, %0d operations with a negative sample",
             NUNITS, n_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
