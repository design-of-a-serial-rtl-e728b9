// tb_clk_div: self-checking test of the clock-enable generator.
//
// Runs four dividers side by side: CLKDIV = 2, 4 and 6 with the default
// rising-edge position X = CLKDIV/2-1, and CLKDIV = 6 with X = 0. For each it
// checks, cycle by cycle against a counter kept in the testbench, that re
// and fe are never high together, that each repeats exactly every CLKDIV
// cycles, that fe follows re after CLKDIV-1-X cycles (CLKDIV/2 by default),
// and that the first re appears X+1 cycles after reset is released
// (f_out = f_in / CLKDIV).
module tb_clk_div;
  localparam int N = 4;
  localparam int DIVS [N] = '{2, 4, 6, 6};
  localparam int XS   [N] = '{0, 1, 2, 0};

  logic clk = 1'b0;
  logic rst = 1'b1;
  int   checks = 0, failures = 0;
  int   cyc = 0;
  logic [N-1:0] re, fe;

  always #5 clk = ~clk;

  for (genvar g = 0; g < N; g++) begin : g_div
    localparam int D = DIVS[g];
    localparam int X = XS[g];
    if (g < 3) begin : g_def
      clk_div #(.CLKDIV(D)) dut (.clk(clk), .rst(rst), .re(re[g]), .fe(fe[g]));
    end else begin : g_x
      clk_div #(.CLKDIV(D), .X(X)) dut (.clk(clk), .rst(rst), .re(re[g]), .fe(fe[g]));
    end

    int last_re = -1, last_fe = -1, n_re = 0, n_fe = 0;
    always @(posedge clk) if (!rst) begin
      // cyc counts cycles since reset release, starting at 1 for the first
      checks++;
      if (re[g] && fe[g]) begin failures++; $display("FAIL div %0d: re and fe together", D); end
      if (re[g]) begin
        checks++;
        if (last_re < 0) begin
          if (cyc != X + 1) begin failures++; $display("FAIL div %0d: first re at %0d", D, cyc); end
        end else if (cyc - last_re != D) begin
          failures++; $display("FAIL div %0d: re period %0d", D, cyc - last_re);
        end
        last_re = cyc; n_re++;
      end
      if (fe[g]) begin
        checks++;
        if (last_re < 0 || cyc - last_re != D - 1 - X) begin
          failures++; $display("FAIL div %0d: fe %0d cycles after re", D, cyc - last_re);
        end
        if (last_fe >= 0 && cyc - last_fe != D) begin
          failures++; $display("FAIL div %0d: fe period %0d", D, cyc - last_fe);
        end
        last_fe = cyc; n_fe++;
      end
    end
  end

  always @(posedge clk) if (!rst) cyc <= cyc + 1;

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (120) @(posedge clk);
    // every divider produced about 120 / D pulses (the window edge may cut one)
    checks++;
    if (g_div[0].n_re < 59 || g_div[0].n_re > 60 || g_div[1].n_re < 29 || g_div[1].n_re > 30 ||
        g_div[2].n_re < 19 || g_div[2].n_re > 20 || g_div[3].n_re < 19 || g_div[3].n_re > 20) begin
      failures++;
      $display("FAIL pulse counts %0d %0d %0d", g_div[0].n_re, g_div[1].n_re, g_div[2].n_re);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
