// End-to-end test of fir_tdf_sa_opt at its default parameters (121 taps,
// 8-bit input, 25-bit output, default coefficient set).
//
// A reference model keeps the input history and computes
// y[n] = sum c_i * x[n-i] in 64-bit arithmetic; the filter output is
// compared with it every cycle after reset.  Stimulus:
//   1. random samples;
//   2. the two worst-case input sequences, which drive the output to the
//      largest positive and the largest negative value it can reach (every
//      x[n-i] at the input extreme whose sign matches c_i), so every width
//      derived from range estimation is exercised at its limit;
//   3. a synchronous reset in the middle of a stream, after which the
//      output must again be exact from the first sample (no start-up
//      transient).
// The test also counts how often the mechanisms of the bisected delay line
// were active: the split plan has a first split and merge/split taps, the
// final merge sees carries and borrows from the lower into the upper part,
// and the lower part of a merge/split tap carries into its upper part.
// The output is combinational from x, so each check samples y just before
// the clock edge that consumes x: zero cycles of latency for the c_0 term,
// and one extra cycle per tap for the others.
module tb_fir_tdf_sa_opt;
  localparam int N  = fir_sa_pkg::FILTER_B_TAPS;
  localparam int WX = 8;
  localparam int WY = 25;

  logic                 clk = 1'b0;
  logic                 rst_n = 1'b0;
  logic signed [WX-1:0] x = '0;
  logic signed [WY-1:0] y;

  int checks = 0;
  int failures = 0;
  int n_final_carry = 0, n_final_borrow = 0, n_mb_carry = 0;
  int n_max_hit = 0, n_min_hit = 0, n_reset_mid = 0;

  fir_tdf_sa_opt dut (.clk, .rst_n, .x, .y);

  always #5 clk = ~clk;

  longint hist [N];      // hist[k] = x[n-k] as the model sees it
  longint c [N];
  longint ymax, ymin;

  function automatic longint model_y();
    longint acc;
    acc = 0;
    for (int k = 0; k < N; k++) acc += c[k] * hist[k];
    return acc;
  endfunction

  // present one sample, check the output, then clock it in
  task automatic step(input logic signed [WX-1:0] xv, input bit do_rst = 1'b0);
    longint exp_y;
    @(negedge clk);
    x     = xv;
    rst_n = !do_rst;
    hist[0] = longint'(xv);
    #1;
    if (!do_rst) begin
      exp_y = model_y();
      checks++;
      if (longint'(y) != exp_y) begin
        failures++;
        if (failures < 10) $display("MISMATCH t=%0t y=%0d expected=%0d", $time, y, exp_y);
      end
      if (exp_y == ymax) n_max_hit++;
      if (exp_y == ymin) n_min_hit++;
    end
    @(posedge clk);
    if (do_rst) for (int k = 0; k < N; k++) hist[k] = 0;
    else        for (int k = N - 1; k > 0; k--) hist[k] = hist[k-1];
  endtask

  // final-merge and merge/split activity, sampled before each clock edge
  always @(negedge clk) begin
    #2;
    if (rst_n) begin
      if (dut.g_tap[0].g_final.u_sa.lf_u > 0) n_final_carry++;
      if (dut.g_tap[0].g_final.u_sa.lf_u < 0) n_final_borrow++;
    end
  end

  initial begin
    for (int k = 0; k < N; k++) begin
      c[k]    = longint'(fir_sa_pkg::FILTER_B_COEF[k]);
      hist[k] = 0;
    end
    ymax = 0;
    ymin = 0;
    for (int k = 0; k < N; k++) begin
      ymax += (c[k] >= 0) ? c[k] * 127 : c[k] * -128;
      ymin += (c[k] >= 0) ? c[k] * -128 : c[k] * 127;
    end
    $display("plan: first split at tap %0d, %0d merge/split taps", dut.FIRST_BISECT,
             dut.NUM_MERGE_BISECT);

    // reset
    repeat (3) step('0, 1'b1);
    // 1. random
    repeat (600) step(WX'($urandom));
    // 2. worst cases: x[n-i] = extreme of sign c_i, for i = N-1 .. 0
    for (int i = N - 1; i >= 0; i--) step((c[i] >= 0) ? 8'sd127 : -8'sd128);
    for (int i = N - 1; i >= 0; i--) step((c[i] >= 0) ? -8'sd128 : 8'sd127);
    repeat (200) step(WX'($urandom));
    // 3. reset in mid-stream, then random again
    step(WX'($urandom), 1'b1);
    n_reset_mid++;
    repeat (300) step(WX'($urandom));
    // long runs of extremes
    repeat (150) step(8'sd127);
    repeat (150) step(-8'sd128);
    repeat (150) step(($urandom % 2) ? 8'sd127 : -8'sd128);

    $display("mechanisms: first_split=%0d merge_split_taps=%0d final_carry=%0d final_borrow=%0d max_out=%0d min_out=%0d mid_reset=%0d",
             dut.FIRST_BISECT, dut.NUM_MERGE_BISECT, n_final_carry, n_final_borrow,
             n_max_hit, n_min_hit, n_reset_mid);
    if (dut.FIRST_BISECT <= 0)      begin failures++; $display("no split in the plan"); end
    if (dut.NUM_MERGE_BISECT == 0)  begin failures++; $display("no merge/split tap"); end
    if (n_final_carry == 0)         begin failures++; $display("final merge never carried"); end
    if (n_final_borrow == 0)        begin failures++; $display("final merge never borrowed"); end
    if (n_max_hit == 0)             begin failures++; $display("largest output never reached"); end
    if (n_min_hit == 0)             begin failures++; $display("smallest output never reached"); end
    checks += 6;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
