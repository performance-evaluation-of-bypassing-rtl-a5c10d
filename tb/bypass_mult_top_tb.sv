// bypass_mult_top_tb - end-to-end check of the top level at its default size.
//
// Drives both multipliers of bypass_mult_top (N = 4, no parameter override)
// with every pair of operands at the same time, the column bypassing
// multiplier getting a different pair than the array multiplier on each step,
// so a crossed wire between the two shows up. Both products are compared with
// x * y from integer arithmetic, 1 ns after each vector.
//
// The mechanisms of the design are counted, and each must happen at least
// once: a carry fed back from the bottom row into the top cell of the next
// column (in either multiplier), a product MSB produced by the last carry, a
// bypassed diagonal (a zero bit of cbm_y), and a fed-back carry that passes a
// bypassed top cell.
module bypass_mult_top_tb;
  localparam int N = 4;
  logic [N-1:0]   arr_x, arr_y, cbm_x, cbm_y;
  logic [2*N-1:0] arr_p, cbm_p;
  int checks = 0, failures = 0;
  int n_fb_arr = 0, n_fb_cbm = 0, n_msb = 0, n_bypass = 0, n_fb_bypassed = 0;

  bypass_mult_top dut (
    .arr_x (arr_x), .arr_y (arr_y), .arr_p (arr_p),
    .cbm_x (cbm_x), .cbm_y (cbm_y), .cbm_p (cbm_p)
  );

  logic [N-2:0] fb_arr, fb_cbm;   // carries fed back from the bottom rows
  for (genvar k = 0; k < N - 1; k++) begin : g_fb
    assign fb_arr[k] = dut.u_array.g_row[N-1].g_col[k].c_out;
    assign fb_cbm[k] = dut.u_pcbm.g_row[N-1].g_col[k].c_out;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int got, input int want, input string what);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d want %0d", what, got, want);
    end
  endtask

  initial begin
    for (int a = 0; a < 2**N; a++) begin
      for (int b = 0; b < 2**N; b++) begin
        arr_x = N'(a); arr_y = N'(b);
        cbm_x = N'(b); cbm_y = N'(a ^ 5);   // a different pair, still all pairs
        #1;
        check(int'(arr_p), a * b, $sformatf("array %0d*%0d", a, b));
        check(int'(cbm_p), int'(cbm_x) * int'(cbm_y), $sformatf("pcbm %0d*%0d", cbm_x, cbm_y));
        if (fb_arr != 0) n_fb_arr++;
        if (fb_cbm != 0) n_fb_cbm++;
        if (arr_p[2*N-1] || cbm_p[2*N-1]) n_msb++;
        if (cbm_y != '1) n_bypass++;
        if (fb_cbm != 0 && !cbm_y[N-1]) n_fb_bypassed++;
      end
    end
    $display("array feedback=%0d pcbm feedback=%0d msb=%0d bypass=%0d feedback through bypass=%0d",
             n_fb_arr, n_fb_cbm, n_msb, n_bypass, n_fb_bypassed);
    check(int'(n_fb_arr > 0), 1, "array feedback carry");
    check(int'(n_fb_cbm > 0), 1, "pcbm feedback carry");
    check(int'(n_msb > 0), 1, "msb from last carry");
    check(int'(n_bypass > 0), 1, "bypassed diagonal");
    check(int'(n_fb_bypassed > 0), 1, "feedback through bypassed cell");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
