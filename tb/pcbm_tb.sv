// pcbm_tb - self-check of the proposed column bypassing multiplier.
//
// Three instances: the default 4 x 4 array and 8 x 8 and 16 x 16 arrays.
// 4 x 4 and 8 x 8 are checked exhaustively, 16 x 16 on corner operands plus
// pseudo-random ones (random operands get random bits cleared so that many
// diagonals are bypassed). Every product is compared with x * y computed in
// integer arithmetic. Combinational DUT, checked 1 ns after each vector.
//
// On the 4 x 4 array the testbench also checks, for every cell on a diagonal
// whose y bit is 0, that its full adder's operands are isolated (0) and its
// carry out is 0. It counts bypassed diagonals, vectors where a carry fed back
// from the bottom row is 1, vectors where such a carry passes through a
// bypassed top cell, and vectors with P[7] = 1; each must happen at least once.
module pcbm_tb;
  logic [3:0]  x4,  y4;
  logic [7:0]  p4;
  logic [7:0]  x8,  y8;
  logic [15:0] p8;
  logic [15:0] x16, y16;
  logic [31:0] p16;
  int checks = 0, failures = 0;
  int n_bypassed_diag = 0, n_feedback = 0, n_feedback_bypassed = 0, n_msb = 0;

  pcbm #(.N(4))  dut4  (.x(x4),  .y(y4),  .p(p4));
  pcbm #(.N(8))  dut8  (.x(x8),  .y(y8),  .p(p8));
  pcbm #(.N(16)) dut16 (.x(x16), .y(y16), .p(p16));

  // iso_ok[i][j]: cell (i, j) of the 4 x 4 array is active, or it is bypassed
  // with its adder operands and carry out at 0.
  logic [3:0] iso_ok [4];
  for (genvar i = 0; i < 4; i++) begin : g_i
    for (genvar j = 0; j < 4; j++) begin : g_j
      assign iso_ok[i][j] = y4[j] ||
                            (dut4.g_row[i].g_col[j].u_cell.fa_a == 1'b0 &&
                             dut4.g_row[i].g_col[j].u_cell.fa_b == 1'b0 &&
                             dut4.g_row[i].g_col[j].c_out == 1'b0);
    end
  end
  logic [2:0] fb4;   // carries fed back from the bottom row of the 4 x 4 array
  assign fb4 = {dut4.g_row[3].g_col[2].c_out, dut4.g_row[3].g_col[1].c_out,
                dut4.g_row[3].g_col[0].c_out};

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input longint unsigned got, input longint unsigned want, input string what);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d want %0d", what, got, want);
    end
  endtask

  initial begin
    x8 = '0; y8 = '0; x16 = '0; y16 = '0;
    // 4 x 4, exhaustive, with isolation checks
    for (int a = 0; a < 16; a++) begin
      for (int b = 0; b < 16; b++) begin
        x4 = 4'(a); y4 = 4'(b);
        #1;
        check(p4, longint'(a * b), $sformatf("4x4 %0d*%0d", a, b));
        for (int i = 0; i < 4; i++)
          check(longint'(iso_ok[i]), 15, $sformatf("4x4 %0d*%0d isolation row %0d", a, b, i));
        for (int j = 0; j < 4; j++) if (!y4[j]) n_bypassed_diag++;
        if (fb4 != 0) n_feedback++;
        // a carry fed into a top cell of column 4..6 while that cell is bypassed
        if (fb4 != 0 && !y4[3]) n_feedback_bypassed++;
        if (p4[7]) n_msb++;
      end
    end
    // 8 x 8, exhaustive
    for (int a = 0; a < 256; a++) begin
      for (int b = 0; b < 256; b++) begin
        x8 = 8'(a); y8 = 8'(b);
        #1;
        check(p8, longint'(a * b), $sformatf("8x8 %0d*%0d", a, b));
      end
    end
    // 16 x 16, corners then random with sparse multiplier bits
    for (int k = 0; k < 20000; k++) begin
      case (k)
        0: begin x16 = 16'hFFFF; y16 = 16'hFFFF; end
        1: begin x16 = 16'hFFFF; y16 = 16'h0000; end
        2: begin x16 = 16'hFFFF; y16 = 16'h8001; end
        3: begin x16 = 16'h8000; y16 = 16'h8000; end
        4: begin x16 = 16'hAAAA; y16 = 16'h5555; end
        default: begin x16 = 16'($urandom); y16 = 16'($urandom & $urandom); end
      endcase
      #1;
      check(p16, longint'(x16) * longint'(y16), $sformatf("16x16 %0d*%0d", x16, y16));
    end
    $display("4x4: bypassed diagonals=%0d feedback carries=%0d feedback through bypassed cell=%0d P7 set=%0d",
             n_bypassed_diag, n_feedback, n_feedback_bypassed, n_msb);
    check(longint'(n_bypassed_diag > 0), 1, "bypass used");
    check(longint'(n_feedback > 0), 1, "feedback used");
    check(longint'(n_feedback_bypassed > 0), 1, "feedback through bypassed cell used");
    check(longint'(n_msb > 0), 1, "MSB carry used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
