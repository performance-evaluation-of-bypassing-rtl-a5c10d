// prop_array_mult_tb - self-check of the array multiplier without final adder.
//
// Three instances: the default 4 x 4 array and 8 x 8 and 16 x 16 arrays.
// 4 x 4 and 8 x 8 are checked exhaustively, 16 x 16 on corner operands plus
// pseudo-random ones; every product is compared with x * y computed in
// integer arithmetic. The DUT is combinational; each vector is checked 1 ns
// after it is applied.
//
// For the 4 x 4 array the testbench also counts how often each of the three
// carries fed back from the bottom row into the top cells of columns 4, 5 and
// 6 is 1, and how often the last carry produces P[7]. Each must happen at
// least once, otherwise the feedback path was never exercised.
module prop_array_mult_tb;
  logic [3:0]  x4,  y4;
  logic [7:0]  p4;
  logic [7:0]  x8,  y8;
  logic [15:0] p8;
  logic [15:0] x16, y16;
  logic [31:0] p16;
  int checks = 0, failures = 0;
  int n_fb [3] = '{0, 0, 0};
  int n_msb = 0;

  prop_array_mult #(.N(4))  dut4  (.x(x4),  .y(y4),  .p(p4));
  prop_array_mult #(.N(8))  dut8  (.x(x8),  .y(y8),  .p(p8));
  prop_array_mult #(.N(16)) dut16 (.x(x16), .y(y16), .p(p16));

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
    // 4 x 4, exhaustive
    for (int a = 0; a < 16; a++) begin
      for (int b = 0; b < 16; b++) begin
        x4 = 4'(a); y4 = 4'(b);
        #1;
        check(p4, longint'(a * b), $sformatf("4x4 %0d*%0d", a, b));
        if (dut4.g_row[3].g_col[0].c_out) n_fb[0]++;
        if (dut4.g_row[3].g_col[1].c_out) n_fb[1]++;
        if (dut4.g_row[3].g_col[2].c_out) n_fb[2]++;
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
    // 16 x 16, corners then random
    for (int k = 0; k < 20000; k++) begin
      case (k)
        0: begin x16 = 16'hFFFF; y16 = 16'hFFFF; end
        1: begin x16 = 16'hFFFF; y16 = 16'h0001; end
        2: begin x16 = 16'h0000; y16 = 16'hFFFF; end
        3: begin x16 = 16'h8000; y16 = 16'h8000; end
        4: begin x16 = 16'hAAAA; y16 = 16'h5555; end
        default: begin x16 = 16'($urandom); y16 = 16'($urandom); end
      endcase
      #1;
      check(p16, longint'(x16) * longint'(y16), $sformatf("16x16 %0d*%0d", x16, y16));
    end
    $display("4x4 fed-back carries set: col4=%0d col5=%0d col6=%0d, P7 set=%0d",
             n_fb[0], n_fb[1], n_fb[2], n_msb);
    for (int k = 0; k < 3; k++) check(longint'(n_fb[k] > 0), 1, $sformatf("feedback %0d used", k));
    check(longint'(n_msb > 0), 1, "MSB carry used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
