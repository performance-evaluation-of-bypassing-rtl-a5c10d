// fab_cell_tb - exhaustive self-check of the full adder bypassing cell.
//
// With y = 1, {c_out, s_out} must equal x + s_in + c_in. With y = 0 (bypass),
// s_out must equal s_in, and with c_in = 0 (the only case that arises in a
// bypassed diagonal) c_out must be 0. In bypass the testbench also checks that
// the full adder's isolated operands stay at 0 whatever x and s_in do, so the
// adder cannot toggle. Counts bypassed and active vectors; each must occur.
module fab_cell_tb;
  logic x, y, s_in, c_in, s_out, c_out;
  int checks = 0, failures = 0;
  int n_bypass = 0, n_active = 0;

  fab_cell dut (.x(x), .y(y), .s_in(s_in), .c_in(c_in), .s_out(s_out), .c_out(c_out));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: x=%0b y=%0b s_in=%0b c_in=%0b -> s_out=%0b c_out=%0b",
               what, x, y, s_in, c_in, s_out, c_out);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {x, y, s_in, c_in} = 4'(v);
      #1;
      if (y) begin
        n_active++;
        check({c_out, s_out} == 2'(int'(x) + int'(s_in) + int'(c_in)), "active sum");
      end else begin
        n_bypass++;
        check(s_out == s_in, "bypass sum");
        check(dut.fa_a == 1'b0 && dut.fa_b == 1'b0, "bypass isolation");
        if (!c_in) check(c_out == 1'b0, "bypass carry");
      end
    end
    check(n_bypass > 0, "bypass exercised");
    check(n_active > 0, "active exercised");
    $display("bypassed vectors=%0d active vectors=%0d", n_bypass, n_active);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
