// array_cell_tb - exhaustive self-check of array_cell.
//
// For all sixteen combinations of x, y, s_in and c_in, compares {c_out, s_out}
// with the integer (x AND y) + s_in + c_in. Combinational DUT, checked 1 ns
// after each vector. A watchdog ends the run with a failure if it hangs.
module array_cell_tb;
  logic x, y, s_in, c_in, s_out, c_out;
  int checks = 0, failures = 0;

  array_cell dut (.x(x), .y(y), .s_in(s_in), .c_in(c_in), .s_out(s_out), .c_out(c_out));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expected;
    for (int v = 0; v < 16; v++) begin
      {x, y, s_in, c_in} = 4'(v);
      #1;
      expected = ((x && y) ? 1 : 0) + int'(s_in) + int'(c_in);
      checks++;
      if ({c_out, s_out} != 2'(expected)) begin
        failures++;
        $display("FAIL x=%0b y=%0b s_in=%0b c_in=%0b -> c_out=%0b s_out=%0b",
                 x, y, s_in, c_in, c_out, s_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
