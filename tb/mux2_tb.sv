// mux2_tb - self-checking testbench for the 2:1 multiplexer cell.
//
// Applies all eight combinations of (a, b, sel) and compares z with the
// selection rule worked out here: a when sel = 1, b when sel = 0. A
// watchdog ends the run with a failure if the sequence never completes.
module mux2_tb;

  logic a, b, sel, z;
  int   checks   = 0;
  int   failures = 0;

  mux2 dut (.a(a), .b(b), .sel(sel), .z(z));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic expected;
    for (int v = 0; v < 8; v++) begin
      {sel, a, b} = 3'(v);
      #1;
      expected = sel ? a : b;
      checks++;
      if (z !== expected) begin
        failures++;
        $display("FAIL sel=%0b a=%0b b=%0b z=%0b expected=%0b", sel, a, b, z, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
