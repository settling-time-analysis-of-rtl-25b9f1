// mux_rank_tb - self-checking testbench for one multiplexer rank.
//
// Instantiates the 15-bit rank (K = 4, the first rank of the 4-bit encoder),
// the 7-bit rank (K = 3) and the 3-bit rank (K = 2, the last multiplexer).
// Every input word of each is applied, thermometer or not. The expected
// outputs are computed here from the definition of the fold: the select is
// the middle bit M = 2**(K-1); output bit j takes input bit M + j when the
// select is 1 and input bit j otherwise. For the valid thermometer codes the
// testbench also checks that the folded code is a thermometer code whose
// number of ones is the input's count minus M times the select.
module mux_rank_tb;

  int checks   = 0;
  int failures = 0;

  logic [15:1] c4;  logic s4;  logic [7:1] o4;
  logic [7:1]  c3;  logic s3;  logic [3:1] o3;
  logic [3:1]  c2;  logic s2;  logic [1:1] o2;

  mux_rank #(.K(4)) dut4 (.code_i(c4), .sel_o(s4), .code_o(o4));
  mux_rank #(.K(3)) dut3 (.code_i(c3), .sel_o(s3), .code_o(o3));
  mux_rank #(.K(2)) dut2 (.code_i(c2), .sel_o(s2), .code_o(o2));

  function automatic void check(string what, int got, int expected);
    checks++;
    if (got != expected) begin
      failures++;
      $display("FAIL %s got=%0h expected=%0h", what, got, expected);
    end
  endfunction

  // Reference fold of a W = 2**k - 1 bit word held in bits 1..W of w.
  function automatic int fold(int k, int w);
    int m = 1 << (k - 1);
    int s = (w >> m) & 1;
    int r = 0;
    for (int j = 1; j < m; j++) begin
      int src = (s != 0) ? (m + j) : j;
      r |= ((w >> src) & 1) << j;
    end
    return r;
  endfunction

  function automatic int therm(int n);  // n ones from bit 1 upward
    return ((1 << n) - 1) << 1;
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    // Every word, each rank.
    for (int v = 0; v < (1 << 15); v++) begin
      c4 = 15'(v);
      c3 = 7'(v);
      c2 = 3'(v);
      #1;
      check("K=4 sel", int'(s4), (v >> 7) & 1);
      check("K=4 code", int'({o4, 1'b0}), fold(4, v << 1));
      if (v < (1 << 7)) begin
        check("K=3 sel", int'(s3), (v >> 3) & 1);
        check("K=3 code", int'({o3, 1'b0}), fold(3, v << 1));
      end
      if (v < (1 << 3)) begin
        check("K=2 sel", int'(s2), (v >> 1) & 1);
        check("K=2 code", int'(o2), (fold(2, v << 1) >> 1));
      end
    end
    // Thermometer in, thermometer out, with the MSB's weight removed.
    for (int n = 0; n <= 15; n++) begin
      c4 = 15'(therm(n) >> 1);
      #1;
      check("K=4 sel on thermometer", int'(s4), int'(n >= 8));
      check("K=4 folded thermometer", int'({o4, 1'b0}), therm(n >= 8 ? n - 8 : n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
