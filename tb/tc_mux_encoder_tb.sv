// tc_mux_encoder_tb - end-to-end, full-size testbench of the 4-bit
// multiplexer-tree thermometer encoder, at its default parameters.
//
// 1. Truth table: the sixteen valid thermometer codes (no comparator high,
//    C1 high, C1..C2 high, ..., all fifteen high) must give the binary count
//    of ones, 0000 .. 1111.
// 2. Binary search: every one of the 2**15 input words, valid or not, is
//    compared with a reference written as a search over comparator indices:
//    start at position p = 0; for bit b from 3 down to 0 read comparator
//    p + 2**b, which is result bit b, and add 2**b to p if it is 1.
// 3. Mid-scale transition: the steps 7 -> 8 and 8 -> 7, the only one-step
//    changes where all four outputs toggle at once (on 7 -> 8 three fall
//    and one rises), are applied and checked.
// The testbench counts, from the outputs, how often each rank select (X3,
// X2, X1) picks the upper half and the lower half on valid codes, and how
// often the all-bits transition occurs; a mechanism that never happens is a
// failure. A watchdog ends the run.
module tc_mux_encoder_tb;

  localparam int unsigned N = 4;
  localparam int unsigned W = 2**N - 1;

  logic [W:1]   therm;
  logic [N-1:0] bin;
  int checks   = 0;
  int failures = 0;
  // Binary bit b (b >= 1) is the select of the rank that follows it:
  // 1 picks the upper half of the code, 0 the lower half.
  int upper_sel [N];
  int lower_sel [N];
  int all_toggle = 0;

  tc_mux_encoder dut (.therm_i(therm), .bin_o(bin));

  function automatic logic [W:1] thermometer(int n);
    logic [W:1] t = '0;
    for (int j = 1; j <= n; j++) t[j] = 1'b1;
    return t;
  endfunction

  function automatic int search(logic [W:1] t);
    int p = 0;
    for (int b = N - 1; b >= 0; b--) begin
      if (t[p + (1 << b)]) p += (1 << b);
    end
    return p;
  endfunction

  task automatic check(string what, int expected);
    checks++;
    if (int'(bin) != expected) begin
      failures++;
      $display("FAIL %s therm=%b bin=%b expected=%0d", what, therm, bin, expected);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic [N-1:0] prev_bin;
    foreach (upper_sel[b]) begin
      upper_sel[b] = 0;
      lower_sel[b] = 0;
    end

    // 1. Valid thermometer codes.
    for (int n = 0; n <= W; n++) begin
      therm = thermometer(n);
      #1;
      check("truth table", n);
      for (int b = 0; b < int'(N); b++) begin
        if (bin[b]) upper_sel[b]++;
        else lower_sel[b]++;
      end
    end

    // 2. Every input word against the binary-search reference.
    for (int v = 0; v < (1 << W); v++) begin
      therm = W'(v);
      #1;
      check("binary search", search(therm));
    end

    // 3. Mid-scale steps where every output bit changes.
    for (int r = 0; r < 4; r++) begin
      therm = thermometer((r % 2 == 0) ? 7 : 8);
      #1;
      prev_bin = bin;
      therm = thermometer((r % 2 == 0) ? 8 : 7);
      #1;
      check("mid-scale step", (r % 2 == 0) ? 8 : 7);
      if ((prev_bin ^ bin) == '1) all_toggle++;
    end

    for (int b = 1; b < int'(N); b++) begin
      $display("select bit X%0d: upper half selected %0d times, lower half %0d times",
               b, upper_sel[b], lower_sel[b]);
      checks++;
      if (upper_sel[b] == 0 || lower_sel[b] == 0) begin
        failures++;
        $display("FAIL select X%0d never took both values", b);
      end
    end
    $display("all-output transitions: %0d", all_toggle);
    checks++;
    if (all_toggle == 0) begin
      failures++;
      $display("FAIL no transition toggled every output");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
