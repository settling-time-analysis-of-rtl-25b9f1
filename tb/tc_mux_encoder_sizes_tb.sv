// tc_mux_encoder_sizes_tb - checks the multiplexer-tree encoder at output
// widths other than the 4-bit default: 2, 3, 5 and 6 bits.
//
// For each width the testbench applies every valid thermometer code (0 up
// to 2**N - 1 comparators high) and expects the count of ones in binary.
// For the 2-, 3- and 5-bit encoders it also applies random words with
// bubbles and compares with a reference binary search over comparator
// positions (read comparator p + 2**b for result bit b, from the MSB down).
module tc_mux_encoder_sizes_tb;

  int checks   = 0;
  int failures = 0;

  logic [3:1]  t2;  logic [1:0] b2;
  logic [7:1]  t3;  logic [2:0] b3;
  logic [31:1] t5;  logic [4:0] b5;
  logic [63:1] t6;  logic [5:0] b6;

  tc_mux_encoder #(.N_BITS(2)) dut2 (.therm_i(t2), .bin_o(b2));
  tc_mux_encoder #(.N_BITS(3)) dut3 (.therm_i(t3), .bin_o(b3));
  tc_mux_encoder #(.N_BITS(5)) dut5 (.therm_i(t5), .bin_o(b5));
  tc_mux_encoder #(.N_BITS(6)) dut6 (.therm_i(t6), .bin_o(b6));

  function automatic logic [63:1] thermometer(int n);
    logic [63:1] t = '0;
    for (int j = 1; j <= n; j++) t[j] = 1'b1;
    return t;
  endfunction

  function automatic int search(int nbits, logic [63:1] t);
    int p = 0;
    for (int b = nbits - 1; b >= 0; b--) begin
      if (t[p + (1 << b)]) p += (1 << b);
    end
    return p;
  endfunction

  function automatic void check(string what, int got, int expected);
    checks++;
    if (got != expected) begin
      failures++;
      $display("FAIL %s got=%0d expected=%0d", what, got, expected);
    end
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic [63:1] w;
    t2 = '0; t3 = '0; t5 = '0; t6 = '0;
    for (int n = 0; n <= 63; n++) begin
      w  = thermometer(n);
      t6 = w;
      if (n <= 31) t5 = w[31:1];
      if (n <= 7)  t3 = w[7:1];
      if (n <= 3)  t2 = w[3:1];
      #1;
      check("6-bit thermometer", int'(b6), n);
      if (n <= 31) check("5-bit thermometer", int'(b5), n);
      if (n <= 7)  check("3-bit thermometer", int'(b3), n);
      if (n <= 3)  check("2-bit thermometer", int'(b2), n);
    end
    for (int i = 0; i < 2000; i++) begin
      w  = 63'({$urandom(), $urandom()} >> 1);
      t2 = w[3:1];
      t3 = w[7:1];
      t5 = w[31:1];
      #1;
      check("2-bit bubbles", int'(b2), search(2, {60'b0, t2}));
      check("3-bit bubbles", int'(b3), search(3, {56'b0, t3}));
      check("5-bit bubbles", int'(b5), search(5, {32'b0, t5}));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
