// tb_serial_converter: self-checking testbench for serial_converter.
//
// Inputs change on the falling clock edge; dout is checked on the next
// falling edge, half a period after the rising edge that updated it. The
// expected output comes from a reference that remembers only the last
// loaded word and how many shift edges have passed since: after k shifts
// dout must be word[WIDTH-1-k], and 0 once k reaches WIDTH. The stimulus
// covers the reference word 10101010 with a one-cycle load, a load held
// high for several cycles, back-to-back words, reloads in the middle of a
// word, random traffic and an asynchronous reset. It also checks that a
// word takes exactly WIDTH clock periods to leave (MSB at the load edge,
// LSB WIDTH-1 edges later, 0 at edge WIDTH).
module tb_serial_converter;
  localparam int unsigned WIDTH = 8;
  localparam int unsigned WATCHDOG_CYCLES = 20000;

  logic             clk = 1'b0;
  logic             rst_n;
  logic             load;
  logic [WIDTH-1:0] d;
  logic             dout;

  int checks   = 0;
  int failures = 0;

  // Reference state.
  logic [WIDTH-1:0] ref_word;
  int               ref_shifts;

  serial_converter #(.WIDTH(WIDTH)) dut (
    .clk  (clk),
    .rst_n(rst_n),
    .load (load),
    .d    (d),
    .dout (dout)
  );

  always #5 clk = ~clk;  // 100 MHz, as in the original test

  function automatic logic expected_bit();
    if (ref_shifts >= int'(WIDTH)) return 1'b0;
    return ref_word[WIDTH-1-ref_shifts];
  endfunction

  // Reference update on each rising edge.
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ref_word   <= '0;
      ref_shifts <= WIDTH;
    end else if (load) begin
      ref_word   <= d;
      ref_shifts <= 0;
    end else if (ref_shifts < int'(WIDTH)) begin
      ref_shifts <= ref_shifts + 1;
    end
  end

  task automatic check_now(string what);
    checks++;
    if (dout !== expected_bit()) begin
      failures++;
      $display("FAIL %s: t=%0t dout=%0b expected=%0b (word=%b shifts=%0d)",
               what, $time, dout, expected_bit(), ref_word, ref_shifts);
    end
  endtask

  // One clock: drive on the falling edge, then check on the next one.
  task automatic cycle(logic ld, logic [WIDTH-1:0] data);
    load = ld;
    d    = data;
    @(negedge clk);
    check_now("cycle");
  endtask

  // Send one word with a load of ld_cycles, then n_shift shift cycles.
  // Also records the edge at which each bit appeared, checking the rate.
  task automatic send_word(logic [WIDTH-1:0] w, int ld_cycles, int n_shift);
    for (int i = 0; i < ld_cycles; i++) begin
      cycle(1'b1, w);
      checks++;
      if (dout !== w[WIDTH-1]) begin
        failures++;
        $display("FAIL load-hold: MSB not at output during load, t=%0t", $time);
      end
    end
    for (int k = 1; k <= n_shift; k++) begin
      cycle(1'b0, WIDTH'($urandom()));  // d must not matter while shifting
      checks++;
      if (dout !== ((k < int'(WIDTH)) ? w[WIDTH-1-k] : 1'b0)) begin
        failures++;
        $display("FAIL timing: bit after %0d shifts wrong, t=%0t", k, $time);
      end
    end
  endtask

  initial begin : watchdog
    repeat (WATCHDOG_CYCLES) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    rst_n = 1'b0;
    load  = 1'b0;
    d     = '0;
    @(negedge clk);
    @(negedge clk);
    checks++;
    if (dout !== 1'b0) begin
      failures++;
      $display("FAIL reset: dout not low");
    end
    rst_n = 1'b1;
    cycle(1'b0, '1);  // no load yet: output stays low
    cycle(1'b0, '1);

    // The reference word, as given in the original test (d(7) = 1) and in
    // its figure (d(0) = 1), each with a single load cycle and a long tail.
    send_word(8'b1010_1010, 1, WIDTH + 4);
    send_word(8'b0101_0101, 1, WIDTH + 4);

    // Load held high for several edges: MSB stays at dout.
    send_word(8'b1100_0011, 4, WIDTH + 1);

    // Back-to-back words, no idle cycle.
    send_word(8'b1000_0001, 1, WIDTH - 1);
    send_word(8'b0111_1110, 1, WIDTH - 1);
    send_word(8'b1111_1111, 1, WIDTH);

    // Reload in the middle of a word: the new word wins.
    send_word(8'b1011_0110, 1, 3);
    send_word(8'b0100_1001, 1, WIDTH + 2);

    // Random traffic.
    for (int i = 0; i < 2000; i++) begin
      cycle(($urandom_range(0, 5) == 0), WIDTH'($urandom()));
    end

    // Asynchronous reset in the middle of a word clears the output at once.
    send_word(8'b1111_0000, 1, 2);
    #2 rst_n = 1'b0;
    #1;
    checks++;
    if (dout !== 1'b0) begin
      failures++;
      $display("FAIL async reset: dout not cleared");
    end
    @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < WIDTH + 2; i++) cycle(1'b0, '1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_serial_converter
