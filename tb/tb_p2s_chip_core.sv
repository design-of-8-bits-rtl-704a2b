// tb_p2s_chip_core: end-to-end testbench of the converter top, at its
// default size (8-bit words).
//
// A source plays the part of the IFFT side: it presents words on d and
// pulses load. A sink plays the part of the next stage: it samples dout
// once per clock and rebuilds each word from the serial stream, MSB first,
// then compares it with the word that was sent. The sink's view is
// independent of the register inside the top: it only knows that the bit
// at the load edge is the MSB and that one bit follows per clock.
//
// Scenarios, each counted and required to occur at least once:
//   load       a word captured with a one-cycle load pulse
//   hold       load held high for several edges (MSB must stay on dout)
//   shift      a full word serialised, WIDTH bits in WIDTH clock periods
//   drain      dout low for the cycles after a word until the next load
//   burst      a word loaded right after the previous word's last bit
//   reload     a load in the middle of a word (the new word wins)
//   reset      asynchronous reset in the middle of a word (dout low)
// The first two words are the original test pattern, 10101010, once with
// d(7) = 1 and once with d(0) = 1, at 100 MHz.
module tb_p2s_chip_core;
  import p2s_pkg::*;

  localparam int unsigned WIDTH = P2S_WIDTH;
  localparam int unsigned WATCHDOG_CYCLES = 50000;

  logic             clk = 1'b0;
  logic             rst_n;
  logic             load;
  logic [WIDTH-1:0] d;
  logic             dout;

  int checks   = 0;
  int failures = 0;
  int n_load = 0, n_hold = 0, n_shift = 0, n_drain = 0;
  int n_burst = 0, n_reload = 0, n_reset = 0;
  longint unsigned cyc = 0;

  p2s_chip_core dut (
    .clk  (clk),
    .rst_n(rst_n),
    .load (load),
    .d    (d),
    .dout (dout)
  );

  always #5 clk = ~clk;  // 10 ns period, 100 MHz

  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at t=%0t", what, $time);
    end
  endtask

  // Present w with load for ld_cycles edges, then let the word run out.
  // The sink rebuilds the word from dout, one sample per clock, and the
  // cycle counter measures when its last bit and the first idle 0 appear.
  task automatic send(logic [WIDTH-1:0] w, int ld_cycles, int idle_after);
    logic [WIDTH-1:0] got;
    longint unsigned  t_load, t_last;
    load = 1'b1;
    d    = w;
    for (int i = 0; i < ld_cycles; i++) begin
      @(negedge clk);
      check(dout == w[WIDTH-1], "MSB on dout while load is high");
    end
    if (ld_cycles > 1) n_hold++;
    n_load++;
    t_load = cyc;
    got    = '0;
    got[WIDTH-1] = dout;
    load = 1'b0;
    for (int k = 1; k < int'(WIDTH); k++) begin
      d = WIDTH'($urandom());  // d is ignored while shifting
      @(negedge clk);
      got[WIDTH-1-k] = dout;
    end
    t_last = cyc;
    check(got == w, $sformatf("word %b came out as %b", w, got));
    check(t_last - t_load == longint'(WIDTH) - 1,
          $sformatf("word took %0d periods, expected %0d", t_last - t_load + 1, WIDTH));
    if (got == w) n_shift++;
    for (int i = 0; i < idle_after; i++) begin
      @(negedge clk);
      check(dout == 1'b0, "dout low after the word");
    end
    if (idle_after > 0) n_drain++;
    else n_burst++;
  endtask

  initial begin : watchdog
    repeat (WATCHDOG_CYCLES) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic [WIDTH-1:0] w;
    rst_n = 1'b0;
    load  = 1'b0;
    d     = '0;
    repeat (2) @(negedge clk);
    check(dout == 1'b0, "dout low in reset");
    rst_n = 1'b1;
    @(negedge clk);
    check(dout == 1'b0, "dout low before the first load");

    // Original pattern, both bit orders.
    send(8'b1010_1010, 1, 3);
    send(8'b0101_0101, 1, 3);

    // Load held high.
    send(8'b1001_0110, 3, 1);

    // Back-to-back words.
    send(8'b1110_0001, 1, 0);
    send(8'b0001_1110, 1, 0);
    send(8'b1111_1111, 1, 2);

    // Reload in the middle of a word: the new word must come out whole.
    load = 1'b1;
    d    = 8'b1111_0000;
    @(negedge clk);
    load = 1'b0;
    repeat (3) @(negedge clk);
    check(dout == 1'b1, "fourth bit of the interrupted word");
    n_reload++;
    send(8'b1010_0101, 1, 2);

    // Asynchronous reset while a word is leaving.
    load = 1'b1;
    d    = 8'b1111_1111;
    @(negedge clk);
    load = 1'b0;
    @(negedge clk);
    check(dout == 1'b1, "bit before reset");
    #2 rst_n = 1'b0;
    #1 check(dout == 1'b0, "dout cleared by asynchronous reset");
    @(negedge clk);
    rst_n = 1'b1;
    repeat (WIDTH) begin
      @(negedge clk);
      check(dout == 1'b0, "dout stays low after reset");
    end
    n_reset++;

    // Random words with random load lengths and gaps.
    for (int i = 0; i < 500; i++) begin
      w = WIDTH'($urandom());
      send(w, $urandom_range(1, 3), $urandom_range(0, 2));
    end

    check(n_load   > 0, "load occurred");
    check(n_hold   > 0, "held load occurred");
    check(n_shift  > 0, "full shift-out occurred");
    check(n_drain  > 0, "drain to low occurred");
    check(n_burst  > 0, "back-to-back word occurred");
    check(n_reload > 0, "reload mid-word occurred");
    check(n_reset  > 0, "asynchronous reset occurred");
    $display("scenarios: load=%0d hold=%0d shift=%0d drain=%0d burst=%0d reload=%0d reset=%0d",
             n_load, n_hold, n_shift, n_drain, n_burst, n_reload, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_p2s_chip_core
