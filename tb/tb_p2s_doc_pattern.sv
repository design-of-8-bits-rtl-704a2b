// tb_p2s_doc_pattern: replays the converter's reference stimulus on the top.
//
// The reference test holds d constant at the pattern 10101010, runs a
// 100 MHz clock whose first rising edge is at 5 ns, and raises load for the
// first clock high phase (to 10 ns). This testbench applies the same waves,
// with load raised 1 ns ahead of the 5 ns edge so that the edge samples it
// without a race, and holds dout against the expected stream: the MSB from
// the 5 ns edge, then one bit per 10 ns, then 0 until the end. It also
// checks the absolute time at which every output bit appears. The pattern
// is run twice, once with d[7] = 1 and once with d[0] = 1, because the
// reference material gives both readings of the bit order.
module tb_p2s_doc_pattern;
  import p2s_pkg::*;

  localparam int unsigned WIDTH = P2S_WIDTH;

  logic             clk;
  logic             rst_n;
  logic             load;
  logic [WIDTH-1:0] d;
  logic             dout;

  int checks   = 0;
  int failures = 0;

  p2s_chip_core dut (
    .clk  (clk),
    .rst_n(rst_n),
    .load (load),
    .d    (d),
    .dout (dout)
  );

  initial begin : watchdog
    #10us;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One run of the reference waves, starting at time t0 (clk low).
  task automatic run(logic [WIDTH-1:0] pattern);
    time t0;
    t0    = $time;
    d     = pattern;
    load  = 1'b0;
    clk   = 1'b0;
    #4 load = 1'b1;                     // t0 + 4 ns
    #1 clk = 1'b1;                      // first rising edge, t0 + 5 ns
    #5 clk = 1'b0; load = 1'b0;         // t0 + 10 ns
    // dout after the first edge: the MSB, at t0 + 5 ns .. t0 + 15 ns.
    for (int k = 0; k < int'(WIDTH) + 3; k++) begin
      #1;                               // 1 ns after the falling edge
      checks++;
      if (dout !== ((k < int'(WIDTH)) ? pattern[WIDTH-1-k] : 1'b0)) begin
        failures++;
        $display("FAIL bit %0d at %0t ns after start: dout=%0b", k, $time - t0, dout);
      end
      #4 clk = 1'b1;                    // next rising edge
      #1;                               // just after it: bit k+1 must be there
      checks++;
      if (dout !== ((k + 1 < int'(WIDTH)) ? pattern[WIDTH-2-k] : 1'b0)) begin
        failures++;
        $display("FAIL edge %0d at %0t ns after start: dout=%0b", k + 1, $time - t0, dout);
      end
      #4 clk = 1'b0;
    end
  endtask

  initial begin : stimulus
    clk   = 1'b0;
    load  = 1'b0;
    d     = '0;
    rst_n = 1'b0;
    #3 rst_n = 1'b1;
    #7;
    run(8'b1010_1010);                  // d[7] = 1
    #20;
    run(8'b0101_0101);                  // d[0] = 1
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_p2s_doc_pattern
