// coarse_counter_tb: start enables, stop disables. For random start/stop
// spacings the counter must read exactly the number of edges between the edge
// that first sees start and the edge that first sees stop, hold it while stop
// is high, and clear when start drops. A 4-bit instance checks saturation and
// the overflow flag.
`timescale 1ps/1fs
module coarse_counter_tb;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #1250 clk = ~clk;

  logic rst, start_lvl, stop_lvl, ovf, ovf4;
  logic [15:0] count;
  logic [3:0]  count4;

  coarse_counter dut (.clk, .rst, .start_lvl, .stop_lvl, .count(count), .overflow(ovf));
  coarse_counter #(.CNT_W(4)) dut4 (.clk, .rst, .start_lvl, .stop_lvl, .count(count4), .overflow(ovf4));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    rst = 1'b1; start_lvl = 1'b0; stop_lvl = 1'b0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < 40; k++) begin
      int n;
      n = (k < 4) ? k : ($urandom % 40);
      @(negedge clk);
      start_lvl = 1'b1;                 // seen at the next edge (Ea)
      repeat (n) @(negedge clk);        // n edges later stop is seen (Eb)
      stop_lvl = 1'b1;
      @(negedge clk);                   // after Eb
      check(count == 16'(n), $sformatf("n=%0d got %0d", n, count));
      check(ovf == (n > 65535), "no overflow");
      check(ovf4 == (n > 15) && count4 == 4'((n > 15) ? 15 : n), $sformatf("4-bit n=%0d got %0d ovf %0b", n, count4, ovf4));
      repeat (3) @(negedge clk);
      check(count == 16'(n), "held while stop high");
      start_lvl = 1'b0; stop_lvl = 1'b0;
      @(negedge clk);
      check(count == 0 && !ovf4, "cleared when start low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
