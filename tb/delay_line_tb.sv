// delay_line_tb: the sampling register of the delay line, without and with the
// reordering layer. Random tap vectors are applied between clock edges; the
// plain line must show the vector sampled at the last edge (1-cycle latency),
// the reordering line the reversed vector one cycle later (2-cycle latency).
`timescale 1ps/1fs
module delay_line_tb;
  localparam int N = 64;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #1250 clk = ~clk;

  function automatic tdc_pkg::tap_order_t rev_order();
    tdc_pkg::tap_order_t o = tdc_pkg::identity_order();
    for (int i = 0; i < N; i++) o[i] = 16'(N - 1 - i);
    return o;
  endfunction

  logic [N-1:0] taps, code_a, code_b;
  logic [N-1:0] hist [3];

  delay_line #(.N_TAPS(N)) dut_a (.clk(clk), .taps(taps), .code(code_a));
  delay_line #(.N_TAPS(N), .USE_REORDER(1'b1), .ORDER(rev_order())) dut_b
    (.clk(clk), .taps(taps), .code(code_b));

  function automatic logic [N-1:0] reverse(input logic [N-1:0] v);
    logic [N-1:0] r;
    for (int i = 0; i < N; i++) r[i] = v[N - 1 - i];
    return r;
  endfunction

  initial begin
    taps = '0;
    hist = '{default: '0};
    repeat (3) @(posedge clk);
    for (int k = 0; k < 300; k++) begin
      @(negedge clk);
      hist[2] = hist[1];
      hist[1] = hist[0];
      taps = {32'($urandom), 32'($urandom)};
      hist[0] = taps;
      @(posedge clk);
      #100;
      // taps change again well after the edge: must not reach the outputs
      taps = ~taps;
      #100;
      if (k >= 2) begin
        checks += 2;
        if (code_a != hist[0]) begin failures++; $display("FAIL k=%0d plain", k); end
        if (code_b != reverse(hist[1])) begin failures++; $display("FAIL k=%0d reorder", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
