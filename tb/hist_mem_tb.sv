// hist_mem_tb: the histogram RAM. All words must read zero after power-up;
// random writes and reads are compared with a model, reads having one cycle of
// latency and returning the old word when the same address is written in the
// same cycle.
`timescale 1ps/1fs
module hist_mem_tb;
  localparam int D = 256;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #1250 clk = ~clk;

  logic        we;
  logic [7:0]  waddr, raddr;
  logic [31:0] wdata, rdata, model [D], exp_v;

  hist_mem #(.DEPTH(D)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    we = 1'b0; waddr = '0; raddr = '0; wdata = '0;
    for (int i = 0; i < D; i++) model[i] = '0;
    for (int i = 0; i < D; i++) begin
      @(negedge clk); raddr = 8'(i);
      @(negedge clk); checks++;
      if (rdata != 0) begin failures++; $display("FAIL power-up word %0d", i); end
    end
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      we = $urandom % 2; waddr = 8'($urandom % 16); wdata = $urandom;
      raddr = (k % 3 == 0) ? waddr : 8'($urandom % 16);
      exp_v = model[raddr];
      if (we) model[waddr] = wdata;
      @(negedge clk);
      we = 1'b0;
      checks++;
      if (rdata != exp_v) begin failures++; $display("FAIL k=%0d addr %0d", k, raddr); end
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
