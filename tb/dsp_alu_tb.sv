// dsp_alu_tb: T = N*2500 + T1 - T3 through the two-level pipeline. A new
// random operation enters every cycle; each result must appear exactly two
// cycles later with the overflow flag carried along.
`timescale 1ps/1fs
module dsp_alu_tb;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #1250 clk = ~clk;

  logic        rst, in_valid, n_overflow, out_valid;
  logic [15:0] n;
  logic [31:0] t1_ps, t3_ps;
  tdc_pkg::meas_t out;

  dsp_alu dut (.clk, .rst, .in_valid, .n, .n_overflow, .t1_ps, .t3_ps, .out_valid, .out);

  logic [32:0] exp_q [$];
  logic        vld_q [$];

  initial begin
    rst = 1'b1; in_valid = 1'b0; n = '0; n_overflow = 1'b0; t1_ps = '0; t3_ps = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < 500; k++) begin
      @(negedge clk);
      if (k >= 2) begin
        logic [32:0] e;
        bit v;
        e = exp_q.pop_front();
        v = vld_q.pop_front();
        checks++;
        if (out_valid != v || (v && {out.overflow, out.t_ps} != e)) begin
          failures++;
          $display("FAIL k=%0d got %0b %0d/%0b expected %0b %0d/%0b", k, out_valid,
                   $signed(out.t_ps), out.overflow, v, $signed(e[31:0]), e[32]);
        end
      end
      in_valid   = ($urandom % 4) != 0;
      n          = (k % 10 == 0) ? 16'hFFFF : 16'($urandom);
      n_overflow = ($urandom % 8) == 0;
      t1_ps      = 32'($urandom % 2600);
      t3_ps      = 32'($urandom % 2600);
      vld_q.push_back(in_valid);
      exp_q.push_back({n_overflow, 32'(longint'(n) * 2500 + t1_ps - t3_ps)});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
