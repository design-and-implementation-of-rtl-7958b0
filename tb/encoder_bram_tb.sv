// encoder_bram_tb: the ones-count to picosecond table. Every entry of the
// power-up table must equal round(i * 6.4) ps with one cycle of latency;
// entries written through the calibration port must then be read back, and
// unwritten ones keep their value.
`timescale 1ps/1fs
module encoder_bram_tb;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #1250 clk = ~clk;

  logic [8:0]  count, wr_addr;
  logic [31:0] delay_ps, wr_data;
  logic        wr_en;
  logic [31:0] model [512];

  encoder_bram dut (.clk, .count, .delay_ps, .wr_en, .wr_addr, .wr_data);

  task automatic read_check(input int a);
    @(negedge clk);
    count = 9'(a);
    @(negedge clk);
    checks++;
    if (delay_ps != model[a]) begin
      failures++;
      $display("FAIL entry %0d: %0d expected %0d", a, delay_ps, model[a]);
    end
  endtask

  initial begin
    wr_en = 1'b0; wr_addr = '0; wr_data = '0; count = '0;
    for (int i = 0; i < 512; i++) model[i] = 32'((i * 64 + 5) / 10);  // round(i*6.4)
    for (int i = 0; i < 512; i++) read_check(i);
    // calibration: a measured table with an offset of 218 ps
    for (int k = 0; k < 64; k++) begin
      int a;
      a = $urandom % 512;
      @(negedge clk);
      wr_en = 1'b1; wr_addr = 9'(a); wr_data = 32'(218 + a * 7 + ($urandom % 5));
      model[a] = wr_data;
      @(negedge clk);
      wr_en = 1'b0;
    end
    for (int i = 0; i < 512; i++) read_check(i);
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
