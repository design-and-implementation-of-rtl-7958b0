// bit_counter_tb: random and edge-case codes into the 464-bit ones counter;
// the registered count must equal an independent count of the previous
// cycle's code (1-cycle latency).
`timescale 1ps/1fs
module bit_counter_tb;
  localparam int N = 464;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #1250 clk = ~clk;

  logic [N-1:0] code;
  logic [8:0]   count;
  bit_counter dut (.clk(clk), .code(code), .count(count));

  function automatic int ref_count(input logic [N-1:0] v);
    int c = 0;
    for (int i = 0; i < N; i++) if (v[i]) c++;
    return c;
  endfunction

  localparam logic [N-1:0] ONES = '1;
  logic [N-1:0] tmp;
  int expected, idx;
  initial begin
    code = '0;
    for (int k = 0; k < 400; k++) begin
      @(negedge clk);
      unique case (k % 4)
        0: for (int w = 0; w < N; w += 16) tmp[w +: 16] = 16'($urandom);
        1: tmp = (k < 8) ? ONES : (ONES >> ($urandom % (N + 1)));   // thermometer
        2: begin                                                      // bubble
          tmp = ONES >> ($urandom % (N + 1));
          idx = $urandom % N;
          tmp[idx] = ~tmp[idx];
        end
        default: begin tmp = '0; idx = $urandom % N; tmp[idx] = 1'b1; end
      endcase
      code = tmp;
      if (k == 0) code = '0;
      expected = ref_count(code);
      @(negedge clk);
      checks++;
      if (count != expected) begin
        failures++;
        $display("FAIL k=%0d count=%0d expected=%0d", k, count, expected);
      end
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
