// mem_manager_tb: the histogram manager on a 64-bin histogram RAM.
// Streams of measurements (one per cycle at times, many back-to-back into the
// same bin to exercise the read-modify-write forwarding, some below and above
// the window, some flagged as coarse overflow) are binned; the host then reads
// every bin and the under/over/total counters, which must match a model. A
// clear must zero everything, and a second window with 1 ps bins is checked
// the same way.
`timescale 1ps/1fs
module mem_manager_tb;
  localparam int NB = 64;
  int checks = 0, failures = 0;
  int same_bin_pairs = 0;
  logic clk = 1'b0;
  always #1250 clk = ~clk;

  logic        rst, acq_en, clear, clear_busy, in_valid, rd_en, rd_valid;
  logic [31:0] cfg_min_ps, total_cnt, under_cnt, over_cnt, rd_data;
  logic [4:0]  cfg_bin_shift;
  logic [5:0]  rd_addr;
  tdc_pkg::meas_t in;
  logic        mem_we;
  logic [5:0]  mem_waddr, mem_raddr;
  logic [31:0] mem_wdata, mem_rdata;

  mem_manager #(.NUM_BINS(NB)) dut (
    .clk, .rst, .acq_en, .clear, .clear_busy, .cfg_min_ps, .cfg_bin_shift,
    .in_valid, .in, .rd_en, .rd_addr, .rd_valid, .rd_data,
    .total_cnt, .under_cnt, .over_cnt,
    .mem_we, .mem_waddr, .mem_wdata, .mem_raddr, .mem_rdata);
  hist_mem #(.DEPTH(NB)) u_mem (.clk, .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata),
                                .raddr(mem_raddr), .rdata(mem_rdata));

  int model [NB];
  int m_total, m_under, m_over;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run_stream(input int n, input int lo, input int hi);
    int last_bin = -1;
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      in_valid = ($urandom % 5) != 0;
      // one value in three repeats the previous one: same bin again
      if (k == 0 || ($urandom % 3) != 0) in.t_ps = 32'(lo + int'($urandom % (hi - lo)));
      in.overflow = ($urandom % 20) == 0;
      if (in_valid) begin
        int d = $signed(in.t_ps) - $signed(cfg_min_ps);
        m_total++;
        if (d < 0) begin m_under++; last_bin = -1; end
        else if (in.overflow || (d >> cfg_bin_shift) >= NB) begin m_over++; last_bin = -1; end
        else begin
          if ((d >> cfg_bin_shift) == last_bin) same_bin_pairs++;
          last_bin = d >> cfg_bin_shift;
          model[last_bin]++;
        end
      end else last_bin = -1;
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (3) @(negedge clk);
  endtask

  task automatic read_all(input string tag);
    acq_en = 1'b0;
    for (int b = 0; b < NB; b++) begin
      @(negedge clk);
      rd_en = 1'b1; rd_addr = 6'(b);
      @(negedge clk);
      rd_en = 1'b0;
      check(rd_valid && rd_data == 32'(model[b]),
            $sformatf("%s bin %0d: %0d expected %0d", tag, b, rd_data, model[b]));
    end
    check(total_cnt == 32'(m_total) && under_cnt == 32'(m_under) && over_cnt == 32'(m_over),
          $sformatf("%s counters %0d/%0d/%0d expected %0d/%0d/%0d", tag, total_cnt, under_cnt,
                    over_cnt, m_total, m_under, m_over));
    acq_en = 1'b1;
  endtask

  task automatic do_clear();
    @(negedge clk);
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    check(clear_busy, "clear busy");
    while (clear_busy) @(negedge clk);
    for (int b = 0; b < NB; b++) model[b] = 0;
    m_total = 0; m_under = 0; m_over = 0;
  endtask

  initial begin
    rst = 1'b1; acq_en = 1'b0; clear = 1'b0; in_valid = 1'b0; rd_en = 1'b0; rd_addr = '0;
    in = '0; cfg_min_ps = 32'd1000; cfg_bin_shift = 5'd3;
    for (int b = 0; b < NB; b++) model[b] = 0;
    m_total = 0; m_under = 0; m_over = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    acq_en = 1'b1;
    run_stream(3000, 900, 1600);
    read_all("window1");
    do_clear();
    read_all("cleared");
    cfg_min_ps = -32'sd20; cfg_bin_shift = 5'd0;
    run_stream(2000, -40, 60);
    read_all("window2");
    check(same_bin_pairs > 100, $sformatf("back-to-back same-bin pairs %0d", same_bin_pairs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
