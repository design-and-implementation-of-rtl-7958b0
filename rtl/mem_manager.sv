// mem_manager: stores the stream of measurements as a histogram in block RAM.
//
// Storing every measurement at an incrementing address would fill the memory
// and limit how long a run can be; counting how often each value occurs keeps
// the memory use fixed. Each valid measurement T (ps) is mapped to a bin
//   bin = (T - cfg_min_ps) >> cfg_bin_shift
// so the histogram covers cfg_min_ps up to cfg_min_ps + NUM_BINS * 2^shift ps
// with bins of 2^shift ps. The bin is incremented by a two-stage
// read-modify-write: stage 0 reads the bin, stage 1 writes it back plus one.
// When consecutive measurements hit the same bin, the value written in the
// previous cycle is forwarded, so one measurement per clock is accepted.
// Values below the range count in under_cnt, values at or above it, and
// measurements flagged as coarse-counter overflow, count in over_cnt; these
// are the out-of-range handling. Bins and counters saturate.
//
// The histogram itself, the configurable bin size, range and overflow handling
// follow the design description; the power-of-two bin size, the separate
// under/over counters, the clear sweep and the read port are this design's
// choices (no numbers or formats are given).
// Interface: acq_en gates acquisition; while acq_en is low the host may read
// bin rd_addr (rd_en), with rd_data valid one cycle later (rd_valid). A pulse
// on clear zeroes all bins and counters in NUM_BINS cycles (clear_busy);
// measurements arriving meanwhile are dropped. mem_* drive hist_mem.
`timescale 1ps/1fs
module mem_manager #(
  parameter int NUM_BINS = 4096,
  parameter int BIN_W    = 32,
  localparam int ADDR_W  = $clog2(NUM_BINS),
  localparam int TIME_W  = tdc_pkg::TIME_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              acq_en,
  input  logic              clear,
  output logic              clear_busy,
  input  logic [TIME_W-1:0] cfg_min_ps,
  input  logic [4:0]        cfg_bin_shift,
  input  logic              in_valid,
  input  tdc_pkg::meas_t    in,
  input  logic              rd_en,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic              rd_valid,
  output logic [BIN_W-1:0]  rd_data,
  output logic [31:0]       total_cnt,
  output logic [31:0]       under_cnt,
  output logic [31:0]       over_cnt,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_waddr,
  output logic [BIN_W-1:0]  mem_wdata,
  output logic [ADDR_W-1:0] mem_raddr,
  input  logic [BIN_W-1:0]  mem_rdata
);
  // ---- stage 0: classify and read ---------------------------------------
  logic signed [TIME_W:0] diff;
  logic signed [TIME_W:0] bin_full;
  logic                   take, is_under, is_over;

  assign take     = in_valid && acq_en && !clear_busy;
  assign diff     = $signed({in.t_ps[TIME_W-1], in.t_ps}) - $signed({cfg_min_ps[TIME_W-1], cfg_min_ps});
  assign bin_full = diff >>> cfg_bin_shift;
  assign is_under = diff < 0;
  assign is_over  = in.overflow || (!is_under && bin_full >= (TIME_W+1)'(NUM_BINS));

  logic              s1_valid;
  logic [ADDR_W-1:0] s1_addr;
  logic              rd_pending;
  logic [ADDR_W-1:0] clr_addr;

  always_comb begin
    if (take) mem_raddr = ADDR_W'(bin_full);
    else      mem_raddr = rd_addr;
  end

  function automatic logic [31:0] sat_inc32(input logic [31:0] v);
    return (v == '1) ? v : v + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      s1_valid   <= 1'b0;
      rd_pending <= 1'b0;
      total_cnt  <= '0;
      under_cnt  <= '0;
      over_cnt   <= '0;
      clear_busy <= 1'b0;
      clr_addr   <= '0;
    end else begin
      s1_valid   <= take && !is_under && !is_over;
      rd_pending <= rd_en && !acq_en && !clear_busy;
      if (take) begin
        total_cnt <= sat_inc32(total_cnt);
        if (is_under)     under_cnt <= sat_inc32(under_cnt);
        else if (is_over) over_cnt  <= sat_inc32(over_cnt);
      end
      if (clear && !clear_busy) begin
        clear_busy <= 1'b1;
        clr_addr   <= '0;
        total_cnt  <= '0;
        under_cnt  <= '0;
        over_cnt   <= '0;
      end else if (clear_busy) begin
        clr_addr <= clr_addr + 1'b1;
        if (clr_addr == ADDR_W'(NUM_BINS - 1)) clear_busy <= 1'b0;
      end
    end
    s1_addr <= ADDR_W'(bin_full);
  end

  // ---- stage 1: increment and write back ---------------------------------
  logic              last_we;
  logic [ADDR_W-1:0] last_waddr;
  logic [BIN_W-1:0]  last_wdata;
  logic [BIN_W-1:0]  cur;

  assign cur = (last_we && last_waddr == s1_addr) ? last_wdata : mem_rdata;

  always_comb begin
    if (clear_busy) begin
      mem_we    = 1'b1;
      mem_waddr = clr_addr;
      mem_wdata = '0;
    end else begin
      mem_we    = s1_valid && !rst;
      mem_waddr = s1_addr;
      mem_wdata = (cur == '1) ? cur : cur + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) last_we <= 1'b0;
    else     last_we <= mem_we;
    last_waddr <= mem_waddr;
    last_wdata <= mem_wdata;
  end

  assign rd_valid = rd_pending;
  assign rd_data  = mem_rdata;
endmodule
