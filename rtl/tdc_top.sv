// tdc_top: single-channel tapped-delay-line time-to-digital converter with
// histogram storage.
//
// Measures the interval between a rising edge on start and a rising edge on
// stop with a resolution of one carry-chain tap (about 6.4 ps nominal) over a
// range set by the 16-bit coarse counter (65535 x 2.5 ns, about 164 us).
// Each signal runs down its own 464-tap carry chain (58 CARRY8 blocks); the
// chains are sampled by the 400 MHz clock, and T = N*2500 + T1 - T3 ps is
// formed from the start-line reading T1, the number N of clock periods and
// the stop-line reading T3 (see tdc_channel). Every result is also streamed
// out on meas_valid/meas and binned into a histogram in block RAM
// (mem_manager, hist_mem).
//
// The block structure, the 464-tap lines, the 400 MHz 16-bit counter, the
// two-level x2500 arithmetic and the histogram in block RAM follow the design
// description; the single channel, the histogram sizes and controls, and the
// 6.4 ps nominal tap are this design's choices.
// The carry chains are behavioural timing models (carry_chain): on the device
// they are the placed CARRY8 primitives. Everything after the taps is
// synthesizable RTL.
// Interface: clk (400 MHz), rst (synchronous, active high), start, stop;
// cal_* loads encoder calibration entries; cfg_min_ps/cfg_bin_shift set the
// histogram window; acq_en, clear, rd_* and the *_cnt outputs control and read
// the histogram. Latency from the stop-sampling clock edge to meas_valid is
// 4 cycles, and one more to the histogram write.
`timescale 1ps/1fs
module tdc_top #(
  parameter int  N_BLOCKS = tdc_pkg::N_BLOCKS,
  parameter int  CNT_W    = tdc_pkg::CNT_W,
  parameter int  TAP_FS   = 6400,
  parameter int  NUM_BINS = 4096,
  parameter int  BIN_W    = 32,
  localparam int N_TAPS   = N_BLOCKS * tdc_pkg::TAPS_PER_BLOCK,
  localparam int COUNT_W  = tdc_pkg::count_width(N_TAPS),
  localparam int ADDR_W   = $clog2(NUM_BINS),
  localparam int TIME_W   = tdc_pkg::TIME_W
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               start,
  input  logic               stop,
  input  logic               cal_we,
  input  logic               cal_line,
  input  logic [COUNT_W-1:0] cal_addr,
  input  logic [TIME_W-1:0]  cal_data,
  output logic               meas_valid,
  output tdc_pkg::meas_t     meas,
  input  logic [TIME_W-1:0]  cfg_min_ps,
  input  logic [4:0]         cfg_bin_shift,
  input  logic               acq_en,
  input  logic               clear,
  output logic               clear_busy,
  input  logic               rd_en,
  input  logic [ADDR_W-1:0]  rd_addr,
  output logic               rd_valid,
  output logic [BIN_W-1:0]   rd_data,
  output logic [31:0]        total_cnt,
  output logic [31:0]        under_cnt,
  output logic [31:0]        over_cnt
);
  localparam real TAP_PS = real'(TAP_FS) / 1000.0;

  logic [N_TAPS-1:0] start_taps, stop_taps;

  carry_chain #(.N_BLOCKS(N_BLOCKS), .TAP_PS(TAP_PS)) u_chain_start (.din(start), .taps(start_taps));
  carry_chain #(.N_BLOCKS(N_BLOCKS), .TAP_PS(TAP_PS)) u_chain_stop  (.din(stop),  .taps(stop_taps));

  tdc_channel #(.N_TAPS(N_TAPS), .CNT_W(CNT_W), .TAP_FS(TAP_FS)) u_channel (
    .clk, .rst, .start_taps, .stop_taps,
    .cal_we, .cal_line, .cal_addr, .cal_data,
    .meas_valid, .meas
  );

  logic              mem_we;
  logic [ADDR_W-1:0] mem_waddr, mem_raddr;
  logic [BIN_W-1:0]  mem_wdata, mem_rdata;

  mem_manager #(.NUM_BINS(NUM_BINS), .BIN_W(BIN_W)) u_mgr (
    .clk, .rst, .acq_en, .clear, .clear_busy, .cfg_min_ps, .cfg_bin_shift,
    .in_valid(meas_valid), .in(meas),
    .rd_en, .rd_addr, .rd_valid, .rd_data,
    .total_cnt, .under_cnt, .over_cnt,
    .mem_we, .mem_waddr, .mem_wdata, .mem_raddr, .mem_rdata
  );

  hist_mem #(.DEPTH(NUM_BINS), .DATA_W(BIN_W)) u_mem (
    .clk, .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata),
    .raddr(mem_raddr), .rdata(mem_rdata)
  );
endmodule
