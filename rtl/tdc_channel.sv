// tdc_channel: one TDC channel -- two tapped delay lines and one coarse counter
// combined into a start-to-stop interval in picoseconds.
//
// The start and stop signals each run down their own carry chain. At every
// 400 MHz clock edge both chains are sampled (delay_line). The first edge at
// which the first start tap reads 1 marks the start: the ones-count of that
// sample, looked up in encoder 1, is T1, the time from the start edge to that
// clock edge. The coarse counter then counts clock periods until the first
// edge at which the stop is seen; the count N is T2 = N * 2.5 ns, and the
// ones-count of the stop sample at that edge, through encoder 2, is T3. The
// ALU forms T = N * 2500 + T1 - T3 (T1 + T2 - T3 in the design's notation).
//
// Pipeline, counted from the clock edge Eb at which the stop is first
// sampled: bit counters (Eb+1), encoders (Eb+2), ALU level 1 (Eb+3) and
// level 2 (Eb+4); meas_valid is high for one cycle after edge Eb+4. The start
// result passes through the same stages and is held until the stop result
// arrives (it arrives in the same cycle when start and stop fall in the same
// clock period, N = 0).
//
// Control (this design's choice; the description gives only the data path):
// a start is accepted only when the stop line was low at the previous edge; a
// stop rising edge is used only after an accepted start; after a measurement
// the channel re-arms once both lines read low again. The first tap of each
// sample serves as the synchronised signal level. Signals are taken as
// rising edges that stay high until the measurement is taken, as in the
// timing diagram. A start that rises within one tap delay before a clock edge
// is first seen at the next edge, with T1 close to a full period, which gives
// the same T to within one tap.
// Interface: clk, rst (synchronous, active high), start_taps/stop_taps
// (carry-chain outputs), cal_we/cal_line/cal_addr/cal_data (load one entry of
// encoder 1 (cal_line = 0) or 2 (cal_line = 1)), meas_valid/meas.
`timescale 1ps/1fs
module tdc_channel #(
  parameter int                  N_TAPS      = tdc_pkg::N_TAPS,
  parameter int                  CNT_W       = tdc_pkg::CNT_W,
  parameter int                  TAP_FS      = 6400,
  parameter bit                  USE_REORDER = 1'b0,
  parameter tdc_pkg::tap_order_t START_ORDER = tdc_pkg::identity_order(),
  parameter tdc_pkg::tap_order_t STOP_ORDER  = tdc_pkg::identity_order(),
  localparam int                 COUNT_W     = tdc_pkg::count_width(N_TAPS),
  localparam int                 TIME_W      = tdc_pkg::TIME_W
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [N_TAPS-1:0]  start_taps,
  input  logic [N_TAPS-1:0]  stop_taps,
  input  logic               cal_we,
  input  logic               cal_line,
  input  logic [COUNT_W-1:0] cal_addr,
  input  logic [TIME_W-1:0]  cal_data,
  output logic               meas_valid,
  output tdc_pkg::meas_t     meas
);
  // ---- sampling -----------------------------------------------------------
  logic [N_TAPS-1:0] code1, code2;

  delay_line #(.N_TAPS(N_TAPS), .USE_REORDER(USE_REORDER), .ORDER(START_ORDER))
    u_dl1 (.clk(clk), .taps(start_taps), .code(code1));
  delay_line #(.N_TAPS(N_TAPS), .USE_REORDER(USE_REORDER), .ORDER(STOP_ORDER))
    u_dl2 (.clk(clk), .taps(stop_taps), .code(code2));

  // ---- start / stop detection --------------------------------------------
  typedef enum logic [1:0] {S_IDLE, S_ARMED, S_DONE} state_t;
  state_t state;

  logic start_lvl, stop_lvl, start_prev, stop_prev;
  logic start_hit, stop_hit;

  assign start_lvl = code1[0];
  assign stop_lvl  = code2[0];

  always_ff @(posedge clk) begin
    if (rst) begin
      start_prev <= 1'b1;   // a line already high at reset is not a new edge
      stop_prev  <= 1'b1;
    end else begin
      start_prev <= start_lvl;
      stop_prev  <= stop_lvl;
    end
  end

  assign start_hit = (state == S_IDLE) && start_lvl && !start_prev && !stop_prev;
  assign stop_hit  = ((state == S_ARMED) || start_hit) && stop_lvl && !stop_prev;

  always_ff @(posedge clk) begin
    if (rst) state <= S_IDLE;
    else begin
      unique case (state)
        S_IDLE:  if (stop_hit) state <= S_DONE;
                 else if (start_hit) state <= S_ARMED;
        S_ARMED: if (stop_hit) state <= S_DONE;
                 else if (!start_lvl) state <= S_IDLE;   // start vanished
        S_DONE:  if (!start_lvl && !stop_lvl) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---- coarse counter -------------------------------------------------------
  logic [CNT_W-1:0] n_cnt;
  logic             n_ovf;

  coarse_counter #(.CNT_W(CNT_W)) u_cnt (
    .clk(clk), .rst(rst), .start_lvl(start_lvl), .stop_lvl(stop_lvl),
    .count(n_cnt), .overflow(n_ovf)
  );

  // ---- fine measurement: ones-count then calibration table ------------------
  logic [COUNT_W-1:0] ones1, ones2;
  logic [TIME_W-1:0]  t1_ps, t3_ps;

  bit_counter #(.N_TAPS(N_TAPS)) u_bc1 (.clk(clk), .code(code1), .count(ones1));
  bit_counter #(.N_TAPS(N_TAPS)) u_bc2 (.clk(clk), .code(code2), .count(ones2));

  encoder_bram #(.COUNT_W(COUNT_W), .TAP_FS(TAP_FS)) u_enc1 (
    .clk(clk), .count(ones1), .delay_ps(t1_ps),
    .wr_en(cal_we && !cal_line), .wr_addr(cal_addr), .wr_data(cal_data)
  );
  encoder_bram #(.COUNT_W(COUNT_W), .TAP_FS(TAP_FS)) u_enc2 (
    .clk(clk), .count(ones2), .delay_ps(t3_ps),
    .wr_en(cal_we && cal_line), .wr_addr(cal_addr), .wr_data(cal_data)
  );

  // Hit flags and the coarse count travel beside the bit counter and encoder
  // (two stages).
  logic [1:0]       start_hit_d, stop_hit_d;
  logic [CNT_W-1:0] n_d [2];
  logic             ovf_d [2];
  logic [TIME_W-1:0] t1_hold;

  always_ff @(posedge clk) begin
    if (rst) begin
      start_hit_d <= '0;
      stop_hit_d  <= '0;
    end else begin
      start_hit_d <= {start_hit_d[0], start_hit};
      stop_hit_d  <= {stop_hit_d[0], stop_hit};
    end
    n_d[0]   <= n_cnt;
    n_d[1]   <= n_d[0];
    ovf_d[0] <= n_ovf;
    ovf_d[1] <= ovf_d[0];
    if (start_hit_d[1]) t1_hold <= t1_ps;
  end

  // ---- final arithmetic -------------------------------------------------------
  dsp_alu #(.CNT_W(CNT_W), .TIME_W(TIME_W)) u_alu (
    .clk(clk), .rst(rst),
    .in_valid(stop_hit_d[1]),
    .n(n_d[1]), .n_overflow(ovf_d[1]),
    .t1_ps(start_hit_d[1] ? t1_ps : t1_hold),
    .t3_ps(t3_ps),
    .out_valid(meas_valid), .out(meas)
  );

  // A stop can only be used after its start has been seen.
  assert property (@(posedge clk) disable iff (rst) stop_hit |-> (state == S_ARMED || start_hit));
endmodule
