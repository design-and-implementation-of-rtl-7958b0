// encoder_bram: block-RAM table that turns a delay-line ones-count into a
// delay in picoseconds.
//
// The delay lines are not uniform (carry-block boundaries, routing), so the
// ones-count is not converted with a fixed multiply but looked up in a table
// filled from calibration measurements. The table sits in one block RAM with
// a registered read, giving the result one clock (2.5 ns) after the count.
//
// The lookup in block RAM and its one-cycle latency follow the design
// description. The table contents come from board measurements that are not
// available, so this design starts from a linear table,
//   entry[i] = round(i * TAP_FS / 1000) + OFFSET_PS,
// and provides a write port through which measured values (including the
// per-line offset) can be loaded at run time.
// Interface: clk; count -> delay_ps (1 cycle); wr_en/wr_addr/wr_data write
// one entry.
`timescale 1ps/1fs
module encoder_bram #(
  parameter int COUNT_W   = tdc_pkg::count_width(tdc_pkg::N_TAPS),
  parameter int TIME_W    = tdc_pkg::TIME_W,
  parameter int TAP_FS    = 6400,
  parameter int OFFSET_PS = 0
) (
  input  logic               clk,
  input  logic [COUNT_W-1:0] count,
  output logic [TIME_W-1:0]  delay_ps,
  input  logic               wr_en,
  input  logic [COUNT_W-1:0] wr_addr,
  input  logic [TIME_W-1:0]  wr_data
);
  localparam int DEPTH = 2 ** COUNT_W;

  logic [TIME_W-1:0] table_q [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++)
      table_q[i] = TIME_W'((longint'(i) * TAP_FS + 500) / 1000 + OFFSET_PS);
  end

  always_ff @(posedge clk) begin
    if (wr_en) table_q[wr_addr] <= wr_data;
    delay_ps <= table_q[count];
  end
endmodule
