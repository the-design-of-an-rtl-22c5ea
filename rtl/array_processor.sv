// Array processor for pattern recognition: top level.
//
// An N x N array (N = 32) of one-bit logical modules, each with an accumulator and a
// 16-bit memory, executes the orders of a master control in lock step. The master control
// takes orders from a host computer, runs each through a nine-pulse memory cycle, and
// provides the address matrix, the isolation masks, the fill column used to shift random
// data into the array, and the in-out register that reads the edge counters.
//
// Interface (host side): order_valid / order_ready handshake carrying an order_t and an
// N-bit data word; io_reg receives a counter on RDC; done marks the last pulse of each
// order. ac_plane exposes every accumulator (ac_plane[r][c], row 0 at the top) so the
// host or a testbench can observe the array.
//
// Timing: an order takes 9 clocks and orders can follow back to back; EXP takes one extra
// clock for every further step its ones spread through the links.
module array_processor
  import ap_pkg::*;
#(
  parameter int unsigned N        = AP_N,
  parameter int unsigned MEM_BITS = AP_MEM_BITS,
  parameter int unsigned CW       = $clog2(N + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                order_valid,
  output logic                order_ready,
  input  order_t              order,
  input  logic [N-1:0]        order_data,
  output logic [CW-1:0]       io_reg,
  output logic                done,
  output logic [N-1:0][N-1:0] ac_plane
);

  array_cmd_t                cmd;
  logic [MEM_BITS-1:0]       sel;
  logic [N-1:0]              row_en, col_en, fill;
  logic                      cnt_clr;
  logic                      exp_changed;
  logic [N-1:0][CW-1:0]      row_cnt, col_cnt;

  master_control #(.N(N), .MEM_BITS(MEM_BITS), .CW(CW), .PULSES(AP_PULSES)) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .order_valid(order_valid),
    .order_ready(order_ready),
    .order      (order),
    .order_data (order_data),
    .io_reg     (io_reg),
    .done       (done),
    .cmd        (cmd),
    .sel        (sel),
    .row_en     (row_en),
    .col_en     (col_en),
    .fill       (fill),
    .cnt_clr    (cnt_clr),
    .exp_changed(exp_changed),
    .row_cnt    (row_cnt),
    .col_cnt    (col_cnt)
  );

  ap_array #(.N(N), .MEM_BITS(MEM_BITS), .CW(CW)) u_array (
    .clk        (clk),
    .rst_n      (rst_n),
    .cmd        (cmd),
    .sel        (sel),
    .row_en     (row_en),
    .col_en     (col_en),
    .fill       (fill),
    .cnt_clr    (cnt_clr),
    .ac_plane   (ac_plane),
    .exp_changed(exp_changed),
    .row_cnt    (row_cnt),
    .col_cnt    (col_cnt)
  );

endmodule
