// mr_top: the one-chip map-reduce accelerator.
//
// A Controller (mr_ctrl) runs the program; each cycle the array half of its
// instruction pair goes down the Distr tree (mr_distr, clog2(P)+1 cycles) to the
// Map section (mr_map, P cells), where every cell executes it in the same cycle.
// The Scan network (mr_scan) returns the activity prefix to the cells. The
// Reduce section (mr_reduce, clog2(P)+1 cycles) folds the accumulators of the
// active cells when the controller asks for it, sending the result either to
// the controller or into the global shift register of the Map section. The
// controller can also read the index of the first active cell from Scan. The
// Trans port (mr_trans) moves words between the host side and the local
// memories while the array computes.
//
// Latencies (L = clog2(P)): an array instruction issued in cycle t changes cell
// state at the end of cycle t+L+1; a reduction requested in cycle t reads the
// accumulators as left by the instructions issued up to t-1, and its result is
// pushed into the shift register at the end of cycle t+2L+2 (usable by an
// SRLOAD issued at t+L+2 or later) or is in the controller's reduction register
// from cycle t+2L+3.
//
// The host processor, the interconnection fabric, the external memory and the
// external interface are outside this module: their connections are the
// program/data memory ports, start/busy/cycles, the reduction result and the
// Trans port. P defaults to 128 cells, the size of the FPGA prototype of the
// source architecture; the local memory size (1024 words of 32 bits) and the
// controller memory sizes are this implementation's choices.
module mr_top
  import mr_pkg::*;
#(
  parameter int unsigned P          = 128,
  parameter int unsigned MEM_WORDS  = 1024,
  parameter int unsigned PROG_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024,
  localparam int unsigned IX_W      = (P > 1) ? $clog2(P) : 1,
  localparam int unsigned AW        = $clog2(MEM_WORDS),
  localparam int unsigned PAW       = $clog2(PROG_WORDS),
  localparam int unsigned DAW       = $clog2(DMEM_WORDS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // controller: program / data memory and run control
  input  logic              pm_we,
  input  logic [PAW-1:0]    pm_addr,
  input  prog_word_t        pm_wdata,
  input  logic              dm_we,
  input  logic [DAW-1:0]    dm_addr,
  input  logic [DATA_W-1:0] dm_wdata,
  output logic [DATA_W-1:0] dm_rdata,
  input  logic              start,
  output logic              busy,
  output logic [31:0]       cycles,
  output logic [DATA_W-1:0] red_result,
  output logic              red_valid,
  // Trans: host access to the vector memory
  input  logic              tr_we,
  input  logic              tr_re,
  input  logic [IX_W-1:0]   tr_cell,
  input  logic [AW-1:0]     tr_addr,
  input  logic [DATA_W-1:0] tr_wdata,
  output logic              tr_rvalid,
  output logic [DATA_W-1:0] tr_rdata,
  // status
  output logic              any_active,
  output logic [IX_W-1:0]   first_active
);

  bcast_t            bc_root;
  bcast_t            bc_leaf [P];
  logic              earlier [P];
  logic              active  [P];
  logic [DATA_W-1:0] acc     [P];
  logic [DATA_W-1:0] sr      [P];
  logic              t_we    [P];
  logic [AW-1:0]     t_addr;
  logic [DATA_W-1:0] t_wdata;
  logic [DATA_W-1:0] t_rdata [P];
  logic              rs_valid, rs_push;
  logic [DATA_W-1:0] rs_data;

  mr_ctrl #(.PROG_WORDS(PROG_WORDS), .DMEM_WORDS(DMEM_WORDS)) u_ctrl (
    .clk, .rst_n,
    .pm_we, .pm_addr, .pm_wdata,
    .dm_we, .dm_addr, .dm_wdata, .dm_rdata,
    .start, .busy, .cycles, .red_result, .red_valid,
    .bc_out  (bc_root),
    .rs_valid, .rs_push, .rs_data,
    .scan_first (any_active ? DATA_W'(first_active) : '1)
  );

  mr_distr #(.P(P)) u_distr (
    .clk, .rst_n,
    .bc_in  (bc_root),
    .bc_out (bc_leaf)
  );

  mr_map #(.P(P), .MEM_WORDS(MEM_WORDS)) u_map (
    .clk, .rst_n,
    .bc      (bc_leaf),
    .earlier (earlier),
    .sr_push (rs_valid && rs_push),
    .sr_in   (rs_data),
    .acc     (acc),
    .sr      (sr),
    .active  (active),
    .t_we    (t_we),
    .t_addr  (t_addr),
    .t_wdata (t_wdata),
    .t_rdata (t_rdata)
  );

  mr_scan #(.P(P)) u_scan (
    .active     (active),
    .earlier    (earlier),
    .any_active (any_active),
    .first_ix   (first_active)
  );

  mr_reduce #(.P(P)) u_reduce (
    .clk, .rst_n,
    .cmd       (bc_leaf[0].red),
    .din       (acc),
    .active    (active),
    .res_valid (rs_valid),
    .res_push  (rs_push),
    .res       (rs_data)
  );

  mr_trans #(.P(P), .MEM_WORDS(MEM_WORDS)) u_trans (
    .clk, .rst_n,
    .we     (tr_we),
    .re     (tr_re),
    .sel_cell   (tr_cell),
    .addr   (tr_addr),
    .wdata  (tr_wdata),
    .rvalid (tr_rvalid),
    .rdata  (tr_rdata),
    .t_we   (t_we),
    .t_addr (t_addr),
    .t_wdata(t_wdata),
    .t_rdata(t_rdata)
  );

endmodule
