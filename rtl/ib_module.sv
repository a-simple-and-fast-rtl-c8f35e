// ib_module - input buffer (IB) module of one switch input.
//
// Holds the random-access buffer, the IB controller and the send buffer.
// In each slot the controller searches the first D buffered cells against
// the reservation table RT_i lent by the CR module; the chosen cell (oldest
// with a free output) leaves the random-access buffer, its output is marked
// busy through grant, and the cell is written into the send buffer at the
// position given by the input's current CRI. The send buffer's HOL cell goes
// to the switch fabric.
//
// Interface: in_* arriving cell; cri and rt_busy from the CR module, grant
// back to it; fab_* the cell for the fabric in this slot. Status pulses:
// sched (a cell was scheduled, with sched_idx its buffer position and
// sched_dest its output), drop (an arrival was lost, buffer full) and exch
// (a same-flow exchange in the send buffer). Timing: a cell arriving in slot
// t can be scheduled from slot t+1; scheduled in slot s it leaves in slot
// s+1+cri.
//
// The three parts and their cooperation follow the document; the latencies
// are this design's choices.
module ib_module #(
  parameter int unsigned N      = cri_pkg::N_PORTS,
  parameter int unsigned DEPTH  = cri_pkg::RAB_DEPTH,
  parameter int unsigned D      = cri_pkg::SEARCH_DEPTH,
  parameter int unsigned CELL_W = cri_pkg::CELL_W,
  localparam int unsigned PW    = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned IW    = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW    = $clog2(DEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // arriving cells
  input  logic              in_valid,
  input  logic [PW-1:0]     in_dest,
  input  logic [CELL_W-1:0] in_data,
  // reservation table RT_i of the CR module
  input  logic [PW-1:0]     cri,
  input  logic [N-1:0]      rt_busy,
  output logic [N-1:0]      grant,
  // switch fabric side
  output logic              fab_valid,
  output logic [PW-1:0]     fab_dest,
  output logic [CELL_W-1:0] fab_data,
  // status
  output logic              sched,
  output logic [IW-1:0]     sched_idx,
  output logic [PW-1:0]     sched_dest,
  output logic              drop,
  output logic              exch,
  output logic [CW-1:0]     count
);

  logic [DEPTH-1:0]         q_valid;
  logic [DEPTH-1:0][PW-1:0] q_dest;
  logic [CELL_W-1:0]        rd_data;

  ra_buffer #(.N(N), .DEPTH(DEPTH), .CELL_W(CELL_W)) u_rab (
    .clk     (clk),
    .rst_n   (rst_n),
    .in_valid(in_valid),
    .in_dest (in_dest),
    .in_data (in_data),
    .drop    (drop),
    .rd_en   (sched),
    .rd_idx  (sched_idx),
    .rd_data (rd_data),
    .q_valid (q_valid),
    .q_dest  (q_dest),
    .count   (count)
  );

  ib_controller #(.N(N), .DEPTH(DEPTH), .D(D)) u_ctrl (
    .q_valid (q_valid),
    .q_dest  (q_dest),
    .rt_busy (rt_busy),
    .match   (sched),
    .sel_idx (sched_idx),
    .sel_dest(sched_dest),
    .grant   (grant)
  );

  send_buffer #(.N(N), .CELL_W(CELL_W)) u_sb (
    .clk      (clk),
    .rst_n    (rst_n),
    .wr_en    (sched),
    .wr_cri   (cri),
    .wr_dest  (sched_dest),
    .wr_data  (rd_data),
    .hol_valid(fab_valid),
    .hol_dest (fab_dest),
    .hol_data (fab_data),
    .exch     (exch)
  );

endmodule
