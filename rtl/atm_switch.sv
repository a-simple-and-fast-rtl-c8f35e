// atm_switch - input queued ATM switch with the cyclic reservation interval
// (CRI) scheduler.
//
// N input buffer (IB) modules, one contention resolution (CR) module holding
// N reservation tables, and a nonblocking space-division switch. Scheduling
// is by advance reservation: in slot t input i reserves an output for slot
// t + CRI_i(t), where CRI_i(t) = (i + TAU*t) mod N. All inputs search in
// parallel; the reservation tables are passed from input to input in a
// pipeline, so every input sees the reservations already made for the slot
// it is working on, and outputs never collide.
//
// Interface: one clock cycle is one cell time. in_valid/in_dest/in_data is
// the cell arriving at each input with its destination output port (routing
// lookup from the header is outside this design). out_valid/out_src/out_data
// is the cell leaving each output in this slot and the input it came from.
// Status per input: sched pulses when a cell is given a reservation, with
// sched_cri the reservation interval used, sched_idx its place in the
// random-access buffer and sched_dest its output; drop when an arrival is
// lost; exch when the send buffer reorders cells of one flow; occupancy is
// the random-access buffer fill. frp/lrp name the first and last reservation port of the slot.
// Latency: a cell arriving in slot t is first searched in slot t+1; a cell
// scheduled in slot s with interval c appears at the output in slot s+1+c.
module atm_switch #(
  parameter int unsigned N      = cri_pkg::N_PORTS,
  parameter int unsigned D      = cri_pkg::SEARCH_DEPTH,
  parameter int unsigned DEPTH  = cri_pkg::RAB_DEPTH,
  parameter int unsigned TAU    = cri_pkg::TAU,
  parameter int unsigned CELL_W = cri_pkg::CELL_W,
  localparam int unsigned PW    = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned IW    = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW    = $clog2(DEPTH + 1)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [N-1:0]              in_valid,
  input  logic [N-1:0][PW-1:0]      in_dest,
  input  logic [N-1:0][CELL_W-1:0]  in_data,
  output logic [N-1:0]              out_valid,
  output logic [N-1:0][PW-1:0]      out_src,
  output logic [N-1:0][CELL_W-1:0]  out_data,
  output logic [N-1:0]              sched,
  output logic [N-1:0][PW-1:0]      sched_cri,
  output logic [N-1:0][IW-1:0]      sched_idx,
  output logic [N-1:0][PW-1:0]      sched_dest,
  output logic [N-1:0]              drop,
  output logic [N-1:0]              exch,
  output logic [N-1:0][CW-1:0]      occupancy,
  output logic [PW-1:0]             frp,
  output logic [PW-1:0]             lrp
);

  logic [N-1:0][PW-1:0]     cri;
  logic [N-1:0][N-1:0]      rt_busy, grant;
  logic [N-1:0]             fab_valid;
  logic [N-1:0][PW-1:0]     fab_dest;
  logic [N-1:0][CELL_W-1:0] fab_data;
  logic                     collide;

  cr_module #(.N(N), .TAU(TAU)) u_cr (
    .clk    (clk),
    .rst_n  (rst_n),
    .cri    (cri),
    .rt_busy(rt_busy),
    .grant  (grant),
    .frp    (frp),
    .lrp    (lrp)
  );

  for (genvar i = 0; i < N; i++) begin : g_ib
    ib_module #(.N(N), .DEPTH(DEPTH), .D(D), .CELL_W(CELL_W)) u_ib (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (in_valid[i]),
      .in_dest   (in_dest[i]),
      .in_data   (in_data[i]),
      .cri       (cri[i]),
      .rt_busy   (rt_busy[i]),
      .grant     (grant[i]),
      .fab_valid (fab_valid[i]),
      .fab_dest  (fab_dest[i]),
      .fab_data  (fab_data[i]),
      .sched     (sched[i]),
      .sched_idx (sched_idx[i]),
      .sched_dest(sched_dest[i]),
      .drop      (drop[i]),
      .exch      (exch[i]),
      .count     (occupancy[i])
    );
  end

  assign sched_cri = cri;

  space_switch #(.N(N), .CELL_W(CELL_W)) u_fabric (
    .in_valid (fab_valid),
    .in_dest  (fab_dest),
    .in_data  (fab_data),
    .out_valid(out_valid),
    .out_src  (out_src),
    .out_data (out_data),
    .collide  (collide)
  );

  // Property 1 of the scheduler: no output reservation conflict
  a_no_collision: assert property (@(posedge clk) disable iff (!rst_n) !collide);

endmodule
