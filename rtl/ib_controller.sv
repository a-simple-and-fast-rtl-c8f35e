// ib_controller - parallel output-port search of one IB module.
//
// The destination ports of the first D cells of the random-access buffer
// (fewer if the buffer holds fewer) are compared at once against the free
// entries of this input's reservation table (rt_busy bit = 1 means the output
// is already reserved for the slot the table stands for). Of the cells that
// find their output free, the oldest one, the one nearest the HOL position, is
// chosen. Purely combinational, so the search time does not depend on D.
//
// Interface: q_valid/q_dest from ra_buffer, rt_busy from the CR module.
// match is set when a cell was chosen, sel_idx is its buffer position,
// grant is the one-hot output port to be marked busy, sel_dest its number.
//
// The parallel match and oldest-first choice follow the document; the
// priority encoder built from a simple loop is this design's own choice.
module ib_controller #(
  parameter int unsigned N     = cri_pkg::N_PORTS,
  parameter int unsigned DEPTH = cri_pkg::RAB_DEPTH,
  parameter int unsigned D     = cri_pkg::SEARCH_DEPTH,
  localparam int unsigned PW   = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned IW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic [DEPTH-1:0]         q_valid,
  input  logic [DEPTH-1:0][PW-1:0] q_dest,
  input  logic [N-1:0]             rt_busy,
  output logic                     match,
  output logic [IW-1:0]            sel_idx,
  output logic [PW-1:0]            sel_dest,
  output logic [N-1:0]             grant
);

  // number of positions searched: the search depth, or the whole buffer
  localparam int unsigned SD = (D < DEPTH) ? D : DEPTH;

  logic [SD-1:0] hit;

  always_comb begin
    for (int k = 0; k < SD; k++) hit[k] = q_valid[k] && !rt_busy[q_dest[k]];
  end

  always_comb begin
    match    = 1'b0;
    sel_idx  = '0;
    sel_dest = '0;
    for (int k = SD - 1; k >= 0; k--) begin
      if (hit[k]) begin
        match    = 1'b1;
        sel_idx  = IW'(k);
        sel_dest = q_dest[k];
      end
    end
    grant = '0;
    if (match) grant[sel_dest] = 1'b1;
  end

endmodule
