// ra_buffer - random-access input buffer of one IB module.
//
// Cells are kept in arrival order, oldest at position 0 (the HOL position).
// Any one cell may be taken out per time slot (rd_en, rd_idx); the cells behind
// it move forward by one place to close the gap, and a newly arriving cell is
// written behind the last cell. All of this happens on the same clock edge,
// so an arriving cell is first visible, and first searched, in the following
// slot. An arrival finding the buffer full, after this slot's removal, is lost
// and flagged on drop for one cycle.
//
// Interface: in_* is the arriving cell (destination port and cell bits);
// q_valid/q_dest/q_data expose every position to the IB controller, which
// searches them in parallel; rd_data is the cell at rd_idx. count is the
// number of cells held.
//
// Storage in arrival order, removal of any matched cell and forward shifting
// follow the document; the one-slot arrival latency and accepting an arrival
// into the place freed in the same slot are this design's choices.
module ra_buffer #(
  parameter int unsigned N      = cri_pkg::N_PORTS,
  parameter int unsigned DEPTH  = cri_pkg::RAB_DEPTH,
  parameter int unsigned CELL_W = cri_pkg::CELL_W,
  localparam int unsigned PW    = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned IW    = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW    = $clog2(DEPTH + 1)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // arriving cell
  input  logic                          in_valid,
  input  logic [PW-1:0]                 in_dest,
  input  logic [CELL_W-1:0]             in_data,
  output logic                          drop,
  // removal of one cell (transferred to the send buffer)
  input  logic                          rd_en,
  input  logic [IW-1:0]                 rd_idx,
  output logic [CELL_W-1:0]             rd_data,
  // parallel view of all positions, 0 = oldest
  output logic [DEPTH-1:0]              q_valid,
  output logic [DEPTH-1:0][PW-1:0]      q_dest,
  output logic [CW-1:0]                 count
);

  logic [DEPTH-1:0][PW-1:0]     dest_q, dest_d;
  logic [DEPTH-1:0][CELL_W-1:0] data_q, data_d;
  logic [CW-1:0]                count_d, count_after_rd;
  logic                         take;

  assign rd_data = data_q[rd_idx];
  assign q_dest  = dest_q;

  always_comb begin
    for (int k = 0; k < DEPTH; k++) q_valid[k] = (CW'(k) < count);
  end

  always_comb begin
    dest_d         = dest_q;
    data_d         = data_q;
    count_after_rd = count;
    if (rd_en && (CW'(rd_idx) < count)) begin
      // close the gap left by the removed cell
      for (int k = 0; k < DEPTH - 1; k++) begin
        if (k >= int'(rd_idx)) begin
          dest_d[k] = dest_q[k+1];
          data_d[k] = data_q[k+1];
        end
      end
      count_after_rd = count - 1'b1;
    end
    take    = in_valid && (count_after_rd < CW'(DEPTH));
    drop    = in_valid && !take;
    count_d = count_after_rd;
    if (take) begin
      dest_d[count_after_rd] = in_dest;
      data_d[count_after_rd] = in_data;
      count_d                = count_after_rd + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) count <= '0;
    else        count <= count_d;
  end

  // cell storage needs no reset: positions at or above count are never used
  always_ff @(posedge clk) begin
    dest_q <= dest_d;
    data_q <= data_d;
  end

  // a removal may only name a held cell
  a_rd_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    rd_en |-> (CW'(rd_idx) < count));

endmodule
