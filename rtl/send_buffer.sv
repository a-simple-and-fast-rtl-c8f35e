// send_buffer - send buffer of one IB module.
//
// N positions; position 0 is the HOL position, whose cell is presented to the
// switch fabric during the current slot. On every clock edge all cells move
// forward by one position, and a newly scheduled cell is written at position
// cri (the input's cyclic reservation interval in the slot it was scheduled),
// so that it reaches position 0 cri slots later. That position is always free:
// an input never reserves the same slot twice when GCD(TAU+1, N) = 1.
//
// Flow order: the new cell is always the youngest of its flow in this buffer.
// If cells with the same destination already sit behind position cri (they
// would leave later), the cells of that flow at position cri and behind are
// reassigned in age order: each older cell moves into the nearest earlier
// place of the set and the new cell takes the last one. With one such cell
// this is a plain exchange of two positions. exch pulses when it happens.
//
// Interface: wr_en/wr_cri/wr_dest/wr_data write one cell per slot;
// hol_valid/hol_dest/hol_data is the fabric side. Timing: a cell written in
// slot t at position c leaves in slot t+1+c.
//
// The shift register, the write position and the exchange follow the
// document; extending the exchange to several queued cells of one flow, and
// the one-slot register stage before the fabric, are this design's choices.
module send_buffer #(
  parameter int unsigned N      = cri_pkg::N_PORTS,
  parameter int unsigned CELL_W = cri_pkg::CELL_W,
  localparam int unsigned PW    = (N > 1) ? $clog2(N) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_en,
  input  logic [PW-1:0]     wr_cri,
  input  logic [PW-1:0]     wr_dest,
  input  logic [CELL_W-1:0] wr_data,
  output logic              hol_valid,
  output logic [PW-1:0]     hol_dest,
  output logic [CELL_W-1:0] hol_data,
  output logic              exch
);

  typedef struct packed {
    logic              valid;
    logic [PW-1:0]     dest;
    logic [CELL_W-1:0] data;
  } slot_t;

  slot_t [N-1:0] sb_q, shifted, sb_d;
  logic  [N-1:0] member;   // positions of the new cell's flow, from wr_cri on
  slot_t         new_cell;

  assign hol_valid = sb_q[0].valid;
  assign hol_dest  = sb_q[0].dest;
  assign hol_data  = sb_q[0].data;

  always_comb begin
    new_cell = '{valid: 1'b1, dest: wr_dest, data: wr_data};
    for (int k = 0; k < N; k++) shifted[k] = (k < N - 1) ? sb_q[k+1] : '0;
    for (int k = 0; k < N; k++)
      member[k] = wr_en && ((k == int'(wr_cri)) ||
                  ((k > int'(wr_cri)) && shifted[k].valid && shifted[k].dest == wr_dest));
    exch = wr_en && ((member & ~(N'(1) << wr_cri)) != '0);
    sb_d = shifted;
    for (int k = 0; k < N; k++) begin
      if (member[k]) begin
        // take the cell of the next member behind; the last member gets the new cell
        sb_d[k] = new_cell;
        for (int q = N - 1; q > k; q--)
          if (member[q]) sb_d[k] = shifted[q];
      end
    end
  end

  // only the valid bits are reset; dest and data are don't-care in empty places
  always_ff @(posedge clk) begin
    sb_q <= sb_d;
    if (!rst_n)
      for (int k = 0; k < N; k++) sb_q[k].valid <= 1'b0;
  end

  // the reserved position must be free: each slot is reserved only once per input
  a_slot_free: assert property (@(posedge clk) disable iff (!rst_n)
    wr_en |-> !shifted[wr_cri].valid);

endmodule
