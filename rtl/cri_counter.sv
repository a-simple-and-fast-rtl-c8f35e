// cri_counter - cyclic reservation interval of one input port.
//
// Implements CRI_i(0) = i and CRI_i(t) = (CRI_i(t-1) + TAU) mod N. One clock
// cycle is one time slot. After reset the counter holds INDEX; on every clock
// edge it advances by TAU modulo N. The value is the number of slots between
// the slot in which input INDEX makes a reservation and the slot it reserves:
// N-1 marks the first reservation port (FRP), 0 the last (LRP).
//
// Interface: clk, synchronous active-low rst_n, output cri (registered).
// The reset value and the update rule follow the scheduler's definition; the
// synchronous reset is this design's choice.
module cri_counter #(
  parameter int unsigned N     = cri_pkg::N_PORTS,
  parameter int unsigned TAU   = cri_pkg::TAU,
  parameter int unsigned INDEX = 0,
  localparam int unsigned PW   = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic [PW-1:0] cri
);

  localparam int unsigned TAU_MOD = TAU % N;

  logic [PW:0] sum;

  always_comb begin
    sum = {1'b0, cri} + (PW+1)'(TAU_MOD);
    if (sum >= (PW+1)'(N)) sum = sum - (PW+1)'(N);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) cri <= PW'(INDEX % N);
    else        cri <= sum[PW-1:0];
  end

endmodule
