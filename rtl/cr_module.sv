// cr_module - contention resolution module: the N reservation tables.
//
// RT_i holds one bit per output port (1 = reserved) for the future slot
// t + CRI_i(t) for which input i reserves in slot t. In each slot:
//   * the RT of the first reservation port (CRI_i = N-1) is presented empty,
//     since nobody has yet reserved the slot it stands for;
//   * input i's IB controller sees rt_busy[i] and returns a one-hot grant,
//     which is OR-ed into the table;
//   * on the clock edge every table moves on: RT_i takes the updated table of
//     RT_j, j = (i + 1 + TAU) mod N. The table of the last reservation port
//     (CRI_j = 0) stands for the current slot; it is not passed on, because
//     its successor is the FRP next slot and is cleared then.
// Because every future slot is represented by exactly one table at any time,
// two inputs can never reserve the same output for the same slot.
//
// Interface: cri[i] is CRI_i(t) for IB_i (one cri_counter per input),
// rt_busy[i] the table seen by IB_i, grant[i] its reservation.
// frp/lrp give the first and last reservation port of the slot.
//
// The tables, their clearing, discarding and cyclic shifting follow the
// document; clearing by a mask on the read side instead of a separate
// clearing step is this design's own choice.
module cr_module #(
  parameter int unsigned N   = cri_pkg::N_PORTS,
  parameter int unsigned TAU = cri_pkg::TAU,
  localparam int unsigned PW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  output logic [N-1:0][PW-1:0]  cri,
  output logic [N-1:0][N-1:0]   rt_busy,
  input  logic [N-1:0][N-1:0]   grant,
  output logic [PW-1:0]         frp,
  output logic [PW-1:0]         lrp
);

  if (!cri_pkg::tau_ok(TAU, N)) begin : g_bad_tau
    $error("cr_module: TAU must satisfy GCD(TAU+1, N) = 1 and TAU != q*N");
  end

  logic [N-1:0][N-1:0] rt_q, rt_upd;

  for (genvar i = 0; i < N; i++) begin : g_cri
    cri_counter #(.N(N), .TAU(TAU), .INDEX(i)) u_cri (
      .clk  (clk),
      .rst_n(rst_n),
      .cri  (cri[i])
    );
  end

  always_comb begin
    frp = '0;
    lrp = '0;
    for (int i = 0; i < N; i++) begin
      // step 2: the FRP starts from an empty table
      rt_busy[i] = (cri[i] == PW'(N - 1)) ? '0 : rt_q[i];
      // step 3: the reservation made by IB_i
      rt_upd[i]  = rt_busy[i] | grant[i];
      if (cri[i] == PW'(N - 1)) frp = PW'(i);
      if (cri[i] == '0)         lrp = PW'(i);
    end
  end

  // step 4: cyclic shift RT_j -> RT_i, j = (i + 1 + TAU) mod N
  always_ff @(posedge clk) begin
    if (!rst_n) rt_q <= '0;
    else
      for (int i = 0; i < N; i++) rt_q[i] <= rt_upd[(i + 1 + TAU) % N];
  end

  // a reservation may only take a free output
  for (genvar i = 0; i < N; i++) begin : g_chk
    a_grant_free: assert property (@(posedge clk) disable iff (!rst_n)
      (grant[i] & rt_busy[i]) == '0);
    a_grant_onehot: assert property (@(posedge clk) disable iff (!rst_n)
      $onehot0(grant[i]));
  end

endmodule
