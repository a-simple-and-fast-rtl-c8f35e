// tb_atm_switch - end-to-end test of the whole switch at its default size
// (16 ports, search depth 16, 20-cell buffers, full 424-bit cells).
//
// Phase 1 offers Bernoulli traffic at load 0.95 with uniform destinations,
// phase 2 stops arrivals and lets every buffer drain. Each cell carries its
// source, destination and per-flow sequence number. Checked at every output:
// the cell belongs there, came from the input named by out_src, is the next
// accepted cell of its flow (no loss inside the switch, no reordering), and
// leaves in the very slot its input reserved (slot of scheduling + 1 + CRI).
// At the end every accepted cell must have left, the mean reservation
// interval must be near (N-1)/2, and each mechanism must have occurred:
// reservations from behind the HOL cell, blocked inputs, lost arrivals,
// same-flow exchanges, and the first reservation port role visiting every input the CRI
// sequence allows (N / GCD(TAU, N) of them).
module tb_atm_switch;
  localparam int N  = cri_pkg::N_PORTS;
  localparam int PW = $clog2(N);
  localparam int CW = cri_pkg::CELL_W;
  localparam int LOAD_PCT = 95;
  localparam int SLOTS = 3000;
  localparam int DRAIN = 400;
  int checks = 0, failures = 0;

  logic                   clk = 1'b0;
  logic                   rst_n;
  logic [N-1:0]           in_valid, out_valid, sched, drop, exch;
  logic [N-1:0][PW-1:0]   in_dest, out_src, sched_cri, sched_dest;
  logic [N-1:0][CW-1:0]   in_data, out_data;
  logic [N-1:0][4:0]      sched_idx;
  logic [N-1:0][5-1:0]    occupancy;
  logic [PW-1:0]          frp, lrp;

  atm_switch dut (.*);

  always #5 clk = ~clk;

  int unsigned seq_next[N][N];
  int unsigned flow[N][N][$];
  int          dep[N][int];
  longint      n_arr = 0, n_acc = 0, n_out = 0, n_sched = 0, sum_cri = 0;
  int          n_bypass = 0, n_blocked = 0, n_drop = 0, n_exch = 0;
  bit          was_frp[N];
  int          n_frp;

  function automatic logic [CW-1:0] make_cell(int src, int dst, int unsigned seq);
    logic [CW-1:0] c;
    for (int w = 0; w < CW / 32 + 1; w++) c[w*32 +: 32] = $urandom;
    c[31:0]  = seq;
    c[39:32] = 8'(dst);
    c[47:40] = 8'(src);
    return c;
  endfunction

  initial begin
    repeat (SLOTS + DRAIN + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int src, dst;
    int unsigned sq;
    rst_n = 1'b0; in_valid = '0; in_dest = '0; in_data = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < SLOTS + DRAIN; t++) begin
      for (int i = 0; i < N; i++) begin
        in_valid[i] = (t < SLOTS) && ($urandom_range(99, 0) < LOAD_PCT);
        dst         = $urandom_range(N - 1, 0);
        in_dest[i]  = PW'(dst);
        in_data[i]  = make_cell(i, dst, seq_next[i][dst]);
      end
      #1;
      // outputs of this slot
      for (int o = 0; o < N; o++) begin
        if (out_valid[o]) begin
          src = int'(out_data[o][47:40]);
          dst = int'(out_data[o][39:32]);
          sq  = out_data[o][31:0];
          n_out++;
          checks++;
          if (dst != o || src != int'(out_src[o])) begin
            failures++; $display("t=%0d output %0d got cell for %0d from %0d (out_src %0d)", t, o, dst, src, out_src[o]);
          end else if (flow[src][dst].size() == 0 || flow[src][dst][0] != sq) begin
            failures++; $display("t=%0d flow %0d->%0d out of order: seq %0d", t, src, dst, sq);
          end else begin
            void'(flow[src][dst].pop_front());
          end
          checks++;
          if (!dep[src].exists(t) || dep[src][t] != o) begin
            failures++; $display("t=%0d input %0d sent to %0d without a reservation", t, src, o);
          end else dep[src].delete(t);
        end
      end
      // inputs of this slot
      if (frp < N) was_frp[frp] = 1'b1;
      for (int i = 0; i < N; i++) begin
        if (in_valid[i]) begin
          n_arr++;
          if (drop[i]) n_drop++;
          else begin
            n_acc++;
            flow[i][in_dest[i]].push_back(seq_next[i][in_dest[i]]);
            seq_next[i][in_dest[i]]++;
          end
        end
        if (sched[i]) begin
          n_sched++;
          sum_cri += sched_cri[i];
          if (sched_idx[i] != 0) n_bypass++;
          dep[i][t + 1 + int'(sched_cri[i])] = int'(sched_dest[i]);
        end else if (occupancy[i] != 0) n_blocked++;
        if (exch[i]) n_exch++;
      end
      @(posedge clk);
      #1;
    end
    // everything accepted must have left
    checks++;
    if (n_out != n_acc) begin failures++; $display("accepted %0d cells, delivered %0d", n_acc, n_out); end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (dep[i].num() != 0) begin failures++; $display("input %0d: %0d reservations unused", i, dep[i].num()); end
    end
    // the FRP role rotates over N / GCD(TAU, N) inputs (Eqn. of the CRI)
    n_frp = 0;
    for (int i = 0; i < N; i++) n_frp += int'(was_frp[i]);
    checks++;
    if (n_frp != N / int'(cri_pkg::gcd(cri_pkg::TAU, N))) begin
      failures++; $display("%0d inputs acted as FRP", n_frp);
    end
    // mean wait in the send buffer is (N-1)/2 slots, independent of load
    checks++;
    if (n_sched == 0 || (real'(sum_cri) / real'(n_sched)) < (N - 1) / 2.0 - 0.5 ||
        (real'(sum_cri) / real'(n_sched)) > (N - 1) / 2.0 + 0.5) begin
      failures++; $display("mean reservation interval off");
    end
    checks++;
    if (n_bypass == 0 || n_blocked == 0 || n_drop == 0 || n_exch == 0) begin
      failures++; $display("a mechanism never occurred");
    end
    $display("arrivals=%0d accepted=%0d lost=%0d delivered=%0d mean_cri=%0.2f",
             n_arr, n_acc, n_drop, n_out, real'(sum_cri) / real'(n_sched));
    $display("bypass=%0d blocked=%0d exchanges=%0d", n_bypass, n_blocked, n_exch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
