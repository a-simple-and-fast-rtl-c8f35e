// tb_ib_module - one IB module with the reservation table and CRI supplied by
// the testbench. Checks every slot: the scheduling choice (oldest cell within
// the search depth whose output is free), the grant, lost arrivals, and at the
// fabric side that a cell of the right output leaves exactly in each reserved
// slot (slot of scheduling + 1 + CRI), with the cells of one flow in arrival
// order.
module tb_ib_module;
  localparam int N = 4;
  localparam int DEPTH = 6;
  localparam int D = 3;
  localparam int W = 16;
  localparam int TAU = 2;
  localparam int INDEX = 1;
  int checks = 0, failures = 0;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         in_valid, fab_valid, sched, drop, exch;
  logic [1:0]   in_dest, cri, fab_dest, sched_dest;
  logic [W-1:0] in_data, fab_data;
  logic [N-1:0] rt_busy, grant;
  logic [2:0]   sched_idx, count;

  ib_module #(.N(N), .DEPTH(DEPTH), .D(D), .CELL_W(W)) dut (.*);

  always #5 clk = ~clk;

  typedef struct { logic [1:0] dest; logic [W-1:0] tag; } c_t;
  c_t   q[$];
  logic [W-1:0] flow[N][$];
  int   dep[int];
  int   n_sched = 0, n_drop = 0, n_exch = 0, n_bypass = 0, n_left = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    logic [W-1:0] tag = 1;
    rst_n = 1'b0; in_valid = 0; in_dest = 0; in_data = 0; cri = 0; rt_busy = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      in_valid = (t < 2900) && ($urandom_range(99, 0) < 75);
      in_dest  = 2'($urandom);
      in_data  = tag;
      cri      = 2'((INDEX + TAU * t) % N);
      rt_busy  = N'($urandom) | N'($urandom);
      #1;
      // fabric side
      checks++;
      if (fab_valid != dep.exists(t)) begin
        failures++; $display("t=%0d fab_valid=%0b", t, fab_valid);
      end else if (fab_valid) begin
        checks++;
        if (int'(fab_dest) != dep[t] || flow[fab_dest].size() == 0 ||
            fab_data != flow[fab_dest][0]) begin
          failures++; $display("t=%0d fabric cell d=%0d tag=%0d wrong", t, fab_dest, fab_data);
        end
        if (flow[fab_dest].size() > 0) void'(flow[fab_dest].pop_front());
        n_left++;
      end
      // scheduling choice
      e = -1;
      for (int k = 0; k < q.size() && k < D; k++)
        if (e < 0 && !rt_busy[q[k].dest]) e = k;
      checks++;
      if (e < 0) begin
        if (sched || grant != '0) begin failures++; $display("t=%0d unexpected schedule", t); end
      end else if (!sched || int'(sched_idx) != e || grant != (N'(1) << q[e].dest)) begin
        failures++; $display("t=%0d sched=%0b idx=%0d expected %0d", t, sched, sched_idx, e);
      end
      checks++;
      if (drop != (in_valid && q.size() - (e >= 0) >= DEPTH)) begin
        failures++; $display("t=%0d drop=%0b", t, drop);
      end
      if (exch) n_exch++;
      if (drop) n_drop++;
      if (e >= 0) begin
        n_sched++;
        if (e > 0) n_bypass++;
        dep[t + 1 + int'(cri)] = q[e].dest;
        flow[q[e].dest].push_back(q[e].tag);
        q.delete(e);
      end
      if (in_valid && !drop) q.push_back('{in_dest, in_data});
      tag++;
      @(posedge clk);
      #1;
    end
    checks++;
    if (n_left != n_sched) begin failures++; $display("scheduled %0d, left %0d", n_sched, n_left); end
    checks++;
    if (n_drop == 0 || n_exch == 0 || n_bypass == 0) begin
      failures++; $display("mechanism missing: drop=%0d exch=%0d bypass=%0d", n_drop, n_exch, n_bypass);
    end
    $display("sched=%0d drop=%0d exch=%0d bypass=%0d", n_sched, n_drop, n_exch, n_bypass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
