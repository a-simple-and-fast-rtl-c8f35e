// tb_ib_controller - random buffer contents and reservation tables; the chosen
// cell must be the oldest one within the search depth whose output is free.
// Two instances: search depth below and above the buffer size.
module tb_ib_controller;
  localparam int N = 4;
  localparam int DEPTH = 6;
  int checks = 0, failures = 0;

  logic [DEPTH-1:0]       q_valid;
  logic [DEPTH-1:0][1:0]  q_dest;
  logic [N-1:0]           rt_busy;
  logic                   match_a, match_b;
  logic [2:0]             idx_a, idx_b;
  logic [1:0]             dest_a, dest_b;
  logic [N-1:0]           grant_a, grant_b;

  ib_controller #(.N(N), .DEPTH(DEPTH), .D(3)) dut_a (
    .q_valid, .q_dest, .rt_busy, .match(match_a), .sel_idx(idx_a), .sel_dest(dest_a), .grant(grant_a));
  ib_controller #(.N(N), .DEPTH(DEPTH), .D(8)) dut_b (
    .q_valid, .q_dest, .rt_busy, .match(match_b), .sel_idx(idx_b), .sel_dest(dest_b), .grant(grant_b));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int d, input logic m, input logic [2:0] idx,
                       input logic [1:0] dst, input logic [N-1:0] g);
    int exp_idx;
    exp_idx = -1;
    for (int k = 0; k < DEPTH && k < d; k++)
      if (exp_idx < 0 && q_valid[k] && !rt_busy[q_dest[k]]) exp_idx = k;
    checks++;
    if (exp_idx < 0) begin
      if (m || g != '0) begin failures++; $display("d=%0d unexpected match", d); end
    end else if (!m || int'(idx) != exp_idx || dst != q_dest[exp_idx] ||
                 g != (N'(1) << q_dest[exp_idx])) begin
      failures++;
      $display("d=%0d got m=%0b idx=%0d, expected idx=%0d", d, m, idx, exp_idx);
    end
  endtask

  initial begin
    int cnt;
    for (int trial = 0; trial < 2000; trial++) begin
      cnt = $urandom_range(DEPTH, 0);
      for (int k = 0; k < DEPTH; k++) begin
        q_valid[k] = (k < cnt);
        q_dest[k]  = 2'($urandom);
      end
      rt_busy = N'($urandom);
      #1;
      check(3, match_a, idx_a, dest_a, grant_a);
      check(8, match_b, idx_b, dest_b, grant_b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
