// tb_throughput - maximum throughput under saturated inputs.
//
// Every input receives a cell in every slot, with uniformly random
// destinations, and the random-access buffer holds exactly d cells, so each
// input always has d cells to search ("saturated" inputs). After a warm-up the
// delivered cells are counted over a fixed window; throughput is delivered
// cells per output per slot. Six (N, d) points are compared with published
// reference figures for this scheduler: 0.672 (4,1), 0.864 (4,4),
// 0.915 (8,8), 0.617 (16,1), 0.841 (16,4), 0.961 (16,16), within 0.02.
// Fairness: each input's share of the delivered cells is compared with the
// mean of its parity class (within 3 %); see below.
module tb_throughput;
  localparam int NCFG = 6;
  localparam int CFG_N [NCFG] = '{4, 4, 8, 16, 16, 16};
  localparam int CFG_D [NCFG] = '{1, 4, 8, 1, 4, 16};
  localparam int CFG_PM[NCFG] = '{672, 864, 915, 617, 841, 961};
  localparam int WARMUP = 200;
  localparam int WINDOW = 5000;
  localparam int TOL_PM = 20;
  localparam int W = 16;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic rst_n;
  logic counting;
  always #5 clk = ~clk;

  longint delivered[NCFG];
  longint per_input[NCFG][16];

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int N  = CFG_N[g];
    localparam int D  = CFG_D[g];
    localparam int PW = $clog2(N);
    localparam int IW = (D > 1) ? $clog2(D) : 1;
    localparam int CW = $clog2(D + 1);

    logic [N-1:0]          in_valid, out_valid, sched, drop, exch;
    logic [N-1:0][PW-1:0]  in_dest, out_src, sched_cri, sched_dest;
    logic [N-1:0][W-1:0]   in_data, out_data;
    logic [N-1:0][IW-1:0]  sched_idx;
    logic [N-1:0][CW-1:0]  occupancy;
    logic [PW-1:0]         frp, lrp;

    atm_switch #(.N(N), .D(D), .DEPTH(D), .TAU(2), .CELL_W(W)) dut (.*);

    always @(posedge clk) begin
      in_valid <= '1;
      for (int i = 0; i < N; i++) begin
        in_dest[i] <= PW'($urandom_range(N - 1, 0));
        in_data[i] <= W'(i);
      end
    end

    always @(negedge clk) begin
      if (counting) begin
        delivered[g] += $countones(out_valid);
        for (int o = 0; o < N; o++) if (out_valid[o]) per_input[g][out_src[o]]++;
      end
    end
  end

  initial begin
    repeat (WARMUP + WINDOW + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pm;
    counting = 1'b0;
    for (int g = 0; g < NCFG; g++) begin
      delivered[g] = 0;
      for (int i = 0; i < 16; i++) per_input[g][i] = 0;
    end
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (WARMUP) @(posedge clk);
    #1 counting = 1'b1;
    repeat (WINDOW) @(posedge clk);
    #1 counting = 1'b0;
    for (int g = 0; g < NCFG; g++) begin
      pm = int'(delivered[g] * 1000 / (longint'(CFG_N[g]) * WINDOW));
      checks++;
      if (pm < CFG_PM[g] - TOL_PM || pm > CFG_PM[g] + TOL_PM) failures++;
      $display("N=%0d d=%0d throughput=0.%03d reference=0.%03d", CFG_N[g], CFG_D[g], pm, CFG_PM[g]);
      // fairness. With even N the rule GCD(TAU+1, N) = 1 makes TAU even, so
      // CRI_i keeps the parity of i: inputs of one parity class rotate through
      // the same places in every table's visiting order, and the odd class
      // always sees a table first. Within a class each input's share must be
      // within 3 % of the class mean; the two class means are only reported.
      for (int c = 0; c < 2; c++) begin
        longint cls;
        cls = 0;
        for (int i = c; i < CFG_N[g]; i += 2) cls += per_input[g][i];
        $display("  inputs of parity %0d: mean share %0d cells", c, cls * 2 / CFG_N[g]);
        for (int i = c; i < CFG_N[g]; i += 2) begin
          checks++;
          if (per_input[g][i] * CFG_N[g] * 100 < cls * 2 * 97 ||
              per_input[g][i] * CFG_N[g] * 100 > cls * 2 * 103) begin
            failures++;
            $display("  input %0d share %0d: differs from its class", i, per_input[g][i]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
