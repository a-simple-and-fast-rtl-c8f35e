// tb_load_sweep - cell loss and mean cell delay of a 16-port switch under
// Bernoulli arrivals with uniform destinations.
//
// Loss points (20-cell buffers, the default size) are compared with reference
// curves for this scheduler read off plots: load 0.95 with d = 4, 8, 16 gives
// about 0.14, 0.062, 0.0085; load 0.90 with d = 4, 8 about 0.088, 0.005.
// A point passes when the measured ratio is within a factor of two.
//
// Delay points use 64-cell buffers (large enough not to lose cells) and d = 16.
// Delay here counts from the arrival slot to the departure slot, which
// includes two register stages (arrival to first search, send buffer to
// fabric) that the reference curve does not count, so two slots are taken off
// before comparing: about 8.0 at load 0.2 and 11.5 at load 0.8, within 1.0.
// At low load nearly all of it is the (N-1)/2 wait in the send buffer.
module tb_load_sweep;
  localparam int N  = 16;
  localparam int PW = 4;
  localparam int W  = 32;
  localparam int NCFG = 7;
  // kind 0 = loss point, 1 = delay point
  localparam int CFG_KIND [NCFG] = '{0, 0, 0, 0, 0, 1, 1};
  localparam int CFG_LOAD [NCFG] = '{95, 95, 95, 90, 90, 20, 80};
  localparam int CFG_D    [NCFG] = '{4, 8, 16, 4, 8, 16, 16};
  localparam int CFG_DEPTH[NCFG] = '{20, 20, 20, 20, 20, 64, 64};
  // reference: loss ratio in parts per 10000, or mean delay in tenths of a slot
  localparam int CFG_REF  [NCFG] = '{1400, 620, 85, 880, 50, 80, 115};
  localparam int WARMUP = 1000;
  localparam int WINDOW = 20000;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic rst_n;
  logic counting;
  int   t_now = 0;
  always #5 clk = ~clk;
  always @(posedge clk) t_now <= t_now + 1;

  longint arrivals[NCFG], lost[NCFG], departures[NCFG], delay_sum[NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int DEPTH = CFG_DEPTH[g];
    localparam int IW = $clog2(DEPTH);
    localparam int CW = $clog2(DEPTH + 1);

    logic [N-1:0]          in_valid, out_valid, sched, drop, exch;
    logic [N-1:0][PW-1:0]  in_dest, out_src, sched_cri, sched_dest;
    logic [N-1:0][W-1:0]   in_data, out_data;
    logic [N-1:0][IW-1:0]  sched_idx;
    logic [N-1:0][CW-1:0]  occupancy;
    logic [PW-1:0]         frp, lrp;

    atm_switch #(.N(N), .D(CFG_D[g]), .DEPTH(DEPTH), .TAU(2), .CELL_W(W)) dut (.*);

    // new arrivals right after each clock edge, carrying their arrival slot
    always @(posedge clk) begin
      for (int i = 0; i < N; i++) begin
        in_valid[i] <= rst_n && ($urandom_range(99, 0) < CFG_LOAD[g]);
        in_dest[i]  <= PW'($urandom_range(N - 1, 0));
        in_data[i]  <= W'(t_now + 1);
      end
    end

    always @(negedge clk) begin
      if (counting) begin
        arrivals[g] += $countones(in_valid);
        lost[g]     += $countones(drop);
        for (int o = 0; o < N; o++) begin
          if (out_valid[o]) begin
            departures[g]++;
            delay_sum[g] += longint'(t_now) - longint'(out_data[o]);
          end
        end
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
    longint v;
    counting = 1'b0;
    for (int g = 0; g < NCFG; g++) begin
      arrivals[g] = 0; lost[g] = 0; departures[g] = 0; delay_sum[g] = 0;
    end
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (WARMUP) @(posedge clk);
    #2 counting = 1'b1;
    repeat (WINDOW) @(posedge clk);
    #2 counting = 1'b0;
    for (int g = 0; g < NCFG; g++) begin
      checks++;
      if (CFG_KIND[g] == 0) begin
        v = lost[g] * 10000 / arrivals[g];
        if (lost[g] * 10000 * 2 < longint'(CFG_REF[g]) * arrivals[g] ||
            lost[g] * 10000 > longint'(CFG_REF[g]) * arrivals[g] * 2) failures++;
        $display("load=0.%0d d=%0d buffer=%0d loss=%0d/%0d (%0d per 10000, reference %0d)",
                 CFG_LOAD[g], CFG_D[g], CFG_DEPTH[g], lost[g], arrivals[g], v, CFG_REF[g]);
      end else begin
        v = delay_sum[g] * 10 / departures[g] - 20;
        if (v < CFG_REF[g] - 10 || v > CFG_REF[g] + 10) failures++;
        if (lost[g] != 0) failures++;
        $display("load=0.%0d d=%0d buffer=%0d mean delay=%0d.%0d slots (reference %0d.%0d), lost=%0d",
                 CFG_LOAD[g], CFG_D[g], CFG_DEPTH[g], v / 10, v % 10, CFG_REF[g] / 10, CFG_REF[g] % 10, lost[g]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
