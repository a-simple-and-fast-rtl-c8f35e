// tb_cr_module - random reservations against a model indexed by absolute
// slot number. In slot t, input i must see exactly the outputs already
// reserved (by any input) for slot t + (i + TAU*t) mod N; its grant is then
// recorded for that slot. Also checks the FRP and LRP indices and that the
// FRP always starts from an empty table.
module tb_cr_module;
  localparam int N = 8;
  localparam int TAU = 2;
  int checks = 0, failures = 0;

  logic                clk = 1'b0;
  logic                rst_n;
  logic [N-1:0][2:0]   cri;
  logic [N-1:0][N-1:0] rt_busy, grant;
  logic [2:0]          frp, lrp;

  cr_module #(.N(N), .TAU(TAU)) dut (.*);

  always #5 clk = ~clk;

  logic [N-1:0] reserved[int];
  int shifted_bits = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c, slot, o;
    logic [N-1:0] exp_busy;
    rst_n = 1'b0; grant = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      #1;
      for (int i = 0; i < N; i++) begin
        c    = (i + TAU * t) % N;
        slot = t + c;
        exp_busy = reserved.exists(slot) ? reserved[slot] : '0;
        checks += 2;
        if (int'(cri[i]) != c) begin failures++; $display("t=%0d cri[%0d]=%0d expected %0d", t, i, cri[i], c); end
        if (rt_busy[i] != exp_busy) begin
          failures++; $display("t=%0d RT[%0d]=%b expected %b", t, i, rt_busy[i], exp_busy);
        end
        if (c != N - 1 && exp_busy != '0) shifted_bits++;
        if (c == N - 1) begin checks++; if (int'(frp) != i) begin failures++; $display("frp"); end end
        if (c == 0)     begin checks++; if (int'(lrp) != i) begin failures++; $display("lrp"); end end
        // reserve a random free output, if any, most of the time
        grant[i] = '0;
        if (!(&exp_busy) && $urandom_range(99, 0) < 70) begin
          do o = $urandom_range(N - 1, 0); while (exp_busy[o]);
          grant[i][o] = 1'b1;
          reserved[slot] = exp_busy | grant[i];
        end
      end
      @(posedge clk);
      #1;
    end
    checks++;
    if (shifted_bits == 0) begin failures++; $display("no reservation was ever passed on"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
