// tb_cri_counter - checks the cyclic reservation interval sequence against
// the closed form CRI_i(t) = (i + TAU*t) mod N for two configurations.
module tb_cri_counter;
  logic clk = 1'b0;
  logic rst_n;
  int   checks = 0, failures = 0;

  logic [3:0] cri16;
  logic [2:0] cri8;

  cri_counter #(.N(16), .TAU(2), .INDEX(5)) dut16 (.clk(clk), .rst_n(rst_n), .cri(cri16));
  cri_counter #(.N(8),  .TAU(4), .INDEX(3)) dut8  (.clk(clk), .rst_n(rst_n), .cri(cri8));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 60; t++) begin
      @(negedge clk);
      checks += 2;
      if (int'(cri16) != (5 + 2 * t) % 16) begin
        failures++;
        $display("N=16 t=%0d cri=%0d expected %0d", t, cri16, (5 + 2 * t) % 16);
      end
      if (int'(cri8) != (3 + 4 * t) % 8) begin
        failures++;
        $display("N=8 t=%0d cri=%0d expected %0d", t, cri8, (3 + 4 * t) % 8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
