// tb_space_switch - drives random partial permutations through the fabric and
// checks that every cell reaches the output it addresses, with its source, and
// that a deliberate double addressing raises collide.
module tb_space_switch;
  localparam int N = 8;
  localparam int W = 16;
  int checks = 0, failures = 0;

  logic [N-1:0]          in_valid, out_valid;
  logic [N-1:0][2:0]     in_dest, out_src;
  logic [N-1:0][W-1:0]   in_data, out_data;
  logic                  collide;

  space_switch #(.N(N), .CELL_W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int perm[N];
    int exp_src[N];
    for (int trial = 0; trial < 200; trial++) begin
      for (int k = 0; k < N; k++) perm[k] = k;
      for (int k = N - 1; k > 0; k--) begin
        int j, tmp;
        j = $urandom_range(k, 0);
        tmp = perm[k]; perm[k] = perm[j]; perm[j] = tmp;
      end
      for (int o = 0; o < N; o++) exp_src[o] = -1;
      for (int i = 0; i < N; i++) begin
        in_valid[i] = ($urandom_range(3, 0) != 0);
        in_dest[i]  = 3'(perm[i]);
        in_data[i]  = W'($urandom);
        if (in_valid[i]) exp_src[perm[i]] = i;
      end
      #1;
      checks++;
      if (collide) begin failures++; $display("false collide"); end
      for (int o = 0; o < N; o++) begin
        checks++;
        if (exp_src[o] < 0) begin
          if (out_valid[o]) begin failures++; $display("output %0d spurious", o); end
        end else if (!out_valid[o] || int'(out_src[o]) != exp_src[o] ||
                     out_data[o] != in_data[exp_src[o]]) begin
          failures++;
          $display("output %0d wrong: v=%0b src=%0d", o, out_valid[o], out_src[o]);
        end
      end
    end
    // two inputs addressing one output
    in_valid = '0;
    in_valid[1] = 1'b1; in_dest[1] = 3'd6;
    in_valid[4] = 1'b1; in_dest[4] = 3'd6;
    #1;
    checks++;
    if (!collide) begin failures++; $display("collision not reported"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
