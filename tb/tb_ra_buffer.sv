// tb_ra_buffer - random arrivals and random removals against a queue model:
// positions, destinations, read data, fill count and lost arrivals.
module tb_ra_buffer;
  localparam int N = 4;
  localparam int DEPTH = 6;
  localparam int W = 16;
  int checks = 0, failures = 0;

  logic             clk = 1'b0;
  logic             rst_n;
  logic             in_valid, drop, rd_en;
  logic [1:0]       in_dest;
  logic [W-1:0]     in_data, rd_data;
  logic [2:0]       rd_idx;
  logic [DEPTH-1:0] q_valid;
  logic [DEPTH-1:0][1:0] q_dest;
  logic [2:0]       count;

  ra_buffer #(.N(N), .DEPTH(DEPTH), .CELL_W(W)) dut (.*);

  always #5 clk = ~clk;

  typedef struct { logic [1:0] dest; logic [W-1:0] data; } ent_t;
  ent_t model[$];
  int   drops = 0, full_accepts = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; rd_en = 1'b0; rd_idx = '0; in_dest = '0; in_data = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      // drive this slot
      in_valid = ($urandom_range(99, 0) < 60);
      in_dest  = 2'($urandom);
      in_data  = W'($urandom);
      rd_en    = (model.size() > 0) && ($urandom_range(99, 0) < 45);
      rd_idx   = rd_en ? 3'($urandom_range(model.size() - 1, 0)) : 3'd0;
      #1;
      // compare the visible state with the model
      checks++;
      if (int'(count) != model.size()) begin
        failures++; $display("cyc %0d count %0d expected %0d", cyc, count, model.size());
      end
      for (int k = 0; k < DEPTH; k++) begin
        checks++;
        if (q_valid[k] != (k < model.size()) ||
            (k < model.size() && q_dest[k] != model[k].dest)) begin
          failures++; $display("cyc %0d position %0d mismatch", cyc, k);
        end
      end
      if (rd_en) begin
        checks++;
        if (rd_data != model[rd_idx].data) begin
          failures++; $display("cyc %0d rd_data mismatch", cyc);
        end
      end
      checks++;
      if (drop != (in_valid && (model.size() - int'(rd_en) >= DEPTH))) begin
        failures++; $display("cyc %0d drop=%0b", cyc, drop);
      end
      // update the model as the clock edge will
      if (in_valid && rd_en && model.size() == DEPTH) full_accepts++;
      if (rd_en) model.delete(rd_idx);
      if (drop) drops++;
      if (in_valid && model.size() < DEPTH) model.push_back('{in_dest, in_data});
      @(posedge clk);
      #1;
    end
    checks++;
    if (drops == 0 || full_accepts == 0) begin
      failures++; $display("overflow cases not reached: drops=%0d full_accepts=%0d", drops, full_accepts);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
