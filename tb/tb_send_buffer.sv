// tb_send_buffer - writes cells at random free positions with few distinct
// destinations, so that flows often have several cells queued. A reference
// model places the cells of the written flow at and behind the write position
// in age order; the HOL output is compared every slot, along with the exch
// flag. Every cell must leave exactly once.
module tb_send_buffer;
  localparam int N = 8;
  localparam int W = 16;
  int checks = 0, failures = 0;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         wr_en, hol_valid, exch;
  logic [2:0]   wr_cri, wr_dest, hol_dest;
  logic [W-1:0] wr_data, hol_data;

  send_buffer #(.N(N), .CELL_W(W)) dut (.*);

  always #5 clk = ~clk;

  typedef struct { bit valid; logic [2:0] dest; logic [W-1:0] tag; } m_t;
  m_t m[N];
  int exchanges = 0, written = 0, left = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m_t sh[N];
    int free_pos[$];
    int pos[$];
    m_t cells[$];
    bit exp_exch;
    logic [W-1:0] tag = 1;
    for (int k = 0; k < N; k++) m[k].valid = 0;
    rst_n = 1'b0; wr_en = 1'b0; wr_cri = '0; wr_dest = '0; wr_data = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      // model of the shifted contents
      for (int k = 0; k < N; k++) sh[k] = (k < N - 1) ? m[k+1] : '{0, 0, 0};
      free_pos.delete();
      for (int k = 0; k < N; k++) if (!sh[k].valid) free_pos.push_back(k);
      wr_en = (cyc < 3900) && ($urandom_range(99, 0) < 70) && (free_pos.size() > 0);
      if (wr_en) begin
        wr_cri  = 3'(free_pos[$urandom_range(free_pos.size() - 1, 0)]);
        wr_dest = 3'($urandom_range(1, 0));
        wr_data = tag;
      end
      #1;
      // HOL output
      checks++;
      if (hol_valid != m[0].valid || (m[0].valid && (hol_dest != m[0].dest || hol_data != m[0].tag))) begin
        failures++;
        $display("cyc %0d HOL v=%0b d=%0d tag=%0d, expected v=%0b d=%0d tag=%0d",
                 cyc, hol_valid, hol_dest, hol_data, m[0].valid, m[0].dest, m[0].tag);
      end
      if (m[0].valid) left++;
      // write: members of the flow at and behind wr_cri, sorted by age
      exp_exch = 0;
      if (wr_en) begin
        pos.delete(); cells.delete();
        for (int k = int'(wr_cri); k < N; k++) begin
          if (k == int'(wr_cri)) pos.push_back(k);
          else if (sh[k].valid && sh[k].dest == wr_dest) begin
            pos.push_back(k); cells.push_back(sh[k]); exp_exch = 1;
          end
        end
        cells.push_back('{1, wr_dest, wr_data});
        cells.sort(c) with (c.tag);
        foreach (pos[p]) sh[pos[p]] = cells[p];
        tag++;
        written++;
      end
      checks++;
      if (exch != exp_exch) begin failures++; $display("cyc %0d exch=%0b expected %0b", cyc, exch, exp_exch); end
      if (exp_exch) exchanges++;
      for (int k = 0; k < N; k++) m[k] = sh[k];
      @(posedge clk);
      #1;
    end
    checks++;
    if (left != written) begin failures++; $display("written %0d, left %0d", written, left); end
    checks++;
    if (exchanges == 0) begin failures++; $display("no exchange happened"); end
    $display("exchanges=%0d written=%0d", exchanges, written);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
