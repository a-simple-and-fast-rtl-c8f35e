// space_switch - self-routing nonblocking space-division switch fabric.
//
// Each input presents at most one cell per slot together with its destination
// port; each output takes the cell of the input that addresses it. The
// scheduler guarantees that no two inputs address the same output in a slot;
// collide reports a violation. The output also names the
// input the cell came from. Combinational: a cell crosses within its slot.
//
// The document only names this block; the crossbar built from one
// multiplexer per output is this design's choice.
module space_switch #(
  parameter int unsigned N      = cri_pkg::N_PORTS,
  parameter int unsigned CELL_W = cri_pkg::CELL_W,
  localparam int unsigned PW    = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]              in_valid,
  input  logic [N-1:0][PW-1:0]      in_dest,
  input  logic [N-1:0][CELL_W-1:0]  in_data,
  output logic [N-1:0]              out_valid,
  output logic [N-1:0][PW-1:0]      out_src,
  output logic [N-1:0][CELL_W-1:0]  out_data,
  output logic                      collide
);

  always_comb begin
    collide = 1'b0;
    for (int o = 0; o < N; o++) begin
      out_valid[o] = 1'b0;
      out_src[o]   = '0;
      out_data[o]  = '0;
      for (int i = 0; i < N; i++) begin
        if (in_valid[i] && in_dest[i] == PW'(o)) begin
          if (out_valid[o]) collide = 1'b1;
          out_valid[o] = 1'b1;
          out_src[o]   = PW'(i);
          out_data[o]  = in_data[i];
        end
      end
    end
  end

endmodule
