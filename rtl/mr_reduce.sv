// mr_reduce: the Reduce section, a log-depth pipelined tree folding the
// accumulators of the active cells into one scalar with ADD, MAX or MIN.
//
// Stage 0 registers the P inputs, replacing the value of an inactive cell (and
// of the padding up to the next power of two) by the identity of the requested
// operation: 0 for ADD, the most negative number for MAX, the most positive for
// MIN (values are signed two's complement). Each of the L = clog2(P) following
// stages combines pairs and registers the result. The command (valid, op,
// destination) travels with the data, so a new reduction can start every
// cycle. A command presented in cycle t gives res_valid/res in cycle t+L+1
// . Sums wrap modulo 2^DATA_W.
//
// Add, max and min and the logarithmic pipelined tree are the source
// architecture's; the identity-padding for inactive cells and the registered
// stage boundaries are this implementation's.
module mr_reduce
  import mr_pkg::*;
#(
  parameter int unsigned P = 128,
  localparam int unsigned L = (P > 1) ? $clog2(P) : 0,
  localparam int unsigned W = 1 << L
) (
  input  logic              clk,
  input  logic              rst_n,
  input  red_cmd_t          cmd,
  input  logic [DATA_W-1:0] din    [P],
  input  logic              active [P],
  output logic              res_valid,
  output logic              res_push,     // destination of the result (see red_cmd_t)
  output logic [DATA_W-1:0] res
);

  localparam logic [DATA_W-1:0] MAXV = {1'b0, {(DATA_W-1){1'b1}}};
  localparam logic [DATA_W-1:0] MINV = {1'b1, {(DATA_W-1){1'b0}}};

  function automatic logic [DATA_W-1:0] ident(r_op_e op);
    unique case (op)
      R_MAX:   return MINV;
      R_MIN:   return MAXV;
      default: return '0;
    endcase
  endfunction

  function automatic logic [DATA_W-1:0] comb2(r_op_e op, logic [DATA_W-1:0] a, logic [DATA_W-1:0] b);
    unique case (op)
      R_MAX:   return ($signed(a) > $signed(b)) ? a : b;
      R_MIN:   return ($signed(a) < $signed(b)) ? a : b;
      default: return a + b;
    endcase
  endfunction

  // heap-ordered tree: node 0 is the root, leaves are W-1 .. 2W-2.
  // Stage s (s = 0 .. L) holds the nodes of level L-s.
  logic [DATA_W-1:0] node [2*W-1];
  red_cmd_t          cmd_q [L+1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s <= L; s++) cmd_q[s] <= '0;
    end else begin
      cmd_q[0] <= cmd;
      for (int s = 1; s <= L; s++) cmd_q[s] <= cmd_q[s-1];
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < W; i++) begin
      if (i < P) node[W-1+i] <= active[i % P] ? din[i % P] : ident(cmd.op);
      else       node[W-1+i] <= ident(cmd.op);
    end
    for (int s = 1; s <= L; s++) begin
      for (int n = (1 << (L - s)) - 1; n < (2 << (L - s)) - 1; n++) begin
        node[n] <= comb2(cmd_q[s-1].op, node[2*n+1], node[2*n+2]);
      end
    end
  end

  assign res_valid = cmd_q[L].valid;
  assign res_push  = cmd_q[L].push;
  assign res       = node[0];

endmodule
