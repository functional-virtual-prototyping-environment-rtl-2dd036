// mr_distr: the Distr network, a log-depth pipelined tree that broadcasts the
// controller's array instruction and its scalar to every cell.
//
// The tree is binary and every node is a register, stored heap-style: node 0 is
// the root, node n feeds nodes 2n+1 and 2n+2. With L = clog2(P) the leaves sit
// at level L and leaf i drives cell i. The word presented on bc_in in cycle t
// therefore appears on every leaf output in cycle t+L+1 , and all
// cells see it in the same cycle. A new word is accepted every cycle.
//
// That the network is a log-depth tree delivering one instruction per cycle
// follows the source architecture; the fan-out of two and the register at each
// level are this implementation's choice. Reset loads NOP words.
module mr_distr
  import mr_pkg::*;
#(
  parameter int unsigned P = 128,
  localparam int unsigned L = (P > 1) ? $clog2(P) : 0,
  localparam int unsigned NODES = (2 << L) - 1
) (
  input  logic   clk,
  input  logic   rst_n,
  input  bcast_t bc_in,
  output bcast_t bc_out [P]
);

  bcast_t tree [NODES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < NODES; n++) tree[n] <= '0;
    end else begin
      tree[0] <= bc_in;
      for (int n = 1; n < NODES; n++) tree[n] <= tree[(n - 1) / 2];
    end
  end

  for (genvar i = 0; i < P; i++) begin : g_leaf
    assign bc_out[i] = tree[(1 << L) - 1 + i];
  end

endmodule
