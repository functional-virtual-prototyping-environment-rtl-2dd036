// mr_map: the Map section, a linear array of P cells (mr_cell).
//
// Every cell gets its instruction from its own Distr leaf, its index (0..P-1)
// and the Scan prefix bit. Neighbouring accumulators are wired in a line for
// the global moves: SHL/ROTL move values toward cell 0 (cell P-1 takes the
// broadcast scalar for SHL, the old acc of cell 0 for ROTL), SHR/ROTR move them
// toward cell P-1 (cell 0 takes the scalar, or the acc of cell P-1). One
// position moves per instruction.
//
// The per-cell sr registers form the global shift register: when sr_push is
// high, every element moves one position toward cell 0 and sr_in enters at
// cell P-1, so after P pushes cell i holds the i-th value pushed. The Trans
// port reaches every local memory: a shared address and write data with one
// write enable and one read data bus per cell.
//
// The array of eng/mem cells with neighbour links follows the source
// architecture; the exact edge rules are this implementation's.
module mr_map
  import mr_pkg::*;
#(
  parameter int unsigned P         = 128,
  parameter int unsigned MEM_WORDS = 1024,
  localparam int unsigned IX_W     = (P > 1) ? $clog2(P) : 1,
  localparam int unsigned AW       = $clog2(MEM_WORDS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  bcast_t            bc       [P],
  input  logic              earlier  [P],
  input  logic              sr_push,
  input  logic [DATA_W-1:0] sr_in,
  output logic [DATA_W-1:0] acc      [P],
  output logic [DATA_W-1:0] sr       [P],
  output logic              active   [P],
  input  logic              t_we     [P],
  input  logic [AW-1:0]     t_addr,
  input  logic [DATA_W-1:0] t_wdata,
  output logic [DATA_W-1:0] t_rdata  [P]
);

  logic [DATA_W-1:0] hi [P];
  logic [DATA_W-1:0] lo [P];
  logic [DATA_W-1:0] sr_hi [P];

  for (genvar i = 0; i < P; i++) begin : g_cell
    if (i == P - 1) begin : g_top
      assign hi[i]    = (bc[i].instr.op == A_ROTL) ? acc[0] : bc[i].scalar;
      assign sr_hi[i] = sr_in;
    end else begin : g_mid_hi
      assign hi[i]    = acc[i+1];
      assign sr_hi[i] = sr[i+1];
    end
    if (i == 0) begin : g_bot
      assign lo[i] = (bc[i].instr.op == A_ROTR) ? acc[P-1] : bc[i].scalar;
    end else begin : g_mid_lo
      assign lo[i] = acc[i-1];
    end

    mr_cell #(.MEM_WORDS(MEM_WORDS), .IX_W(IX_W)) u_cell (
      .clk           (clk),
      .rst_n         (rst_n),
      .bc            (bc[i]),
      .index         (IX_W'(i)),
      .hi_in         (hi[i]),
      .lo_in         (lo[i]),
      .sr_push       (sr_push),
      .sr_hi_in      (sr_hi[i]),
      .earlier_active(earlier[i]),
      .acc           (acc[i]),
      .sr            (sr[i]),
      .is_active     (active[i]),
      .t_we          (t_we[i]),
      .t_addr        (t_addr),
      .t_wdata       (t_wdata),
      .t_rdata       (t_rdata[i])
    );
  end

endmodule
