// mr_trans: the Trans network, which inserts data into and extracts data from
// the cells' local memories without stopping the computation.
//
// The host side addresses one word by (cell, word address). A write request is
// registered, decoded into a one-hot write enable for the selected cell and
// written one cycle later through the cell's second memory port. A read request
// is registered, the word is picked from the selected cell by a multiplexer and
// returned in a register: rdata is valid (rvalid) two cycles after the request.
// One request (read or write) is accepted per cycle; when both are asserted the
// write is taken and the read ignored. Assertions check the read latency.
//
// That such a network moves data to and from the vector memory transparently
// to the computation is the source architecture's; the one-word-per-cycle
// addressed port and its timing are this implementation's simplification of
// the two-dimensional network.
module mr_trans
  import mr_pkg::*;
#(
  parameter int unsigned P         = 128,
  parameter int unsigned MEM_WORDS = 1024,
  localparam int unsigned IX_W     = (P > 1) ? $clog2(P) : 1,
  localparam int unsigned AW       = $clog2(MEM_WORDS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // host side
  input  logic              we,
  input  logic              re,
  input  logic [IX_W-1:0]   sel_cell,
  input  logic [AW-1:0]     addr,
  input  logic [DATA_W-1:0] wdata,
  output logic              rvalid,
  output logic [DATA_W-1:0] rdata,
  // array side
  output logic              t_we    [P],
  output logic [AW-1:0]     t_addr,
  output logic [DATA_W-1:0] t_wdata,
  input  logic [DATA_W-1:0] t_rdata [P]
);

  logic            we_q, re_q;
  logic [IX_W-1:0] cell_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      we_q   <= 1'b0;
      re_q   <= 1'b0;
      cell_q <= '0;
      t_addr <= '0;
      t_wdata <= '0;
      rvalid <= 1'b0;
      rdata  <= '0;
    end else begin
      we_q   <= we;
      re_q   <= re && !we;
      if (we || re) begin
        cell_q  <= sel_cell;
        t_addr  <= addr;
        t_wdata <= wdata;
      end
      rvalid <= re_q;
      if (re_q) rdata <= t_rdata[cell_q];
    end
  end

  for (genvar i = 0; i < P; i++) begin : g_we
    assign t_we[i] = we_q && (cell_q == IX_W'(i));
  end

  // read data arrives exactly two cycles after an accepted read request
  a_read_latency: assert property (@(posedge clk) disable iff (!rst_n)
    (re && !we) |=> ##1 rvalid);
  a_no_spurious_rvalid: assert property (@(posedge clk) disable iff (!rst_n)
    rvalid |-> $past(re_q));

endmodule
