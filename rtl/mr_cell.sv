// mr_cell: one cell of the Map section, an execution unit eng(0) with its
// local memory mem(0).
//
// Each cycle the cell executes the array instruction it receives from its Distr
// leaf. State: a DATA_W accumulator (acc), an address register (addr) for
// indexed access, an activity counter (active), one element of the global
// shift register (sr) and MEM_WORDS words of local memory. The cell's index
// comes in on a port.
//
// Activity follows the nesting scheme of the source architecture: a cell is
// active when its counter is 0. Arithmetic, test, load and store instructions
// change only active cells; WHERE/ELSEWHERE/ENDWHERE/FIRST/RESETACT/SETACT act
// on every cell; shift and rotate move the accumulators of every cell (the
// array supplies the neighbour values on hi_in / lo_in). The shift register
// moves one position toward cell 0 when sr_push is high, independent of the
// instruction stream. Test instructions leave 1 or 0 in acc, which is the
// Boolean vector read by WHERE and SETACT.
//
// The local memory has two ports: the instruction port (combinational read,
// synchronous write) and the Trans port (combinational read, synchronous write)
// so transfers run alongside computation. If both write the same word in one
// cycle, the Trans write wins. Reads are combinational, so every instruction
// completes in one cycle: state is updated at the clock edge ending the cycle
// in which the instruction is presented.
//
// The instruction set, its encoding, operand sources and the 1-cycle timing are
// this implementation's choices; the activity-counter rules and the list of
// operations follow the source architecture.
module mr_cell
  import mr_pkg::*;
#(
  parameter int unsigned MEM_WORDS = 1024,
  parameter int unsigned IX_W      = 7,
  localparam int unsigned AW       = $clog2(MEM_WORDS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  bcast_t            bc,              // instruction + scalar from the Distr leaf
  input  logic [IX_W-1:0]   index,           // this cell's position in the array
  input  logic [DATA_W-1:0] hi_in,           // value shifted in from the upper side (SHL/ROTL)
  input  logic [DATA_W-1:0] lo_in,           // value shifted in from the lower side (SHR/ROTR)
  input  logic              sr_push,         // global shift register shifts this cycle
  input  logic [DATA_W-1:0] sr_hi_in,        // shift register value entering from above
  input  logic              earlier_active,  // from Scan: a lower-index cell has active==0
  output logic [DATA_W-1:0] acc,
  output logic [DATA_W-1:0] sr,
  output logic              is_active,       // active counter == 0
  // Trans port
  input  logic              t_we,
  input  logic [AW-1:0]     t_addr,
  input  logic [DATA_W-1:0] t_wdata,
  output logic [DATA_W-1:0] t_rdata
);

  logic [DATA_W-1:0] mem [MEM_WORDS];
  logic [AW-1:0]     addr;
  logic [ACT_W-1:0]  active;

  a_instr_t          ins;
  logic [AW-1:0]     mem_a;       // memory address used by this instruction
  logic [DATA_W-1:0] mem_q;
  logic [DATA_W-1:0] opnd;
  logic [DATA_W-1:0] acc_d;
  logic              acc_we;      // acc changes (active cell)
  logic              mem_we;
  logic              indexed;

  assign ins       = bc.instr;
  assign is_active = (active == '0);
  assign indexed   = (ins.op == A_ILOAD) || (ins.op == A_ISTORE);
  assign mem_a     = indexed ? AW'(addr + ins.imm[AW-1:0]) : ins.imm[AW-1:0];
  assign mem_q     = mem[mem_a];
  assign t_rdata   = mem[t_addr];

  always_comb begin
    unique case (ins.src)
      SRC_MEM:    opnd = mem_q;
      SRC_IMM:    opnd = DATA_W'($signed(ins.imm));
      SRC_SCALAR: opnd = bc.scalar;
      default:    opnd = '0;
    endcase
  end

  // accumulator next value for computational instructions
  always_comb begin
    acc_d  = acc;
    acc_we = 1'b0;
    mem_we = 1'b0;
    unique case (ins.op)
      A_LOAD:   begin acc_d = opnd;                                   acc_we = 1'b1; end
      A_ADD:    begin acc_d = acc + opnd;                             acc_we = 1'b1; end
      A_SUB:    begin acc_d = acc - opnd;                             acc_we = 1'b1; end
      A_MULT:   begin acc_d = DATA_W'(acc * opnd);                    acc_we = 1'b1; end
      A_AND:    begin acc_d = acc & opnd;                             acc_we = 1'b1; end
      A_OR:     begin acc_d = acc | opnd;                             acc_we = 1'b1; end
      A_XOR:    begin acc_d = acc ^ opnd;                             acc_we = 1'b1; end
      A_EQ:     begin acc_d = DATA_W'(acc == opnd);                   acc_we = 1'b1; end
      A_LT:     begin acc_d = DATA_W'($signed(acc) <  $signed(opnd)); acc_we = 1'b1; end
      A_LEQ:    begin acc_d = DATA_W'($signed(acc) <= $signed(opnd)); acc_we = 1'b1; end
      A_ZERO:   begin acc_d = DATA_W'(acc == '0);                     acc_we = 1'b1; end
      A_ILOAD:  begin acc_d = mem_q;                                  acc_we = 1'b1; end
      A_IXLOAD: begin acc_d = DATA_W'(index);                         acc_we = 1'b1; end
      A_SRLOAD: begin acc_d = sr;                                     acc_we = 1'b1; end
      A_STORE, A_ISTORE: mem_we = 1'b1;
      default: ;
    endcase
  end

  // registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc    <= '0;
      addr   <= '0;
      active <= '0;
      sr     <= '0;
    end else begin
      // computational instructions: active cells only
      if (is_active && acc_we) acc <= acc_d;
      if (is_active && indexed) addr <= addr + 1'b1;
      if (is_active && ins.op == A_ADDRLD) addr <= opnd[AW-1:0];

      // global moves: every cell
      unique case (ins.op)
        A_SHL, A_ROTL: acc <= hi_in;
        A_SHR, A_ROTR: acc <= lo_in;
        default: ;
      endcase

      // spatial control: every cell
      unique case (ins.op)
        A_RESETACT:  active <= '0;
        A_SETACT:    active <= ACT_W'(acc != '0);
        A_WHERE:     if (!(is_active && acc != '0)) active <= active + 1'b1;
        A_ELSEWHERE: if (active == ACT_W'(0)) active <= ACT_W'(1);
                     else if (active == ACT_W'(1)) active <= '0;
        A_ENDWHERE:  if (active != '0) active <= active - 1'b1;
        A_FIRST:     if (!(is_active && !earlier_active)) active <= active + 1'b1;
        default: ;
      endcase

      if (sr_push) sr <= sr_hi_in;
    end
  end

  // local memory: instruction port then Trans port
  always_ff @(posedge clk) begin
    if (is_active && mem_we) mem[mem_a] <= acc;
    if (t_we)                mem[t_addr] <= t_wdata;
  end

endmodule
