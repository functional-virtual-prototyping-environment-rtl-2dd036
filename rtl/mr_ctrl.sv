// mr_ctrl: the Controller, a small accumulator machine that sequences the
// accelerator.
//
// Each cycle while running it reads one instruction pair from its program
// memory at pc. The controller half executes here (accumulator arithmetic on
// immediates or data-memory words, jumps and the decrement-and-branch loop
// instruction, reduction requests); the array half leaves on bc_out in the same
// cycle, together with a scalar (the accumulator before this cycle's update,
// or the immediate of a cSEND) and the reduction command, for the Distr tree.
// Every instruction takes one cycle; branches are taken without a bubble.
//
// Reductions: cCPUSHL asks the Reduce section to push its result into the
// global shift register; cCRED brings the result back into this controller's
// reduction register, where cRLOAD reads it and the host sees it on
// red_result/red_valid. cFIRSTIX reads the index of the first active cell
// from the Scan network (-1 when no cell is active). The program must wait for the pipeline latency itself
// (Distr + Reduce, or Distr before cFIRSTIX); there are no interlocks.
//
// Host side: program and data memories are written through their own ports
// (the data memory can also be read); start begins execution at pc 0 and busy
// stays high until a cHALT (a start while busy is ignored and flagged by an
// assertion). cycles counts the cycles of the last run.
//
// One instruction pair fetched per cycle, the controller/array split and the
// mnemonics are the source architecture's; the accumulator organisation,
// encoding, memory sizes and host interface are this implementation's.
module mr_ctrl
  import mr_pkg::*;
#(
  parameter int unsigned PROG_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024,
  localparam int unsigned PAW = $clog2(PROG_WORDS),
  localparam int unsigned DAW = $clog2(DMEM_WORDS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // host side
  input  logic              pm_we,
  input  logic [PAW-1:0]    pm_addr,
  input  prog_word_t        pm_wdata,
  input  logic              dm_we,
  input  logic [DAW-1:0]    dm_addr,
  input  logic [DATA_W-1:0] dm_wdata,
  output logic [DATA_W-1:0] dm_rdata,
  input  logic              start,
  output logic              busy,
  output logic [31:0]       cycles,
  output logic [DATA_W-1:0] red_result,
  output logic              red_valid,
  // to the array
  output bcast_t            bc_out,
  // from the Reduce section
  input  logic              rs_valid,
  input  logic              rs_push,
  input  logic [DATA_W-1:0] rs_data,
  // from the Scan network
  input  logic [DATA_W-1:0] scan_first
);

  prog_word_t        pmem [PROG_WORDS];
  logic [DATA_W-1:0] dmem [DMEM_WORDS];

  logic [PAW-1:0]    pc;
  logic [DATA_W-1:0] acc;
  prog_word_t        iw;
  c_instr_t          ci;
  logic [DATA_W-1:0] imm_x;
  logic [DATA_W-1:0] dm_q;

  logic [PAW-1:0]    pc_d;
  logic [DATA_W-1:0] acc_d;
  logic              st_we;
  logic              halt;

  assign iw       = pmem[pc];
  assign ci       = iw.c;
  assign imm_x    = DATA_W'($signed(ci.imm));
  assign dm_q     = dmem[ci.imm[DAW-1:0]];
  assign dm_rdata = dmem[dm_addr];

  always_comb begin
    pc_d  = pc + 1'b1;
    acc_d = acc;
    st_we = 1'b0;
    halt  = 1'b0;
    unique case (ci.op)
      C_HALT:    halt = 1'b1;
      C_VLOAD:   acc_d = imm_x;
      C_LOAD:    acc_d = dm_q;
      C_STORE:   st_we = 1'b1;
      C_VADD:    acc_d = acc + imm_x;
      C_ADD:     acc_d = acc + dm_q;
      C_VSUB:    acc_d = acc - imm_x;
      C_SUB:     acc_d = acc - dm_q;
      C_JMP:     pc_d = ci.imm[PAW-1:0];
      C_BRZ:     if (acc == '0) pc_d = ci.imm[PAW-1:0];
      C_BRNZ:    if (acc != '0) pc_d = ci.imm[PAW-1:0];
      C_BRNZDEC: if (acc != '0) begin
                   pc_d  = ci.imm[PAW-1:0];
                   acc_d = acc - 1'b1;
                 end
      C_RLOAD:   acc_d = red_result;
      C_FIRSTIX: acc_d = scan_first;
      default: ;
    endcase
  end

  // broadcast word for the Distr tree
  always_comb begin
    bc_out = '0;
    if (busy) begin
      bc_out.instr     = iw.a;
      bc_out.scalar    = (ci.op == C_SEND) ? imm_x : acc;
      bc_out.red.valid = (ci.op == C_CPUSHL) || (ci.op == C_CRED);
      bc_out.red.op    = r_op_e'(ci.imm[1:0]);
      bc_out.red.push  = (ci.op == C_CPUSHL);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc         <= '0;
      acc        <= '0;
      busy       <= 1'b0;
      cycles     <= '0;
      red_result <= '0;
      red_valid  <= 1'b0;
    end else begin
      red_valid <= 1'b0;
      if (rs_valid && !rs_push) begin
        red_result <= rs_data;
        red_valid  <= 1'b1;
      end
      if (busy) begin
        pc     <= pc_d;
        acc    <= acc_d;
        cycles <= cycles + 1'b1;
        if (halt) busy <= 1'b0;
      end else if (start) begin
        pc     <= '0;
        busy   <= 1'b1;
        cycles <= '0;
      end
    end
  end

  // the host must not start a program that is already running
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);

  always_ff @(posedge clk) begin
    if (pm_we) pmem[pm_addr] <= pm_wdata;
    if (busy && st_we) dmem[ci.imm[DAW-1:0]] <= acc;
    if (dm_we) dmem[dm_addr] <= dm_wdata;
  end

endmodule
