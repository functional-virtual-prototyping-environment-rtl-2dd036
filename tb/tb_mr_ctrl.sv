// tb_mr_ctrl: the Controller alone. Loads small programs and checks, cycle by
// cycle, the broadcast word (array half, scalar = accumulator or cSEND
// immediate, reduction command), the accumulator arithmetic on immediates and
// data-memory words, cSTORE, the branches (cJMP, cBRZ, cBRNZ and the
// cBRNZDEC loop, whose trip count sets the run length), the cycle counter,
// and the path of a reduction result into the reduction register (cRLOAD).
module tb_mr_ctrl;
  import mr_pkg::*;
  logic clk = 0, rst_n = 0;
  logic pm_we = 0;
  logic [5:0] pm_addr = '0;
  prog_word_t pm_wdata = '0;
  logic dm_we = 0;
  logic [5:0] dm_addr = '0;
  logic [DATA_W-1:0] dm_wdata = '0, dm_rdata;
  logic start = 0, busy;
  logic [31:0] cycles;
  logic [DATA_W-1:0] red_result;
  logic red_valid;
  bcast_t bc_out;
  logic rs_valid = 0, rs_push = 0;
  logic [DATA_W-1:0] rs_data = '0;
  logic [DATA_W-1:0] scan_first = 32'd42;

  mr_ctrl #(.PROG_WORDS(64), .DMEM_WORDS(64)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int pc_w;
  task automatic put(input c_op_e cop, input int cimm, input a_op_e aop = A_NOP, input int aimm = 0);
    @(negedge clk);
    pm_we = 1; pm_addr = 6'(pc_w);
    pm_wdata = '0;
    pm_wdata.c.op = cop; pm_wdata.c.imm = IMM_W'(cimm);
    pm_wdata.a.op = aop; pm_wdata.a.imm = IMM_W'(aimm);
    @(negedge clk); pm_we = 0;
    pc_w++;
  endtask

  // record broadcast words while running
  bcast_t trace [$];
  always @(posedge clk) if (busy) trace.push_back(bc_out);

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); dm_we = 1; dm_addr = 6'd5; dm_wdata = 32'd40; @(negedge clk); dm_we = 0;

    // program 1: arithmetic, scalar, store, branches, loop
    pc_w = 0;
    put(C_VLOAD, 7,  A_IXLOAD, 1);   // 0: acc=7
    put(C_ADD,   5,  A_LOAD, 2);     // 1: acc=47 (scalar this cycle = 7)
    put(C_VSUB,  2);                 // 2: acc=45
    put(C_SUB,   5);                 // 3: acc=5
    put(C_STORE, 6);                 // 4: dmem[6]=5
    put(C_SEND,  -9, A_ADDRLD, 0);   // 5: scalar=-9, acc stays 5
    put(C_VADD,  -2);                // 6: acc=3
    put(C_BRNZDEC, 7);               // 7: loop 3 times: acc 3->2->1->0, then falls through
    put(C_BRZ, 10);                  // 8: taken
    put(C_HALT, 0);                  // 9: skipped
    put(C_LOAD, 6);                  // 10: acc=5
    put(C_BRNZ, 13);                 // 11: taken
    put(C_HALT, 0);                  // 12: skipped
    put(C_JMP, 15);                  // 13
    put(C_HALT, 0);                  // 14: skipped
    put(C_CPUSHL, R_MAX);            // 15
    put(C_CRED, R_MIN);              // 16
    put(C_HALT, 0, A_STORE, 3);      // 17
    trace.delete();
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (busy) @(negedge clk);
    // lines executed: 0..6 (7), 7 x4, 8, 10, 11, 13, 15, 16, 17 = 18
    check(cycles == 18, $sformatf("cycles %0d", cycles));
    check(trace.size() == 18, "trace length");
    if (trace.size() == 18) begin
      check(trace[0].instr.op == A_IXLOAD && trace[0].instr.imm == 1, "array half issued");
      check(trace[1].scalar == 7 && trace[1].instr.op == A_LOAD, "scalar = accumulator");
      check(trace[2].scalar == 47, "ADD from data memory");
      check(trace[3].scalar == 45, "VSUB");
      check(trace[4].scalar == 5, "SUB from data memory");
      check(trace[5].scalar == DATA_W'(-9) && trace[5].instr.op == A_ADDRLD, "cSEND scalar");
      check(trace[6].scalar == 5, "cSEND leaves accumulator");
      check(trace[7].scalar == 3 && trace[10].scalar == 0, "BRNZDEC counts down");
      check(trace[15].red.valid && trace[15].red.push && trace[15].red.op == R_MAX, "cCPUSHL command");
      check(trace[16].red.valid && !trace[16].red.push && trace[16].red.op == R_MIN, "cCRED command");
      check(!trace[14].red.valid, "no reduction otherwise");
      check(trace[17].instr.op == A_STORE, "halt line issues its array half");
    end
    dm_addr = 6'd6; #1;
    check(dm_rdata == 5, "cSTORE");
    #1;
    check(bc_out.instr.op == A_NOP && !bc_out.red.valid, "idle issues NOP");

    // program 2: reduction register
    pc_w = 0;
    put(C_NOP, 0);
    put(C_NOP, 0);
    put(C_NOP, 0);
    put(C_RLOAD, 0);
    put(C_STORE, 7);
    put(C_FIRSTIX, 0);
    put(C_STORE, 8);
    put(C_HALT, 0);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    rs_valid = 1; rs_push = 1; rs_data = 32'd111;   // pushed result: not for the controller
    @(negedge clk); rs_push = 0; rs_data = 32'd222;
    @(negedge clk); rs_valid = 0;
    check(red_valid && red_result == 222, "reduction register loaded");
    while (busy) @(negedge clk);
    dm_addr = 6'd7; #1;
    check(dm_rdata == 222, "cRLOAD");
    dm_addr = 6'd8; #1;
    check(dm_rdata == 42, "cFIRSTIX");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
