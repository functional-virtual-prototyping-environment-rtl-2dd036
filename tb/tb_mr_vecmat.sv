// tb_mr_vecmat: vector-matrix product at the large configuration of the
// architecture, N = P = 1024 cells, with 2048-word local memories.
//
// The vector (word 0) and the 1024 matrix rows (words 1..1024) are placed in
// the local memories by the testbench; the program then runs the two-line software-pipelined loop: indexed row load and
// multiply in the cells, reduce-add pushed into the global shift register,
// decrement-and-branch in the controller. Afterwards every y[i] is read back
// through Trans and compared with the product computed here, and the run
// length must be 2N + 4 + log2(P) instruction pairs plus the halt line
// (2062 + 1 cycles, about 2.01 cycles per result element).
module tb_mr_vecmat;
  import mr_pkg::*;

  localparam int P = 1024;
  localparam int N = 1024;
  localparam int MEMW = 2048;
  localparam int L = $clog2(P);
  localparam int IXW = $clog2(P);
  localparam int AW = $clog2(MEMW);

  logic              clk = 0;
  logic              rst_n = 0;
  logic              pm_we = 0;
  logic [9:0]        pm_addr = '0;
  prog_word_t        pm_wdata = '0;
  logic              dm_we = 0;
  logic [9:0]        dm_addr = '0;
  logic [DATA_W-1:0] dm_wdata = '0;
  logic [DATA_W-1:0] dm_rdata;
  logic              start = 0;
  logic              busy;
  logic [31:0]       cycles;
  logic [DATA_W-1:0] red_result;
  logic              red_valid;
  logic              tr_we = 0, tr_re = 0;
  logic [IXW-1:0]    tr_cell = '0;
  logic [AW-1:0]     tr_addr = '0;
  logic [DATA_W-1:0] tr_wdata = '0;
  logic              tr_rvalid;
  logic [DATA_W-1:0] tr_rdata;
  logic              any_active;
  logic [IXW-1:0]    first_active;

  mr_top #(.P(P), .MEM_WORDS(MEMW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  int pc_w;
  task automatic put(input c_op_e cop, input int cimm, input a_op_e aop, input a_src_e src, input int aimm);
    @(negedge clk);
    pm_we = 1; pm_addr = 10'(pc_w);
    pm_wdata.c.op = cop; pm_wdata.c.imm = IMM_W'(cimm);
    pm_wdata.a.op = aop; pm_wdata.a.src = src; pm_wdata.a.imm = IMM_W'(aimm);
    @(negedge clk);
    pm_we = 0;
    pc_w++;
  endtask

  // deterministic data so the expected product needs no stored matrix
  function automatic logic [DATA_W-1:0] vv(input int j);
    return DATA_W'((j * 37 + 11) % 201) - 100;
  endfunction
  function automatic logic [DATA_W-1:0] mm(input int i, input int j);
    return DATA_W'((i * 131 + j * 71 + (i ^ j)) % 199) - 99;
  endfunction

  // Operands are placed straight into the local memories (a backdoor load:
  // streaming 1M words through Trans would dominate the run time). The
  // results are still read back through Trans.
  logic loaded = 0;
  for (genvar j = 0; j < P; j++) begin : g_load
    initial begin
      @(posedge rst_n);
      dut.u_map.g_cell[j].u_cell.mem[0] = vv(j);
      for (int a = 1; a <= N; a++) dut.u_map.g_cell[j].u_cell.mem[a] = mm(a - 1, j);
    end
  end
  initial begin
    @(posedge rst_n);
    #1 loaded = 1;
  end

  int unsigned n;
  int lp;
  logic [DATA_W-1:0] e;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(posedge loaded);

    pc_w = 0;
    put(C_SEND, 1,     A_ADDRLD, SRC_SCALAR, 0);
    put(C_VLOAD, N-1,  A_ILOAD,  SRC_MEM,    0);
    put(C_NOP, 0,      A_MULT,   SRC_MEM,    0);
    lp = pc_w;
    put(C_CPUSHL, R_ADD, A_ILOAD, SRC_MEM,  0);
    put(C_BRNZDEC, lp,   A_MULT,  SRC_MEM,  0);
    for (int k = 0; k < L; k++) put(C_NOP, 0, A_NOP, SRC_MEM, 0);
    put(C_NOP, 0,  A_SRLOAD, SRC_MEM, 0);
    put(C_HALT, 0, A_STORE,  SRC_MEM, N + 5);

    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (busy) @(negedge clk);
    n = cycles;
    repeat (L + 4) @(negedge clk);
    check(n == 2 * N + 4 + L + 1, $sformatf("cycles %0d, expected %0d", n, 2 * N + 5 + L));
    $display("vector-matrix N=%0d P=%0d: %0d cycles (%0d instruction pairs before the halt)", N, P, n, n - 1);

    for (int i = 0; i < N; i++) begin
      e = '0;
      for (int j = 0; j < P; j++) e += vv(j) * mm(i, j);
      @(negedge clk);
      tr_re = 1; tr_cell = IXW'(i); tr_addr = AW'(N + 5);
      @(negedge clk);
      tr_re = 0;
      while (!tr_rvalid) @(negedge clk);
      check(tr_rdata == e, $sformatf("y[%0d] = %0d, expected %0d", i, $signed(tr_rdata), $signed(e)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
