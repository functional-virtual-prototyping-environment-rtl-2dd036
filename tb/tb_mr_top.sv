// tb_mr_top: end-to-end test of the accelerator at its default size (P = 128
// cells, 1024-word local memories).
//
// 1. Vector-matrix product (N = P): the host loads the vector into word 0 and
//    the N matrix rows into words 1..N of the local memories through Trans, and
//    runs the two-line software-pipelined loop (indexed load + multiply,
//    reduce-add pushed into the global shift register, decrement-and-branch).
//    The result vector is read back through Trans and compared with a product
//    computed here; the run must take 2N + 4 + log2(P) issued instruction pairs
//    plus the halt. Trans writes to unused words run alongside the program.
// 2. Single-cell extraction (as the host I/O test does): for several cells c
//    the program selects cell c with IXLOAD/EQ/WHERE, loads a word there,
//    zeroes it elsewhere (ELSEWHERE), ends the WHERE and reduces; the result
//    must equal the word written to cell c.
// 3. Spatial control and reductions: RESETACT, WHERE on a test result, MIN and
//    MAX reductions, FIRST, nested ENDWHERE; then SHL, ROTR, ROTL and SHR.
// 4. FirstIndex: the controller reads the first active cell from Scan.
// Every mechanism (each instruction kind at the cells, shift-register pushes,
// reductions to the controller, Trans reads and writes, taken branches) is
// counted and must occur at least once.
module tb_mr_top;
  import mr_pkg::*;

  localparam int P = 128;
  localparam int MEMW = 1024;
  localparam int L = $clog2(P);
  localparam int IXW = $clog2(P);

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
  logic [9:0]        tr_addr = '0;
  logic [DATA_W-1:0] tr_wdata = '0;
  logic              tr_rvalid;
  logic [DATA_W-1:0] tr_rdata;
  logic              any_active;
  logic [IXW-1:0]    first_active;

  mr_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- mechanism counters ----
  int op_seen [32];
  int n_push = 0, n_red = 0, n_twr = 0, n_trd = 0, n_branch = 0;
  always @(posedge clk) if (rst_n) begin
    op_seen[int'(dut.bc_leaf[0].instr.op)]++;
    if (dut.rs_valid && dut.rs_push) n_push++;
    if (red_valid) n_red++;
    if (tr_we) n_twr++;
    if (tr_rvalid) n_trd++;
    if (busy && dut.u_ctrl.pc_d != dut.u_ctrl.pc + 1'b1) n_branch++;
  end

  // reduction results in order of arrival
  logic [DATA_W-1:0] reds [$];
  always @(posedge clk) if (red_valid) reds.push_back(red_result);

  // ---- host helpers ----
  int pc_w;
  task automatic put(input c_op_e cop, input int cimm, input a_op_e aop, input a_src_e src, input int aimm);
    prog_word_t w;
    w.c.op = cop; w.c.imm = IMM_W'(cimm);
    w.a.op = aop; w.a.src = src; w.a.imm = IMM_W'(aimm);
    @(negedge clk);
    pm_we = 1; pm_addr = 10'(pc_w); pm_wdata = w;
    @(negedge clk);
    pm_we = 0;
    pc_w++;
  endtask

  task automatic tw(input int c, input int a, input logic [DATA_W-1:0] d);
    @(negedge clk);
    tr_we = 1; tr_cell = IXW'(c); tr_addr = 10'(a); tr_wdata = d;
    @(negedge clk);
    tr_we = 0;
  endtask

  task automatic tr(input int c, input int a, output logic [DATA_W-1:0] d);
    @(negedge clk);
    tr_re = 1; tr_cell = IXW'(c); tr_addr = 10'(a);
    @(negedge clk);
    tr_re = 0;
    while (!tr_rvalid) @(negedge clk);
    d = tr_rdata;
  endtask

  task automatic dmw(input int a, input logic [DATA_W-1:0] d);
    @(negedge clk);
    dm_we = 1; dm_addr = 10'(a); dm_wdata = d;
    @(negedge clk);
    dm_we = 0;
  endtask

  task automatic run(output int unsigned n);
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    while (busy) @(negedge clk);
    n = cycles;
    repeat (2 * L + 6) @(negedge clk);   // drain Distr and Reduce
  endtask

  logic [DATA_W-1:0] vec [P];
  logic [DATA_W-1:0] mat [P][P];
  logic [DATA_W-1:0] d;
  int unsigned n;
  int lp;

  initial begin
    foreach (op_seen[i]) op_seen[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ================= 1. vector-matrix product, N = P =================
    for (int j = 0; j < P; j++) begin
      vec[j] = DATA_W'($urandom_range(0, 200)) - 100;
      tw(j, 0, vec[j]);
      for (int i = 0; i < P; i++) begin
        mat[i][j] = DATA_W'($urandom_range(0, 200)) - 100;
        tw(j, 1 + i, mat[i][j]);
      end
    end
    pc_w = 0;
    put(C_SEND, 1,     A_ADDRLD, SRC_SCALAR, 0);   // addr <= 1 (first row)
    put(C_VLOAD, P-1,  A_ILOAD,  SRC_MEM,    0);   // counter; acc <= row 0
    put(C_NOP, 0,      A_MULT,   SRC_MEM,    0);   // acc *= vector
    lp = pc_w;
    put(C_CPUSHL, R_ADD, A_ILOAD, SRC_MEM,  0);    // push sum of previous product; next row
    put(C_BRNZDEC, lp,   A_MULT,  SRC_MEM,  0);
    for (int k = 0; k < L; k++) put(C_NOP, 0, A_NOP, SRC_MEM, 0);   // latency steps
    put(C_NOP, 0,  A_SRLOAD, SRC_MEM, 0);
    put(C_HALT, 0, A_STORE,  SRC_MEM, 900);

    fork
      run(n);
      begin   // transparent transfers while the program runs
        repeat (20) @(negedge clk);
        for (int j = 0; j < 8; j++) tw(j * 5, 1000, 32'hA5A50000 + j);
      end
    join
    check(n == 2 * P + 4 + L + 1, $sformatf("vector-matrix cycles %0d, expected %0d", n, 2 * P + 5 + L));
    for (int i = 0; i < P; i++) begin
      logic [DATA_W-1:0] e;
      e = '0;
      for (int j = 0; j < P; j++) e += vec[j] * mat[i][j];
      tr(i, 900, d);
      check(d == e, $sformatf("y[%0d] = %0d, expected %0d", i, $signed(d), $signed(e)));
    end
    for (int j = 0; j < 8; j++) begin
      tr(j * 5, 1000, d);
      check(d == 32'hA5A50000 + j, "transfer during computation");
    end

    // ================= 2. single-cell extraction =================
    for (int c = 0; c < P; c += 37) begin
      tw(c, 50, DATA_W'(1000 + c * 3));
    end
    pc_w = 0;
    put(C_LOAD, 0, A_NOP,       SRC_MEM,    0);
    put(C_NOP,  0, A_IXLOAD,    SRC_MEM,    0);
    put(C_NOP,  0, A_EQ,        SRC_SCALAR, 0);
    put(C_NOP,  0, A_WHERE,     SRC_MEM,    0);
    put(C_NOP,  0, A_LOAD,      SRC_MEM,    50);
    put(C_NOP,  0, A_ELSEWHERE, SRC_MEM,    0);
    put(C_NOP,  0, A_LOAD,      SRC_IMM,    0);
    put(C_NOP,  0, A_ENDWHERE,  SRC_MEM,    0);
    put(C_CRED, R_ADD, A_NOP,   SRC_MEM,    0);
    for (int k = 0; k < 2 * L + 2; k++) put(C_NOP, 0, A_NOP, SRC_MEM, 0);
    put(C_RLOAD, 0, A_NOP, SRC_MEM, 0);
    put(C_STORE, 1, A_NOP, SRC_MEM, 0);
    put(C_HALT,  0, A_NOP, SRC_MEM, 0);
    for (int c = 0; c < P; c += 37) begin
      dmw(0, DATA_W'(c));
      reds.delete();
      run(n);
      check(reds.size() == 1 && reds[0] == DATA_W'(1000 + c * 3), $sformatf("extract cell %0d", c));
      @(negedge clk); dm_addr = 10'd1; #1;
      check(dm_rdata == DATA_W'(1000 + c * 3), "controller stored reduction result");
    end

    // ================= 3. spatial control, reductions, moves =================
    pc_w = 0;
    put(C_NOP, 0, A_RESETACT, SRC_MEM, 0);
    put(C_NOP, 0, A_IXLOAD,   SRC_MEM, 0);
    put(C_NOP, 0, A_LT,       SRC_IMM, 5);
    put(C_NOP, 0, A_ZERO,     SRC_MEM, 0);
    put(C_NOP, 0, A_WHERE,    SRC_MEM, 0);     // active: ix >= 5
    put(C_NOP, 0, A_IXLOAD,   SRC_MEM, 0);
    put(C_CRED, R_MIN, A_NOP, SRC_MEM, 0);
    put(C_CRED, R_MAX, A_FIRST, SRC_MEM, 0);   // then only cell 5 active
    put(C_CRED, R_ADD, A_ENDWHERE, SRC_MEM, 0);
    put(C_NOP, 0, A_ENDWHERE, SRC_MEM, 0);
    put(C_CRED, R_ADD, A_NOP, SRC_MEM, 0);     // all active
    put(C_NOP, 0, A_IXLOAD,   SRC_MEM, 0);
    put(C_SEND, 77, A_SHL,    SRC_SCALAR, 0);  // acc = 1,2,..,P-1,77
    put(C_NOP, 0, A_ROTR,     SRC_MEM, 0);     // acc = 77,1,2,..,P-1
    put(C_NOP, 0, A_STORE,    SRC_MEM, 800);
    put(C_NOP, 0, A_ROTL,     SRC_MEM, 0);     // acc = 1,2,..,P-1,77
    put(C_SEND, -3, A_SHR,    SRC_SCALAR, 0);  // acc = -3,1,2,..,P-1
    put(C_NOP, 0, A_STORE,    SRC_MEM, 801);
    put(C_HALT, 0, A_NOP,     SRC_MEM, 0);
    reds.delete();
    run(n);
    check(n == 19, "spatial program length");
    check(reds.size() == 4, $sformatf("four reductions, got %0d", reds.size()));
    if (reds.size() == 4) begin
      int s;
      s = 0;
      for (int i = 5; i < P; i++) s += i;
      check(reds[0] == 5, "RedMin over WHERE");
      check(reds[1] == DATA_W'(P - 1), "RedMax over WHERE");
      check(reds[2] == 5, "FIRST leaves one cell");
      check(reds[3] == DATA_W'(s), "RedAdd after ENDWHERE");
    end
    for (int i = 0; i < P; i++) begin
      tr(i, 800, d);
      check(d == ((i == 0) ? 77 : i), $sformatf("ROTR cell %0d", i));
      tr(i, 801, d);
      check(d == ((i == 0) ? -3 : i), $sformatf("SHR cell %0d", i));
    end

    // ================= 4. FirstIndex from Scan =================
    pc_w = 0;
    put(C_NOP, 0, A_RESETACT, SRC_MEM, 0);
    put(C_NOP, 0, A_IXLOAD,   SRC_MEM, 0);
    put(C_NOP, 0, A_LT,       SRC_IMM, 9);
    put(C_NOP, 0, A_ZERO,     SRC_MEM, 0);
    put(C_NOP, 0, A_WHERE,    SRC_MEM, 0);     // active: ix >= 9
    for (int k = 0; k < L + 1; k++) put(C_NOP, 0, A_NOP, SRC_MEM, 0);
    put(C_FIRSTIX, 0, A_ENDWHERE, SRC_MEM, 0);
    put(C_STORE, 2, A_NOP, SRC_MEM, 0);
    for (int k = 0; k < L + 1; k++) put(C_NOP, 0, A_NOP, SRC_MEM, 0);
    put(C_FIRSTIX, 0, A_NOP, SRC_MEM, 0);
    put(C_STORE, 3, A_NOP, SRC_MEM, 0);
    put(C_HALT, 0, A_NOP, SRC_MEM, 0);
    run(n);
    @(negedge clk); dm_addr = 10'd2; #1;
    check(dm_rdata == 9, "FirstIndex inside WHERE");
    @(negedge clk); dm_addr = 10'd3; #1;
    check(dm_rdata == 0, "FirstIndex after ENDWHERE");

    // ---- every mechanism happened ----
    begin
      a_op_e need [] = '{A_LOAD, A_MULT, A_EQ, A_LT, A_ZERO, A_STORE, A_ILOAD, A_ADDRLD, A_IXLOAD,
                         A_SRLOAD, A_RESETACT, A_WHERE, A_ELSEWHERE, A_ENDWHERE, A_FIRST,
                         A_SHL, A_SHR, A_ROTL, A_ROTR};
      foreach (need[k]) check(op_seen[int'(need[k])] > 0, $sformatf("op %s never executed", need[k].name()));
    end
    check(n_push == P, $sformatf("shift-register pushes %0d", n_push));
    check(n_red > 0, "reductions to controller");
    check(n_twr > 0 && n_trd > 0, "Trans transfers");
    check(n_branch > 0, "taken branches");
    $display("mechanisms: pushes=%0d reductions=%0d trans_wr=%0d trans_rd=%0d branches=%0d",
             n_push, n_red, n_twr, n_trd, n_branch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
