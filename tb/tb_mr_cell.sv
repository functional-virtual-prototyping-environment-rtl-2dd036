// tb_mr_cell: directed and random test of one Map cell.
//
// Drives instruction words straight into the cell (no Distr) and compares acc,
// the local memory (through the Trans port), the address register behaviour,
// the activity counter rules (WHERE / ELSEWHERE / ENDWHERE / FIRST / SETACT /
// RESETACT, observed through is_active and through instructions being ignored
// while inactive), the neighbour inputs of SHL/SHR and the shift-register
// input with values computed here. Every instruction completes in one cycle.
module tb_mr_cell;
  import mr_pkg::*;

  localparam int MW = 64;
  logic clk = 0, rst_n = 0;
  bcast_t bc = '0;
  logic [6:0] index = 7'd9;
  logic [DATA_W-1:0] hi_in = '0, lo_in = '0, sr_hi_in = '0;
  logic sr_push = 0, earlier_active = 0;
  logic [DATA_W-1:0] acc, sr, t_rdata;
  logic is_active;
  logic t_we = 0;
  logic [5:0] t_addr = '0;
  logic [DATA_W-1:0] t_wdata = '0;

  mr_cell #(.MEM_WORDS(MW), .IX_W(7)) dut (.*);

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

  task automatic ex(input a_op_e op, input a_src_e src = SRC_MEM, input int imm = 0,
                    input logic [DATA_W-1:0] scalar = '0);
    @(negedge clk);
    bc.instr.op = op; bc.instr.src = src; bc.instr.imm = IMM_W'(imm); bc.scalar = scalar;
    @(negedge clk);
    bc = '0;
  endtask

  task automatic memw(input int a, input logic [DATA_W-1:0] d);
    @(negedge clk); t_we = 1; t_addr = 6'(a); t_wdata = d;
    @(negedge clk); t_we = 0;
  endtask

  task automatic chkmem(input int a, input logic [DATA_W-1:0] e, input string what);
    t_addr = 6'(a);
    #1;
    check(t_rdata == e, what);
  endtask

  logic [DATA_W-1:0] a, b, ref_acc;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < MW; i++) memw(i, DATA_W'(i * 7 + 3));

    // random arithmetic against a model
    ref_acc = '0;
    for (int k = 0; k < 200; k++) begin
      int m, sel;
      a_op_e op;
      m = $urandom_range(0, MW - 1);
      sel = $urandom_range(0, 10);
      b = DATA_W'(m * 7 + 3);
      unique case (sel)
        0: begin op = A_LOAD; ref_acc = b; end
        1: begin op = A_ADD;  ref_acc = ref_acc + b; end
        2: begin op = A_SUB;  ref_acc = ref_acc - b; end
        3: begin op = A_MULT; ref_acc = ref_acc * b; end
        4: begin op = A_AND;  ref_acc = ref_acc & b; end
        5: begin op = A_OR;   ref_acc = ref_acc | b; end
        6: begin op = A_XOR;  ref_acc = ref_acc ^ b; end
        7: begin op = A_EQ;   ref_acc = DATA_W'(ref_acc == b); end
        8: begin op = A_LT;   ref_acc = DATA_W'($signed(ref_acc) < $signed(b)); end
        9: begin op = A_LEQ;  ref_acc = DATA_W'($signed(ref_acc) <= $signed(b)); end
        default: begin op = A_ZERO; ref_acc = DATA_W'(ref_acc == 0); end
      endcase
      ex(op, SRC_MEM, m);
      check(acc == ref_acc, $sformatf("op %s: acc %h expected %h", op.name(), acc, ref_acc));
    end
    // operand sources
    ex(A_LOAD, SRC_IMM, -5);          check(acc == DATA_W'(-5), "immediate operand sign-extended");
    ex(A_ADD, SRC_SCALAR, 0, 32'd12); check(acc == DATA_W'(7), "scalar operand");
    ex(A_IXLOAD);                     check(acc == 9, "index");
    // store and indexed access
    ex(A_STORE, SRC_MEM, 40);         chkmem(40, 9, "store");
    ex(A_ADDRLD, SRC_SCALAR, 0, 32'd10);
    ex(A_ILOAD, SRC_MEM, 2);          check(acc == DATA_W'(12 * 7 + 3), "indexed load");
    ex(A_ILOAD, SRC_MEM, 2);          check(acc == DATA_W'(13 * 7 + 3), "address post-increment");
    ex(A_LOAD, SRC_IMM, 99);
    ex(A_ISTORE, SRC_MEM, 0);         chkmem(12, 99, "indexed store");
    // neighbours
    hi_in = 32'h1111; lo_in = 32'h2222;
    ex(A_SHL);  check(acc == 32'h1111, "SHL takes upper neighbour");
    ex(A_ROTR); check(acc == 32'h2222, "ROTR takes lower neighbour");
    // shift register
    @(negedge clk); sr_push = 1; sr_hi_in = 32'hBEEF; @(negedge clk); sr_push = 0;
    check(sr == 32'hBEEF, "shift register push");
    ex(A_SRLOAD); check(acc == 32'hBEEF, "SRLOAD");

    // spatial control
    ex(A_LOAD, SRC_IMM, 0);
    ex(A_WHERE);  check(!is_active, "WHERE on false deactivates");
    ex(A_LOAD, SRC_IMM, 55); check(acc == 0, "inactive cell ignores LOAD");
    ex(A_STORE, SRC_MEM, 41); chkmem(41, DATA_W'(41 * 7 + 3), "inactive cell ignores STORE");
    ex(A_WHERE);  // nested: counter 2
    ex(A_ELSEWHERE); check(!is_active, "ELSEWHERE leaves counter 2 alone");
    ex(A_ENDWHERE);  check(!is_active, "ENDWHERE 2 -> 1");
    ex(A_ELSEWHERE); check(is_active, "ELSEWHERE 1 -> 0");
    ex(A_ELSEWHERE); check(!is_active, "ELSEWHERE 0 -> 1");
    ex(A_ENDWHERE);  check(is_active, "ENDWHERE 1 -> 0");
    ex(A_LOAD, SRC_IMM, 1);
    ex(A_WHERE);  check(is_active, "WHERE on true keeps active");
    ex(A_ENDWHERE); check(is_active, "ENDWHERE keeps 0");
    earlier_active = 1;
    ex(A_FIRST);  check(!is_active, "FIRST: not the first active cell");
    ex(A_ENDWHERE);
    earlier_active = 0;
    ex(A_FIRST);  check(is_active, "FIRST: first active cell stays");
    ex(A_LOAD, SRC_IMM, 1);
    ex(A_SETACT); check(!is_active, "SETACT 1");
    ex(A_RESETACT); check(is_active, "RESETACT");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
