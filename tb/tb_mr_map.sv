// tb_mr_map: the Map section with P = 8 cells of 16 words, driven directly
// (the same instruction to every cell, as the Distr leaves would). Checks the
// cell indices, the neighbour wiring of SHL/SHR/ROTL/ROTR including the end
// cells, the global shift register chain, the per-cell Trans write enables and
// read buses, and FIRST with the Scan prefix supplied by the testbench.
module tb_mr_map;
  import mr_pkg::*;
  localparam int P = 8, MW = 16;
  logic clk = 0, rst_n = 0;
  bcast_t bc [P];
  logic earlier [P];
  logic sr_push = 0;
  logic [DATA_W-1:0] sr_in = '0;
  logic [DATA_W-1:0] acc [P];
  logic [DATA_W-1:0] sr [P];
  logic active [P];
  logic t_we [P];
  logic [3:0] t_addr = '0;
  logic [DATA_W-1:0] t_wdata = '0;
  logic [DATA_W-1:0] t_rdata [P];

  mr_map #(.P(P), .MEM_WORDS(MW)) dut (.*);
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
    foreach (bc[i]) begin
      bc[i] = '0;
      bc[i].instr.op = op; bc[i].instr.src = src; bc[i].instr.imm = IMM_W'(imm); bc[i].scalar = scalar;
    end
    @(negedge clk);
    foreach (bc[i]) bc[i] = '0;
  endtask

  logic [DATA_W-1:0] m [P];
  initial begin
    foreach (bc[i]) begin bc[i] = '0; earlier[i] = 0; t_we[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    ex(A_IXLOAD);
    foreach (acc[i]) check(acc[i] == i, "index");
    ex(A_SHL, SRC_SCALAR, 0, 32'd50);
    foreach (m[i]) m[i] = (i == P - 1) ? 50 : i + 1;
    foreach (acc[i]) check(acc[i] == m[i], $sformatf("SHL cell %0d", i));
    ex(A_ROTL);
    foreach (m[i]) m[i] = (i == P - 1) ? 1 : ((i == P - 2) ? 50 : i + 2);
    foreach (acc[i]) check(acc[i] == m[i], $sformatf("ROTL cell %0d", i));
    ex(A_ROTR);
    foreach (m[i]) m[i] = (i == P - 1) ? 50 : i + 1;
    foreach (acc[i]) check(acc[i] == m[i], $sformatf("ROTR cell %0d", i));
    ex(A_SHR, SRC_SCALAR, 0, 32'd60);
    foreach (m[i]) m[i] = (i == 0) ? 60 : i;
    foreach (acc[i]) check(acc[i] == m[i], $sformatf("SHR cell %0d", i));
    // global shift register
    for (int k = 0; k < P; k++) begin
      @(negedge clk); sr_push = 1; sr_in = DATA_W'(100 + k);
    end
    @(negedge clk); sr_push = 0;
    foreach (sr[i]) check(sr[i] == DATA_W'(100 + i), $sformatf("shift register cell %0d", i));
    // Trans port
    for (int c = 0; c < P; c++) begin
      @(negedge clk); t_we[c] = 1; t_addr = 4'd3; t_wdata = DATA_W'(700 + c);
      @(negedge clk); t_we[c] = 0;
    end
    t_addr = 4'd3; #1;
    foreach (t_rdata[i]) check(t_rdata[i] == DATA_W'(700 + i), $sformatf("trans cell %0d", i));
    ex(A_LOAD, SRC_MEM, 3);
    foreach (acc[i]) check(acc[i] == DATA_W'(700 + i), "load written word");
    // FIRST with the prefix from the testbench: cells 0..2 see no earlier active
    foreach (earlier[i]) earlier[i] = (i >= 3);
    ex(A_FIRST);
    foreach (active[i]) check(active[i] == (i < 3), $sformatf("FIRST cell %0d", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
