// tb_mr_trans: Trans network with P = 8 local memories of 16 words modelled in
// the testbench. Random writes must land in the addressed cell only (one cycle
// after the request); reads must return the addressed word with rvalid two
// cycles after the request; a simultaneous write and read performs the write.
module tb_mr_trans;
  import mr_pkg::*;
  localparam int P = 8, MW = 16;
  logic clk = 0, rst_n = 0;
  logic we = 0, re = 0;
  logic [2:0] sel_cell = '0;
  logic [3:0] addr = '0;
  logic [DATA_W-1:0] wdata = '0;
  logic rvalid;
  logic [DATA_W-1:0] rdata;
  logic t_we [P];
  logic [3:0] t_addr;
  logic [DATA_W-1:0] t_wdata;
  logic [DATA_W-1:0] t_rdata [P];
  logic [DATA_W-1:0] mem [P][MW];
  logic [DATA_W-1:0] model [P][MW];

  mr_trans #(.P(P), .MEM_WORDS(MW)) dut (.*);
  always #5 clk = ~clk;
  for (genvar i = 0; i < P; i++) begin : g_m
    always_ff @(posedge clk) if (t_we[i]) mem[i][t_addr] <= t_wdata;
    assign t_rdata[i] = mem[i][t_addr];
  end

  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int c = 0; c < P; c++) for (int a = 0; a < MW; a++) begin mem[c][a] = '0; model[c][a] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 1500; k++) begin
      int c, a;
      bit w;
      c = $urandom_range(0, P - 1); a = $urandom_range(0, MW - 1);
      w = (k < 200) || ($urandom_range(0, 1) == 1);
      @(negedge clk);
      sel_cell = 3'(c); addr = 4'(a);
      if (w) begin
        we = 1; re = (k % 7 == 0); wdata = $urandom; model[c][a] = wdata;
        @(negedge clk); we = 0; re = 0;
        @(negedge clk);
        begin
          bit bad;
          bad = 0;
          for (int cc = 0; cc < P; cc++) for (int aa = 0; aa < MW; aa++)
            if (mem[cc][aa] != model[cc][aa]) bad = 1;
          checks++;
          if (bad) begin failures++; $display("FAIL write c=%0d a=%0d", c, a); end
        end
        checks++;
        if (rvalid) begin failures++; $display("FAIL read answered during write"); end
      end else begin
        re = 1;
        @(negedge clk); re = 0;
        checks++;
        if (rvalid) begin failures++; $display("FAIL rvalid too early"); end
        @(negedge clk);
        checks++;
        if (!rvalid || rdata != model[c][a]) begin failures++; $display("FAIL read c=%0d a=%0d", c, a); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
