// tb_mr_distr: checks that every word entering the Distr tree reaches all P
// leaves unchanged, exactly clog2(P)+1 cycles later, with a new word every
// cycle. P = 12 exercises a tree whose last level is only partly used.
module tb_mr_distr;
  import mr_pkg::*;
  localparam int P = 12;
  localparam int LAT = $clog2(P) + 1;
  logic clk = 0, rst_n = 0;
  bcast_t bc_in = '0;
  bcast_t bc_out [P];
  mr_distr #(.P(P)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  bcast_t hist [$];
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      bc_in = bcast_t'({$urandom, $urandom, $urandom});
      hist.push_front(bc_in);
      #1;
      if (hist.size() > LAT) begin
        for (int i = 0; i < P; i++) begin
          checks++;
          if (bc_out[i] != hist[LAT]) begin
            failures++;
            $display("FAIL: leaf %0d at step %0d", i, t);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
