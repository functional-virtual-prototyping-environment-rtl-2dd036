// tb_mr_scan: random and corner-case test of the Scan prefix network for
// P = 13: earlier[i] must be the OR of active[0..i-1], any_active the OR of
// all, first_ix the lowest active index (0 when none).
module tb_mr_scan;
  localparam int P = 13;
  logic active [P];
  logic earlier [P];
  logic any_active;
  logic [3:0] first_ix;
  mr_scan #(.P(P)) dut (.*);
  int checks = 0, failures = 0;
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int t = 0; t < 600; t++) begin
      bit seen;
      int first;
      foreach (active[i]) begin
        if (t < P) active[i] = (i == t);
        else if (t == P) active[i] = 0;
        else active[i] = ($urandom_range(0, 4) == 0);
      end
      #1;
      seen = 0; first = 0;
      for (int i = 0; i < P; i++) begin
        checks++;
        if (earlier[i] != seen) begin failures++; $display("FAIL t=%0d i=%0d", t, i); end
        if (active[i] && !seen) first = i;
        seen |= active[i];
      end
      checks++;
      if (any_active != seen || (seen && first_ix != 4'(first))) begin
        failures++; $display("FAIL t=%0d any/first", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
