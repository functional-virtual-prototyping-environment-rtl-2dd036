// tb_mr_reduce: random test of the Reduce tree for P = 10 (padded to 16).
// Every cycle a random command (ADD, MAX or MIN, random destination) is applied
// with random signed inputs and activity flags; clog2(P)+1 cycles later the
// result must equal the reduction, computed here, over the active inputs
// (0, the most negative or the most positive number when none is active).
module tb_mr_reduce;
  import mr_pkg::*;
  localparam int P = 10;
  localparam int LAT = $clog2(P) + 1;
  logic clk = 0, rst_n = 0;
  red_cmd_t cmd = '0;
  logic [DATA_W-1:0] din [P];
  logic active [P];
  logic res_valid, res_push;
  logic [DATA_W-1:0] res;
  mr_reduce #(.P(P)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  typedef struct { logic v; logic push; logic [DATA_W-1:0] r; } exp_t;
  exp_t q [$];
  int seen_op [3];
  initial begin
    foreach (din[i]) begin din[i] = '0; active[i] = 0; end
    seen_op = '{0, 0, 0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      exp_t e;
      logic signed [DATA_W-1:0] acc;
      @(negedge clk);
      cmd.valid = 1'($urandom);
      cmd.op = r_op_e'($urandom_range(0, 2));
      cmd.push = 1'($urandom);
      foreach (din[i]) begin
        din[i] = (t % 3 == 0) ? $urandom : DATA_W'($urandom_range(0, 2000)) - 1000;
        active[i] = ($urandom_range(0, 3) != 0);
      end
      acc = (cmd.op == R_ADD) ? 0 : (cmd.op == R_MAX) ? {1'b1, {(DATA_W-1){1'b0}}} : {1'b0, {(DATA_W-1){1'b1}}};
      foreach (din[i]) if (active[i]) begin
        unique case (cmd.op)
          R_ADD: acc = acc + din[i];
          R_MAX: if ($signed(din[i]) > acc) acc = din[i];
          default: if ($signed(din[i]) < acc) acc = din[i];
        endcase
      end
      if (cmd.valid) seen_op[int'(cmd.op)]++;
      e.v = cmd.valid; e.push = cmd.push; e.r = acc;
      q.push_front(e);
      #1;
      if (q.size() > LAT) begin
        checks++;
        if (res_valid != q[LAT].v || (res_valid && (res != q[LAT].r || res_push != q[LAT].push))) begin
          failures++;
          $display("FAIL t=%0d: valid %0d res %0d expected %0d %0d", t, res_valid, $signed(res), q[LAT].v, $signed(q[LAT].r));
        end
      end
    end
    foreach (seen_op[k]) begin checks++; if (seen_op[k] == 0) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
