// tb_t4ss_block: exhaustive check of the t4ss pair detector.
// All 16 (previous pair, current pair) combinations are applied; hit must be 1
// exactly for a T4** transition: no line switches and the two lines differ.
module tb_t4ss_block;
  import tb_ref_pkg::*;
  logic clk = 1'b0;
  logic [1:0] prev, cur;
  logic hit;
  int checks = 0, failures = 0, hits = 0;

  t4ss_block dut (.prev(prev), .cur(cur), .hit(hit));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic [1:0] p, c;
      logic exp;
      p = v[3:2]; c = v[1:0];
      exp = (p == c) && (p[0] != p[1]);
      prev = p; cur = c;
      #1;
      checks++;
      hits += int'(hit);
      if (hit !== exp) begin
        failures++;
        $display("FAIL prev=%b cur=%b hit=%b exp=%b", p, c, hit, exp);
      end
    end
    checks++;
    if (hits != 2) begin
      failures++;
      $display("FAIL expected 2 matching combinations, got %0d", hits);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
