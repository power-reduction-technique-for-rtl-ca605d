// tb_ty_block: exhaustive check of the inversion-benefit detector.
// All 16 (previous pair, current pair) combinations are applied; hit must be 1
// exactly when flipping the current value of the flip line lowers the pair's
// coupling cost. A few rows of the odd-inversion table are also checked by
// name (first bit = keep line, second bit = flip line).
module tb_ty_block;
  import tb_ref_pkg::*;
  logic clk = 1'b0;
  logic pk, pf, ck, cf, hit;
  int checks = 0, failures = 0;

  ty_block dut (.prev_keep(pk), .prev_flip(pf), .cur_keep(ck), .cur_flip(cf), .hit(hit));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_row(input logic [1:0] p, input logic [1:0] c, input logic exp);
    {pk, pf} = p; {ck, cf} = c;
    #1;
    checks++;
    if (hit !== exp) begin
      failures++;
      $display("FAIL named row %b->%b hit=%b exp=%b", p, c, hit, exp);
    end
  endtask

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic [1:0] p, c;
      logic exp;
      p = v[3:2]; c = v[1:0];
      // pair_cost takes {line i+1, line i}: flip line is bit 1, keep line bit 0
      exp = pair_cost({p[0], p[1]}, {~c[0], c[1]}) < pair_cost({p[0], p[1]}, {c[0], c[1]});
      {pk, pf} = p; {ck, cf} = c;
      #1;
      checks++;
      if (hit !== exp) begin
        failures++;
        $display("FAIL prev=%b cur=%b hit=%b exp=%b", p, c, hit, exp);
      end
    end
    // Odd-inversion table by name: T1* 00->10, T1** 00->01, T1*** 01->11, Type II 01->10,
    // Type III 00->11, Type IV 01->01.
    check_row(2'b00, 2'b10, 1'b1);
    check_row(2'b00, 2'b01, 1'b1);
    check_row(2'b01, 2'b11, 1'b0);
    check_row(2'b10, 2'b00, 1'b0);
    check_row(2'b01, 2'b10, 1'b1);
    check_row(2'b00, 2'b11, 1'b0);
    check_row(2'b01, 2'b01, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
