// tb_scheme3_decision: exhaustive check of Scheme III's decision module for a
// 32-wire link over all (Ty, Te, T2, T4**) counts in 0..31. The reference
// picks the action whose coupling saving (odd 2Ty - 31, even 2Te - 31,
// full 2(T2 - T4**), none 0) is strictly larger than the other three's.
module tb_scheme3_decision;
  import noc_enc_pkg::*;
  localparam int W = 32;
  logic clk = 1'b0;
  logic [4:0] ty, te, t2, t4;
  inv_action_e action;
  int checks = 0, failures = 0;
  int seen [4];

  scheme3_decision #(.W(W)) dut (.ty_cnt(ty), .te_cnt(te), .t2_cnt(t2), .t4_cnt(t4), .action(action));

  always #5 clk = ~clk;

  initial begin
    repeat (100000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 4; k++) seen[k] = 0;
    for (int a = 0; a < 32; a++)
      for (int e = 0; e < 32; e++)
        for (int b = 0; b < 32; b++)
          for (int c = 0; c < 32; c++) begin
            int so, se, sf;
            logic [1:0] exp;
            so = 2 * a - (W - 1);
            se = 2 * e - (W - 1);
            sf = 2 * (b - c);
            if (so > 0 && so > se && so > sf)      exp = 2'b10;
            else if (se > 0 && se > so && se > sf) exp = 2'b01;
            else if (sf > 0 && sf > so && sf > se) exp = 2'b11;
            else                                   exp = 2'b00;
            ty = 5'(a); te = 5'(e); t2 = 5'(b); t4 = 5'(c);
            #1;
            checks++;
            seen[action]++;
            if (action !== exp) begin
              failures++;
              if (failures < 10)
                $display("FAIL ty=%0d te=%0d t2=%0d t4=%0d action=%b exp=%b", a, e, b, c, action, exp);
            end
          end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (seen[k] == 0) begin
        failures++;
        $display("FAIL action %b never taken", 2'(k));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
