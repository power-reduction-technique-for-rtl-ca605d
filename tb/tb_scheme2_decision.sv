// tb_scheme2_decision: exhaustive check of Scheme II's decision module for a
// 32-wire link: every (Ty, T2, T4**) count in 0..31 with the decodability
// input at 0 and 1. The reference reasons in coupling savings: odd inversion
// saves 2Ty - 31, full inversion 2(T2 - T4**); the larger positive saving
// wins, a tie gives none, and a full inversion the receiver cannot read falls
// back to odd when odd saves anything.
module tb_scheme2_decision;
  localparam int W = 32;
  logic clk = 1'b0;
  logic [4:0] ty, t2, t4;
  logic dec_ok, odd, full;
  int checks = 0, failures = 0;
  int n_odd = 0, n_full = 0, n_fallback = 0;

  scheme2_decision #(.W(W)) dut (
    .ty_cnt(ty), .t2_cnt(t2), .t4_cnt(t4), .full_decodable(dec_ok), .odd(odd), .full(full)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (10000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 32; a++)
      for (int b = 0; b < 32; b++)
        for (int c = 0; c < 32; c++)
          for (int d = 0; d < 2; d++) begin
            int so, sf;
            logic e_odd, e_full;
            so = 2 * a - (W - 1);
            sf = 2 * (b - c);
            e_full = (sf > 0) && (sf > so) && (d == 1);
            e_odd  = (so > 0) && ((so > sf) || ((sf > so) && (sf > 0) && (d == 0)));
            ty = 5'(a); t2 = 5'(b); t4 = 5'(c); dec_ok = d[0];
            #1;
            checks++;
            if (odd !== e_odd || full !== e_full) begin
              failures++;
              if (failures < 10)
                $display("FAIL ty=%0d t2=%0d t4=%0d ok=%0d odd=%b full=%b exp %b %b", a, b, c, d, odd, full, e_odd, e_full);
            end
            if (odd && full) begin
              failures++;
              $display("FAIL both odd and full");
            end
            n_odd += int'(odd);
            n_full += int'(full);
            n_fallback += int'(odd && (sf > so));
          end
    checks++;
    if (n_odd == 0 || n_full == 0 || n_fallback == 0) begin
      failures++;
      $display("FAIL coverage odd=%0d full=%0d fallback=%0d", n_odd, n_full, n_fallback);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
