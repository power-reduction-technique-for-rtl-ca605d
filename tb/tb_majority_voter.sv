// tb_majority_voter: checks the strict majority at N = 31 (odd) and N = 8
// (even, where a 4-of-8 tie must give 0), including every population count.
module tb_majority_voter;
  logic clk = 1'b0;
  logic [30:0] b31;
  logic        m31;
  logic [7:0]  b8;
  logic        m8;
  int checks = 0, failures = 0;

  majority_voter #(.N(31)) dut31 (.bits(b31), .more_than_half(m31));
  majority_voter #(.N(8))  dut8  (.bits(b8),  .more_than_half(m8));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Every population count 0..31 with the ones at random places.
    for (int k = 0; k <= 31; k++) begin
      for (int r = 0; r < 20; r++) begin
        b31 = '0;
        while ($countones(b31) < k) b31[$urandom % 31] = 1'b1;
        #1;
        checks++;
        if (m31 !== (k >= 16)) begin
          failures++;
          $display("FAIL N=31 ones=%0d out=%b", k, m31);
        end
      end
    end
    for (int v = 0; v < 256; v++) begin
      b8 = 8'(v);
      #1;
      checks++;
      if (m8 !== ($countones(b8) >= 5)) begin
        failures++;
        $display("FAIL N=8 bits=%b out=%b", b8, m8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
