// tb_ones_counter: random and corner-case check of the 1s block at N = 31
// (a 32-wire link) and N = 7; the count is compared with $countones.
module tb_ones_counter;
  logic clk = 1'b0;
  logic [30:0] b31;
  logic [4:0]  c31;
  logic [6:0]  b7;
  logic [2:0]  c7;
  int checks = 0, failures = 0;

  ones_counter #(.N(31)) dut31 (.bits(b31), .count(c31));
  ones_counter #(.N(7))  dut7  (.bits(b7),  .count(c7));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      case (i)
        0: b31 = '0;
        1: b31 = '1;
        default: b31 = 31'($urandom) & 31'($urandom | ((i % 3 == 0) ? 32'hFFFF_FFFF : 32'h0));
      endcase
      b7 = 7'(i);
      #1;
      checks += 2;
      if (int'(c31) != $countones(b31)) begin
        failures++;
        $display("FAIL N=31 bits=%h count=%0d", b31, c31);
      end
      if (int'(c7) != $countones(b7)) begin
        failures++;
        $display("FAIL N=7 bits=%b count=%0d", b7, c7);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
