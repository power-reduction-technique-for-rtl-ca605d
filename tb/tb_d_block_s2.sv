// tb_d_block_s2: round-trip check of the Scheme 2 decoding logic at W = 32.
// Flits are encoded with the reference model against a random previous link
// value (stimulus chosen so that every action the scheme has is exercised);
// the decoder must return the original payload.
module tb_d_block_s2;
  import tb_ref_pkg::*;
  localparam int S = 2;
  localparam int W = 32;
  logic clk = 1'b0;
  logic [W-1:0] link, prev;
  logic [W-1-1:0] pay;
  int checks = 0, failures = 0;
  int seen [4];

  d_block_s2 #(.W(W)) dut (.link(link), .prev_link(prev), .payload(pay));

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 4; k++) seen[k] = 0;
    for (int i = 0; i < 20000; i++) begin
      logic [W-1:0] y, x;
      logic [1:0] code;
      y = link_ref#(W)::stim(0, '0);
      x = link_ref#(W)::pack(S, link_ref#(W)::stim(i % 4, y));
      code = link_ref#(W)::decide(S, y, x);
      prev = y;
      link = link_ref#(W)::apply(code, x);
      #1;
      checks++;
      seen[code]++;
      if (pay !== x[W-1-1:0]) begin
        failures++;
        if (failures < 10) $display("FAIL prev=%h link=%h code=%b payload=%h exp %h", y, link, code, pay, x[W-1-1:0]);
      end
    end
    for (int k = 0; k < 4; k++) begin
      if ((S == 1 && k[0]) || (S == 2 && k == 1)) continue;
      checks++;
      if (seen[k] == 0) begin
        failures++;
        $display("FAIL action %0d never exercised", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
