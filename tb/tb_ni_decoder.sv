// tb_ni_decoder: cycle check of the receiving interface for all three
// schemes at W = 32. For each scheme a reference sender encodes a random
// payload stream (with idle cycles, during which the link wires hold) and
// drives the link; one cycle after each valid flit the decoder must present
// out_valid = 1 and the original payload, and out_valid = 0 after idle ones.
module tb_ni_decoder;
  import tb_ref_pkg::*;
  localparam int W = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  logic         lv = 1'b0;
  logic [W-1:0] link [1:3];
  logic         ov [1:3];
  logic [W-2:0] op1, op2;
  logic [W-3:0] op3;
  int checks = 0, failures = 0;

  ni_decoder #(.W(W), .SCHEME(1)) dut1 (.clk, .rst_n, .link_valid(lv), .link_data(link[1]), .out_valid(ov[1]), .out_payload(op1));
  ni_decoder #(.W(W), .SCHEME(2)) dut2 (.clk, .rst_n, .link_valid(lv), .link_data(link[2]), .out_valid(ov[2]), .out_payload(op2));
  ni_decoder #(.W(W), .SCHEME(3)) dut3 (.clk, .rst_n, .link_valid(lv), .link_data(link[3]), .out_valid(ov[3]), .out_payload(op3));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 1; s <= 3; s++) link[s] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 30000; i++) begin
      logic [W-1:0] pay;
      @(negedge clk);
      lv  = ($urandom % 8) != 0;
      pay = link_ref#(W)::stim(i % 4, link[3]);
      if (lv)
        for (int s = 1; s <= 3; s++) link[s] = link_ref#(W)::encode(s, link[s], pay);
      @(posedge clk);
      #1;
      for (int s = 1; s <= 3; s++) begin
        logic [W-1:0] got;
        logic [W-1:0] want;
        got  = (s == 1) ? W'(op1) : (s == 2) ? W'(op2) : W'(op3);
        want = (s == 3) ? W'(pay[W-3:0]) : W'(pay[W-2:0]);
        checks++;
        if (ov[s] !== lv || (lv && got !== want)) begin
          failures++;
          if (failures < 10) $display("FAIL scheme %0d cycle %0d valid=%b payload=%h exp=%h", s, i, ov[s], got, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
