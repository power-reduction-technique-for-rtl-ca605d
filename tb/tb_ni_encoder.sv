// tb_ni_encoder: cycle check of the sending interface for all three schemes
// at W = 32. A random payload stream with random idle cycles is applied to
// three ni_encoder instances (SCHEME 1, 2, 3). After every rising edge the
// link must show, for an accepted payload, the reference encoding against
// the previous link value with link_valid = 1 (one-cycle latency), and in an
// idle cycle link_valid = 0 with the wires unchanged. Reset must clear the link.
module tb_ni_encoder;
  import tb_ref_pkg::*;
  import noc_enc_pkg::*;
  localparam int W = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [W-1:0] payload = '0;
  logic [W-1:0] link [1:3];
  logic         lv [1:3];
  inv_action_e  la [1:3];
  logic [W-1:0] y [1:3];
  int checks = 0, failures = 0, idles = 0;
  int seen [1:3][4];

  ni_encoder #(.W(W), .SCHEME(1)) dut1 (.clk, .rst_n, .in_valid, .in_payload(payload[W-2:0]),
    .link_valid(lv[1]), .link_data(link[1]), .link_action(la[1]));
  ni_encoder #(.W(W), .SCHEME(2)) dut2 (.clk, .rst_n, .in_valid, .in_payload(payload[W-2:0]),
    .link_valid(lv[2]), .link_data(link[2]), .link_action(la[2]));
  ni_encoder #(.W(W), .SCHEME(3)) dut3 (.clk, .rst_n, .in_valid, .in_payload(payload[W-3:0]),
    .link_valid(lv[3]), .link_data(link[3]), .link_action(la[3]));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 1; s <= 3; s++) for (int k = 0; k < 4; k++) seen[s][k] = 0;
    repeat (3) @(posedge clk);
    #1;
    for (int s = 1; s <= 3; s++) begin
      checks++;
      if (link[s] !== '0 || lv[s] !== 1'b0) begin
        failures++;
        $display("FAIL scheme %0d not cleared by reset", s);
      end
      y[s] = '0;
    end
    rst_n = 1'b1;
    for (int i = 0; i < 30000; i++) begin
      logic [W-1:0] exp [1:3];
      logic [1:0]   code [1:3];
      @(negedge clk);
      in_valid = ($urandom % 8) != 0;
      payload  = link_ref#(W)::stim(i % 4, link[3]);
      for (int s = 1; s <= 3; s++) begin
        code[s] = link_ref#(W)::decide(s, y[s], link_ref#(W)::pack(s, payload));
        exp[s]  = in_valid ? link_ref#(W)::apply(code[s], link_ref#(W)::pack(s, payload)) : y[s];
      end
      @(posedge clk);
      #1;
      idles += int'(!in_valid);
      for (int s = 1; s <= 3; s++) begin
        checks++;
        if (lv[s] !== in_valid || link[s] !== exp[s] || (in_valid && la[s] !== code[s])) begin
          failures++;
          if (failures < 10)
            $display("FAIL scheme %0d cycle %0d valid=%b/%b link=%h exp=%h act=%b exp=%b",
                     s, i, lv[s], in_valid, link[s], exp[s], la[s], code[s]);
        end
        if (in_valid) seen[s][code[s]]++;
        y[s] = link[s];
      end
    end
    checks++;
    if (seen[1][2] == 0 || seen[2][3] == 0 || seen[3][1] == 0 || seen[3][3] == 0 || idles == 0) begin
      failures++;
      $display("FAIL coverage");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
