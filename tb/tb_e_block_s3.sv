// tb_e_block_s3: checks the Scheme III encoding logic against the cost-based
// reference model at W = 32 and W = 10. Stimulus mixes uniform random flits,
// small changes of the previous flit, near-complements and alternating
// patterns so that every action (none, odd, even and full) is taken. For each flit the
// encoded value and the action must match the reference, and the coupling
// cost of what is sent may never exceed that of the plain flit.
module tb_e_block_s3;
  import tb_ref_pkg::*;
  localparam int S = 3;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- W = 32 instance
  localparam int W = 32;
  logic [W-2-1:0] pay;
  logic [W-1:0] prev, enc;
  noc_enc_pkg::inv_action_e action; logic [1:0] act; assign act = action;
  e_block_s3 #(.W(W)) dut (.payload(pay), .prev_link(prev), .enc(enc), .action(action));

  // ---- W = 10 instance
  localparam int WS = 10;
  logic [WS-2-1:0] pay_s;
  logic [WS-1:0] prev_s, enc_s;
  e_block_s3 #(.W(WS)) dut_s (.payload(pay_s), .prev_link(prev_s), .enc(enc_s), .action());

  int seen [4];

  initial begin
    for (int k = 0; k < 4; k++) seen[k] = 0;
    for (int i = 0; i < 20000; i++) begin
      logic [W-1:0] y, x, z;
      logic [1:0] code;
      y = link_ref#(W)::stim(0, '0);
      x = link_ref#(W)::pack(S, link_ref#(W)::stim(i % 4, y));
      code = link_ref#(W)::decide(S, y, x);
      z = link_ref#(W)::apply(code, x);
      prev = y; pay = x[W-2-1:0];
      #1;
      checks += 3;
      seen[act]++;
      if (enc !== z || act !== code) begin
        failures++;
        if (failures < 10) $display("FAIL W=32 prev=%h x=%h enc=%h act=%b exp %h %b", y, x, enc, act, z, code);
      end
      if (link_ref#(W)::cost(y, enc) > link_ref#(W)::cost(y, x)) begin
        failures++;
        $display("FAIL encoding raised coupling cost");
      end
      if (enc[W-2-1:0] !== (x[W-2-1:0] ^ link_ref#(W)::apply(code, '0)[W-2-1:0])) begin
        failures++;
        $display("FAIL payload lines not inverted as coded");
      end
    end
    for (int i = 0; i < 5000; i++) begin
      logic [WS-1:0] y, x, z;
      y = link_ref#(WS)::stim(0, '0);
      x = link_ref#(WS)::pack(S, link_ref#(WS)::stim(i % 4, y));
      z = link_ref#(WS)::encode(S, y, x);
      prev_s = y; pay_s = x[WS-2-1:0];
      #1;
      checks++;
      if (enc_s !== z) begin
        failures++;
        if (failures < 10) $display("FAIL W=10 prev=%h x=%h enc=%h exp %h", y, x, enc_s, z);
      end
    end
    for (int k = 0; k < 4; k++) begin
      if ((S == 1 && k[0]) || (S == 2 && k == 1)) continue;
      checks++;
      if (seen[k] == 0) begin
        failures++;
        $display("FAIL action %0d never taken", k);
      end
    end
    $display("actions none=%0d even=%0d odd=%0d full=%0d", seen[0], seen[1], seen[2], seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
