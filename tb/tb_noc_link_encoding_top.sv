// tb_noc_link_encoding_top: end-to-end test of the three encoded links at the
// default width (W = 32), with no parameter overrides.
//
// The same payload stream (trimmed to each channel's payload width) goes into
// all three channels. Two traffic phases are run:
//   1. synthetic traffic: uniformly random payloads, 1 in 8 cycles idle;
//   2. correlated traffic: small changes, near-complements and alternating
//      patterns of the previous flit, which make full and even inversion win.
// Checked: every payload comes out of its decoder unchanged, in order, two
// cycles after it went in; the link carries the reference encoding; no flit
// raises the coupling cost against the plain flit. Counted, and each required
// at least once: per scheme every inversion action it has, a Scheme II full
// inversion that is turned down because the receiver could not read it,
// idle cycles (link holds), and a reset in mid-stream. The coupling activity
// (Type I weight 1, Type II weight 2) of plain and encoded links is printed
// per phase and scheme; encoded links must not exceed plain ones in total.
module tb_noc_link_encoding_top;
  import tb_ref_pkg::*;
  import noc_enc_pkg::*;
  localparam int W = 32;
  localparam int N_FLITS = 40000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic         in_valid = 1'b0;
  logic [W-1:0] payload = '0;
  logic [W-1:0] link [1:3];
  inv_action_e  act [1:3];
  logic         ov [1:3];
  logic [W-2:0] op1, op2;
  logic [W-3:0] op3;

  noc_link_encoding_top dut (
    .clk, .rst_n,
    .s1_in_valid(in_valid), .s1_in_payload(payload[W-2:0]), .s1_link(link[1]), .s1_link_action(act[1]),
    .s1_out_valid(ov[1]), .s1_out_payload(op1),
    .s2_in_valid(in_valid), .s2_in_payload(payload[W-2:0]), .s2_link(link[2]), .s2_link_action(act[2]),
    .s2_out_valid(ov[2]), .s2_out_payload(op2),
    .s3_in_valid(in_valid), .s3_in_payload(payload[W-3:0]), .s3_link(link[3]), .s3_link_action(act[3]),
    .s3_out_valid(ov[3]), .s3_out_payload(op3)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int seen [1:3][4];
  int s2_blocked = 0, idles = 0, resets = 0;
  longint raw_cost [1:2][1:3];
  longint enc_cost [1:2][1:3];

  initial begin
    repeat (N_FLITS * 2 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] trim(input int s, input logic [W-1:0] p);
    return (s == 3) ? W'(p[W-3:0]) : W'(p[W-2:0]);
  endfunction

  function automatic logic [W-1:0] out_of(input int s);
    return (s == 1) ? W'(op1) : (s == 2) ? W'(op2) : W'(op3);
  endfunction

  initial begin
    logic [W-1:0] y [1:3];       // link value before the current flit (reference)
    logic [W-1:0] yraw [1:3];    // previous plain flit, for the unencoded baseline
    logic [W-1:0] pend [1:3];    // payload sent one cycle ago, due at the output now
    logic         pend_v;
    for (int s = 1; s <= 3; s++) begin
      for (int k = 0; k < 4; k++) seen[s][k] = 0;
      for (int ph = 1; ph <= 2; ph++) begin raw_cost[ph][s] = 0; enc_cost[ph][s] = 0; end
      y[s] = '0; yraw[s] = '0; pend[s] = '0;
    end
    pend_v = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < N_FLITS; i++) begin
      int ph;
      logic [W-1:0] exp_link [1:3];
      logic [1:0]   code [1:3];
      ph = (i < N_FLITS / 2) ? 1 : 2;
      // Reset in mid-stream once: both ends must restart from all zeros.
      if (i == N_FLITS / 4) begin
        @(negedge clk);
        in_valid = 1'b0;
        rst_n = 1'b0;
        @(posedge clk);
        #1;
        rst_n = 1'b1;
        resets++;
        for (int s = 1; s <= 3; s++) begin
          checks++;
          if (link[s] !== '0 || ov[s] !== 1'b0) begin
            failures++;
            $display("FAIL scheme %0d not reset", s);
          end
          y[s] = '0;
        end
        pend_v = 1'b0;
      end
      @(negedge clk);
      in_valid = ($urandom % 8) != 0;
      payload  = (ph == 1) ? link_ref#(W)::stim(0, '0) : link_ref#(W)::stim(1 + i % 3, link[3]);
      for (int s = 1; s <= 3; s++) begin
        logic [W-1:0] x;
        x = link_ref#(W)::pack(s, payload);
        code[s] = link_ref#(W)::decide(s, y[s], x);
        exp_link[s] = in_valid ? link_ref#(W)::apply(code[s], x) : y[s];
        if (in_valid) begin
          raw_cost[ph][s] += link_ref#(W)::cost(yraw[s], x);
          enc_cost[ph][s] += link_ref#(W)::cost(y[s], exp_link[s]);
          checks++;
          if (link_ref#(W)::cost(y[s], exp_link[s]) > link_ref#(W)::cost(y[s], x)) begin
            failures++;
            $display("FAIL scheme %0d flit raises coupling", s);
          end
          yraw[s] = x;
          if (s == 2) begin
            int c0, co, ce, cf;
            c0 = link_ref#(W)::cost(y[s], x);
            co = link_ref#(W)::cost(y[s], link_ref#(W)::apply(2'b10, x));
            ce = link_ref#(W)::cost(y[s], link_ref#(W)::apply(2'b01, x));
            cf = link_ref#(W)::cost(y[s], link_ref#(W)::apply(2'b11, x));
            if (cf < c0 && cf < co && !(ce < cf)) s2_blocked++;
          end
        end
      end
      @(posedge clk);
      #1;
      idles += int'(!in_valid);
      for (int s = 1; s <= 3; s++) begin
        // Output of the flit accepted one edge earlier (two-cycle latency).
        checks++;
        if (ov[s] !== pend_v || (pend_v && out_of(s) !== trim(s, pend[s]))) begin
          failures++;
          if (failures < 10)
            $display("FAIL scheme %0d flit %0d out_valid=%b out=%h exp=%h", s, i, ov[s], out_of(s), trim(s, pend[s]));
        end
        checks++;
        if (link[s] !== exp_link[s] || (in_valid && act[s] !== code[s])) begin
          failures++;
          if (failures < 10) $display("FAIL scheme %0d flit %0d link=%h exp=%h", s, i, link[s], exp_link[s]);
        end
        if (in_valid) seen[s][code[s]]++;
        y[s] = link[s];
        pend[s] = payload;
      end
      pend_v = in_valid;
    end
    // Coverage of every mechanism.
    begin
      int need [$];
      string what [$];
      need = '{seen[1][0], seen[1][2],
               seen[2][0], seen[2][2], seen[2][3], s2_blocked,
               seen[3][0], seen[3][1], seen[3][2], seen[3][3], idles, resets};
      what = '{"s1 none", "s1 odd", "s2 none", "s2 odd", "s2 full", "s2 full turned down",
               "s3 none", "s3 even", "s3 odd", "s3 full", "idle cycle", "reset"};
      foreach (need[k]) begin
        $display("  %-22s %0d", what[k], need[k]);
        checks++;
        if (need[k] == 0) begin
          failures++;
          $display("FAIL mechanism never happened: %s", what[k]);
        end
      end
    end
    for (int ph = 1; ph <= 2; ph++)
      for (int s = 1; s <= 3; s++) begin
        $display("phase %0d scheme %0d: coupling plain=%0d encoded=%0d saving=%0d%%", ph, s,
                 raw_cost[ph][s], enc_cost[ph][s],
                 (raw_cost[ph][s] == 0) ? 0 : int'((raw_cost[ph][s] - enc_cost[ph][s]) * 100 / raw_cost[ph][s]));
        checks++;
        if (enc_cost[ph][s] > raw_cost[ph][s]) begin
          failures++;
          $display("FAIL scheme %0d raised total coupling in phase %0d", s, ph);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
