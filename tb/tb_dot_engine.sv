// Self-checking testbench of dot_engine.  Three engines of 8 lanes, one per
// weight space (F, B, T), receive the same stream of random dot products of
// random length (1 to 40 terms, so the last beat is partly masked), sent back to
// back with no idle cycle.  Each result is compared bit for bit with the
// reference (same pairwise lane order, same accumulation order), and must
// appear exactly three cycles after the last beat.
module tb_dot_engine;
  import mpwn_pkg::*;
  import mpwn_ref_pkg::*;

  localparam int L = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          in_valid, in_first, in_last;
  logic [L-1:0]  in_mask;
  half_t         in_act [L];
  logic [L*16-1:0] wgt_f;
  logic [L*1-1:0]  wgt_b;
  logic [L*2-1:0]  wgt_t;
  logic  ov [3];
  half_t os [3];

  dot_engine #(.LANES(L), .WSPACE(WS_F)) u_f (.clk, .rst_n, .in_valid, .in_first, .in_last,
    .in_mask, .in_act, .in_wgt(wgt_f), .out_valid(ov[0]), .out_sum(os[0]));
  dot_engine #(.LANES(L), .WSPACE(WS_B)) u_b (.clk, .rst_n, .in_valid, .in_first, .in_last,
    .in_mask, .in_act, .in_wgt(wgt_b), .out_valid(ov[1]), .out_sum(os[1]));
  dot_engine #(.LANES(L), .WSPACE(WS_T)) u_t (.clk, .rst_n, .in_valid, .in_first, .in_last,
    .in_mask, .in_act, .in_wgt(wgt_t), .out_valid(ov[2]), .out_sum(os[2]));

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // expected results, queued with the cycle they are due in
  h16_t exp_q [3][$];
  int   due_q [$];

  always @(negedge clk) begin
    if (rst_n) begin
      if (due_q.size() > 0 && due_q[0] == cycle) begin
        void'(due_q.pop_front());
        for (int s = 0; s < 3; s++) begin
          h16_t e;
          e = exp_q[s].pop_front();
          checks++;
          if (!ov[s] || !h_same(os[s], e)) begin
            failures++;
            if (failures < 10) $display("FAIL ws=%0d cycle %0d valid=%b sum=%h exp=%h", s, cycle, ov[s], os[s], e);
          end
        end
      end else begin
        for (int s = 0; s < 3; s++) if (ov[s]) begin
          failures++;
          $display("FAIL ws=%0d unexpected result at cycle %0d", s, cycle);
        end
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    h16_t a[], wf[], wb[], wt[];
    in_valid = 0; in_first = 0; in_last = 0; in_mask = '0;
    foreach (in_act[i]) in_act[i] = '0;
    wgt_f = '0; wgt_b = '0; wgt_t = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int v = 0; v < 300; v++) begin
      int n, words;
      n     = 1 + $urandom % 40;
      words = (n + L - 1) / L;
      a = new[n]; wf = new[n]; wb = new[n]; wt = new[n];
      for (int i = 0; i < n; i++) begin
        a[i]  = rand_half(-4.0, 4.0);
        wf[i] = rand_weight(0, 1.0);
        wb[i] = rand_weight(1, 1.0);
        wt[i] = rand_weight(2, 1.0);
      end
      exp_q[0].push_back(ref_dot(0, L, a, wf, n));
      exp_q[1].push_back(ref_dot(1, L, a, wb, n));
      exp_q[2].push_back(ref_dot(2, L, a, wt, n));
      for (int t = 0; t < words; t++) begin
        @(negedge clk);
        in_valid = 1;
        in_first = (t == 0);
        in_last  = (t == words - 1);
        for (int p = 0; p < L; p++) begin
          int idx;
          idx = t * L + p;
          in_mask[p] = idx < n;
          // masked lanes carry garbage that must not reach the sum
          in_act[p]  = (idx < n) ? a[idx] : 16'($urandom);
          wgt_f[p*16 +: 16] = (idx < n) ? wf[idx] : 16'h3C00;
          wgt_b[p]          = (idx < n) ? wb[idx][0] : 1'b0;
          wgt_t[p*2 +: 2]   = (idx < n) ? wt[idx][1:0] : 2'b01;
        end
        // the last beat is sampled at the next edge; the result follows 3 edges later
        if (t == words - 1) due_q.push_back(cycle + 3);
      end
    end
    @(negedge clk);
    in_valid = 0; in_first = 0; in_last = 0;
    repeat (10) @(posedge clk);
    if (due_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
