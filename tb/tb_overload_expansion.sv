// tb_overload_expansion: programs an expansion table, then sends packets of
// plain and overloaded candidates (each packet closed by an end mark, on its
// own or on the last candidate). Checks, per packet, that exactly the plain
// rules plus every expanded rule list come out before the packet's single
// end mark; that plain candidates overtake a busy slow path; and that one
// expansion takes one cycle per rule.
module tb_overload_expansion;
  import rs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, overtakes = 0, expansions = 0;

  logic init_done, cfg_we, in_valid, in_ready, out_valid, out_ready, expanding;
  logic [11:0] cfg_addr;
  logic [RULE_W-1:0] cfg_rule;
  ctok_t in_tok;
  rtok_t out_tok;

  overload_expansion dut (.*);

  localparam int NPKT = 150;
  ctok_t stim[$];
  int    expq[NPKT][$];
  int    got[$];
  int    pkt = 0;
  int    exp_tab[int];

  initial begin
    cfg_we = 0; in_valid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (init_done);
    for (int a = 0; a < 256; a++) begin
      exp_tab[a] = 2000 + a;
      @(negedge clk);
      cfg_we = 1; cfg_addr = 12'(a); cfg_rule = RULE_W'(2000 + a);
    end
    @(negedge clk) cfg_we = 0;
    for (int p = 0; p < NPKT; p++) begin
      automatic int n = $urandom_range(0, 6);
      for (int k = 0; k < n; k++) begin
        automatic ctok_t t = '0;
        t.hit = 1;
        t.overload = ($urandom_range(0, 3) == 0);
        t.last = (k == n - 1) && $urandom_range(0, 1);
        if (t.overload) begin
          t.rule  = RULE_W'($urandom_range(0, 200));
          t.count = CNT_W'($urandom_range(1, 15));
          for (int j = 0; j < int'(t.count); j++) expq[p].push_back(exp_tab[int'(t.rule) + j]);
        end else begin
          t.rule = RULE_W'($urandom_range(0, 1999));
          expq[p].push_back(int'(t.rule));
        end
        stim.push_back(t);
      end
      if (n == 0 || !stim[$].last) stim.push_back('{hit: 0, last: 1, overload: 0, rule: 0, count: 0});
      expq[p].sort();
    end
  end

  always @(negedge clk) begin
    in_valid  <= rst_n && init_done && !cfg_we && stim.size() > 0;
    if (stim.size() > 0) in_tok <= stim[0];
    out_ready <= ($urandom_range(0, 5) != 0);
  end

  always @(posedge clk) begin
    if (rst_n && in_valid && in_ready) void'(stim.pop_front());
    if (rst_n && in_valid && in_ready && in_tok.overload && in_tok.hit) expansions++;
    if (rst_n && out_valid && out_ready) begin
      if (expanding && !dut.x_fire) overtakes++;
      if (out_tok.hit) got.push_back(int'(out_tok.rule));
      if (out_tok.last) begin
        got.sort();
        checks++;
        if (pkt < NPKT && got != expq[pkt]) begin
          failures++;
          $display("packet %0d got %p exp %p", pkt, got, (pkt < NPKT) ? expq[pkt] : got);
        end
        got.delete();
        pkt++;
      end
    end
  end

  // rate of the slow path: a lone 15-rule expansion takes 15 output cycles
  int t0, t1;
  initial begin
    wait (rst_n);
    wait (init_done);
    wait (pkt == NPKT);
    repeat (5) @(posedge clk);
    @(negedge clk);
    force out_ready = 1'b1;
    stim.push_back('{hit: 1, last: 1, overload: 1, rule: 12'd10, count: 4'd15});
    wait (out_valid);
    t0 = int'($time);
    wait (out_valid && out_tok.last);
    t1 = int'($time);
    @(posedge clk);
    release out_ready;
    repeat (2) @(posedge clk);
    checks += 4;
    if ((t1 - t0) / 10 != 14) begin failures++; $display("15 rules took %0d cycles", (t1 - t0) / 10 + 1); end
    if (overtakes == 0) begin failures++; $display("fast path never overtook the slow path"); end
    if (expansions == 0) begin failures++; $display("no expansion"); end
    if (pkt != NPKT + 1) begin failures++; $display("last packet missing"); end
    $display("overtakes=%0d expansions=%0d", overtakes, expansions);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
