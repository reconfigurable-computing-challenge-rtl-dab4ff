// tb_fp_compare: random packet fingerprints and, per packet, 0..5 candidate
// rules whose fingerprints are either a subset of the packet's (must pass)
// or have an extra bit (must fail). Fingerprints and candidates arrive with
// independent random delays. Checks every match (packet number, rule) and
// every verdict, in order.
module tb_fp_compare;
  import rs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, passes = 0, rejects = 0;

  ftok_t cand_tok;
  logic [FP_BITS-1:0] pkt_fp;
  logic cand_valid, cand_ready, pkt_valid, pkt_ready;
  match_t match;
  verdict_t verdict;
  logic match_valid, match_ready, verdict_valid, verdict_ready;

  fp_compare dut (.*);

  ftok_t cq[$];
  logic [FP_BITS-1:0] pq[$];
  match_t mq[$];
  verdict_t vq[$];

  function automatic logic [FP_BITS-1:0] rnd_fp();
    logic [FP_BITS-1:0] v;
    for (int w = 0; w < FP_BITS / 32; w++) v[32*w +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    cand_valid = 0; pkt_valid = 0;
    for (int p = 0; p < 120; p++) begin
      automatic logic [FP_BITS-1:0] pf = rnd_fp();
      automatic int n = $urandom_range(0, 5);
      automatic bit any = 0;
      pq.push_back(pf);
      for (int k = 0; k < n; k++) begin
        automatic ftok_t t;
        automatic bit ok = $urandom_range(0, 1);
        t.hit = 1; t.last = (k == n - 1) && $urandom_range(0, 1);
        t.rule = RULE_W'($urandom);
        t.fp = pf & rnd_fp();
        if (!ok) begin
          automatic int b;
          do b = $urandom_range(0, FP_BITS - 1); while (pf[b]);
          t.fp[b] = 1'b1;
          rejects++;
        end else begin
          mq.push_back('{pid: 16'(p), rule: t.rule});
          any = 1;
          passes++;
        end
        cq.push_back(t);
      end
      if (n == 0 || !cq[$].last) cq.push_back('{hit: 0, last: 1, rule: 0, fp: '0});
      vq.push_back('{pid: 16'(p), matched: any});
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
  end

  always @(negedge clk) begin
    cand_valid <= rst_n && cq.size() > 0 && $urandom_range(0, 3) != 0;
    if (cq.size() > 0) cand_tok <= cq[0];
    pkt_valid <= rst_n && pq.size() > 0 && $urandom_range(0, 3) != 0;
    if (pq.size() > 0) pkt_fp <= pq[0];
    match_ready   <= ($urandom_range(0, 3) != 0);
    verdict_ready <= ($urandom_range(0, 3) != 0);
  end

  always @(posedge clk) begin
    if (rst_n && cand_valid && cand_ready) void'(cq.pop_front());
    if (rst_n && pkt_valid && pkt_ready) void'(pq.pop_front());
    if (rst_n && match_valid && match_ready) begin
      automatic match_t e = mq.pop_front();
      checks++;
      if (match != e) begin failures++; $display("match %p exp %p", match, e); end
    end
    if (rst_n && verdict_valid && verdict_ready) begin
      automatic verdict_t e = vq.pop_front();
      checks++;
      if (verdict != e) begin failures++; $display("verdict %p exp %p", verdict, e); end
    end
  end

  initial begin
    wait (rst_n);
    wait (vq.size() == 0 && mq.size() == 0);
    repeat (2) @(posedge clk);
    checks++;
    if (passes == 0 || rejects == 0) begin failures++; $display("pass and reject not both seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
