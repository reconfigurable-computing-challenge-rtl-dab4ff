// tb_cpm: the conjunct pattern matcher on its own. Loads rules with one or
// two conjunct literals each, sends events as packet flits and, per event, a
// random list of candidate rules with an end mark (candidates and data with
// independent random timing). A candidate must pass exactly when all its
// literals' fingerprint bits occur in the event's reference fingerprint;
// checks matches, verdicts and the passed-on data flits.
module tb_cpm;
  import rs_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, passes = 0, rejects = 0;

  logic init_done, in_valid, in_ready, cand_valid, cand_ready, data_valid, data_ready;
  logic match_valid, match_ready, verdict_valid, verdict_ready;
  cfg_t cfg;
  flit_t in_flit, data_flit;
  rtok_t cand_tok;
  match_t match;
  verdict_t verdict;

  cpm dut (.*);

  string keys[NFIELDS] = '{"", "", "", ""};
  string lits[8] = '{"http", "-o", "|sh", "777", "+x", "/tmp/", "-d", "passwd"};
  rule_t rules[$];
  flit_t stim[$], dq[$];
  rtok_t cq[$];
  match_t mq[$];
  verdict_t vq[$];

  initial begin
    for (int r = 0; r < 16; r++) begin
      automatic rule_t x;
      x.fp = "zzzz"; x.field = 0;
      x.lits.push_back(lits[r % 8]);
      if (r >= 8) x.lits.push_back(lits[(r * 3) % 8]);
      rules.push_back(x);
    end
    load_rules(rules, keys);
    for (int p = 0; p < 60; p++) begin
      automatic string s = "{\"cmdline\": \"";
      automatic byte_t b[$];
      automatic logic [FP_BITS-1:0] f;
      automatic int pos = 0;
      automatic int nc = $urandom_range(0, 6);
      automatic bit any = 0;
      for (int k = 0; k < 3; k++) s = {s, lits[$urandom_range(0, 7)], " q "};
      s = {s, "\"}"};
      if (p % 5 == 0) for (int k = 0; k < 10; k++) s = {s, " padding-text"};
      str_bytes(s, b);
      f = cpm_fp_ref(b);
      while (pos < b.size()) begin
        automatic flit_t x = '0;
        x.sop = (pos == 0);
        for (int i = 0; i < LANES && pos < b.size(); i++) begin x.data[i] = b[pos]; x.keep[i] = 1; pos++; end
        x.eop = (pos >= b.size());
        stim.push_back(x);
        dq.push_back(x);
      end
      for (int k = 0; k < nc; k++) begin
        automatic int r = $urandom_range(0, 15);
        cq.push_back('{hit: 1, last: 0, rule: RULE_W'(r)});
        if ((c_fp[r] & ~f) == '0) begin mq.push_back('{pid: 16'(p), rule: RULE_W'(r)}); any = 1; passes++; end
        else rejects++;
      end
      cq.push_back('{hit: 0, last: 1, rule: '0});
      vq.push_back('{pid: 16'(p), matched: any});
    end
  end

  always @(negedge clk) begin
    cfg.we <= 1'b0;
    if (rst_n && init_done && cfg_q.size() > 0) cfg <= cfg_q.pop_front();
    in_valid <= rst_n && init_done && cfg_q.size() == 0 && stim.size() > 0 && $urandom_range(0, 2) != 0;
    if (stim.size() > 0) in_flit <= stim[0];
    cand_valid <= rst_n && init_done && cfg_q.size() == 0 && cq.size() > 0 && $urandom_range(0, 2) != 0;
    if (cq.size() > 0) cand_tok <= cq[0];
    data_ready    <= ($urandom_range(0, 3) != 0);
    match_ready   <= ($urandom_range(0, 3) != 0);
    verdict_ready <= ($urandom_range(0, 3) != 0);
  end

  always @(posedge clk) begin
    if (rst_n && in_valid && in_ready) void'(stim.pop_front());
    if (rst_n && cand_valid && cand_ready) void'(cq.pop_front());
    if (rst_n && data_valid && data_ready) begin
      automatic flit_t e = dq.pop_front();
      checks++;
      if (data_flit != e) begin failures++; $display("data flit mismatch"); end
    end
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
    cfg = '0; in_valid = 0; cand_valid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (init_done);
    repeat (10) @(posedge clk);
    wait (vq.size() == 0 && mq.size() == 0 && dq.size() == 0);
    repeat (5) @(posedge clk);
    checks++;
    if (passes == 0 || rejects == 0) begin failures++; $display("pass and reject not both seen"); end
    $display("passes=%0d rejects=%0d", passes, rejects);
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
