// tb_mspm: the multi-string pattern matcher on its own. Loads a rule set
// with field-restricted and shared fast patterns, sends JSON events as
// tagged packet flits (tags from the reference tagger, events starting at
// random lanes), and checks per event the multiset of candidate rules
// against a table-level reference, with random back-pressure on the
// candidate output. Also checks that compactor back-pressure (hash-check
// stall) and the overload slow path both occur.
module tb_mspm;
  import rs_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_stall = 0, n_expand = 0;

  logic init_done, in_valid, in_ready, cand_valid, cand_ready, hc_stall, expanding;
  cfg_t cfg;
  flit_t in_flit;
  rtok_t cand_tok;

  mspm dut (.*);

  string keys[NFIELDS] = '{"\"path\": \"", "\"cmdline\": \"", "", ""};
  rule_t rules[$];
  flit_t stim[$];
  int expq[$][$];
  int got[$];
  int pkt = 0;

  function automatic void add_rule(string fp, int field);
    rule_t r;
    r.fp = fp; r.field = field;
    rules.push_back(r);
  endfunction

  function automatic void add_event(string s);
    byte_t b[$];
    int tags[$], cand[$];
    int pos = 0;
    str_bytes(s, b);
    ref_tags(b, keys, tags);
    mspm_ref(b, tags, cand);
    cand.sort();
    expq.push_back(cand);
    while (pos < b.size() || pos == 0) begin
      automatic flit_t f = '0;
      automatic int lane0 = (pos == 0) ? $urandom_range(0, 30) : 0;
      f.sop = (pos == 0);
      for (int i = lane0; i < LANES && pos < b.size(); i++) begin
        f.data[i] = b[pos]; f.keep[i] = 1; f.tag[i] = field_t'(tags[pos]); pos++;
      end
      f.eop = (pos >= b.size());
      stim.push_back(f);
      if (b.size() == 0) break;
    end
  endfunction

  string words[10] = '{"wget", "curl", "chmod", "/bin/sh", "aaaaaaaaaaaaaaaaaaaaaaaaaaaaaaaaaaaaaa", "ls", "x", "base64", "http", "wgetwget"};

  initial begin
    add_rule("wget", 2);
    add_rule("/bin/sh", 1);
    add_rule("chmod", 0);
    add_rule("chmod", 0);
    add_rule("curl", 0);
    add_rule("curl", 0);
    add_rule("curl", 0);
    add_rule("aa", 0);
    add_rule("base64", 2);
    load_rules(rules, keys);
    for (int n = 0; n < 80; n++)
      add_event($sformatf("{\"path\": \"%s\", \"cmdline\": \"%s %s\", \"u\": \"%s\"}",
                words[$urandom_range(0, 9)], words[$urandom_range(0, 9)],
                words[$urandom_range(0, 9)], words[$urandom_range(0, 9)]));
    add_event("");
  end

  always @(negedge clk) begin
    cfg.we <= 1'b0;
    if (rst_n && init_done && cfg_q.size() > 0) cfg <= cfg_q.pop_front();
    in_valid   <= rst_n && init_done && cfg_q.size() == 0 && stim.size() > 0;
    if (stim.size() > 0) in_flit <= stim[0];
    cand_ready <= ($urandom_range(0, 3) != 0);
  end

  always @(posedge clk) begin
    if (rst_n && in_valid && in_ready) void'(stim.pop_front());
    if (rst_n) begin n_stall += hc_stall; n_expand += expanding; end
    if (rst_n && cand_valid && cand_ready) begin
      if (cand_tok.hit) got.push_back(int'(cand_tok.rule));
      if (cand_tok.last) begin
        got.sort();
        checks++;
        if (pkt >= expq.size() || got != expq[pkt]) begin
          failures++;
          $display("event %0d got %p", pkt, got);
          if (pkt < expq.size()) $display("   expected %p", expq[pkt]);
        end
        got.delete();
        pkt++;
      end
    end
  end

  initial begin
    cfg = '0; in_valid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (init_done);
    repeat (10) @(posedge clk);
    wait (pkt == expq.size());
    repeat (20) @(posedge clk);
    checks += 3;
    if (cand_valid) begin failures++; $display("extra candidates"); end
    if (n_stall == 0) begin failures++; $display("no hash-check stall"); end
    if (n_expand == 0) begin failures++; $display("no overload expansion"); end
    $display("stall=%0d expand=%0d", n_stall, n_expand);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog: event %0d", pkt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
