// tb_rapiddetect_top: end-to-end test of the whole pipeline at its default
// sizes. Loads a small Sigma-like rule set (fast patterns restricted to JSON
// fields, fast patterns shared by several rules, conjunct literals), streams
// newline-separated JSON log events through the raw input and checks:
//  - every (event, rule) match against a table-level reference of the MSPM
//    and CPM applied to the reference field tags of each event;
//  - that exactly the events with a match are forwarded, byte for byte;
//  - that each flow-control mechanism acted at least once: several newlines
//    in one flit, the newline stream of the source, a hash-check stall,
//    overload expansion, dropping of unmatched events, field filtering and
//    CPM rejection of a candidate;
//  - line rate: a stream of long events without hits enters at one flit per
//    cycle, apart from one extra cycle per event for the newline split.
module tb_rapiddetect_top;
  import rs_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic init_done;
  cfg_t cfg;
  byte_t [LANES-1:0] in_data;
  logic [LANES-1:0] in_keep;
  logic in_valid, in_ready, out_valid, out_ready, match_valid, match_ready;
  flit_t out_flit;
  logic [15:0] out_pid;
  match_t match;
  logic multi_nl_evt, nl_turn_evt, hc_stall_evt, expand_evt, drop_evt;

  rapiddetect_top dut (.*);

  string keys[NFIELDS] = '{"\"path\": \"", "\"cmdline\": \"", "\"user\": \"", ""};
  rule_t rules[$];

  typedef struct { byte_t b[$]; int m[$]; bit fwd; } ev_t;
  ev_t evs[$];
  byte_t raw[$];
  int got_m [int][$];
  byte_t got_b [int][$];
  int n_multi = 0, n_nlturn = 0, n_stall = 0, n_expand = 0, n_drop = 0;
  int field_rejects = 0, cpm_rejects = 0;
  bit free_run = 0;

  function automatic void add_rule(string fp, int field, string l0, string l1 = "");
    rule_t r;
    r.fp = fp; r.field = field;
    if (l0.len() > 0) r.lits.push_back(l0);
    if (l1.len() > 0) r.lits.push_back(l1);
    rules.push_back(r);
  endfunction

  function automatic int count_of(string s, string pat);
    int n = 0;
    for (int i = 0; i + pat.len() <= s.len(); i++) if (s.substr(i, i + pat.len() - 1) == pat) n++;
    return n;
  endfunction

  // one event: reference tags, candidates, fingerprint check
  function automatic void add_event(string s);
    ev_t e;
    int tags[$], cand[$];
    logic [FP_BITS-1:0] f;
    str_bytes(s, e.b);
    ref_tags(e.b, keys, tags);
    mspm_ref(e.b, tags, cand);
    f = cpm_fp_ref(e.b);
    foreach (cand[j]) begin
      if ((c_fp[cand[j]] & ~f) == '0) e.m.push_back(cand[j]);
      else cpm_rejects++;
    end
    e.m.sort();
    e.fwd = (e.m.size() > 0);
    field_rejects += count_of(s, "wget") - count_of(s, "\"cmdline\": \"wget");
    evs.push_back(e);
    foreach (e.b[j]) raw.push_back(e.b[j]);
    raw.push_back(8'h0A);
  endfunction

  string paths[5] = '{"/bin/sh", "/usr/bin/wget", "/usr/bin/curl", "/bin/chmod", "/usr/bin/python3"};
  string cmds[12] = '{"wget http://x.io/a", "wget ftp://y", "curl -o /tmp/a http://z", "curl x|sh",
                      "chmod 777 /tmp/x", "chmod +x a", "chmod 644 b", "echo aGk= | base64 -d",
                      "base64 f", "ls", "cat /etc/passwd", ""};
  string users[3] = '{"root", "wget", "www"};

  initial begin
    automatic string aaa = "";
    for (int i = 0; i < 150; i++) aaa = {aaa, "a"};
    cmds[11] = aaa;
    add_rule("wget", 2, "http");
    add_rule("/bin/sh", 1, "");
    add_rule("chmod", 0, "777");
    add_rule("chmod", 0, "+x");
    add_rule("base64", 2, "-d");
    add_rule("curl", 2, "|sh");
    add_rule("curl", 2, "-o");
    add_rule("curl", 2, "http");
    add_rule("aa", 0, "zz", "ls");
    load_rules(rules, keys);
    for (int n = 0; n < 60; n++) begin
      if (n % 9 == 4) begin
        add_event("{}"); add_event("{\"a\":1}"); add_event("");
      end
      add_event($sformatf("{\"event_id\": \"%0d\", \"path\": \"%s\", \"cmdline\": \"%s\", \"user\": \"%s\"}",
                          n, paths[$urandom_range(0, 4)], cmds[(n % 12 == 11) ? 9 : $urandom_range(0, 11)],
                          users[$urandom_range(0, 2)]));
    end
    add_event({"{\"cmdline\": \"", aaa, " zz ls\"}"});
  end

  // ---- driving ----
  int phase = 1;
  int in_cnt = 0;
  always @(negedge clk) begin
    automatic bit go = rst_n && init_done && cfg_q.size() == 0 && raw.size() > 0 &&
                       (free_run || $urandom_range(0, 5) != 0);
    if (go) begin
      for (int i = 0; i < LANES; i++) begin
        in_data[i] <= (i < raw.size()) ? raw[i] : 8'h00;
        in_keep[i] <= (i < raw.size());
      end
    end
    in_valid    <= go;
    out_ready   <= free_run || ($urandom_range(0, 3) != 0);
    match_ready <= free_run || ($urandom_range(0, 3) != 0);
    cfg.we      <= 1'b0;
    if (rst_n && init_done && cfg_q.size() > 0) cfg <= cfg_q.pop_front();
  end

  always @(posedge clk) begin
    if (rst_n && in_valid && in_ready) begin
      for (int i = 0; i < LANES && raw.size() > 0; i++) void'(raw.pop_front());
      in_cnt++;
    end
    if (rst_n) begin
      n_multi  += multi_nl_evt;
      n_nlturn += nl_turn_evt;
      n_stall  += hc_stall_evt;
      n_expand += expand_evt;
      n_drop   += drop_evt;
    end
    if (rst_n && match_valid && match_ready) got_m[int'(match.pid)].push_back(int'(match.rule));
    if (rst_n && out_valid && out_ready)
      for (int i = 0; i < LANES; i++) if (out_flit.keep[i]) got_b[int'(out_pid)].push_back(out_flit.data[i]);
  end

  task automatic check_events(int first, int last);
    for (int p = first; p < last; p++) begin
      automatic int gm[$];
      if (got_m.exists(p)) gm = got_m[p];
      gm.sort();
      checks++;
      if (gm != evs[p].m) begin
        failures++;
        $display("event %0d matches %p expected %p", p, gm, evs[p].m);
      end
      checks++;
      if (evs[p].fwd != got_b.exists(p) || (evs[p].fwd && got_b[p] != evs[p].b)) begin
        failures++;
        $display("event %0d forwarded %0d expected %0d", p, got_b.exists(p), evs[p].fwd);
      end
    end
  endtask

  int t_start, t_end, n0, fl0;
  initial begin
    cfg = '0;
    in_valid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (init_done);
    // phase 1: rule-set traffic with random stalls
    wait (raw.size() == 0);
    repeat (400) @(posedge clk);
    check_events(0, evs.size());
    $display("events=%0d multi_nl=%0d nl_turn=%0d hc_stall=%0d expand=%0d drop=%0d field_rej=%0d cpm_rej=%0d",
             evs.size(), n_multi, n_nlturn, n_stall, n_expand, n_drop, field_rejects, cpm_rejects);
    checks += 7;
    if (n_multi == 0)       begin failures++; $display("no flit with several newlines"); end
    if (n_nlturn == 0)      begin failures++; $display("newline stream never used"); end
    if (n_stall == 0)       begin failures++; $display("hash check never stalled"); end
    if (n_expand == 0)      begin failures++; $display("no overload expansion"); end
    if (n_drop == 0)        begin failures++; $display("no event dropped"); end
    if (field_rejects == 0) begin failures++; $display("no field-filtered hit"); end
    if (cpm_rejects == 0)   begin failures++; $display("no CPM rejection"); end
    // phase 2: line rate with long hit-free events
    n0 = evs.size();
    for (int n = 0; n < 24; n++) begin
      automatic string s = $sformatf("{\"event_id\": \"r%0d\", \"note\": \"", n);
      for (int k = 0; k < 40; k++) s = {s, "xyz-0123 "};
      add_event({s, "\"}"});
    end
    fl0 = in_cnt;
    free_run = 1;
    wait (in_valid);
    t_start = int'($time);
    wait (raw.size() == 0);
    t_end = int'($time);
    repeat (400) @(posedge clk);
    check_events(n0, evs.size());
    checks++;
    $display("rate: %0d flits in %0d cycles, %0d events", in_cnt - fl0, (t_end - t_start) / 10, evs.size() - n0);
    if ((t_end - t_start) / 10 > (in_cnt - fl0) + (evs.size() - n0) + 4) begin
      failures++;
      $display("input slower than one flit per cycle plus one cycle per event");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
