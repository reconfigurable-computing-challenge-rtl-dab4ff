// tb_util_pkg: reference models shared by the testbenches. Everything here
// is written independently of the RTL: hashes and fingerprint indices are
// computed with integer arithmetic on the byte values.
package tb_util_pkg;
  import rs_pkg::*;

  // Reference substring hash: 12-bit rotate-left-by-5, then xor the byte.
  function automatic int unsigned ref_hash(byte_t b[$], int from, int len);
    int unsigned h = 0;
    for (int k = 0; k < len; k++) begin
      h = ((h << 5) | (h >> (HASH_BITS - 5))) & ((1 << HASH_BITS) - 1);
      h = h ^ int'(b[from + k]);
    end
    return h;
  endfunction

  function automatic int unsigned ref_fp_index(int t, int unsigned h);
    return ((h & 255) ^ (h >> 8) ^ ((t * 37) & 255)) & 255;
  endfunction

  // Bytes of a string, in order.
  function automatic void str_bytes(string s, ref byte_t q[$]);
    for (int i = 0; i < s.len(); i++) q.push_back(byte_t'(s[i]));
  endfunction

  // Field key slots for field_tagger: right-aligned bytes and compare mask.
  function automatic logic [8*KEYMAX+KEYMAX-1:0] key_cfg(string k);
    logic [8*KEYMAX-1:0] b = '0;
    logic [KEYMAX-1:0]   m = '0;
    for (int j = 0; j < k.len(); j++) begin
      b[8*(KEYMAX - k.len() + j) +: 8] = byte_t'(k[j]);
      m[KEYMAX - k.len() + j] = 1'b1;
    end
    return {m, b};
  endfunction

  // Reference field tagging of one whole packet, byte-serial.
  function automatic void ref_tags(byte_t b[$], string keys[NFIELDS], ref int tags[$]);
    int st = 0;
    tags.delete();
    for (int i = 0; i < b.size(); i++) begin
      int tg = 0;
      if (st != 0) begin
        if (b[i] == 8'h22) st = 0; else tg = st;
      end
      tags.push_back(tg);
      if (st == 0)
        for (int k = 0; k < NFIELDS; k++) begin
          int n = keys[k].len();
          bit m = (n > 0) && (i + 1 >= n);
          for (int j = 0; m && j < n; j++)
            if (b[i - n + 1 + j] != byte_t'(keys[k][j])) m = 0;
          if (m) begin st = k + 1; break; end
        end
    end
  endfunction

  // ---------------------------------------------------------------------
  // Rule-set model: a small Sigma-like rule set, the configuration writes
  // that load it, and table-level reference models of the MSPM and CPM.
  // ---------------------------------------------------------------------
  typedef struct { string fp; int field; string lits[$]; } rule_t;

  int unsigned m_htab [int];   // (t << HASH_BITS | h) -> field  (MSPM)
  int          m_rule [int];   // (t << HASH_BITS | h) -> index into m_list
  int          m_list [int][$];// rule lists per fast-pattern entry
  int unsigned c_htab [int];   // CPM literal table, field
  logic [FP_BITS-1:0] c_fp [int];  // rule -> required fingerprint
  cfg_t        cfg_q[$];

  function automatic int key(int t, int unsigned h);
    return (t << HASH_BITS) | int'(h);
  endfunction

  function automatic cfg_t mk_cfg(cfg_target_e tg, int tab, int addr, logic [FP_BITS-1:0] d);
    cfg_t c;
    c.we = 1'b1; c.target = tg; c.table_id = 3'(tab); c.addr = 16'(addr); c.data = d;
    return c;
  endfunction

  // Builds the tables for rules (rule id = index). Rules with the same fast
  // pattern and field share one overloaded entry.
  function automatic void load_rules(rule_t rules[$], string keys[NFIELDS]);
    int exp_next = 0;
    int groups[string][$];
    for (int k = 0; k < NFIELDS; k++) if (keys[k].len() > 0) begin
      logic [8*KEYMAX+KEYMAX-1:0] kc = key_cfg(keys[k]);
      cfg_q.push_back(mk_cfg(CFG_FIELD_KEY, 0, k, FP_BITS'(kc)));
    end
    for (int r = 0; r < rules.size(); r++)
      groups[$sformatf("%0d:%s", rules[r].field, rules[r].fp)].push_back(r);
    foreach (groups[g]) begin
      int r0 = groups[g][0];
      byte_t b[$];
      int t;
      int unsigned h;
      rtab_entry_t e;
      str_bytes(rules[r0].fp, b);
      t = b.size() - 1;
      h = ref_hash(b, 0, b.size());
      m_htab[key(t, h)] = rules[r0].field;
      m_list[key(t, h)] = groups[g];
      cfg_q.push_back(mk_cfg(CFG_MSPM_HASH, t, h, FP_BITS'({1'b1, field_t'(rules[r0].field)})));
      e.valid = 1;
      if (groups[g].size() == 1) begin
        e.overload = 0; e.rule = RULE_W'(r0); e.count = '0;
      end else begin
        e.overload = 1; e.rule = RULE_W'(exp_next); e.count = CNT_W'(groups[g].size());
        foreach (groups[g][j]) begin
          cfg_q.push_back(mk_cfg(CFG_MSPM_EXP, 0, exp_next, FP_BITS'(groups[g][j])));
          exp_next++;
        end
      end
      cfg_q.push_back(mk_cfg(CFG_MSPM_RULE, t, h, FP_BITS'(e)));
    end
    for (int r = 0; r < rules.size(); r++) begin
      logic [FP_BITS-1:0] f = '0;
      foreach (rules[r].lits[j]) begin
        byte_t b[$];
        int unsigned h;
        str_bytes(rules[r].lits[j], b);
        h = ref_hash(b, 0, b.size());
        c_htab[key(b.size() - 1, h)] = 0;
        cfg_q.push_back(mk_cfg(CFG_CPM_HASH, b.size() - 1, h, FP_BITS'({1'b1, field_t'(0)})));
        f[ref_fp_index(b.size() - 1, h)] = 1'b1;
      end
      c_fp[r] = f;
      cfg_q.push_back(mk_cfg(CFG_CPM_FP, 0, r, f));
    end
  endfunction

  // MSPM reference: candidate rules of one packet, one per fast-pattern hit.
  function automatic void mspm_ref(byte_t b[$], int tags[$], ref int cand[$]);
    cand.delete();
    for (int i = 0; i < b.size(); i++)
      for (int t = 0; t < NTABLES && t <= i; t++) begin
        int k = key(t, ref_hash(b, i - t, t + 1));
        if (m_htab.exists(k) && (m_htab[k] == 0 || m_htab[k] == tags[i]) && m_list.exists(k))
          foreach (m_list[k][j]) cand.push_back(m_list[k][j]);
      end
  endfunction

  // CPM reference fingerprint of one packet.
  function automatic logic [FP_BITS-1:0] cpm_fp_ref(byte_t b[$]);
    logic [FP_BITS-1:0] f = '0;
    for (int i = 0; i < b.size(); i++)
      for (int t = 0; t < NTABLES && t <= i; t++) begin
        int unsigned h = ref_hash(b, i - t, t + 1);
        if (c_htab.exists(key(t, h))) f[ref_fp_index(t, h)] = 1'b1;
      end
    return f;
  endfunction
endpackage
