// mspm: multi-string pattern matcher. Scans every byte of the tagged log
// stream for the fast patterns of all rules and emits, per packet, the
// candidate rules whose fast pattern occurs, followed by an end mark.
//
// Structure (after the published pipeline figure): hash check at line rate
// -> one 64-to-1 compactor per hash table -> one rule lookup per table ->
// downshift (8 streams to 1) -> overload expansion. The hash check result of
// a flit is issued as NTABLES x LANES leaf tokens: a lane issues a token when
// it hits or when the flit ends a packet (end mark). The flit is released
// once every leaf token has been accepted; leaves accepted early are
// remembered, so a compactor that falls behind only stalls the MSPM input
// (hc_stall) while it catches up. The MSPM consumes the stream; the CPM gets
// its own copy (see rapiddetect_top).
// Configuration: writes with target CFG_MSPM_HASH / RULE / EXP.
module mspm
  import rs_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  output logic  init_done,
  input  cfg_t  cfg,
  input  flit_t in_flit,
  input  logic  in_valid,
  output logic  in_ready,
  output rtok_t cand_tok,      // candidate rules, one end mark per packet
  output logic  cand_valid,
  input  logic  cand_ready,
  output logic  hc_stall,      // hash-check result waiting on compactors
  output logic  expanding      // overload slow path busy
);
  localparam int CW = $bits(ctok_t) - 2;

  flit_t                               hc_flit;
  logic [NTABLES-1:0][LANES-1:0]       hc_hit;
  logic [NTABLES-1:0][LANES-1:0][HASH_BITS-1:0] hc_hash;
  logic                                hc_valid, hc_ready, hc_init;

  hash_check u_hash (
    .clk, .rst_n, .init_done(hc_init),
    .cfg_we(cfg.we && cfg.target == CFG_MSPM_HASH),
    .cfg_table(cfg.table_id), .cfg_addr(cfg.addr[HASH_BITS-1:0]),
    .cfg_entry(htab_entry_t'(cfg.data[$bits(htab_entry_t)-1:0])),
    .in_flit, .in_valid, .in_ready,
    .out_flit(hc_flit), .out_hit(hc_hit), .out_hash(hc_hash),
    .out_valid(hc_valid), .out_ready(hc_ready)
  );

  // leaf issue with per-leaf "already accepted" bits
  logic [NTABLES-1:0][LANES-1:0] done, lv, lr;
  mtok_t [NTABLES-1:0][LANES-1:0] ltok;
  logic  all_ok;

  always_comb begin
    for (int t = 0; t < NTABLES; t++)
      for (int i = 0; i < LANES; i++) begin
        ltok[t][i] = '{hit: hc_hit[t][i], last: hc_flit.eop, hash: hc_hash[t][i]};
        lv[t][i]   = hc_valid && !done[t][i] && (hc_hit[t][i] || hc_flit.eop);
      end
  end

  always_comb begin
    all_ok = ~|(lv & ~lr);
    hc_ready = all_ok;
    hc_stall = hc_valid && !all_ok;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done <= '0;
    end else if (hc_valid) begin
      if (hc_ready) done <= '0;
      else          done <= done | (lv & lr);
    end
  end

  // per-table compaction and rule lookup
  ctok_t [NTABLES-1:0] rl_tok;
  logic  [NTABLES-1:0] rl_valid, rl_ready, rl_init;

  for (genvar t = 0; t < NTABLES; t++) begin : g_tab
    logic [HASH_BITS+1:0] c_tok;
    logic                 c_valid, c_ready;

    compactor #(.FANIN(LANES), .PW(HASH_BITS)) u_cmp (
      .clk, .rst_n,
      .in_tok(ltok[t]), .in_valid(lv[t]), .in_ready(lr[t]),
      .out_tok(c_tok), .out_valid(c_valid), .out_ready(c_ready)
    );

    rule_lookup u_rule (
      .clk, .rst_n, .init_done(rl_init[t]),
      .cfg_we(cfg.we && cfg.target == CFG_MSPM_RULE && cfg.table_id == 3'(t)),
      .cfg_addr(cfg.addr[HASH_BITS-1:0]),
      .cfg_entry(rtab_entry_t'(cfg.data[$bits(rtab_entry_t)-1:0])),
      .in_tok(mtok_t'(c_tok)), .in_valid(c_valid), .in_ready(c_ready),
      .out_tok(rl_tok[t]), .out_valid(rl_valid[t]), .out_ready(rl_ready[t])
    );
  end

  ctok_t d_tok;
  logic  d_valid, d_ready, ox_init;

  downshift #(.N(NTABLES), .PW(CW)) u_down (
    .clk, .rst_n,
    .in_tok(rl_tok), .in_valid(rl_valid), .in_ready(rl_ready),
    .out_tok(d_tok), .out_valid(d_valid), .out_ready(d_ready)
  );

  overload_expansion u_ovl (
    .clk, .rst_n, .init_done(ox_init),
    .cfg_we(cfg.we && cfg.target == CFG_MSPM_EXP),
    .cfg_addr(cfg.addr[11:0]), .cfg_rule(cfg.data[RULE_W-1:0]),
    .in_tok(d_tok), .in_valid(d_valid), .in_ready(d_ready),
    .out_tok(cand_tok), .out_valid(cand_valid), .out_ready(cand_ready),
    .expanding
  );

  assign init_done = hc_init && (&rl_init) && ox_init;
endmodule
