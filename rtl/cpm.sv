// cpm: conjunct pattern matcher. Checks, for each candidate rule the MSPM
// reports in a packet, that the packet also holds the rule's other literals.
//
// Structure (after the published pipeline figure): a second hash check scans
// the data stream for all CPM literals; fingerprint accumulate ORs their
// fingerprint bits per packet; in parallel, FP lookup reads each candidate
// rule's required fingerprint; fingerprint compare passes a rule when all its
// bits are present. Like a Bloom filter this can pass a rule wrongly but
// never rejects a rule whose literals are all present; the host's full
// matcher settles the rest. Finished packet fingerprints wait in a FIFO of
// FPQ_DEPTH entries for their candidates. Outputs: the data stream, rule
// matches and one verdict per packet.
// Configuration: writes with target CFG_CPM_HASH and CFG_CPM_FP.
module cpm
  import rs_pkg::*;
#(
  parameter int FPQ_DEPTH = 16
) (
  input  logic     clk,
  input  logic     rst_n,
  output logic     init_done,
  input  cfg_t     cfg,
  input  flit_t    in_flit,
  input  logic     in_valid,
  output logic     in_ready,
  input  rtok_t    cand_tok,
  input  logic     cand_valid,
  output logic     cand_ready,
  output flit_t    data_flit,
  output logic     data_valid,
  input  logic     data_ready,
  output match_t   match,
  output logic     match_valid,
  input  logic     match_ready,
  output verdict_t verdict,
  output logic     verdict_valid,
  input  logic     verdict_ready
);
  flit_t                         hc_flit;
  logic [NTABLES-1:0][LANES-1:0] hc_hit;
  logic [NTABLES-1:0][LANES-1:0][HASH_BITS-1:0] hc_hash;
  logic                          hc_valid, hc_ready, hc_init, fl_init;

  hash_check u_hash (
    .clk, .rst_n, .init_done(hc_init),
    .cfg_we(cfg.we && cfg.target == CFG_CPM_HASH),
    .cfg_table(cfg.table_id), .cfg_addr(cfg.addr[HASH_BITS-1:0]),
    .cfg_entry(htab_entry_t'(cfg.data[$bits(htab_entry_t)-1:0])),
    .in_flit, .in_valid, .in_ready,
    .out_flit(hc_flit), .out_hit(hc_hit), .out_hash(hc_hash),
    .out_valid(hc_valid), .out_ready(hc_ready)
  );

  logic [FP_BITS-1:0] acc_fp, q_fp;
  logic               acc_fp_valid, acc_fp_ready, q_valid, q_ready;

  fp_accumulate u_acc (
    .clk, .rst_n,
    .in_flit(hc_flit), .in_hit(hc_hit), .in_hash(hc_hash),
    .in_valid(hc_valid), .in_ready(hc_ready),
    .data_flit, .data_valid, .data_ready,
    .fp(acc_fp), .fp_valid(acc_fp_valid), .fp_ready(acc_fp_ready)
  );

  stream_fifo #(.W(FP_BITS), .DEPTH(FPQ_DEPTH)) u_fpq (
    .clk, .rst_n,
    .in_data(acc_fp), .in_valid(acc_fp_valid), .in_ready(acc_fp_ready),
    .out_data(q_fp), .out_valid(q_valid), .out_ready(q_ready)
  );

  ftok_t l_tok;
  logic  l_valid, l_ready;

  fp_lookup u_look (
    .clk, .rst_n, .init_done(fl_init),
    .cfg_we(cfg.we && cfg.target == CFG_CPM_FP),
    .cfg_addr(cfg.addr[RULE_W-1:0]), .cfg_fp(cfg.data),
    .in_tok(cand_tok), .in_valid(cand_valid), .in_ready(cand_ready),
    .out_tok(l_tok), .out_valid(l_valid), .out_ready(l_ready)
  );

  fp_compare u_cmp (
    .clk, .rst_n,
    .cand_tok(l_tok), .cand_valid(l_valid), .cand_ready(l_ready),
    .pkt_fp(q_fp), .pkt_valid(q_valid), .pkt_ready(q_ready),
    .match, .match_valid, .match_ready,
    .verdict, .verdict_valid, .verdict_ready
  );

  assign init_done = hc_init && fl_init;
endmodule
