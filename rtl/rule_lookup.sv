// rule_lookup: maps a compacted hash-table hit to the rule it belongs to.
//
// One per hash table, after that table's compactor. Indexed by the hit's
// hash, the rule table returns a rule id, or, for a fast pattern shared by
// several rules (overload=1), a pointer into the expansion table and the
// number of rules. A hit on an invalid entry is dropped (its end mark, if
// any, is kept). End marks pass through in order. The table is cleared by a
// sweep of 2**HASH_BITS cycles after reset and written through the
// configuration port. The block's place in the pipeline follows the
// published design; the entry format is this design's own.
// Timing: one register stage, valid/ready, one token per cycle.
module rule_lookup
  import rs_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  output logic                 init_done,
  input  logic                 cfg_we,
  input  logic [HASH_BITS-1:0] cfg_addr,
  input  rtab_entry_t          cfg_entry,
  input  mtok_t                in_tok,
  input  logic                 in_valid,
  output logic                 in_ready,
  output ctok_t                out_tok,
  output logic                 out_valid,
  input  logic                 out_ready
);
  rtab_entry_t        tbl [2**HASH_BITS];
  logic [HASH_BITS:0] sweep;
  rtab_entry_t        e;
  logic               keep_hit;

  assign init_done = sweep[HASH_BITS];
  assign in_ready  = init_done && (!out_valid || out_ready);
  assign e         = tbl[in_tok.hash];
  assign keep_hit  = in_tok.hit && e.valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sweep     <= '0;
      out_valid <= 1'b0;
    end else begin
      if (!init_done) sweep <= sweep + 1'b1;
      if (in_ready) out_valid <= in_valid && (keep_hit || in_tok.last);
    end
  end

  always_ff @(posedge clk) begin
    if (!init_done)  tbl[sweep[HASH_BITS-1:0]] <= '0;
    else if (cfg_we) tbl[cfg_addr] <= cfg_entry;
    if (in_valid && in_ready) begin
      out_tok.hit      <= keep_hit;
      out_tok.last     <= in_tok.last;
      out_tok.overload <= e.overload;
      out_tok.rule     <= e.rule;
      out_tok.count    <= e.count;
    end
  end
endmodule
