// fp_lookup: reads, for each candidate rule from the MSPM, the fingerprint
// of the literals that rule requires (its conjunction).
//
// The table holds one FP_BITS-wide mask per rule id, the OR of fp_index() of
// each of the rule's CPM literals. It is cleared by a sweep of 2**RULE_W
// cycles after reset and written through the configuration port. End marks
// pass through. The lookup stage follows the published design; the table
// format is this design's own. Timing: one register stage, valid/ready.
module fp_lookup
  import rs_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  output logic               init_done,
  input  logic               cfg_we,
  input  logic [RULE_W-1:0]  cfg_addr,
  input  logic [FP_BITS-1:0] cfg_fp,
  input  rtok_t              in_tok,
  input  logic               in_valid,
  output logic               in_ready,
  output ftok_t              out_tok,
  output logic               out_valid,
  input  logic               out_ready
);
  logic [FP_BITS-1:0] tbl [2**RULE_W];
  logic [RULE_W:0]    sweep;

  assign init_done = sweep[RULE_W];
  assign in_ready  = init_done && (!out_valid || out_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sweep     <= '0;
      out_valid <= 1'b0;
    end else begin
      if (!init_done) sweep <= sweep + 1'b1;
      if (in_ready) out_valid <= in_valid;
    end
  end

  always_ff @(posedge clk) begin
    if (!init_done)  tbl[sweep[RULE_W-1:0]] <= '0;
    else if (cfg_we) tbl[cfg_addr] <= cfg_fp;
    if (in_valid && in_ready)
      out_tok <= '{hit: in_tok.hit, last: in_tok.last, rule: in_tok.rule,
                   fp: tbl[in_tok.rule]};
  end
endmodule
