// fp_compare: the CPM's final check. A candidate rule of a packet passes
// when every fingerprint bit the rule requires is set in the packet's
// fingerprint: (rule_fp & ~packet_fp) == 0.
//
// Inputs are the candidate stream (rules with their fingerprints, one end
// mark per packet, packets in order) and the packet fingerprint stream (one
// entry per packet, same order). A candidate waits until its packet's
// fingerprint is present. Each passing rule is written to the match output
// with the packet number; at the packet's end mark the verdict (did any rule
// pass) is written and the packet fingerprint is consumed. Packet numbers
// count from 0 after reset. The comparison follows the published design;
// the outputs and the ordering by end marks are this design's own.
// Timing: combinational from the input heads, valid/ready.
module fp_compare
  import rs_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  ftok_t              cand_tok,
  input  logic               cand_valid,
  output logic               cand_ready,
  input  logic [FP_BITS-1:0] pkt_fp,
  input  logic               pkt_valid,
  output logic               pkt_ready,
  output match_t             match,
  output logic               match_valid,
  input  logic               match_ready,
  output verdict_t           verdict,
  output logic               verdict_valid,
  input  logic               verdict_ready
);
  logic [15:0] pid;
  logic        any;    // a rule of this packet has passed
  logic        pass, go;

  always_comb begin
    pass          = cand_tok.hit && ((cand_tok.fp & ~pkt_fp) == '0);
    match         = '{pid: pid, rule: cand_tok.rule};
    verdict       = '{pid: pid, matched: any || pass};
    go            = cand_valid && pkt_valid &&
                    (!pass || match_ready) && (!cand_tok.last || verdict_ready);
    match_valid   = cand_valid && pkt_valid && pass &&
                    (!cand_tok.last || verdict_ready);
    verdict_valid = cand_valid && pkt_valid && cand_tok.last &&
                    (!pass || match_ready);
    cand_ready    = go;
    pkt_ready     = go && cand_tok.last;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pid <= '0;
      any <= 1'b0;
    end else if (go) begin
      if (cand_tok.last) begin
        pid <= pid + 1'b1;
        any <= 1'b0;
      end else if (pass) begin
        any <= 1'b1;
      end
    end
  end
endmodule
