// compact_2to1: one node of the compaction tree. Merges two sparse token
// streams into one denser stream, one token per cycle, behind a 2-entry
// output buffer (the buffer between tree stages).
//
// Token layout: {hit, last, payload[PW]}. hit marks a real element; last
// marks the end of a packet. Both inputs carry one end mark per packet, so
// the node keeps packets in order: hits that are not end-marked are taken
// from either side, round-robin; a side whose head is end-marked waits for
// the other side to reach its end mark too. Then the remaining hits of the
// two heads are sent and a single end mark is sent (combined with the last
// hit when possible), so one end mark per packet comes out.
// The 2-to-1 stage with buffers follows the published compaction tree; the
// end-mark rule that keeps packets in order is this design's own.
module compact_2to1 #(
  parameter int PW = 12
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [PW+1:0] a_tok,
  input  logic          a_valid,
  output logic          a_ready,
  input  logic [PW+1:0] b_tok,
  input  logic          b_valid,
  output logic          b_ready,
  output logic [PW+1:0] out_tok,
  output logic          out_valid,
  input  logic          out_ready
);
  localparam int HIT = PW + 1;
  localparam int LST = PW;

  logic          rr;        // 1: b has priority among plain hits
  logic          a_sent;    // hit of the end-marked head of a already sent
  logic [PW+1:0] m_tok;
  logic          m_valid, m_ready;
  logic          pick_a, pick_b, end_pair;
  logic          a_hit, b_hit;

  always_comb begin
    logic ea, eb;
    ea = a_valid && !a_tok[LST];
    eb = b_valid && !b_tok[LST];
    a_hit = a_tok[HIT] && !a_sent;
    b_hit = b_tok[HIT];
    pick_a   = ea && (!eb || !rr);
    pick_b   = eb && !pick_a;
    end_pair = !ea && !eb && a_valid && b_valid;
    m_valid  = pick_a || pick_b || end_pair;
    m_tok    = '0;
    a_ready  = 1'b0;
    b_ready  = 1'b0;
    if (pick_a) begin
      m_tok   = a_tok;
      a_ready = m_ready;
    end else if (pick_b) begin
      m_tok   = b_tok;
      b_ready = m_ready;
    end else if (end_pair) begin
      if (a_hit && b_hit) begin
        m_tok = {1'b1, 1'b0, a_tok[PW-1:0]};        // a's hit first, keep heads
      end else begin
        if (a_hit)      m_tok = {1'b1, 1'b1, a_tok[PW-1:0]};
        else if (b_hit) m_tok = {1'b1, 1'b1, b_tok[PW-1:0]};
        else            m_tok = {1'b0, 1'b1, {PW{1'b0}}};
        a_ready = m_ready;
        b_ready = m_ready;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr     <= 1'b0;
      a_sent <= 1'b0;
    end else if (m_valid && m_ready) begin
      if (pick_a) rr <= 1'b1;
      if (pick_b) rr <= 1'b0;
      if (end_pair) a_sent <= a_hit && b_hit;
    end
  end

  stream_fifo #(.W(PW + 2), .DEPTH(2)) u_buf (
    .clk, .rst_n,
    .in_data(m_tok), .in_valid(m_valid), .in_ready(m_ready),
    .out_data(out_tok), .out_valid, .out_ready
  );
endmodule
