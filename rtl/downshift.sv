// downshift: merges the N per-table candidate streams of the MSPM into the
// single stream that feeds overload expansion.
//
// Each input carries one end mark per packet. Tokens that are not
// end-marked are taken round-robin, one per cycle. When every input's head
// is end-marked, the hits those heads still carry are sent one per cycle and
// the last of them, or a bare end mark, carries the single end mark of the
// merged packet; then all heads are popped. Token layout:
// {hit, last, payload[PW]}. A flat N-way arbiter behind a 2-entry buffer.
// The block and its N-to-1 shape follow the published pipeline figure; its
// arbitration is this design's own.
module downshift #(
  parameter int N  = 8,
  parameter int PW = 17
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0][PW+1:0] in_tok,
  input  logic [N-1:0]         in_valid,
  output logic [N-1:0]         in_ready,
  output logic [PW+1:0]        out_tok,
  output logic                 out_valid,
  input  logic                 out_ready
);
  localparam int HIT = PW + 1;
  localparam int LST = PW;
  localparam int IW  = $clog2(N);

  logic [IW-1:0] rr;          // input with the highest priority
  logic [N-1:0]  sent;        // end-marked heads whose hit is already sent
  logic [N-1:0]  elig, pend;
  logic [PW+1:0] m_tok;
  logic          m_valid, m_ready, all_end, final_end;
  logic [IW-1:0] sel;
  logic          found;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      elig[i] = in_valid[i] && !in_tok[i][LST];
      pend[i] = in_valid[i] && in_tok[i][LST] && in_tok[i][HIT] && !sent[i];
    end
    all_end = &(in_valid & ~elig);
    found = 1'b0;
    sel   = '0;
    for (int k = 0; k < N; k++) begin
      logic [IW-1:0] j;
      j = IW'((int'(rr) + k) % N);
      if (!found && (|elig ? elig[j] : (all_end && pend[j]))) begin
        found = 1'b1;
        sel   = j;
      end
    end
    // last pending hit of an all-end-marked packet carries the end mark
    final_end = all_end && !(|elig) && ($countones(pend) <= 1);
    m_valid = |elig || all_end;
    in_ready = '0;
    if (|elig) begin
      m_tok = in_tok[sel];
      in_ready[sel] = m_ready;
    end else if (found) begin
      m_tok = {1'b1, final_end, in_tok[sel][PW-1:0]};
      if (final_end) in_ready = {N{m_ready}};
    end else begin
      m_tok = {1'b0, 1'b1, {PW{1'b0}}};
      in_ready = {N{m_ready && all_end}};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr   <= '0;
      sent <= '0;
    end else if (m_valid && m_ready) begin
      rr <= IW'((int'(sel) + 1) % N);
      if (!(|elig)) begin
        if (final_end)  sent <= '0;
        else if (found) sent[sel] <= 1'b1;
      end
    end
  end

  stream_fifo #(.W(PW + 2), .DEPTH(2)) u_buf (
    .clk, .rst_n,
    .in_data(m_tok), .in_valid(m_valid), .in_ready(m_ready),
    .out_data(out_tok), .out_valid, .out_ready
  );
endmodule
