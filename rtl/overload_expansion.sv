// overload_expansion: resolves fast patterns that several rules share.
//
// A candidate whose rule-table entry is not overloaded goes to the fast
// path FIFO and on to the output. An overloaded candidate carries a pointer
// and a count; it goes to the slow path, where an expander reads the
// expansion table and emits one rule id per cycle, count rules in all. The
// output takes the fast path first and the slow path when the fast path is
// empty, so shared patterns do not hold up the others. Packet order is kept
// at end marks: an end-marked token is dispatched only after the slow path
// has drained (an end-marked overloaded token carries its mark on its last
// expanded rule), and nothing is dispatched while such a token is in the
// slow path. The expansion table is cleared by a sweep after reset and
// written through the configuration port.
// The fast/slow split follows the published design; the FIFO depths, the
// table format and the ordering rule are this design's own.
// Timing: valid/ready throughout; fast-path latency 2 cycles.
module overload_expansion
  import rs_pkg::*;
#(
  parameter int EXP_BITS   = 12,  // expansion-table entries = 2**EXP_BITS
  parameter int FAST_DEPTH = 4,
  parameter int SLOW_DEPTH = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  output logic                init_done,
  input  logic                cfg_we,
  input  logic [EXP_BITS-1:0] cfg_addr,
  input  logic [RULE_W-1:0]   cfg_rule,
  input  ctok_t               in_tok,
  input  logic                in_valid,
  output logic                in_ready,
  output rtok_t               out_tok,
  output logic                out_valid,
  input  logic                out_ready,
  output logic                expanding      // slow path busy this cycle
);
  logic [RULE_W-1:0] tbl [2**EXP_BITS];
  logic [EXP_BITS:0] sweep;
  assign init_done = sweep[EXP_BITS];

  // fast path
  rtok_t f_in, f_out;
  logic  f_in_valid, f_in_ready, f_out_valid, f_out_ready;
  // slow path queue
  ctok_t s_in, s_out;
  logic  s_in_valid, s_in_ready, s_out_valid, s_out_ready;
  // expander
  logic              x_busy, x_last;
  logic [RULE_W-1:0] x_ptr;
  logic [CNT_W-1:0]  x_left;
  logic              slow_has_last;
  logic              slow_empty;
  rtok_t             x_tok;
  logic              x_fire;

  assign slow_empty = !s_out_valid && !x_busy;

  always_comb begin
    f_in       = '{hit: in_tok.hit, last: in_tok.last, rule: in_tok.rule};
    s_in       = in_tok;
    f_in_valid = 1'b0;
    s_in_valid = 1'b0;
    in_ready   = 1'b0;
    if (init_done && in_valid && !slow_has_last) begin
      if (in_tok.hit && in_tok.overload) begin
        s_in_valid = !in_tok.last || slow_empty;
        in_ready   = s_in_ready && s_in_valid;
      end else if (!in_tok.last || slow_empty) begin
        f_in_valid = 1'b1;
        in_ready   = f_in_ready;
      end
    end
  end

  stream_fifo #(.W($bits(rtok_t)), .DEPTH(FAST_DEPTH)) u_fast (
    .clk, .rst_n,
    .in_data(f_in), .in_valid(f_in_valid), .in_ready(f_in_ready),
    .out_data(f_out), .out_valid(f_out_valid), .out_ready(f_out_ready)
  );

  stream_fifo #(.W($bits(ctok_t)), .DEPTH(SLOW_DEPTH)) u_slow (
    .clk, .rst_n,
    .in_data(s_in), .in_valid(s_in_valid), .in_ready(s_in_ready),
    .out_data(s_out), .out_valid(s_out_valid), .out_ready(s_out_ready)
  );

  // expander: loads a slow token when idle, then emits one rule per cycle
  assign s_out_ready = !x_busy;
  always_comb begin
    x_tok.hit  = 1'b1;
    x_tok.rule = tbl[EXP_BITS'(x_ptr)];
    x_tok.last = x_last && (x_left == CNT_W'(1));
  end

  // output arbitration: fast path first
  always_comb begin
    f_out_ready = 1'b0;
    x_fire      = 1'b0;
    if (f_out_valid) begin
      out_tok     = f_out;
      out_valid   = 1'b1;
      f_out_ready = out_ready;
    end else begin
      out_tok   = x_tok;
      out_valid = x_busy;
      x_fire    = x_busy && out_ready;
    end
  end
  assign expanding = x_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sweep         <= '0;
      x_busy        <= 1'b0;
      x_ptr         <= '0;
      x_left        <= '0;
      x_last        <= 1'b0;
      slow_has_last <= 1'b0;
    end else begin
      if (!init_done) sweep <= sweep + 1'b1;
      if (s_in_valid && s_in_ready && in_tok.last) slow_has_last <= 1'b1;
      if (!x_busy && s_out_valid) begin
        x_busy <= (s_out.count != '0);
        x_ptr  <= s_out.rule;
        x_left <= s_out.count;
        x_last <= s_out.last;
        if (s_out.count == '0 && s_out.last) slow_has_last <= 1'b0;
      end else if (x_fire) begin
        x_ptr  <= x_ptr + 1'b1;
        x_left <= x_left - 1'b1;
        if (x_left == CNT_W'(1)) begin
          x_busy <= 1'b0;
          if (x_last) slow_has_last <= 1'b0;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!init_done)  tbl[sweep[EXP_BITS-1:0]] <= '0;
    else if (cfg_we) tbl[cfg_addr] <= cfg_rule;
  end
endmodule
