// tb_compact_2to1: two random token streams into one 2-to-1 compaction node.
// Each input carries, per packet, a random number of hits (payload = input
// number and packet number) and one end mark, sometimes on its last hit.
// Inputs are sparse and randomly delayed, the output is randomly stalled.
// Check: between consecutive output end marks exactly the hits of one
// packet appear, in packet order, and every packet has one end mark.
module tb_compact_2to1;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int N = 2;
  localparam int PW = 12;
  localparam int NPKT = 300;
  int checks = 0, failures = 0, cycles = 0, combined = 0;

  logic [N-1:0][PW+1:0] in_tok;
  logic [N-1:0]         in_valid, in_ready;
  logic [PW+1:0] out_tok;
  logic          out_valid, out_ready;

  compact_2to1 #(.PW(PW)) dut (
    .clk, .rst_n,
    .a_tok(in_tok[0]), .a_valid(in_valid[0]), .a_ready(in_ready[0]),
    .b_tok(in_tok[1]), .b_valid(in_valid[1]), .b_ready(in_ready[1]),
    .out_tok, .out_valid, .out_ready);

  logic [PW+1:0] q [N][$];
  int            expq [NPKT][$];
  int            got[$];
  int            pkt = 0;

  initial begin
    for (int i = 0; i < N; i++)
      for (int p = 0; p < NPKT; p++) begin
        automatic int nh = ($urandom_range(0, 1) == 0) ? $urandom_range(1, 3) : 0;
        automatic bit ended = 0;
        for (int h = 0; h < nh; h++) begin
          automatic int pay = (i * NPKT + p) * 4 + h;
          automatic bit lst = (h == nh - 1) && $urandom_range(0, 1);
          q[i].push_back({1'b1, lst, PW'(pay)});
          expq[p].push_back(pay);
          if (lst) begin ended = 1; break; end
        end
        if (!ended) q[i].push_back({1'b0, 1'b1, PW'(0)});
      end
    for (int p = 0; p < NPKT; p++) expq[p].sort();
    repeat (3) @(posedge clk);
    rst_n = 1;
  end

  always @(negedge clk) begin
    for (int i = 0; i < N; i++) begin
      in_valid[i] <= rst_n && q[i].size() > 0 && ($urandom_range(0, 2) != 0);
      if (q[i].size() > 0) in_tok[i] <= q[i][0];
    end
    out_ready <= ($urandom_range(0, 4) != 0);
  end

  always @(posedge clk) begin
    if (rst_n) cycles++;
    for (int i = 0; i < N; i++) if (rst_n && in_valid[i] && in_ready[i]) void'(q[i].pop_front());
    if (rst_n && out_valid && out_ready) begin
      if (out_tok[PW+1]) got.push_back(int'(out_tok[PW-1:0]));
      if (out_tok[PW+1] && out_tok[PW]) combined++;
      if (out_tok[PW]) begin
        got.sort();
        checks++;
        if (pkt >= NPKT || got != expq[pkt]) begin
          failures++;
          $display("packet %0d: %0d hits, expected %0d", pkt, got.size(), (pkt < NPKT) ? expq[pkt].size() : -1);
          $display("  got %p exp %p", got, expq[pkt]);
        end
        got.delete();
        pkt++;
      end
    end
  end

  initial begin
    wait (rst_n);
    wait (pkt == NPKT);
    repeat (20) @(posedge clk);
    checks += 2;
    if (out_valid) begin failures++; $display("extra output"); end
    if (combined == 0) begin failures++; $display("no hit combined with an end mark"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog: packet %0d", pkt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
