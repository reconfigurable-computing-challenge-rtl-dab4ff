// tb_sink: events of 1..5 flits and their verdicts (verdicts delayed at
// random, some arriving long after their event). Only flits of matched
// events may come out, in order, each tagged with its packet number; the
// unmatched ones must be dropped.
module tb_sink;
  import rs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, drops = 0;

  flit_t in_flit, out_flit;
  verdict_t verdict;
  logic in_valid, in_ready, verdict_valid, verdict_ready, out_valid, out_ready, dropping;
  logic [15:0] out_pid;

  sink #(.DEPTH(8)) dut (.*);

  flit_t fq[$];
  verdict_t vq[$];
  typedef struct { byte_t id; int pid; } e_t;
  e_t eq[$];

  initial begin
    in_valid = 0; verdict_valid = 0;
    for (int p = 0; p < 100; p++) begin
      automatic int nf = $urandom_range(1, 5);
      automatic bit m = $urandom_range(0, 1);
      for (int f = 0; f < nf; f++) begin
        automatic flit_t x = '0;
        x.sop = (f == 0); x.eop = (f == nf - 1); x.keep = '1;
        x.data[0] = byte_t'(p * 5 + f);
        fq.push_back(x);
        if (m) eq.push_back('{id: x.data[0], pid: p});
      end
      vq.push_back('{pid: 16'(p), matched: m});
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
  end

  always @(negedge clk) begin
    in_valid <= rst_n && fq.size() > 0 && $urandom_range(0, 3) != 0;
    if (fq.size() > 0) in_flit <= fq[0];
    verdict_valid <= rst_n && vq.size() > 0 && $urandom_range(0, 4) == 0;
    if (vq.size() > 0) verdict <= vq[0];
    out_ready <= ($urandom_range(0, 3) != 0);
  end

  always @(posedge clk) begin
    if (rst_n && in_valid && in_ready) void'(fq.pop_front());
    if (rst_n && verdict_valid && verdict_ready) void'(vq.pop_front());
    if (rst_n && dropping) drops++;
    if (rst_n && out_valid && out_ready) begin
      automatic e_t e = eq.pop_front();
      checks++;
      if (out_flit.data[0] != e.id || int'(out_pid) != e.pid) begin
        failures++;
        $display("got flit %0d pid %0d exp %0d pid %0d", out_flit.data[0], out_pid, e.id, e.pid);
      end
    end
  end

  initial begin
    wait (rst_n);
    wait (fq.size() == 0 && vq.size() == 0 && eq.size() == 0);
    repeat (5) @(posedge clk);
    checks += 2;
    if (out_valid) begin failures++; $display("extra output"); end
    if (drops == 0) begin failures++; $display("nothing dropped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
