// tb_source_merge: feeds numbered flits on the regular stream (some marked
// split) and on the newline stream, with random valid gaps and random output
// back-pressure. Every split regular flit must be followed directly by the
// next newline-stream flit, everything else in regular order; one flit per
// cycle must come out when both inputs are full and the output is ready.
module tb_source_merge;
  import rs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, nl_turns = 0;

  flit_t reg_flit, nl_flit, out_flit;
  logic  reg_split, reg_valid, reg_ready, nl_valid, nl_ready, out_valid, out_ready, nl_turn;

  source_merge dut (.*);

  typedef struct { byte_t id; bit split; } item_t;
  item_t rq[$];
  byte_t nq[$], exp_q[$];
  bit    full_rate;
  int    busy_cycles, out_cycles;

  initial begin
    for (int n = 0; n < 200; n++) begin
      automatic bit sp = ($urandom_range(0, 2) == 0);
      rq.push_back('{id: byte_t'(n), split: sp});
      exp_q.push_back(byte_t'(n));
      if (sp) begin
        nq.push_back(byte_t'(n + 128));
        exp_q.push_back(byte_t'(n + 128));
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
  end

  always @(negedge clk) begin
    full_rate = ($time > 2000);
    reg_valid <= rst_n && rq.size() > 0 && (full_rate || $urandom_range(0, 3) != 0);
    nl_valid  <= rst_n && nq.size() > 0 && (full_rate || $urandom_range(0, 3) != 0);
    if (rq.size() > 0) begin
      reg_flit <= '0;
      reg_flit.data[0] <= rq[0].id;
      reg_split <= rq[0].split;
    end
    if (nq.size() > 0) begin
      nl_flit <= '0;
      nl_flit.data[0] <= nq[0];
    end
    out_ready <= full_rate || ($urandom_range(0, 3) != 0);
  end

  always @(posedge clk) begin
    if (rst_n && reg_valid && reg_ready) void'(rq.pop_front());
    if (rst_n && nl_valid && nl_ready) void'(nq.pop_front());
    if (nl_turn && out_valid && out_ready) nl_turns++;
    if (full_rate && rq.size() > 1 && nq.size() > 1) begin
      busy_cycles++;
      if (out_valid) out_cycles++;
    end
    if (rst_n && out_valid && out_ready) begin
      automatic byte_t e = exp_q.pop_front();
      checks++;
      if (out_flit.data[0] != e) begin
        failures++;
        $display("order mismatch got %0d exp %0d", out_flit.data[0], e);
      end
    end
  end

  initial begin
    wait (rst_n);
    wait (exp_q.size() == 0);
    repeat (2) @(posedge clk);
    checks += 2;
    if (nl_turns == 0) begin failures++; $display("newline stream never served"); end
    if (out_cycles != busy_cycles) begin
      failures++;
      $display("rate: %0d flits in %0d cycles", out_cycles, busy_cycles);
    end
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
