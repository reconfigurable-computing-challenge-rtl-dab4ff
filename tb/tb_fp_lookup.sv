// tb_fp_lookup: writes random fingerprints for random rule ids, then sends
// candidates (hits and end marks) and checks that each comes out in order
// with its rule's fingerprint (zero for rules never written).
module tb_fp_lookup;
  import rs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic init_done, cfg_we, in_valid, in_ready, out_valid, out_ready;
  logic [RULE_W-1:0] cfg_addr;
  logic [FP_BITS-1:0] cfg_fp;
  rtok_t in_tok;
  ftok_t out_tok;

  fp_lookup dut (.*);

  logic [FP_BITS-1:0] model [int];
  rtok_t stim[$];
  ftok_t expq[$];

  initial begin
    cfg_we = 0; in_valid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (init_done);
    for (int n = 0; n < 40; n++) begin
      automatic int a = $urandom_range(0, 63);
      automatic logic [FP_BITS-1:0] v;
      for (int w = 0; w < FP_BITS / 32; w++) v[32*w +: 32] = $urandom;
      model[a] = v;
      @(negedge clk);
      cfg_we = 1; cfg_addr = RULE_W'(a); cfg_fp = v;
    end
    @(negedge clk) cfg_we = 0;
    for (int n = 0; n < 300; n++) begin
      automatic rtok_t t;
      t.rule = RULE_W'($urandom_range(0, 63));
      t.last = ($urandom_range(0, 3) == 0);
      t.hit  = !t.last || $urandom_range(0, 1);
      stim.push_back(t);
      expq.push_back('{hit: t.hit, last: t.last, rule: t.rule,
                       fp: model.exists(int'(t.rule)) ? model[int'(t.rule)] : '0});
    end
  end

  always @(negedge clk) begin
    in_valid  <= rst_n && init_done && !cfg_we && stim.size() > 0;
    if (stim.size() > 0) in_tok <= stim[0];
    out_ready <= ($urandom_range(0, 3) != 0);
  end

  always @(posedge clk) begin
    if (rst_n && in_valid && in_ready) void'(stim.pop_front());
    if (rst_n && out_valid && out_ready) begin
      automatic ftok_t e = expq.pop_front();
      checks++;
      if (out_tok != e) begin failures++; $display("rule %0d fp mismatch", out_tok.rule); end
    end
  end

  initial begin
    wait (rst_n);
    wait (init_done);
    repeat (60) @(posedge clk);
    wait (stim.size() == 0 && expq.size() == 0);
    repeat (2) @(posedge clk);
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
