// tb_source_split: random flits with 0..4 newlines in random lanes, random
// back-pressure on both outputs. A byte-level reference cuts each flit into
// events and predicts every regular and newline-stream flit (keep mask, sop,
// eop, split); both output streams are compared in order.
module tb_source_split;
  import rs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, stalls = 0;

  flit_t in_flit, reg_flit, nl_flit;
  logic  in_valid, in_ready, reg_split, reg_valid, reg_ready, nl_valid, nl_ready, mstall;

  source_split dut (.*, .multi_nl_stall(mstall));

  typedef struct { logic [LANES-1:0] keep; bit sop, eop, split; byte_t d0; } exp_t;
  exp_t eq_reg[$], eq_nl[$];
  flit_t stim[$];

  task automatic model(flit_t f, ref bit start);
    int nls[$];
    int lo;
    for (int i = 0; i < LANES; i++) if (f.data[i] == 8'h0A) nls.push_back(i);
    lo = 0;
    if (nls.size() == 0) begin
      eq_reg.push_back('{keep: f.keep, sop: start, eop: 0, split: 0, d0: f.data[0]});
      start = 0;
      return;
    end
    for (int j = 0; j < nls.size(); j++) begin
      logic [LANES-1:0] k = '0;
      bit last = (j == nls.size() - 1);
      bit rest = last && nls[j] < LANES - 1;
      for (int i = lo; i < nls[j]; i++) k[i] = 1;
      eq_reg.push_back('{keep: k, sop: start, eop: 1, split: rest, d0: f.data[0]});
      start = 1;
      lo = nls[j] + 1;
      if (rest) begin
        k = '0;
        for (int i = lo; i < LANES; i++) k[i] = 1;
        eq_nl.push_back('{keep: k, sop: 1, eop: 0, split: 0, d0: f.data[0]});
        start = 0;
      end
    end
  endtask

  initial begin
    bit start = 1;
    for (int n = 0; n < 300; n++) begin
      automatic flit_t f = '0;
      automatic int k = $urandom_range(0, 4);
      if (n % 7 == 0) k = 0;
      for (int i = 0; i < LANES; i++) f.data[i] = byte_t'($urandom_range(32, 126));
      f.data[0] = byte_t'(n);
      if (f.data[0] == 8'h0A) f.data[0] = 8'h0B;
      for (int j = 0; j < k; j++) f.data[$urandom_range(1, LANES - 1)] = 8'h0A;
      if (n == 5) f.data[LANES-1] = 8'h0A;
      if (n == 9) f.data[0] = 8'h0A;
      f.keep = '1;
      stim.push_back(f);
      model(f, start);
    end
  end

  initial begin
    in_valid = 0; reg_ready = 0; nl_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
  end

  // inputs change on the falling edge, handshakes are taken on the rising edge
  always @(negedge clk) begin
    in_valid  <= rst_n && stim.size() > 0;
    if (stim.size() > 0) in_flit <= stim[0];
    reg_ready <= ($urandom_range(0, 3) != 0);
    nl_ready  <= ($urandom_range(0, 3) != 0);
  end

  always @(posedge clk) begin
    if (rst_n && in_valid && in_ready) void'(stim.pop_front());
    if (mstall) stalls++;
    if (rst_n && reg_valid && reg_ready) begin
      automatic exp_t e = eq_reg.pop_front();
      checks++;
      if (reg_flit.keep != e.keep || reg_flit.sop != e.sop || reg_flit.eop != e.eop ||
          reg_split != e.split || reg_flit.data[0] != e.d0) begin
        failures++;
        $display("reg mismatch keep=%h/%h sop=%b/%b eop=%b/%b split=%b/%b", reg_flit.keep, e.keep,
                 reg_flit.sop, e.sop, reg_flit.eop, e.eop, reg_split, e.split);
      end
    end
    if (rst_n && nl_valid && nl_ready) begin
      automatic exp_t e = eq_nl.pop_front();
      checks++;
      if (nl_flit.keep != e.keep || !nl_flit.sop || nl_flit.eop || nl_flit.data[0] != e.d0) begin
        failures++;
        $display("nl mismatch keep=%h/%h", nl_flit.keep, e.keep);
      end
    end
  end

  initial begin
    wait (rst_n);
    wait (stim.size() == 0 && eq_reg.size() == 0 && eq_nl.size() == 0);
    repeat (2) @(posedge clk);
    checks++;
    if (stalls == 0) begin failures++; $display("multi-newline stall never seen"); end
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
