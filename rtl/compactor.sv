// compactor: FANIN-to-1 compaction kernel. Densifies FANIN sparse token
// streams (at most one token per input per cycle, mostly empty) into one
// stream of up to one token per cycle.
//
// Built as a binary tree of compact_2to1 nodes, each with its own 2-entry
// buffer, so every level is one pipeline stage and the tree has
// log2(FANIN) stages. Nodes are numbered as a heap: node n merges nodes 2n
// and 2n+1, inputs are nodes FANIN..2*FANIN-1, the output is node 1.
// Inputs that are not ready back-pressure the producer. Each input carries
// one end mark per packet; the output then carries exactly one end mark per
// packet, after all hits of that packet. Token layout: {hit, last, payload}.
// The tree of 2-to-1 stages separated by buffers and the 64-to-1 size follow
// the published design; FANIN must be a power of two.
module compactor #(
  parameter int FANIN = 64,
  parameter int PW    = 12
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [FANIN-1:0][PW+1:0] in_tok,
  input  logic [FANIN-1:0]         in_valid,
  output logic [FANIN-1:0]         in_ready,
  output logic [PW+1:0]            out_tok,
  output logic                     out_valid,
  input  logic                     out_ready
);
  logic [PW+1:0] tok [1:2*FANIN-1];
  logic          vld [1:2*FANIN-1];
  logic          rdy [1:2*FANIN-1];

  for (genvar i = 0; i < FANIN; i++) begin : g_leaf
    assign tok[FANIN+i] = in_tok[i];
    assign vld[FANIN+i] = in_valid[i];
    assign in_ready[i]  = rdy[FANIN+i];
  end

  for (genvar n = 1; n < FANIN; n++) begin : g_node
    compact_2to1 #(.PW(PW)) u_node (
      .clk, .rst_n,
      .a_tok(tok[2*n]),   .a_valid(vld[2*n]),   .a_ready(rdy[2*n]),
      .b_tok(tok[2*n+1]), .b_valid(vld[2*n+1]), .b_ready(rdy[2*n+1]),
      .out_tok(tok[n]),   .out_valid(vld[n]),   .out_ready(rdy[n])
    );
  end

  assign out_tok   = tok[1];
  assign out_valid = vld[1];
  assign rdy[1]    = out_ready;
endmodule
