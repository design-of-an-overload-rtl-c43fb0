// oci_add_tree: sums K operands of W bits with a balanced tree of Brent-Kung
// adders, optionally followed by a pipeline register.
//
// This is the arithmetic core of the crossbar channel adder (K = M spread
// chips, one bit each, zero-extended to W) and of the parallel correlator of
// the P-OCI orthogonal decoder (K = N signed chip sums). The tree is laid out
// as a binary heap: node n adds nodes 2n+1 and 2n+2, leaves K-1..2K-2 carry
// the operands, node 0 is the result, so the depth is ceil(log2 K) adder
// levels. The result is taken modulo 2^W; the caller chooses W so that the
// true sum fits (unsigned or two's complement).
// Using Brent-Kung adders for these sums follows the OCI speed-up; the heap
// layout and the single output pipeline register are this design's choices.
//
// Timing: PIPE = 0 gives a combinational sum. PIPE = 1 registers the sum
// (one cycle latency), the optional pipeline stage that shortens the critical
// path of the pipelined crossbar variant. clk/rst_n are only used when PIPE = 1.
module oci_add_tree #(
  parameter int unsigned K    = 14,
  parameter int unsigned W    = 4,
  parameter bit          PIPE = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] op  [K],
  output logic [W-1:0] sum
);

  localparam int unsigned NODES = 2 * K - 1;

  logic [W-1:0] node [NODES];
  logic [W-1:0] comb_sum;

  for (genvar l = 0; l < K; l++) begin : g_leaf
    assign node[K - 1 + l] = op[l];
  end

  for (genvar n = 0; n < K - 1; n++) begin : g_node
    logic unused_cout;
    bk_adder #(.WIDTH(W)) u_add (
      .a    (node[2*n + 1]),
      .b    (node[2*n + 2]),
      .cin  (1'b0),
      .sum  (node[n]),
      .cout (unused_cout)
    );
  end

  assign comb_sum = node[0];

  if (PIPE) begin : g_pipe
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) sum <= '0;
      else        sum <= comb_sum;
    end
  end else begin : g_comb
    assign sum = comb_sum;
  end

endmodule
