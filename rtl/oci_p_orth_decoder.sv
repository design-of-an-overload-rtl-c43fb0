// oci_p_orth_decoder: parallel (P-OCI) orthogonal decoder for one Walsh code.
//
// All N chip sums S(0..N-1) arrive in the same cycle, so the accumulator loop
// of the serial decoder is unrolled into an adder tree: sum_i w(i) * S(i) with
// w(i) = +1 where the code chip is '0' and -1 where it is '1'. Subtraction is
// done as ~S(i) plus a constant equal to the number of '1' chips of the code
// (the collected carry-ins), added as one more tree operand. The tree is made
// of Brent-Kung adders. The decoded bit is the inverted sign of the result.
// The unrolled correlator follows the OCI parallel decoder; the constant
// operand and the registered output are this design's choices.
//
// Interface: in_valid with sums[0..N-1]; out_valid/out_bit follow one cycle
// later (registered output).
module oci_p_orth_decoder
  import oci_pkg::*;
#(
  parameter int unsigned N    = 8,
  parameter int unsigned SW   = $clog2(N + 1),
  parameter int unsigned CODE = 0                // orthogonal code index, 0..N-2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [SW-1:0] sums [N],
  output logic          out_valid,
  output logic          out_bit
);

  localparam int unsigned AW = SW + $clog2(N) + 1;

  function automatic logic [N-1:0] code_vec();
    for (int i = 0; i < int'(N); i++) code_vec[i] = code_chip(N, CODE, i);
  endfunction
  localparam logic [N-1:0] CODE_BITS = code_vec();
  localparam int unsigned  N_ONES    = $countones(CODE_BITS);

  logic [AW-1:0] ops [N + 1];
  logic [AW-1:0] corr;

  always_comb begin
    for (int i = 0; i < int'(N); i++)
      ops[i] = CODE_BITS[i] ? ~AW'(sums[i]) : AW'(sums[i]);
    ops[N] = AW'(N_ONES);
  end

  oci_add_tree #(.K(N + 1), .W(AW), .PIPE(1'b0)) u_tree (
    .clk   (clk),
    .rst_n (rst_n),
    .op    (ops),
    .sum   (corr)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_bit   <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_bit <= ~corr[AW-1];
    end
  end

endmodule
