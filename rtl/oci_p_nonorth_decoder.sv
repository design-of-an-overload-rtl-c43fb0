// oci_p_nonorth_decoder: parallel (P-OCI) overloaded decoder for one
// non-orthogonal code.
//
// Same rule as the serial overloaded decoder, LSB(S(0)) XOR LSB(S(k)), but
// both sums are present in the same cycle, so no 2-bit holding register is
// needed; only the output is registered.
// The XOR rule follows the OCI parallel overloaded decoder; the output
// register is this design's choice.
//
// Interface: in_valid with sums[0..N-1]; out_valid/out_bit one cycle later.
module oci_p_nonorth_decoder #(
  parameter int unsigned N    = 8,
  parameter int unsigned SW   = $clog2(N + 1),
  parameter int unsigned CODE = N - 1            // non-orthogonal code index, N-1..2N-3
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [SW-1:0] sums [N],
  output logic          out_valid,
  output logic          out_bit
);

  localparam int unsigned K_CHIP = CODE - (N - 1) + 1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_bit   <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_bit <= sums[0][0] ^ sums[K_CHIP][0];
    end
  end

  initial begin
    assert (CODE >= N - 1 && CODE <= 2 * N - 3)
      else $error("oci_p_nonorth_decoder: CODE %0d is not an overloading code", CODE);
  end

endmodule
