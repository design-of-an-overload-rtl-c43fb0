// oci_t_nonorth_decoder: serial (T-OCI) overloaded decoder for one
// non-orthogonal code.
//
// With all N-1 Walsh codes in use, the orthogonal part of the channel sum has
// the same parity at every chip. Overloading code k puts its data bit only
// into the sum of chip k, so the bit is LSB(S(0)) XOR LSB(S(k)). A 2-bit
// register keeps the two LSBs and an XOR gate decodes them.
// This is the OCI overloaded decoder; the registered valid flag is this
// design's choice.
//
// Interface: same chip stream as the orthogonal decoder (chip_idx 0..N-1 in
// order). out_valid pulses the cycle after chip N-1 was presented; out_bit is
// valid while out_valid is high.
module oci_t_nonorth_decoder #(
  parameter int unsigned N    = 8,               // spreading code length
  parameter int unsigned SW   = $clog2(N + 1),   // channel sum width
  parameter int unsigned CODE = N - 1            // non-orthogonal code index, N-1..2N-3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [$clog2(N)-1:0] chip_idx,
  input  logic [SW-1:0]        sum,
  output logic                 out_valid,
  output logic                 out_bit
);

  // Chip that carries this code's data: k = CODE - (N-1) + 1, in 1..N-1.
  localparam int unsigned K_CHIP = CODE - (N - 1) + 1;

  logic [1:0] lsb_q;   // [0]: LSB of S(0), [1]: LSB of S(k)

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lsb_q     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && (chip_idx == $clog2(N)'(N - 1));
      if (in_valid && chip_idx == '0)                      lsb_q[0] <= sum[0];
      if (in_valid && chip_idx == $clog2(N)'(K_CHIP))      lsb_q[1] <= sum[0];
    end
  end

  assign out_bit = lsb_q[0] ^ lsb_q[1];

  initial begin
    assert (CODE >= N - 1 && CODE <= 2 * N - 3)
      else $error("oci_t_nonorth_decoder: CODE %0d is not an overloading code", CODE);
  end

endmodule
