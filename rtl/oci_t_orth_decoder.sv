// oci_t_orth_decoder: serial (T-OCI) orthogonal decoder, an up/down
// accumulator correlator for one Walsh code.
//
// The channel sum S(i) arrives one chip per cycle. The accumulator adds S(i)
// when chip i of the decoder's Walsh code is '0' and subtracts it when the
// chip is '1', and restarts at chip 0, so after chip N-1 it holds the
// difference of the classic "zero" and "one" correlator accumulators. The
// decoded bit is the inverted sign bit: a non-negative result decodes as '1',
// a negative one as '0'. The overloading chips (at most N-1 extra '1's spread
// over chips 1..N-1) shift the result by at most -N/2..N/2-1 against the
// orthogonal signal of +-N/2, so the sign still decides correctly.
// The add/subtract is one Brent-Kung adder with the operand inverted and the
// carry-in set for subtraction.
// The up/down accumulator, its restart every N chips and the sign rule are
// those of the OCI decoder; adding on a '0' chip, counting a zero result as
// '1' and the output timing are this design's choices.
//
// Interface: in_valid/chip_idx/sum is the chip stream (chip_idx 0..N-1 in
// order, one transaction per N valid cycles). out_valid pulses for one cycle,
// the cycle after chip N-1 was presented, with out_bit.
module oci_t_orth_decoder
  import oci_pkg::*;
#(
  parameter int unsigned N    = 8,               // spreading code length
  parameter int unsigned SW   = $clog2(N + 1),   // channel sum width
  parameter int unsigned CODE = 0                // orthogonal code index, 0..N-2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [$clog2(N)-1:0] chip_idx,
  input  logic [SW-1:0]        sum,
  output logic                 out_valid,
  output logic                 out_bit
);

  // Accumulator range: |acc| <= N * (2^SW - 1), plus a sign bit.
  localparam int unsigned AW = SW + $clog2(N) + 1;

  function automatic logic [N-1:0] code_vec();
    for (int i = 0; i < int'(N); i++) code_vec[i] = code_chip(N, CODE, i);
  endfunction
  localparam logic [N-1:0] CODE_BITS = code_vec();

  logic [AW-1:0] acc, acc_base, term, acc_next;
  logic          neg, last, unused_cout;

  assign neg      = CODE_BITS[chip_idx];
  assign last     = (chip_idx == $clog2(N)'(N - 1));
  assign acc_base = (chip_idx == '0) ? '0 : acc;   // restart every N chips
  assign term     = neg ? ~AW'(sum) : AW'(sum);

  bk_adder #(.WIDTH(AW)) u_acc_add (
    .a    (acc_base),
    .b    (term),
    .cin  (neg),
    .sum  (acc_next),
    .cout (unused_cout)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      out_valid <= 1'b0;
      out_bit   <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        acc <= acc_next;
        if (last) begin
          out_valid <= 1'b1;
          out_bit   <= ~acc_next[AW-1];
        end
      end
    end
  end

endmodule
