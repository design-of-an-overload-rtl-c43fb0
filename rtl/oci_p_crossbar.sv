// oci_p_crossbar: parallel overloaded CDMA crossbar (P-OCI), M = 2(N-1)
// ports, FLIT_W-bit flits.
//
// Same code scheme as the serial crossbar, but all N chips of a transaction
// are handled in one cycle: the hybrid encoder is replicated N times per flit
// bit and port, the channel adder N times per flit bit (one S(i) per chip),
// and the decoders take all N sums at once: an unrolled correlator (adder
// tree) for the Walsh codes and LSB(S(0)) XOR LSB(S(k)) for the overloading
// codes. This gives N times the bandwidth of the serial crossbar for about N
// times its encoder and adder logic.
// The structure follows the OCI parallel crossbar; the handshake, the full
// M-input adders and the register placement are this design's choices.
//
// PIPELINED = 1 adds a register after the channel adders.
//
// Timing: ready is always high; one transaction may start every cycle.
// out_valid pulses 2 cycles after the start cycle (3 when PIPELINED): input
// register, [adder register], decoder output register.
module oci_p_crossbar
  import oci_pkg::*;
#(
  parameter int unsigned N         = 8,
  parameter int unsigned FLIT_W    = 8,
  parameter bit          PIPELINED = 1'b0,
  parameter int unsigned M         = 2 * (N - 1),
  parameter int unsigned CW        = $clog2(M)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              ready,
  input  logic              enc_en        [M],
  input  logic [CW-1:0]     enc_code      [M],
  input  logic [FLIT_W-1:0] flit          [M],
  input  logic              dest_valid    [M],
  output logic              out_valid,
  output logic              out_dest_valid[M],
  output logic [FLIT_W-1:0] out_data      [M]
);

  localparam int unsigned SW = $clog2(N + 1);

  function automatic logic [M*N-1:0] code_table();
    for (int c = 0; c < int'(M); c++)
      for (int i = 0; i < int'(N); i++)
        code_table[c*N + i] = code_chip(N, c, i);
  endfunction
  localparam logic [M*N-1:0] CODE_TABLE = code_table();

  assign ready = 1'b1;

  // ---- transaction registers ----
  logic              t_valid;
  logic              en_q   [M];
  logic [CW-1:0]     code_q [M];
  logic [FLIT_W-1:0] flit_q [M];
  logic              mask_q [M];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_valid <= 1'b0;
      for (int p = 0; p < int'(M); p++) begin
        en_q[p]   <= 1'b0;
        code_q[p] <= '0;
        flit_q[p] <= '0;
        mask_q[p] <= 1'b0;
      end
    end else begin
      t_valid <= start;
      if (start) begin
        for (int p = 0; p < int'(M); p++) begin
          en_q[p]   <= enc_en[p];
          code_q[p] <= enc_code[p];
          flit_q[p] <= flit[p];
          mask_q[p] <= dest_valid[p];
        end
      end
    end
  end

  // ---- hybrid encoders, N per flit bit and port ----
  logic [M-1:0] spread [FLIT_W][N];   // spread[b][i][p]

  for (genvar p = 0; p < M; p++) begin : g_port
    code_type_e ctype;
    assign ctype = code_is_nonorth(N, 32'(code_q[p])) ? CODE_NONORTH : CODE_ORTH;
    for (genvar i = 0; i < N; i++) begin : g_chip
      logic code_bit;
      assign code_bit = CODE_TABLE[32'(code_q[p]) * N + i];
      for (genvar b = 0; b < FLIT_W; b++) begin : g_bit
        oci_hybrid_encoder u_enc (
          .en        (en_q[p]),
          .code_type (ctype),
          .data      (flit_q[p][b]),
          .chip      (code_bit),
          .spread    (spread[b][i][p])
        );
      end
    end
  end

  // ---- channel adders, one per flit bit and chip ----
  logic [SW-1:0] sums [FLIT_W][N];

  for (genvar b = 0; b < FLIT_W; b++) begin : g_add_bit
    for (genvar i = 0; i < N; i++) begin : g_add_chip
      logic [SW-1:0] ops [M];
      for (genvar p = 0; p < M; p++) begin : g_op
        assign ops[p] = SW'(spread[b][i][p]);
      end
      oci_add_tree #(.K(M), .W(SW), .PIPE(PIPELINED)) u_adder (
        .clk   (clk),
        .rst_n (rst_n),
        .op    (ops),
        .sum   (sums[b][i])
      );
    end
  end

  // ---- valid and mask travel with the sums ----
  logic s_valid;
  logic s_mask [M];

  if (PIPELINED) begin : g_pipe
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        s_valid <= 1'b0;
        for (int p = 0; p < int'(M); p++) s_mask[p] <= 1'b0;
      end else begin
        s_valid <= t_valid;
        for (int p = 0; p < int'(M); p++) s_mask[p] <= mask_q[p];
      end
    end
  end else begin : g_nopipe
    assign s_valid = t_valid;
    assign s_mask  = mask_q;
  end

  // ---- decoders ----
  logic dec_valid [M][FLIT_W];

  for (genvar d = 0; d < M; d++) begin : g_dest
    for (genvar b = 0; b < FLIT_W; b++) begin : g_bit
      if (d < N - 1) begin : g_orth
        oci_p_orth_decoder #(.N(N), .SW(SW), .CODE(d)) u_dec (
          .clk       (clk),
          .rst_n     (rst_n),
          .in_valid  (s_valid),
          .sums      (sums[b]),
          .out_valid (dec_valid[d][b]),
          .out_bit   (out_data[d][b])
        );
      end else begin : g_nonorth
        oci_p_nonorth_decoder #(.N(N), .SW(SW), .CODE(d)) u_dec (
          .clk       (clk),
          .rst_n     (rst_n),
          .in_valid  (s_valid),
          .sums      (sums[b]),
          .out_valid (dec_valid[d][b]),
          .out_bit   (out_data[d][b])
        );
      end
    end
  end

  assign out_valid = dec_valid[0][0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 0; d < int'(M); d++) out_dest_valid[d] <= 1'b0;
    end else if (s_valid) begin
      for (int d = 0; d < int'(M); d++) out_dest_valid[d] <= s_mask[d];
    end
  end

endmodule
