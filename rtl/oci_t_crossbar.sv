// oci_t_crossbar: serial overloaded CDMA crossbar (T-OCI), M = 2(N-1) ports,
// FLIT_W-bit flits.
//
// One transaction moves up to M flits, one per receive port, in N cycles. At
// start the crossbar latches each transmit port's flit and assigned code
// (from oci_controller). Then for chips i = 0..N-1, one per cycle, every flit
// bit of every port goes through a hybrid encoder with chip i of its code,
// and per flit bit a channel adder (Brent-Kung tree) sums the M spread chips
// into S(i). Per flit bit, receive ports 0..N-2 have an up/down accumulator
// (Walsh) decoder and ports N-1..2N-3 an LSB-XOR overloaded decoder. The
// single-bit crossbar is thus replicated FLIT_W times.
//
// The sum needs only $clog2(N+1) bits: at any chip at most N-1 orthogonal
// chips and one overloading chip are '1', because each overloading code has a
// single '1' chip of its own. The adder still takes all M port chips, because
// with receiver-based assignment any port may hold either code type.
// (The published crossbar instead multiplexes a single overloading input
// into a smaller adder, which presumes fixed overloading ports.)
//
// The encoder/adder/decoder structure follows the OCI serial crossbar; the
// start/ready/out_valid handshake and the place of the pipeline register are
// this design's choices.
//
// PIPELINED = 1 adds a register after the channel adder (the pipelined
// variant); the chip index, valid and destination mask are delayed with it.
//
// Timing: start is taken when ready is high. ready is high when idle and in
// the last chip cycle, so transactions can run back to back every N cycles.
// out_valid pulses N+1 cycles after the start cycle (N+2 when PIPELINED),
// with out_data for every port and out_dest_valid marking the ports that
// received a real flit.
module oci_t_crossbar
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
  localparam int unsigned CI = $clog2(N);

  // Code chips, flattened: bit code*N + chip.
  function automatic logic [M*N-1:0] code_table();
    for (int c = 0; c < int'(M); c++)
      for (int i = 0; i < int'(N); i++)
        code_table[c*N + i] = code_chip(N, c, i);
  endfunction
  localparam logic [M*N-1:0] CODE_TABLE = code_table();

  // ---- transaction registers and chip counter ----
  logic              busy;
  logic [CI-1:0]     chip;
  logic              en_q   [M];
  logic [CW-1:0]     code_q [M];
  logic [FLIT_W-1:0] flit_q [M];
  logic              mask_q [M];

  assign ready = !busy || (chip == CI'(N - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      chip <= '0;
      for (int p = 0; p < int'(M); p++) begin
        en_q[p]   <= 1'b0;
        code_q[p] <= '0;
        flit_q[p] <= '0;
        mask_q[p] <= 1'b0;
      end
    end else if (start && ready) begin
      busy <= 1'b1;
      chip <= '0;
      for (int p = 0; p < int'(M); p++) begin
        en_q[p]   <= enc_en[p];
        code_q[p] <= enc_code[p];
        flit_q[p] <= flit[p];
        mask_q[p] <= dest_valid[p];
      end
    end else if (busy) begin
      if (chip == CI'(N - 1)) busy <= 1'b0;
      chip <= chip + 1'b1;
    end
  end

  // ---- hybrid encoders ----
  logic [M-1:0] spread [FLIT_W];   // spread[b][p]

  for (genvar p = 0; p < M; p++) begin : g_port
    logic       code_bit;
    code_type_e ctype;
    assign code_bit = CODE_TABLE[32'(code_q[p]) * N + 32'(chip)];
    assign ctype    = code_is_nonorth(N, 32'(code_q[p])) ? CODE_NONORTH : CODE_ORTH;
    for (genvar b = 0; b < FLIT_W; b++) begin : g_bit
      oci_hybrid_encoder u_enc (
        .en        (en_q[p]),
        .code_type (ctype),
        .data      (flit_q[p][b]),
        .chip      (code_bit),
        .spread    (spread[b][p])
      );
    end
  end

  // ---- channel adders, one per flit bit ----
  logic [SW-1:0] sum [FLIT_W];

  for (genvar b = 0; b < FLIT_W; b++) begin : g_add
    logic [SW-1:0] ops [M];
    for (genvar p = 0; p < M; p++) begin : g_op
      assign ops[p] = SW'(spread[b][p]);
    end
    oci_add_tree #(.K(M), .W(SW), .PIPE(PIPELINED)) u_adder (
      .clk   (clk),
      .rst_n (rst_n),
      .op    (ops),
      .sum   (sum[b])
    );
  end

  // ---- chip stream that travels with the sums ----
  logic          s_valid;
  logic [CI-1:0] s_chip;
  logic          s_mask [M];

  if (PIPELINED) begin : g_pipe
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        s_valid <= 1'b0;
        s_chip  <= '0;
        for (int p = 0; p < int'(M); p++) s_mask[p] <= 1'b0;
      end else begin
        s_valid <= busy;
        s_chip  <= chip;
        for (int p = 0; p < int'(M); p++) s_mask[p] <= mask_q[p];
      end
    end
  end else begin : g_nopipe
    assign s_valid = busy;
    assign s_chip  = chip;
    assign s_mask  = mask_q;
  end

  // ---- decoders: ports 0..N-2 orthogonal, N-1..M-1 overloaded ----
  logic dec_valid [M][FLIT_W];

  for (genvar d = 0; d < M; d++) begin : g_dest
    for (genvar b = 0; b < FLIT_W; b++) begin : g_bit
      if (d < N - 1) begin : g_orth
        oci_t_orth_decoder #(.N(N), .SW(SW), .CODE(d)) u_dec (
          .clk       (clk),
          .rst_n     (rst_n),
          .in_valid  (s_valid),
          .chip_idx  (s_chip),
          .sum       (sum[b]),
          .out_valid (dec_valid[d][b]),
          .out_bit   (out_data[d][b])
        );
      end else begin : g_nonorth
        oci_t_nonorth_decoder #(.N(N), .SW(SW), .CODE(d)) u_dec (
          .clk       (clk),
          .rst_n     (rst_n),
          .in_valid  (s_valid),
          .chip_idx  (s_chip),
          .sum       (sum[b]),
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
    end else if (s_valid && s_chip == CI'(N - 1)) begin
      for (int d = 0; d < int'(M); d++) out_dest_valid[d] <= s_mask[d];
    end
  end

endmodule
