// oci_router: CDMA network-on-chip router built around an overloaded CDMA
// crossbar, with M = 2(N-1) ports.
//
// Each port has a transmit network-interface FIFO that holds flits
// {destination, payload} written by its processing element. The controller
// looks at the head flit of every FIFO, grants at most one flit per receive
// port (rotating priority) and assigns the spreading
// code of that receive port to the winner's encoders, plus filler Walsh codes
// to idle ports. When the crossbar is ready and at least one flit is granted,
// the transaction starts, the granted flits leave their FIFOs and the crossbar
// delivers each payload at its receive port. Losers stay at the head of their
// FIFO and compete again in the next transaction.
//
// PARALLEL selects the crossbar: 0 = serial T-OCI (one transaction per N
// cycles), 1 = parallel P-OCI (one transaction per cycle). PIPELINED adds the
// register after the channel adders.
//
// Interface: tx_* is a valid/ready write port per transmit port; tx_dest must
// be below M. rx_valid/rx_data is a one-cycle pulse per delivered flit at the
// receive port; there is no backpressure on the receive side.
module oci_router #(
  parameter int unsigned N          = 8,
  parameter int unsigned FLIT_W     = 8,
  parameter bit          PARALLEL   = 1'b0,
  parameter bit          PIPELINED  = 1'b0,
  parameter int unsigned FIFO_DEPTH = 4,
  parameter int unsigned M          = 2 * (N - 1),
  parameter int unsigned DW         = $clog2(M)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tx_valid [M],
  output logic              tx_ready [M],
  input  logic [DW-1:0]     tx_dest  [M],
  input  logic [FLIT_W-1:0] tx_data  [M],
  output logic              rx_valid [M],
  output logic [FLIT_W-1:0] rx_data  [M]
);

  // ---- transmit NI FIFOs ----
  logic              head_valid [M];
  logic [DW-1:0]     head_dest  [M];
  logic [FLIT_W-1:0] head_data  [M];
  logic              pop        [M];

  for (genvar p = 0; p < M; p++) begin : g_fifo
    logic [DW+FLIT_W-1:0] rd;
    oci_tx_fifo #(.WIDTH(DW + FLIT_W), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk      (clk),
      .rst_n    (rst_n),
      .wr_valid (tx_valid[p]),
      .wr_ready (tx_ready[p]),
      .wr_data  ({tx_dest[p], tx_data[p]}),
      .rd_valid (head_valid[p]),
      .rd_data  (rd),
      .rd_pop   (pop[p])
    );
    assign head_dest[p] = rd[DW+FLIT_W-1:FLIT_W];
    assign head_data[p] = rd[FLIT_W-1:0];
  end

  // ---- controller ----
  logic          xbar_ready, start;
  logic          grant      [M];
  logic          enc_en     [M];
  logic          enc_fill   [M];
  logic [DW-1:0] enc_code   [M];
  logic          dest_valid [M];
  logic          any_grant;

  oci_controller #(.N(N), .M(M), .DW(DW)) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .advance    (start),
    .req_valid  (head_valid),
    .req_dest   (head_dest),
    .grant      (grant),
    .enc_en     (enc_en),
    .enc_fill   (enc_fill),
    .enc_code   (enc_code),
    .dest_valid (dest_valid),
    .any_grant  (any_grant)
  );

  // ---- transaction start ----
  logic [FLIT_W-1:0] flit [M];

  assign start = any_grant && xbar_ready;

  for (genvar p = 0; p < M; p++) begin : g_flit
    assign pop[p]  = start && grant[p];
    // Fillers and idle ports spread a '0' payload.
    assign flit[p] = (grant[p] && !enc_fill[p]) ? head_data[p] : '0;
  end

  // ---- crossbar ----
  logic              out_valid;
  logic              out_dest_valid [M];
  logic [FLIT_W-1:0] out_data       [M];

  if (PARALLEL) begin : g_p_oci
    oci_p_crossbar #(.N(N), .FLIT_W(FLIT_W), .PIPELINED(PIPELINED), .M(M), .CW(DW)) u_xbar (
      .clk            (clk),
      .rst_n          (rst_n),
      .start          (start),
      .ready          (xbar_ready),
      .enc_en         (enc_en),
      .enc_code       (enc_code),
      .flit           (flit),
      .dest_valid     (dest_valid),
      .out_valid      (out_valid),
      .out_dest_valid (out_dest_valid),
      .out_data       (out_data)
    );
  end else begin : g_t_oci
    oci_t_crossbar #(.N(N), .FLIT_W(FLIT_W), .PIPELINED(PIPELINED), .M(M), .CW(DW)) u_xbar (
      .clk            (clk),
      .rst_n          (rst_n),
      .start          (start),
      .ready          (xbar_ready),
      .enc_en         (enc_en),
      .enc_code       (enc_code),
      .flit           (flit),
      .dest_valid     (dest_valid),
      .out_valid      (out_valid),
      .out_dest_valid (out_dest_valid),
      .out_data       (out_data)
    );
  end

  // ---- receive side ----
  for (genvar d = 0; d < M; d++) begin : g_rx
    assign rx_valid[d] = out_valid && out_dest_valid[d];
    assign rx_data[d]  = out_data[d];
  end

  // Flits must address an existing receive port.
  for (genvar p = 0; p < M; p++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
                     tx_valid[p] |-> (32'(tx_dest[p]) < M))
      else $error("oci_router: port %0d writes a flit for receive port %0d", p, tx_dest[p]);
  end

endmodule
