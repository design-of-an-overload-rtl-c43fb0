// oci_noc_top: the two overloaded CDMA crossbar routers side by side, the
// serial T-OCI router (t_* ports) and the parallel P-OCI router (p_* ports).
//
// Both use code length N = 8, so each has M = 2(N-1) = 14 ports: 7 receive
// ports with Walsh codes and 7 with overloading codes, twice the 7 ports a
// classical CDMA crossbar with the same codes serves. The serial router moves
// one set of flits every N cycles; the parallel router one set every cycle.
// Both share the clock and reset. See oci_router for the port protocol.
module oci_noc_top #(
  parameter int unsigned N          = 8,
  parameter int unsigned FLIT_W     = 8,
  parameter bit          PIPELINED  = 1'b0,
  parameter int unsigned FIFO_DEPTH = 4,
  parameter int unsigned M          = 2 * (N - 1),
  parameter int unsigned DW         = $clog2(M)
) (
  input  logic              clk,
  input  logic              rst_n,
  // serial (T-OCI) router
  input  logic              t_tx_valid [M],
  output logic              t_tx_ready [M],
  input  logic [DW-1:0]     t_tx_dest  [M],
  input  logic [FLIT_W-1:0] t_tx_data  [M],
  output logic              t_rx_valid [M],
  output logic [FLIT_W-1:0] t_rx_data  [M],
  // parallel (P-OCI) router
  input  logic              p_tx_valid [M],
  output logic              p_tx_ready [M],
  input  logic [DW-1:0]     p_tx_dest  [M],
  input  logic [FLIT_W-1:0] p_tx_data  [M],
  output logic              p_rx_valid [M],
  output logic [FLIT_W-1:0] p_rx_data  [M]
);

  oci_router #(.N(N), .FLIT_W(FLIT_W), .PARALLEL(1'b0), .PIPELINED(PIPELINED),
               .FIFO_DEPTH(FIFO_DEPTH), .M(M), .DW(DW)) u_t_router (
    .clk      (clk),
    .rst_n    (rst_n),
    .tx_valid (t_tx_valid),
    .tx_ready (t_tx_ready),
    .tx_dest  (t_tx_dest),
    .tx_data  (t_tx_data),
    .rx_valid (t_rx_valid),
    .rx_data  (t_rx_data)
  );

  oci_router #(.N(N), .FLIT_W(FLIT_W), .PARALLEL(1'b1), .PIPELINED(PIPELINED),
               .FIFO_DEPTH(FIFO_DEPTH), .M(M), .DW(DW)) u_p_router (
    .clk      (clk),
    .rst_n    (rst_n),
    .tx_valid (p_tx_valid),
    .tx_ready (p_tx_ready),
    .tx_dest  (p_tx_dest),
    .tx_data  (p_tx_data),
    .rx_valid (p_rx_valid),
    .rx_data  (p_rx_data)
  );

endmodule
