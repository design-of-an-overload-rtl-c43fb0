// tb_oci_router: a serial T-OCI router and a pipelined parallel P-OCI router,
// each driven by its own traffic generator/scoreboard (tb_oci_traffic):
// latency probe, random hot-spot traffic, full-load permutation throughput
// (14 flits per N cycles serial, per cycle parallel) and drain.
module tb_oci_router;
  localparam int N = 8, M = 14, FW = 8, DW = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          tx_valid [2][M], tx_ready [2][M], rx_valid [2][M];
  logic [DW-1:0] tx_dest  [2][M];
  logic [FW-1:0] tx_data  [2][M], rx_data [2][M];
  logic          done [2];
  int            checks [2], failures [2], n_del [2], n_ovl [2], n_bp [2];

  oci_router #(.N(N), .FLIT_W(FW), .PARALLEL(1'b0), .PIPELINED(1'b0)) u_t (
    .clk(clk), .rst_n(rst_n), .tx_valid(tx_valid[0]), .tx_ready(tx_ready[0]), .tx_dest(tx_dest[0]),
    .tx_data(tx_data[0]), .rx_valid(rx_valid[0]), .rx_data(rx_data[0]));
  oci_router #(.N(N), .FLIT_W(FW), .PARALLEL(1'b1), .PIPELINED(1'b1)) u_p (
    .clk(clk), .rst_n(rst_n), .tx_valid(tx_valid[1]), .tx_ready(tx_ready[1]), .tx_dest(tx_dest[1]),
    .tx_data(tx_data[1]), .rx_valid(rx_valid[1]), .rx_data(rx_data[1]));

  // write -> FIFO head (1) -> start; serial: N chips + decoder register;
  // parallel pipelined: input, adder and decoder registers
  tb_oci_traffic #(.N(N), .M(M), .FW(FW), .DW(DW), .PERIOD(N), .EXP_LAT(N + 2), .NAME(0)) u_gen_t (
    .clk(clk), .rst_n(rst_n), .tx_valid(tx_valid[0]), .tx_ready(tx_ready[0]), .tx_dest(tx_dest[0]),
    .tx_data(tx_data[0]), .rx_valid(rx_valid[0]), .rx_data(rx_data[0]), .done(done[0]),
    .checks(checks[0]), .failures(failures[0]), .n_delivered(n_del[0]), .n_overloaded(n_ovl[0]),
    .n_backpressure(n_bp[0]));
  tb_oci_traffic #(.N(N), .M(M), .FW(FW), .DW(DW), .PERIOD(1), .EXP_LAT(4), .NAME(1)) u_gen_p (
    .clk(clk), .rst_n(rst_n), .tx_valid(tx_valid[1]), .tx_ready(tx_ready[1]), .tx_dest(tx_dest[1]),
    .tx_data(tx_data[1]), .rx_valid(rx_valid[1]), .rx_data(rx_data[1]), .done(done[1]),
    .checks(checks[1]), .failures(failures[1]), .n_delivered(n_del[1]), .n_overloaded(n_ovl[1]),
    .n_backpressure(n_bp[1]));


  initial begin
    repeat (200000) @(posedge clk);

    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1], failures[0] + failures[1] + 1);
    $finish;
  end

  initial begin
    int c, f;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done[0] && done[1]);
    @(posedge clk);
    c = checks[0] + checks[1] + 2;
    f = failures[0] + failures[1];
    for (int k = 0; k < 2; k++) begin
      $display("router %0d: delivered=%0d overloaded=%0d backpressure=%0d", k, n_del[k], n_ovl[k], n_bp[k]);
      if (n_ovl[k] == 0 || n_bp[k] == 0) f++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end
endmodule
