// tb_oci_noc_top: end-to-end test of the top at its default parameters
// (N = 8, 14 ports per router, 8-bit flits). Each router gets its own
// traffic generator and scoreboard (tb_oci_traffic): latency probe, random
// hot-spot traffic, full-load permutation throughput and drain. The test also
// counts how often each router mechanism happened and fails if one never did:
// arbitration conflicts, filler Walsh codes, disabled (idle) encoders,
// deliveries on Walsh and on overloading codes, a fully loaded transaction
// with all 14 ports served, back-to-back transactions, and FIFO backpressure.
module tb_oci_noc_top;
  localparam int N = 8, M = 14, FW = 8, DW = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          tx_valid [2][M], tx_ready [2][M], rx_valid [2][M];
  logic [DW-1:0] tx_dest  [2][M];
  logic [FW-1:0] tx_data  [2][M], rx_data [2][M];
  logic          done [2];
  int            checks [2], failures [2], n_del [2], n_ovl [2], n_bp [2];

  oci_noc_top u_top (
    .clk(clk), .rst_n(rst_n),
    .t_tx_valid(tx_valid[0]), .t_tx_ready(tx_ready[0]), .t_tx_dest(tx_dest[0]), .t_tx_data(tx_data[0]),
    .t_rx_valid(rx_valid[0]), .t_rx_data(rx_data[0]),
    .p_tx_valid(tx_valid[1]), .p_tx_ready(tx_ready[1]), .p_tx_dest(tx_dest[1]), .p_tx_data(tx_data[1]),
    .p_rx_valid(rx_valid[1]), .p_rx_data(rx_data[1]));

  tb_oci_traffic #(.N(N), .M(M), .FW(FW), .DW(DW), .PERIOD(N), .EXP_LAT(N + 2), .NAME(0)) u_gen_t (
    .clk(clk), .rst_n(rst_n), .tx_valid(tx_valid[0]), .tx_ready(tx_ready[0]), .tx_dest(tx_dest[0]),
    .tx_data(tx_data[0]), .rx_valid(rx_valid[0]), .rx_data(rx_data[0]), .done(done[0]),
    .checks(checks[0]), .failures(failures[0]), .n_delivered(n_del[0]), .n_overloaded(n_ovl[0]),
    .n_backpressure(n_bp[0]));
  tb_oci_traffic #(.N(N), .M(M), .FW(FW), .DW(DW), .PERIOD(1), .EXP_LAT(3), .NAME(1)) u_gen_p (
    .clk(clk), .rst_n(rst_n), .tx_valid(tx_valid[1]), .tx_ready(tx_ready[1]), .tx_dest(tx_dest[1]),
    .tx_data(tx_data[1]), .rx_valid(rx_valid[1]), .rx_data(rx_data[1]), .done(done[1]),
    .checks(checks[1]), .failures(failures[1]), .n_delivered(n_del[1]), .n_overloaded(n_ovl[1]),
    .n_backpressure(n_bp[1]));

  // ---- mechanism counters, sampled at each transaction start ----
  typedef enum int {CONFLICT, FILLER, IDLE_ENC, FULL_LOAD, BACK_TO_BACK, NUM_MECH} mech_e;
  string mech_name [NUM_MECH] = '{"conflict", "filler_code", "idle_encoder", "full_load", "back_to_back"};
  int    mech [2][NUM_MECH];
  int    last_start [2] = '{-100, -100};
  int    cycle = 0;

  task automatic sample(int k, logic start, logic head_valid [M], logic grant [M],
                        logic enc_en [M], logic enc_fill [M], int period);
    int ng = 0;
    if (!start) return;
    for (int p = 0; p < M; p++) begin
      if (head_valid[p] && !grant[p]) mech[k][CONFLICT]++;
      if (enc_fill[p]) mech[k][FILLER]++;
      if (!enc_en[p]) mech[k][IDLE_ENC]++;
      if (grant[p]) ng++;
    end
    if (ng == M) mech[k][FULL_LOAD]++;
    if (cycle - last_start[k] == period) mech[k][BACK_TO_BACK]++;
    last_start[k] = cycle;
  endtask

  always @(posedge clk) if (rst_n) begin
    cycle <= cycle + 1;
    sample(0, u_top.u_t_router.start, u_top.u_t_router.head_valid, u_top.u_t_router.grant,
           u_top.u_t_router.enc_en, u_top.u_t_router.enc_fill, N);
    sample(1, u_top.u_p_router.start, u_top.u_p_router.head_valid, u_top.u_p_router.grant,
           u_top.u_p_router.enc_en, u_top.u_p_router.enc_fill, 1);
  end

  initial begin
    repeat (300000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1], failures[0] + failures[1] + 1);
    $finish;
  end

  initial begin
    int c, f;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done[0] && done[1]);
    @(posedge clk);
    c = checks[0] + checks[1];
    f = failures[0] + failures[1];
    for (int k = 0; k < 2; k++) begin
      $display("%s router: delivered=%0d on_overloading_codes=%0d on_walsh_codes=%0d fifo_backpressure=%0d",
               k ? "P-OCI" : "T-OCI", n_del[k], n_ovl[k], n_del[k] - n_ovl[k], n_bp[k]);
      for (int m = 0; m < NUM_MECH; m++) $display("  %s=%0d", mech_name[m], mech[k][m]);
      c += 3;
      if (n_ovl[k] == 0 || n_del[k] == n_ovl[k] || n_bp[k] == 0) f++;
      for (int m = 0; m < NUM_MECH; m++) begin
        c++;
        if (mech[k][m] == 0) begin f++; $display("FAIL mechanism %s never happened", mech_name[m]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end
endmodule
