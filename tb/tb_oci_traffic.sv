// tb_oci_traffic: traffic generator and scoreboard for one OCI router port set.
//
// Payload of every flit = {source port, sequence number}. A queue per
// (source, destination) pair holds the flits accepted by the router; every
// delivered flit must be the oldest outstanding one of its pair. Phases:
//   0 latency probe: one flit from port 0 to the last port into an idle
//     router; its write-to-delivery time must be EXP_LAT cycles;
//   1 random traffic with a hot spot (conflicts, idle ports, full FIFOs);
//   2 full-load permutation (port p -> port (p+s) mod M): after warm-up,
//     M flits must arrive every PERIOD cycles;
//   3 drain: no writes until every queue is empty.
// done rises when finished; checks/failures and delivery counts are outputs.
module tb_oci_traffic #(
  parameter int N = 8, M = 14, FW = 8, DW = 4,
  parameter int PERIOD = 8, EXP_LAT = 10, RANDOM_CYCLES = 3000, NAME = 0
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic          tx_valid [M],
  input  logic          tx_ready [M],
  output logic [DW-1:0] tx_dest  [M],
  output logic [FW-1:0] tx_data  [M],
  input  logic          rx_valid [M],
  input  logic [FW-1:0] rx_data  [M],
  output logic          done,
  output int            checks,
  output int            failures,
  output int            n_delivered,
  output int            n_overloaded,
  output int            n_backpressure
);
  logic [FW-1:0] q [M][M][$];
  logic [3:0]    seq [M];
  int phase = 0, cycle = 0, window_count = 0;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL router %0d: %s (cycle %0d)", NAME, msg, cycle);
    end
  endtask

  initial begin
    checks = 0; failures = 0; n_delivered = 0; n_overloaded = 0; n_backpressure = 0; done = 0;
    for (int p = 0; p < M; p++) begin tx_valid[p] = 0; tx_dest[p] = 0; tx_data[p] = 0; seq[p] = 0; end
  end

  // scoreboard: accepted writes and deliveries, sampled at the clock edge
  always @(posedge clk) if (rst_n) begin
    cycle <= cycle + 1;
    for (int p = 0; p < M; p++) begin
      if (tx_valid[p] && tx_ready[p]) begin
        q[p][tx_dest[p]].push_back(tx_data[p]);
        seq[p] <= seq[p] + 1;
      end
      if (tx_valid[p] && !tx_ready[p]) n_backpressure++;
    end
    for (int d = 0; d < M; d++) if (rx_valid[d]) begin
      automatic int s = int'(rx_data[d][FW-1:FW-4]);
      n_delivered++;
      if (d >= N - 1) n_overloaded++;
      if (phase == 2) window_count++;
      chk(s < M && q[s][d].size() > 0, $sformatf("port %0d got unexpected flit %h", d, rx_data[d]));
      if (s < M && q[s][d].size() > 0) begin
        automatic logic [FW-1:0] e = q[s][d].pop_front();
        chk(e == rx_data[d], $sformatf("port %0d got %h expected %h", d, rx_data[d], e));
      end
    end
  end

  function automatic int outstanding();
    int n = 0;
    for (int s = 0; s < M; s++) for (int d = 0; d < M; d++) n += q[s][d].size();
    return n;
  endfunction

  initial begin
    int t0, shift, hot, c0;
    @(posedge rst_n);
    repeat (3) @(negedge clk);
    // phase 0: latency probe
    tx_valid[0] = 1; tx_dest[0] = DW'(M - 1); tx_data[0] = {4'd0, seq[0]};
    t0 = cycle;
    @(negedge clk);
    tx_valid[0] = 0;
    while (!rx_valid[M-1]) @(negedge clk);
    chk(cycle - t0 == EXP_LAT, $sformatf("latency %0d, expected %0d", cycle - t0, EXP_LAT));
    // phase 1: random traffic with a hot spot
    phase = 1;
    for (int t = 0; t < RANDOM_CYCLES; t++) begin
      hot = (t / 200) % M;
      for (int p = 0; p < M; p++) begin
        if (!tx_valid[p] || tx_ready[p]) begin
          tx_valid[p] = ($urandom_range(0, 99) < ((t / 300) % 2 ? 90 : 20));
          tx_dest[p]  = ($urandom_range(0, 3) == 0) ? DW'(hot) : DW'($urandom_range(0, M - 1));
          tx_data[p]  = {4'(p), seq[p]};
        end
      end
      @(negedge clk);
      for (int p = 0; p < M; p++) tx_data[p] = {4'(p), seq[p]};
    end
    // phase 2: full-load permutation
    shift = $urandom_range(0, M - 1);
    for (int p = 0; p < M; p++) begin
      tx_valid[p] = 1; tx_dest[p] = DW'((p + shift) % M); tx_data[p] = {4'(p), seq[p]};
    end
    repeat (5 * M * PERIOD + 40) begin   // warm-up: leftover flits drain
      @(negedge clk);
      for (int p = 0; p < M; p++) tx_data[p] = {4'(p), seq[p]};
    end
    phase = 2;
    window_count = 0;
    c0 = cycle;
    repeat (10 * PERIOD) begin
      @(negedge clk);
      for (int p = 0; p < M; p++) tx_data[p] = {4'(p), seq[p]};
    end
    phase = 3;
    chk(window_count == 10 * M, $sformatf("full load: %0d flits in %0d cycles, expected %0d",
        window_count, cycle - c0, 10 * M));
    // phase 3: drain
    for (int p = 0; p < M; p++) tx_valid[p] = 0;
    for (int t = 0; t < 2000 && outstanding() > 0; t++) @(negedge clk);
    chk(outstanding() == 0, $sformatf("%0d flits never delivered", outstanding()));
    done = 1;
  end
endmodule
