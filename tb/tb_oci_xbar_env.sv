// tb_oci_xbar_env: test environment for one OCI crossbar variant (serial or
// parallel, chosen by PARALLEL) at code length N. It instantiates the
// reference and the pipelined crossbar and drives both with the same random
// transactions: a random set of served receive ports, each given to a
// distinct transmit port with a random flit, leftover Walsh codes on idle
// ports as fillers with zero data, other ports disabled with junk data.
// Checks every delivered flit and the served-port mask, that out_valid comes
// exactly N+1 (serial) or 2 (parallel) cycles after the start, one more when
// pipelined, and that the serial crossbar is ready again exactly every N
// cycles while the parallel one is always ready. Raises done when finished.
module tb_oci_xbar_env #(
  parameter int N = 8, PARALLEL = 0
) (
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int M = 2 * (N - 1), FW = 8, CW = $clog2(M);
  localparam int LAT = PARALLEL ? 2 : N + 1;
  int cycle = 0;
  initial begin checks = 0; failures = 0; done = 0; end
  int n_full = 0, n_fill = 0, n_b2b = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  logic              start, ready0, ready1;
  logic              enc_en [M];
  logic [CW-1:0]     enc_code [M];
  logic [FW-1:0]     flit [M];
  logic              dest_valid [M];
  logic              ov [2];
  logic              odv [2][M];
  logic [FW-1:0]     od [2][M];

  if (PARALLEL) begin : g_p
    oci_p_crossbar #(.N(N), .FLIT_W(FW), .PIPELINED(1'b0)) u_ref (
      .clk(clk), .rst_n(rst_n), .start(start), .ready(ready0), .enc_en(enc_en), .enc_code(enc_code),
      .flit(flit), .dest_valid(dest_valid), .out_valid(ov[0]), .out_dest_valid(odv[0]), .out_data(od[0]));
    oci_p_crossbar #(.N(N), .FLIT_W(FW), .PIPELINED(1'b1)) u_pipe (
      .clk(clk), .rst_n(rst_n), .start(start), .ready(ready1), .enc_en(enc_en), .enc_code(enc_code),
      .flit(flit), .dest_valid(dest_valid), .out_valid(ov[1]), .out_dest_valid(odv[1]), .out_data(od[1]));
  end else begin : g_t
    oci_t_crossbar #(.N(N), .FLIT_W(FW), .PIPELINED(1'b0)) u_ref (
      .clk(clk), .rst_n(rst_n), .start(start), .ready(ready0), .enc_en(enc_en), .enc_code(enc_code),
      .flit(flit), .dest_valid(dest_valid), .out_valid(ov[0]), .out_dest_valid(odv[0]), .out_data(od[0]));
    oci_t_crossbar #(.N(N), .FLIT_W(FW), .PIPELINED(1'b1)) u_pipe (
      .clk(clk), .rst_n(rst_n), .start(start), .ready(ready1), .enc_en(enc_en), .enc_code(enc_code),
      .flit(flit), .dest_valid(dest_valid), .out_valid(ov[1]), .out_dest_valid(odv[1]), .out_data(od[1]));
  end

  typedef struct {
    int          due;
    bit          mask [M];
    logic [FW-1:0] data [M];
  } exp_t;
  exp_t q0 [$], q1 [$];

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL N=%0d %s (cycle %0d)", N, msg, cycle);
    end
  endtask

  task automatic check_out(int k, ref exp_t q [$]);
    exp_t e;
    if (!ov[k]) return;
    chk(q.size() > 0, $sformatf("variant %0d: unexpected out_valid", k));
    if (q.size() == 0) return;
    e = q.pop_front();
    chk(cycle == e.due, $sformatf("variant %0d: output at %0d, expected %0d", k, cycle, e.due));
    for (int d = 0; d < M; d++) begin
      chk(odv[k][d] == e.mask[d], $sformatf("variant %0d: mask[%0d]", k, d));
      if (e.mask[d])
        chk(od[k][d] == e.data[d], $sformatf("variant %0d: port %0d got %h expected %h", k, d, od[k][d], e.data[d]));
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    #1;
    check_out(0, q0);
    check_out(1, q1);
  end

  initial begin
    int src [M], perm [M], nserve, idle [$], last_start;
    exp_t e;
    start = 0;
    for (int p = 0; p < M; p++) begin
      enc_en[p] = 0; enc_code[p] = 0; flit[p] = 0; dest_valid[p] = 0;
    end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    last_start = -100;
    for (int t = 0; t < 3000; t++) begin
      if (t > 0 && $urandom_range(0, 1) == 0) @(negedge clk);
      while (!ready0) @(negedge clk);
      chk(ready1 == ready0, "ready of both variants");
      if ($urandom_range(0, 4) == 0) begin          // idle cycle
        start = 0;
        continue;
      end
      // random port permutation; the first nserve ports serve destinations perm order
      for (int p = 0; p < M; p++) perm[p] = p;
      for (int p = M - 1; p > 0; p--) begin
        automatic int k = $urandom_range(0, p); automatic int tmp = perm[p]; perm[p] = perm[k]; perm[k] = tmp;
      end
      nserve = (t % 5 == 0) ? M : $urandom_range(0, M);
      for (int d = 0; d < M; d++) begin
        e.mask[d] = 0;
        e.data[d] = 0;
        dest_valid[d] = 0;
      end
      for (int p = 0; p < M; p++) begin
        enc_en[p] = 0; enc_code[p] = CW'($urandom); flit[p] = FW'($urandom);
      end
      // destinations chosen: a random subset of size nserve
      for (int d = 0; d < M; d++) src[d] = -1;
      begin
        automatic int dl [M];
        for (int d = 0; d < M; d++) dl[d] = d;
        for (int d = M - 1; d > 0; d--) begin
          automatic int k = $urandom_range(0, d); automatic int tmp = dl[d]; dl[d] = dl[k]; dl[k] = tmp;
        end
        for (int s = 0; s < nserve; s++) begin
          automatic int p = perm[s]; automatic int d = dl[s];
          src[d] = p;
          enc_en[p] = 1; enc_code[p] = CW'(d);
          e.mask[d] = 1; e.data[d] = flit[p]; dest_valid[d] = 1;
        end
      end
      // fillers for unused Walsh codes on the remaining ports
      idle.delete();
      for (int s = nserve; s < M; s++) idle.push_back(perm[s]);
      for (int c = 0; c < N - 1; c++)
        if (src[c] < 0) begin
          automatic int p = idle.pop_front();
          enc_en[p] = 1; enc_code[p] = CW'(c); flit[p] = 0;
          n_fill++;
        end
      if (nserve == M) n_full++;
      if (cycle - last_start == (PARALLEL ? 1 : N)) n_b2b++;
      last_start = cycle;
      start = 1;
      e.due = cycle + LAT;     q0.push_back(e);
      e.due = cycle + LAT + 1; q1.push_back(e);
      if (PARALLEL) chk(ready0 && ready1, "always ready");
      @(negedge clk);
      start = 0;
      for (int p = 0; p < M; p++) flit[p] = FW'($urandom);   // inputs only matter at start
      if (!PARALLEL) begin
        for (int i = 1; i < N; i++) begin chk(!ready0, "busy during chips"); @(negedge clk); end
        chk(ready0, "ready in the last chip cycle");
      end
    end
    repeat (LAT + 4) @(negedge clk);
    chk(q0.size() == 0 && q1.size() == 0, "all transactions delivered");
    chk(n_full > 0 && n_fill > 0 && n_b2b > 0, "full load, fillers and back-to-back seen");
    $display("N=%0d: full=%0d fillers=%0d back_to_back=%0d checks=%0d failures=%0d",
             N, n_full, n_fill, n_b2b, checks, failures);
    done = 1;
  end
endmodule
