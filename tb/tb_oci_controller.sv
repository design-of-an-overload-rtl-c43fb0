// tb_oci_controller: random request patterns (idle, light, heavy with
// conflicts, full permutations) checked against the rules of receiver-based
// code assignment: the first requesting port in rotating-priority order
// (pointer modelled here, stepped on random advance pulses) wins each
// receive port and gets
// its code, every Walsh code is on the channel exactly once (fillers on idle
// ports otherwise), no code is given twice, dest_valid marks served ports.
module tb_oci_controller;
  localparam int N = 8, M = 14, DW = 4;
  int checks = 0, failures = 0;
  int n_conflict = 0, n_fill = 0;

  logic          clk = 0, rst_n = 1, advance = 0;
  int            ptr = 0;
  logic          req_valid [M];
  logic [DW-1:0] req_dest  [M];
  logic          grant [M], enc_en [M], enc_fill [M], dest_valid [M], any_grant;
  logic [DW-1:0] enc_code [M];

  oci_controller #(.N(N)) u_dut (
    .clk(clk), .rst_n(rst_n), .advance(advance),
    .req_valid(req_valid), .req_dest(req_dest), .grant(grant), .enc_en(enc_en),
    .enc_fill(enc_fill), .enc_code(enc_code), .dest_valid(dest_valid), .any_grant(any_grant));

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int winner, owners, perm [M];
    bit any;
    for (int p = 0; p < M; p++) begin req_valid[p] = 0; req_dest[p] = 0; end
    #1 rst_n = 0;
    #1 rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      // step the priority pointer on a random advance pulse
      advance = 1'($urandom);
      #1 clk = 1;
      #1 clk = 0;
      if (advance) ptr = (ptr + 1) % M;
      advance = 0;
      case (t % 4)
        0: for (int p = 0; p < M; p++) begin                 // light
             req_valid[p] = ($urandom_range(0, 3) == 0); req_dest[p] = DW'($urandom_range(0, M-1)); end
        1: for (int p = 0; p < M; p++) begin                 // heavy, conflicts
             req_valid[p] = 1'($urandom); req_dest[p] = DW'($urandom_range(0, 4)); end
        2: begin                                             // full permutation
             for (int p = 0; p < M; p++) perm[p] = p;
             for (int p = M - 1; p > 0; p--) begin
               automatic int k = $urandom_range(0, p); automatic int tmp = perm[p]; perm[p] = perm[k]; perm[k] = tmp;
             end
             for (int p = 0; p < M; p++) begin req_valid[p] = 1; req_dest[p] = DW'(perm[p]); end
           end
        default: for (int p = 0; p < M; p++) begin           // idle or random
             req_valid[p] = (t % 8 == 3) ? 1'b0 : 1'($urandom); req_dest[p] = DW'($urandom_range(0, M-1)); end
      endcase
      #1;
      any = 0;
      for (int d = 0; d < M; d++) begin
        winner = -1;
        for (int k = M - 1; k >= 0; k--)
          if (req_valid[(ptr + k) % M] && req_dest[(ptr + k) % M] == DW'(d)) winner = (ptr + k) % M;
        if (winner >= 0) begin
          any = 1;
          chk(grant[winner] && enc_en[winner] && !enc_fill[winner] && enc_code[winner] == DW'(d),
              $sformatf("dest %0d: port %0d should win", d, winner));
          for (int p = 0; p < M; p++)
            if (p != winner && req_valid[p] && req_dest[p] == DW'(d)) begin
              n_conflict++;
              chk(!grant[p], $sformatf("dest %0d: port %0d granted too", d, p));
            end
        end
        chk(dest_valid[d] == (winner >= 0), $sformatf("dest_valid[%0d]", d));
        // every code at most once; Walsh codes exactly once
        owners = 0;
        for (int p = 0; p < M; p++) if (enc_en[p] && enc_code[p] == DW'(d)) owners++;
        if (d < N - 1) chk(owners == 1, $sformatf("Walsh code %0d has %0d owners", d, owners));
        else           chk(owners == (winner >= 0 ? 1 : 0), $sformatf("code %0d has %0d owners", d, owners));
      end
      for (int p = 0; p < M; p++) begin
        if (grant[p]) chk(req_valid[p], $sformatf("port %0d granted without request", p));
        if (enc_en[p] && !grant[p]) begin
          n_fill++;
          chk(enc_fill[p] && enc_code[p] < DW'(N - 1), $sformatf("port %0d bad filler", p));
        end
      end
      chk(any_grant == any, "any_grant");
    end
    chk(n_conflict > 0 && n_fill > 0, "conflicts and fillers exercised");
    $display("conflicts=%0d fillers=%0d", n_conflict, n_fill);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
