// tb_oci_tx_fifo: random writes and pops against a queue model; checks the
// head flit, rd_valid, wr_ready when full (and full with a pop), and order.
module tb_oci_tx_fifo;
  localparam int W = 12, D = 4;
  int checks = 0, failures = 0, n_full = 0, n_full_pop = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic wr_valid, wr_ready, rd_valid, rd_pop;
  logic [W-1:0] wr_data, rd_data;
  logic [W-1:0] q [$];

  oci_tx_fifo #(.WIDTH(W), .DEPTH(D)) u_dut (
    .clk(clk), .rst_n(rst_n), .wr_valid(wr_valid), .wr_ready(wr_ready), .wr_data(wr_data),
    .rd_valid(rd_valid), .rd_data(rd_data), .rd_pop(rd_pop));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_valid = 0; rd_pop = 0; wr_data = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      wr_valid = ($urandom_range(0, 99) < ((t / 500) % 2 ? 70 : 35));
      wr_data  = W'($urandom);
      rd_pop   = rd_valid && (q.size() > 0) && ($urandom_range(0, 99) < 50);
      #1;
      checks += 2;
      if (rd_valid != (q.size() > 0)) begin failures++; $display("FAIL rd_valid"); end
      if (wr_ready != (q.size() < D || rd_pop)) begin failures++; $display("FAIL wr_ready"); end
      if (q.size() == D) begin n_full++; if (rd_pop) n_full_pop++; end
      if (q.size() > 0) begin
        checks++;
        if (rd_data != q[0]) begin failures++; $display("FAIL head %h expected %h", rd_data, q[0]); end
      end
      @(posedge clk);
      if (rd_pop) void'(q.pop_front());
      if (wr_valid && wr_ready) q.push_back(wr_data);
    end
    checks++;
    if (n_full == 0 || n_full_pop == 0) failures++;
    $display("full=%0d full_with_pop=%0d", n_full, n_full_pop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
