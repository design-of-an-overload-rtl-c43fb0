// tb_oci_p_orth_decoder: drives the seven Walsh-code up/down accumulator decoders of the parallel
// crossbar (N = 8, codes 0..6) with all eight chip sums at once, built
// by the reference model from random data on all 14 codes, one transaction
// per cycle with random idle cycles. Checks each bit and the one-cycle latency.
module tb_oci_p_orth_decoder;
  import tb_oci_ref_pkg::*;
  localparam int N = 8, M = 14, SW = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          in_valid;
  logic [SW-1:0] sums [N];
  logic          ov [7];
  logic          ob [7];

  for (genvar j = 0; j < 7; j++) begin : g_dut
    oci_p_orth_decoder #(.N(N), .SW(SW), .CODE(0 + j)) u_dut (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .sums(sums),
      .out_valid(ov[j]), .out_bit(ob[j]));
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit d [M];
  bit exp_bits [7];
  bit expect_out = 0;

  always @(posedge clk) if (rst_n) begin
    #1;
    for (int j = 0; j < 7; j++) begin
      checks++;
      if (ov[j] !== expect_out) begin
        failures++;
        $display("FAIL code %0d: out_valid=%0b expected %0b", 0 + j, ov[j], expect_out);
      end else if (expect_out) begin
        checks++;
        if (ob[j] !== exp_bits[j]) begin
          failures++;
          $display("FAIL code %0d: bit %0b expected %0b", 0 + j, ob[j], exp_bits[j]);
        end
      end
    end
  end

  initial begin
    int s;
    bit v;
    in_valid = 0;
    for (int i = 0; i < N; i++) sums[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      v = ($urandom_range(0, 3) != 0);
      for (int c = 0; c < M; c++) d[c] = 1'($urandom);
      for (int i = 0; i < N; i++) begin
        s = 0;
        for (int c = 0; c < M; c++) s += ref_spread(N, c, d[c], i);
        sums[i] = SW'(s);
      end
      in_valid = v;
      expect_out = v;
      for (int j = 0; j < 7; j++) exp_bits[j] = d[0 + j];
      @(negedge clk);
    end
    in_valid = 0;
    expect_out = 0;
    repeat (2) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
