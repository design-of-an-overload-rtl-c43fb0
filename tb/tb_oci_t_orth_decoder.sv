// tb_oci_t_orth_decoder: drives the seven Walsh-code up/down accumulator decoders of the serial
// crossbar (N = 8, codes 0..6) with channel sums built by the reference
// model from random data on all 14 codes. Checks every decoded bit, that
// out_valid comes exactly one cycle after chip N-1, and that transactions
// run back to back or with idle gaps.
module tb_oci_t_orth_decoder;
  import tb_oci_ref_pkg::*;
  localparam int N = 8, M = 14, SW = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          in_valid;
  logic [2:0]    chip_idx;
  logic [SW-1:0] sum;
  logic          ov [7];
  logic          ob [7];

  for (genvar j = 0; j < 7; j++) begin : g_dut
    oci_t_orth_decoder #(.N(N), .SW(SW), .CODE(0 + j)) u_dut (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .chip_idx(chip_idx), .sum(sum),
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

  // output checker: valid exactly when expected
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
    in_valid = 0; chip_idx = 0; sum = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      for (int c = 0; c < M; c++) d[c] = 1'($urandom);
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        s = 0;
        for (int c = 0; c < M; c++) s += ref_spread(N, c, d[c], i);
        in_valid = 1; chip_idx = 3'(i); sum = SW'(s);
        expect_out = (i == N - 1);
        if (i == N - 1) for (int j = 0; j < 7; j++) exp_bits[j] = d[0 + j];
      end
      // one transaction in three is followed by an idle cycle
      if (t % 3 == 0) begin
        @(negedge clk);
        in_valid = 0; chip_idx = 3'($urandom); sum = SW'($urandom);
        expect_out = 0;
      end
    end
    @(negedge clk);
    in_valid = 0;
    expect_out = 0;
    repeat (2) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
