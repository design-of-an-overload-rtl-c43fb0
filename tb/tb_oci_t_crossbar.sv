// tb_oci_t_crossbar: runs the serial (T-OCI) crossbar, reference and pipelined,
// through tb_oci_xbar_env at the default code length N = 8 (14 ports) and at
// N = 4 (6 ports) and N = 16 (30 ports), to show that the code construction
// and the decoders hold for other power-of-two code lengths.
module tb_oci_t_crossbar;
  logic done [3];
  int   checks [3], failures [3];

  tb_oci_xbar_env #(.N(8),  .PARALLEL(0)) u_n8  (.done(done[0]), .checks(checks[0]), .failures(failures[0]));
  tb_oci_xbar_env #(.N(4),  .PARALLEL(0)) u_n4  (.done(done[1]), .checks(checks[1]), .failures(failures[1]));
  tb_oci_xbar_env #(.N(16), .PARALLEL(0)) u_n16 (.done(done[2]), .checks(checks[2]), .failures(failures[2]));

  initial begin
    #100000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1] + checks[2],
             failures[0] + failures[1] + failures[2] + 1);
    $finish;
  end

  initial begin
    wait (done[0] && done[1] && done[2]);
    #1;
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1] + checks[2],
             failures[0] + failures[1] + failures[2]);
    $finish;
  end
endmodule
