// tb_oci_hybrid_encoder: exhaustive check of the hybrid encoder: XOR for an
// orthogonal code, AND for an overloading code, '0' when disabled.
module tb_oci_hybrid_encoder;
  import oci_pkg::*;
  int checks = 0, failures = 0;
  logic en, data, chip, spread;
  code_type_e ct;

  oci_hybrid_encoder u_dut (.en(en), .code_type(ct), .data(data), .chip(chip), .spread(spread));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    for (int v = 0; v < 16; v++) begin
      en = v[0]; ct = code_type_e'(v[1]); data = v[2]; chip = v[3];
      #1;
      if (!en) exp = 1'b0;
      else if (ct == CODE_ORTH) exp = (data != chip);
      else exp = data && chip;
      checks++;
      if (spread !== exp) begin
        failures++;
        $display("FAIL en=%0b type=%0d d=%0b c=%0b -> %0b", en, ct, data, chip, spread);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
