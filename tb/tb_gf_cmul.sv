// tb_gf_cmul: exhaustive check of the constant multiplier.
// For the default constant alpha^225 all 256 inputs are compared with the
// reference multiplier and with the XOR equations of the alpha^225 example
// (y0 = a3^a6^a7, y1 = a4^a7, ...). A second instance (constant alpha^7) is
// checked against the reference as well.
module tb_gf_cmul;
  import rs_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] a, y, y7;

  gf_cmul dut (.a(a), .y(y));
  gf_cmul #(.C(8'h80)) dut7 (.a(a), .y(y7));

  function automatic logic [7:0] eq225(logic [7:0] b);
    logic [7:0] c;
    c[0] = b[3]^b[6]^b[7];
    c[1] = b[4]^b[7];
    c[2] = b[0]^b[3]^b[5]^b[6]^b[7];
    c[3] = b[1]^b[3]^b[4];
    c[4] = b[2]^b[3]^b[4]^b[5]^b[6]^b[7];
    c[5] = b[0]^b[3]^b[4]^b[5]^b[6]^b[7];
    c[6] = b[1]^b[4]^b[5]^b[6]^b[7];
    c[7] = b[2]^b[5]^b[6]^b[7];
    return c;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    if (apow(225) != 8'h24 || apow(7) != 8'h80) begin
      failures++;
      $display("reference constants wrong");
    end
    for (int i = 0; i < 256; i++) begin
      a = 8'(i);
      #1;
      checks += 3;
      if (y != mul(a, apow(225))) begin failures++; $display("a=%h y=%h exp=%h", a, y, mul(a, apow(225))); end
      if (y != eq225(a)) begin failures++; $display("a=%h y=%h eq=%h", a, y, eq225(a)); end
      if (y7 != mul(a, apow(7))) begin failures++; $display("a=%h y7=%h", a, y7); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
