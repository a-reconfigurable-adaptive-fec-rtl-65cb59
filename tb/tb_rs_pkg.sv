// tb_rs_pkg: checks the GF(2^8) functions of rs_pkg against the table-based
// reference: all products a*b, all inverses, powers of alpha, and the lane
// counts per t.
module tb_rs_pkg;
  import rs_pkg::*;
  import rs_tb_pkg::*;
  int checks = 0, failures = 0;
  initial begin
    for (int a = 0; a < 256; a++) begin
      for (int b = 0; b < 256; b++) begin
        checks++;
        if (gf_mul(8'(a), 8'(b)) != tmul(8'(a), 8'(b))) failures++;
      end
      checks++;
      if (gf_inv(8'(a)) != tinv(8'(a))) begin failures++; $display("inv %0d", a); end
    end
    for (int k = 0; k < 600; k++) begin
      checks++;
      if (gf_alpha_pow(k) != talpha(k)) begin failures++; $display("alpha^%0d", k); end
    end
    checks += 4;
    if (lanes_for_t(1) != 14 || lanes_for_t(2) != 6 || lanes_for_t(3) != 4 || lanes_for_t(4) != 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
