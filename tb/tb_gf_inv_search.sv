// tb_gf_inv_search: random divisions q = b / a, plus a = 0 and a = 1. The
// quotient must match the reference and `found` must come exactly j cycles
// after start, where alpha^j = 1/a (the LFSR visits alpha^0, alpha^1, ...).
module tb_gf_inv_search;
  import rs_pkg::*;
  import rs_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, busy, found, div_zero;
  gf_t a, b, q_now, q;
  int checks = 0, failures = 0;

  gf_inv_search dut (.*);

  task automatic run(gf_t av, gf_t bv);
    int n, j;
    @(negedge clk);
    a = av; b = bv; start = 1;
    n = 0;
    if (av == 0) begin
      @(negedge clk); start = 0;
      checks++; if (!div_zero || busy) failures++;
      return;
    end
    #1;
    while (!found) begin
      @(negedge clk); start = 0; a = $urandom; b = $urandom; n++;
      #1;
      if (n > 300) break;
    end
    j = (255 - tlog(av)) % 255;
    checks++;
    if (n != j) begin failures++; $display("a=%h: found after %0d cycles, expected %0d", av, n, j); end
    @(negedge clk);
    checks++;
    if (q != tmul(bv, tinv(av)) || div_zero) begin failures++; $display("a=%h b=%h q=%h", av, bv, q); end
  endtask

  initial begin
    start = 0; a = 0; b = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    run(8'h00, 8'h12);
    run(8'h01, 8'h5A);
    run(8'h02, 8'h01);
    for (int k = 0; k < 60; k++) run(gf_t'($urandom_range(1, 255)), gf_t'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
