// tb_rs_syndrome: codewords with 0..5 random errors streamed back to back
// into the t = 4 syndrome unit; its 8 syndromes must equal r(alpha^i)
// evaluated directly by the reference, and `done` must come with the 255th
// symbol.
module tb_rs_syndrome;
  import rs_pkg::*;
  import rs_tb_pkg::*;
  localparam int T = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_first, done;
  gf_t in_sym;
  gf_t [2*T-1:0] synd;
  int checks = 0, failures = 0;

  rs_syndrome #(.T(T)) dut (.*);

  initial begin
    cw_t cw;
    int pos [8];
    sym_t val [8];
    in_valid = 0; in_first = 0; in_sym = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int k = 0; k < 30; k++) begin
      random_codeword(T, cw);
      inject(k % 6, cw, pos, val);
      for (int i = 0; i < 255; i++) begin
        @(negedge clk);
        in_valid = 1; in_first = (i == 0); in_sym = cw[i];
      end
      @(negedge clk);
      in_valid = 0; in_first = 0;
      checks++;
      if (!done) begin failures++; $display("no done"); end
      for (int i = 0; i < 2*T; i++) begin
        checks++;
        if (synd[i] != syndrome(cw, i)) begin failures++; $display("pkt %0d s%0d %h", k, i, synd[i]); end
      end
      if (k % 2) repeat (3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
