// tb_rs_chien: Chien search at t = 4. The locator of 0..4 known error
// positions (built by the reference) must give exactly those positions, in
// descending order, with X = alpha^p, `done` 255 cycles after start, and no
// failure; a locator with a wrong nu must be flagged.
module tb_rs_chien;
  import rs_pkg::*;
  import rs_tb_pkg::*;
  localparam int T = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, busy, done, fail;
  gf_t [T-1:0] lambda, loc_x;
  logic [2:0] nu, cnt;
  logic [T-1:0][7:0] loc_pos;
  int checks = 0, failures = 0;

  rs_chien #(.T(T)) dut (.*);

  initial begin
    int ne, pos [8], srt [8], n, tmp;
    sym_t val [8], lam [9], x;
    cw_t r;
    start = 0; lambda = '0; nu = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int k = 0; k < 40; k++) begin
      ne = k % 5;
      for (int i = 0; i < 255; i++) r[i] = 0;
      inject(ne, r, pos, val);
      for (int i = 0; i < 9; i++) lam[i] = 0;
      lam[0] = 1;
      for (int e = 0; e < ne; e++) begin
        x = talpha(pos[e]);
        for (int i = 8; i > 0; i--) lam[i] = lam[i] ^ tmul(lam[i-1], x);
      end
      for (int i = 0; i < T; i++) lambda[i] = lam[i+1];
      nu = (k == 39) ? 3'(ne + 1) : 3'(ne);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0; lambda = '0; nu = 0;
      n = 1;
      while (!done) begin @(negedge clk); n++; end
      checks++;
      if (n != 255) begin failures++; $display("done after %0d", n); end
      for (int e = 0; e < ne; e++) srt[e] = pos[e];
      for (int a = 0; a < ne; a++) for (int b = a + 1; b < ne; b++)
        if (srt[b] > srt[a]) begin tmp = srt[a]; srt[a] = srt[b]; srt[b] = tmp; end
      checks++;
      if (k == 39) begin
        if (!fail) begin failures++; $display("wrong nu not flagged"); end
      end else if (fail || cnt != 3'(ne)) begin failures++; $display("k=%0d cnt=%0d fail=%b", k, cnt, fail); end
      for (int e = 0; e < ne; e++) begin
        checks++;
        if (loc_pos[e] != 8'(srt[e]) || loc_x[e] != talpha(srt[e])) begin
          failures++; $display("k=%0d loc %0d: %0d", k, e, loc_pos[e]);
        end
      end
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
