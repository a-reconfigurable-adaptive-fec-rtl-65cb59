// tb_rs_matrix_solver: the shared stage 2/4 solver at t = 4.
//
// For random error patterns of 0..4 errors the syndromes are computed by the
// reference. Peterson mode must return nu and the locator coefficients
// lambda(k-1) = L(k) of prod(1 + X_l x); magnitude mode, given the locators
// X_l, must return the error values. Patterns of 5 errors must not be
// reported as solvable with a locator whose roots are all valid, and zero
// syndromes must give nu = 0. The two jobs together must take fewer than 255
// cycles.
module tb_rs_matrix_solver;
  import rs_pkg::*;
  import rs_tb_pkg::*;
  localparam int T = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, mode, busy, done, fail;
  gf_t [2*T-1:0] synd;
  logic [2:0] nu_in, nu_out;
  gf_t [T-1:0] loc_x, sol;
  logic [8:0] cycles;
  int checks = 0, failures = 0, worst = 0;

  rs_matrix_solver #(.T(T)) dut (.*);

  task automatic job(bit m);
    @(negedge clk);
    mode = m; start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
  endtask

  initial begin
    int ne, pos [8], tot;
    sym_t val [8], lam [9], x;
    cw_t r;
    start = 0; mode = 0; synd = '0; nu_in = 0; loc_x = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int k = 0; k < 200; k++) begin
      ne = (k < 190) ? k % 5 : 5;
      for (int i = 0; i < 255; i++) r[i] = 0;
      inject(ne, r, pos, val);
      for (int i = 0; i < 2*T; i++) synd[i] = syndrome(r, i);
      job(0);
      tot = cycles;
      // reference locator prod (1 + X_l x)
      for (int i = 0; i < 9; i++) lam[i] = 0;
      lam[0] = 1;
      for (int e = 0; e < ne; e++) begin
        x = talpha(pos[e]);
        for (int i = 8; i > 0; i--) lam[i] = lam[i] ^ tmul(lam[i-1], x);
      end
      if (ne <= T) begin
        checks++;
        if (fail || nu_out != 3'(ne)) begin failures++; $display("k=%0d ne=%0d: nu=%0d fail=%b", k, ne, nu_out, fail); end
        for (int i = 0; i < T; i++) begin
          checks++;
          if (sol[i] != ((i < ne) ? lam[i+1] : 8'h00)) begin failures++; $display("k=%0d lambda%0d", k, i); end
        end
        // magnitudes
        nu_in = 3'(ne);
        for (int e = 0; e < T; e++) loc_x[e] = (e < ne) ? talpha(pos[e]) : 8'h00;
        job(1);
        tot += cycles;
        checks++;
        if (fail) begin failures++; $display("k=%0d magnitude fail", k); end
        for (int e = 0; e < ne; e++) begin
          checks++;
          if (sol[e] != val[e]) begin failures++; $display("k=%0d e%0d %h != %h", k, e, sol[e], val[e]); end
        end
        if (tot > worst) worst = tot;
        checks++;
        if (tot >= 255) begin failures++; $display("k=%0d: %0d cycles", k, tot); end
      end
    end
    $display("worst stage 2 + stage 4 cycles: %0d", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
