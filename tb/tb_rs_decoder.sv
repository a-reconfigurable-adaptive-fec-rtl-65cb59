// tb_rs_decoder: end-to-end test of the pipelined RS decoder for t = 1..4.
//
// One decoder of each t receives codewords back to back (a new one every 255
// cycles). Each codeword is random, encoded by the reference encoder, and
// given 0..t errors, or t+1..t+3 errors for some to exercise the failure path.
// The output must equal the transmitted codeword with out_ok whenever there
// were at most t errors; with more errors out_ok or out_fail must come and
// out_ok may only come with a codeword that is a valid one. The latency from
// first input symbol to first output symbol must be 4*255+1 cycles.
module tb_rs_decoder;
  import rs_tb_pkg::*;

  localparam int NPKT = 40;
  localparam int TW   = 17;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [3:0]         in_valid, in_ready, out_valid, out_sop, out_eop, out_ok, out_fail, busy;
  logic [3:0][7:0]    in_sym, out_sym;
  logic [3:0][TW-1:0] in_tag, out_tag;

  for (genvar g = 0; g < 4; g++) begin : g_dut
    rs_decoder #(.T(g + 1), .TAG_W(TW)) dut (
      .clk, .rst_n,
      .in_valid (in_valid[g]), .in_sym (in_sym[g]), .in_tag (in_tag[g]), .in_ready (in_ready[g]),
      .out_valid(out_valid[g]), .out_sop(out_sop[g]), .out_eop(out_eop[g]), .out_sym(out_sym[g]),
      .out_tag(out_tag[g]), .out_ok(out_ok[g]), .out_fail(out_fail[g]), .busy(busy[g])
    );
  end

  // reference data per t
  cw_t    sent   [4][NPKT];
  int     nerr   [4][NPKT];
  longint t_in   [4][NPKT];
  int     n_out  [4];
  int     n_fail [4];

  task automatic drive(int g);
    cw_t cw, rx;
    int pos [8];
    sym_t val [8];
    int t;
    t = g + 1;
    for (int k = 0; k < NPKT; k++) begin
      random_codeword(t, cw);
      sent[g][k] = cw;
      rx = cw;
      if (k % 5 == 4) nerr[g][k] = t + 1 + (k % 3);
      else nerr[g][k] = k % (t + 1);
      inject(nerr[g][k], rx, pos, val);
      while (!in_ready[g]) @(negedge clk);
      for (int i = 0; i < 255; i++) begin
        in_valid[g] = 1'b1;
        in_sym[g]   = rx[i];
        in_tag[g]   = TW'(k);
        if (i == 0) t_in[g][k] = cyc;
        @(negedge clk);
      end
      in_valid[g] = 1'b0;
    end
  endtask

  task automatic collect(int g);
    cw_t got;
    int k, i, mism;
    longint t0;
    bit valid_cw;
    cw_t chk;
    for (int n = 0; n < NPKT; n++) begin
      @(posedge clk iff (out_valid[g] && out_sop[g]));
      t0 = cyc;
      k = int'(out_tag[g]);
      i = 0;
      forever begin
        got[i] = out_sym[g];
        i++;
        if (out_eop[g]) break;
        @(posedge clk);
      end
      checks++;
      if (i != 255) begin failures++; $display("t=%0d pkt %0d: %0d symbols", g+1, k, i); end
      checks++;
      if (t0 - t_in[g][k] != 4*255 + 1) begin
        failures++; $display("t=%0d pkt %0d: latency %0d", g+1, k, t0 - t_in[g][k]);
      end
      mism = 0;
      for (int q = 0; q < 255; q++) if (got[q] != sent[g][k][q]) mism++;
      checks++;
      if (nerr[g][k] <= g + 1) begin
        if (!out_ok[g] || out_fail[g] || mism != 0) begin
          failures++;
          $display("t=%0d pkt %0d errors %0d: ok=%b fail=%b mismatches=%0d", g+1, k, nerr[g][k], out_ok[g], out_fail[g], mism);
        end
      end else begin
        // beyond t: must flag failure, or deliver a valid codeword
        chk = got;
        valid_cw = 1;
        for (int s = 0; s < 2*(g+1); s++) if (syndrome(chk, s) != 0) valid_cw = 0;
        if (out_fail[g]) n_fail[g]++;
        if (!(out_fail[g] || (out_ok[g] && valid_cw))) begin
          failures++;
          $display("t=%0d pkt %0d errors %0d: ok=%b fail=%b valid=%b", g+1, k, nerr[g][k], out_ok[g], out_fail[g], valid_cw);
        end
      end
      n_out[g]++;
    end
  endtask

  initial begin
    in_valid = '0; in_sym = '0; in_tag = '0;
    n_out = '{default: 0};
    n_fail = '{default: 0};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    fork
      drive(0); drive(1); drive(2); drive(3);
      collect(0); collect(1); collect(2); collect(3);
    join
    // for t = 1 every two-syndrome pattern with both non-zero decodes to some
    // codeword, so the failure path is only required for t >= 2
    for (int g = 1; g < 4; g++) begin
      checks++;
      if (n_fail[g] == 0) begin failures++; $display("t=%0d: failure path never taken", g+1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NPKT * 255 + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
