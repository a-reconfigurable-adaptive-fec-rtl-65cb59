// tb_rs_corrector: streams codewords through the correction stage with up to
// 4 error positions and values; output symbol i must be the RAM symbol XOR
// the error value of position 254-i, sop/eop/ok/fail in the right cycles,
// and no correction when the codeword is marked failed.
module tb_rs_corrector;
  import rs_pkg::*;
  localparam int T = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic active, fail, out_valid, out_sop, out_eop, out_ok, out_fail;
  logic [7:0] idx;
  logic [2:0] err_cnt;
  logic [T-1:0][7:0] err_pos;
  gf_t [T-1:0] err_val;
  logic [16:0] tag, out_tag;
  gf_t rd_data, out_sym;
  int checks = 0, failures = 0;

  rs_corrector #(.T(T), .TAG_W(17)) dut (.*);

  initial begin
    gf_t data [255], expv [255];
    active = 0; fail = 0; idx = 0; err_cnt = 0; err_pos = '0; err_val = '0; tag = 0; rd_data = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int k = 0; k < 10; k++) begin
      err_cnt = 3'(k % 5);
      fail = (k == 7);
      tag = 17'(k);
      for (int e = 0; e < T; e++) begin
        err_pos[e] = 8'(e * 60 + k);
        err_val[e] = gf_t'($urandom_range(1, 255));
      end
      for (int i = 0; i < 255; i++) begin
        data[i] = gf_t'($urandom);
        expv[i] = data[i];
        for (int e = 0; e < T; e++)
          if (e < k % 5 && !fail && err_pos[e] == 8'(254 - i)) expv[i] ^= err_val[e];
      end
      for (int i = 0; i <= 255; i++) begin
        @(negedge clk);
        if (i > 0) begin
          rd_data = data[i-1];
          #1;
          checks++;
          if (!out_valid || out_sym != expv[i-1] || out_sop != (i == 1) || out_eop != (i == 255) ||
              out_tag != 17'(k)) begin
            failures++; $display("k=%0d i=%0d sym %h exp %h", k, i-1, out_sym, expv[i-1]);
          end
          if (i == 255) begin
            checks++;
            if (out_ok != !fail || out_fail != fail) begin failures++; $display("k=%0d flags", k); end
          end
        end
        active = (i < 255); idx = 8'(i);
      end
      active = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
