// tb_reconfig_controller: a request for another t must drop cfg_ready for
// exactly RECONFIG_CYCLES cycles and then switch cur_t and the lane count
// (14/6/4/3); requests for the current t or while busy are ignored.
module tb_reconfig_controller;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic req, cfg_ready;
  logic [2:0] req_t, cur_t;
  logic [4:0] lanes;
  logic [31:0] reconf_cnt;
  int checks = 0, failures = 0;
  localparam int RC = 50;

  reconfig_controller #(.RECONFIG_CYCLES(RC), .INIT_T(4)) dut (.*);

  task automatic chk(string what, bit cond);
    checks++;
    if (!cond) begin failures++; $display("failed: %s", what); end
  endtask

  task automatic ask(int t, int expect_cycles);
    int n;
    @(negedge clk); req = 1; req_t = 3'(t);
    @(negedge clk); req = 0;
    n = 0;
    while (!cfg_ready) begin
      if (n == 3) begin req = 1; req_t = 3'd1; end   // ignored while busy
      @(negedge clk); req = 0; n++;
    end
    chk($sformatf("t=%0d busy %0d cycles", t, n), n == expect_cycles);
  endtask

  initial begin
    req = 0; req_t = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    chk("initial t=4, 3 lanes", cur_t == 4 && lanes == 3 && cfg_ready);
    ask(4, 0);
    chk("same t ignored", reconf_cnt == 0);
    ask(2, RC);
    chk("now t=2, 6 lanes", cur_t == 2 && lanes == 6);
    ask(1, RC);
    chk("now t=1, 14 lanes", cur_t == 1 && lanes == 14);
    ask(3, RC);
    chk("now t=3, 4 lanes", cur_t == 3 && lanes == 4 && reconf_cnt == 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
