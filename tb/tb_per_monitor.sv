// tb_per_monitor: windows of 16 decoded packets. A window with at least 2
// failures must raise t by one (up to 4), a clean one lower it (down to 1),
// one with a single failure keep it. Events of several lanes in one cycle
// must all be counted.
module tb_per_monitor;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [3:0] ev_ok, ev_fail;
  logic chg_req;
  logic [2:0] req_t;
  int checks = 0, failures = 0, nchg = 0;

  per_monitor #(.P_MAX(4), .WINDOW(16), .HI_FAILS(2), .LO_FAILS(0), .INIT_T(2)) dut (.*);

  always @(posedge clk) if (rst_n && chg_req) nchg++;

  task automatic window(int fails, int exp_t);
    int n;
    n = 0;
    while (n < 16) begin
      @(negedge clk);
      ev_ok = 4'b0011; ev_fail = 4'b0000;     // two packets in one cycle
      if (n < 2 * fails) ev_fail = 4'b0100;   // a third, failing, one
      n += (n < 2 * fails) ? 3 : 2;
      if (n > 16) ev_ok = 4'b0001;
    end
    @(negedge clk); ev_ok = 0; ev_fail = 0;
    @(negedge clk);
    checks++;
    if (req_t != 3'(exp_t)) begin failures++; $display("after window with %0d fails: t=%0d expected %0d", fails, req_t, exp_t); end
  endtask

  initial begin
    int c0;
    ev_ok = 0; ev_fail = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    window(0, 1);
    window(0, 1);
    window(3, 2);
    window(1, 2);
    window(2, 3);
    window(5, 4);
    window(5, 4);
    c0 = nchg;
    checks++;
    if (c0 != 4) begin failures++; $display("%0d change requests, expected 4", c0); end
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
