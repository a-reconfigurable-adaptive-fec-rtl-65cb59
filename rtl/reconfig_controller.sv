// reconfig_controller: switches the receiver between its four decoder
// configurations.
//
// In the source design an FPGA is reloaded from a configuration memory with
// the decoder array built for the new t (14, 6, 4 or 3 parallel decoders for
// t = 1..4); reloading takes 9.36 ms, during which decoding is suspended. This
// RTL keeps all four decoder banks and lets this controller enable one: on a
// request for a different t it drops `cfg_ready` for RECONFIG_CYCLES cycles
// (9.36 ms at the 10 MHz decoder clock = 93,600 cycles), then makes the new t
// current. The requester must only ask when the decoders are empty.
//
// Interface: `req` with `req_t` (1..4) for one cycle while `cfg_ready`;
// requests for the current t or out of range are ignored. `lanes` is the
// number of parallel decoders of the current configuration.
module reconfig_controller
  import rs_pkg::*;
#(
  parameter int RECONFIG_CYCLES = 93600,
  parameter int INIT_T          = 4,
  parameter int LANES_T1        = 14,
  parameter int LANES_T2        = 6,
  parameter int LANES_T3        = 4,
  parameter int LANES_T4        = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req,
  input  logic [2:0]  req_t,
  output logic [2:0]  cur_t,
  output logic        cfg_ready,
  output logic [4:0]  lanes,
  output logic [31:0] reconf_cnt
);

  localparam int CW = $clog2(RECONFIG_CYCLES + 1);

  logic [CW-1:0] timer;
  logic [2:0]    target;

  always_comb begin
    unique case (cur_t)
      3'd1:    lanes = 5'(LANES_T1);
      3'd2:    lanes = 5'(LANES_T2);
      3'd3:    lanes = 5'(LANES_T3);
      default: lanes = 5'(LANES_T4);
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_t      <= 3'(INIT_T);
      cfg_ready  <= 1'b1;
      timer      <= '0;
      target     <= 3'(INIT_T);
      reconf_cnt <= '0;
    end else if (!cfg_ready) begin
      if (timer == CW'(1)) begin
        cur_t      <= target;
        cfg_ready  <= 1'b1;
        reconf_cnt <= reconf_cnt + 32'd1;
      end
      timer <= timer - 1'b1;
    end else if (req && req_t >= 3'd1 && req_t <= 3'd4 && req_t != cur_t) begin
      cfg_ready <= 1'b0;
      timer     <= CW'(RECONFIG_CYCLES);
      target    <= req_t;
    end
  end

endmodule
