// rafec_system: reconfigurable adaptive FEC receiver.
//
// A wireless link protects every 255-byte packet with an RS(255, 255-2t)
// code whose t (1..4) follows the channel. Decoders built for a small t are
// much smaller, so a fixed area holds more of them: 14 decoders for t = 1, 6
// for t = 2, 4 for t = 3, 3 for t = 4. The receiver is reconfigured to the
// array of decoders for the t in use, raising decoding throughput and so
// emptying the received buffer faster while the ARQ protocol waits for
// retransmissions, which lowers the number of dropped packets.
//
// Data path: channel bytes -> received_buffer (6000 packets) ->
// packet_sequencer -> the active decoder bank (rs_decoder lanes) -> the
// application ports. Control: decoder receiving/error signals drive the
// control_packet_gen (ACK/NAK) and the per_monitor, whose t requests are also
// sent as control packets; packets arriving with a new t make the sequencer
// ask the reconfig_controller for a new configuration. The FPGA reload of the
// source design is modelled by four decoder banks side by side, of which the
// controller enables one and which stay idle during the reconfiguration time.
//
// Ports: channel input in_*, one byte per cycle, header with the first byte;
// application output app_*, one byte stream per lane, with the lane's
// packet tag and ok/fail at the last byte (a failed packet will come again as
// a retransmission); feedback channel cp_*; status counters.
module rafec_system
  import rs_pkg::*;
#(
  parameter int BUF_DEPTH       = 6000,
  parameter int RECONFIG_CYCLES = 93600,
  parameter int INIT_T          = 4,
  parameter int LANES_T1        = 14,
  parameter int LANES_T2        = 6,
  parameter int LANES_T3        = 4,
  parameter int LANES_T4        = 3,
  parameter int PER_WINDOW      = 64,
  parameter int PER_HI_FAILS    = 4,
  parameter int PER_LO_FAILS    = 0
) (
  input  logic                                clk,
  input  logic                                rst_n,
  // forward channel
  input  logic                                in_valid,
  input  logic                                in_sop,
  input  gf_t                                 in_sym,
  input  pkt_hdr_t                            in_hdr,
  // application
  output logic [13:0]                         app_valid,
  output logic [13:0]                         app_sop,
  output logic [13:0]                         app_eop,
  output gf_t  [13:0]                         app_sym,
  output logic [13:0][TAG_W-1:0]              app_tag,
  output logic [13:0]                         app_ok,
  output logic [13:0]                         app_fail,
  // feedback channel
  output logic                                cp_valid,
  output logic                                cp_sop,
  output logic                                cp_eop,
  output logic [7:0]                          cp_byte,
  // status
  output logic [2:0]                          cur_t,
  output logic                                cfg_ready,
  output logic [2:0]                          req_t,
  output logic [$clog2(BUF_DEPTH+1)-1:0]      buf_count,
  output logic                                buf_full,
  output logic [31:0]                         drop_cnt,
  output logic [31:0]                         arrive_cnt,
  output logic                                hold,
  output logic [31:0]                         reconf_cnt,
  output logic [31:0]                         ack_cnt,
  output logic [31:0]                         nak_cnt,
  output logic [31:0]                         chg_cnt,
  output logic [31:0]                         gap_cnt
);

  localparam int P_MAX = 14;

  // ------------------------------------------------------------- buffer
  logic           head_valid, pop, retx_valid, retx_take, drop;
  logic [8*RS_N-1:0] head_pkt, retx_pkt;
  pkt_hdr_t       head_hdr, retx_hdr;

  received_buffer #(.DEPTH(BUF_DEPTH), .N(RS_N)) u_buffer (
    .clk, .rst_n,
    .in_valid, .in_sop, .in_sym, .in_hdr,
    .head_valid, .head_pkt, .head_hdr, .pop,
    .retx_valid, .retx_pkt, .retx_hdr, .retx_take,
    .count (buf_count), .full (buf_full), .drop, .drop_cnt, .arrive_cnt
  );

  // ------------------------------------------------------ configuration
  logic       reconf_req;
  logic [2:0] reconf_t;
  logic [4:0] lanes;

  reconfig_controller #(
    .RECONFIG_CYCLES (RECONFIG_CYCLES), .INIT_T (INIT_T),
    .LANES_T1 (LANES_T1), .LANES_T2 (LANES_T2), .LANES_T3 (LANES_T3), .LANES_T4 (LANES_T4)
  ) u_reconfig (
    .clk, .rst_n,
    .req (reconf_req), .req_t (reconf_t),
    .cur_t, .cfg_ready, .lanes, .reconf_cnt
  );

  // ---------------------------------------------------------- sequencer
  logic [P_MAX-1:0]            lane_ready, lane_busy, lane_valid;
  gf_t  [P_MAX-1:0]            lane_sym;
  logic [P_MAX-1:0][TAG_W-1:0] lane_tag;
  logic [7:0]                  outstanding;
  logic [31:0]                 dispatch_cnt;

  packet_sequencer #(.P_MAX(P_MAX), .N(RS_N)) u_sequencer (
    .clk, .rst_n,
    .head_valid, .head_pkt, .head_hdr, .pop,
    .retx_valid, .retx_pkt, .retx_hdr, .retx_take,
    .cur_t, .cfg_ready, .lanes, .reconf_req, .reconf_t,
    .lane_ready, .lane_busy, .lane_valid, .lane_sym, .lane_tag,
    .res_ok (app_ok), .res_fail (app_fail), .res_tag (app_tag),
    .hold, .outstanding, .gap_cnt, .dispatch_cnt
  );

  // ------------------------------------------------------ decoder banks
  logic [4:1][P_MAX-1:0]            b_ready, b_busy, b_valid, b_sop, b_eop, b_ok, b_fail;
  gf_t  [4:1][P_MAX-1:0]            b_sym;
  logic [4:1][P_MAX-1:0][TAG_W-1:0] b_tag;

  for (genvar t = 1; t <= 4; t++) begin : g_bank
    localparam int P = (t == 1) ? LANES_T1 : (t == 2) ? LANES_T2 : (t == 3) ? LANES_T3 : LANES_T4;
    for (genvar l = 0; l < P_MAX; l++) begin : g_lane
      if (l < P) begin : g_dec
        rs_decoder #(.T(t), .TAG_W(TAG_W)) u_dec (
          .clk, .rst_n,
          .in_valid  (lane_valid[l] && cur_t == 3'(t) && cfg_ready),
          .in_sym    (lane_sym[l]),
          .in_tag    (lane_tag[l]),
          .in_ready  (b_ready[t][l]),
          .out_valid (b_valid[t][l]),
          .out_sop   (b_sop[t][l]),
          .out_eop   (b_eop[t][l]),
          .out_sym   (b_sym[t][l]),
          .out_tag   (b_tag[t][l]),
          .out_ok    (b_ok[t][l]),
          .out_fail  (b_fail[t][l]),
          .busy      (b_busy[t][l])
        );
      end else begin : g_none
        assign b_ready[t][l] = 1'b0;
        assign b_busy[t][l]  = 1'b0;
        assign b_valid[t][l] = 1'b0;
        assign b_sop[t][l]   = 1'b0;
        assign b_eop[t][l]   = 1'b0;
        assign b_sym[t][l]   = '0;
        assign b_tag[t][l]   = '0;
        assign b_ok[t][l]    = 1'b0;
        assign b_fail[t][l]  = 1'b0;
      end
    end
  end

  // only the bank of the current configuration is connected
  logic [2:0] bank;
  assign bank = (cur_t >= 3'd1 && cur_t <= 3'd4) ? cur_t : 3'd4;

  always_comb begin
    lane_ready = cfg_ready ? b_ready[bank] : '0;
    lane_busy  = b_busy[bank];
    app_valid  = b_valid[bank];
    app_sop    = b_sop[bank];
    app_eop    = b_eop[bank];
    app_sym    = b_sym[bank];
    app_tag    = b_tag[bank];
    app_ok     = b_ok[bank];
    app_fail   = b_fail[bank];
  end

  // ------------------------------------------------ control packets, PER
  logic chg_req;

  per_monitor #(
    .P_MAX (P_MAX), .WINDOW (PER_WINDOW), .HI_FAILS (PER_HI_FAILS),
    .LO_FAILS (PER_LO_FAILS), .INIT_T (INIT_T)
  ) u_per (
    .clk, .rst_n,
    .ev_ok (app_ok), .ev_fail (app_fail),
    .chg_req, .req_t
  );

  logic cp_overflow;
  control_packet_gen #(.P_MAX(P_MAX)) u_cpg (
    .clk, .rst_n,
    .ev_ok (app_ok), .ev_fail (app_fail), .ev_tag (app_tag),
    .chg_req, .chg_t (req_t), .cur_t,
    .cp_valid, .cp_sop, .cp_eop, .cp_byte,
    .ack_cnt, .nak_cnt, .chg_cnt, .overflow (cp_overflow)
  );

  a_no_cp_overflow: assert property (@(posedge clk) disable iff (!rst_n) !cp_overflow);

endmodule
